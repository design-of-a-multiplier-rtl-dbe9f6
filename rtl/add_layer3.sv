// add_layer3: controlled addition at layer 3 of the VHBCSE multiplier.
//
// Adders A5 and A6 join the four layer-2 sums into the sums of the two 8-bit
// coefficient groups: AS5 = (AS1 << 4) + AS2 for h[15:8] and
// AS6 = (AS3 << 4) + AS4 for h[7:0]. When c7 reports h[15:8] == h[7:0] the two
// byte sums are equal, A6 is skipped (operands held at zero) and AS5 is used
// for AS6. c7 is the document's control signal; the operand isolation is this
// design's choice. Purely combinational.
module add_layer3
  import vhbcse_pkg::*;
(
  input  l2_set_t as_i,   // [3] = AS1 .. [0] = AS4
  input  logic    c7,
  output l3_t     as5,
  output l3_t     as6
);

  l3_t a6_hi, a6_lo;

  always_comb begin
    as5   = (l3_t'(as_i[3]) << 4) + l3_t'(as_i[2]);
    a6_hi = c7 ? '0 : (l3_t'(as_i[1]) << 4);
    a6_lo = c7 ? '0 : l3_t'(as_i[0]);
    as6   = c7 ? as5 : (a6_hi + a6_lo);
  end

endmodule
