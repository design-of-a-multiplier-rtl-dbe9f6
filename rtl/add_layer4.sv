// add_layer4: final addition at layer 4 of the VHBCSE multiplier.
//
// Adder A7 joins the two byte sums, A7 = (AS5 << 8) + AS6, and a 1-bit right
// shift of its output gives the 32-bit product h*x (every earlier value was
// carried at twice its weight, see ppg). Both the adder and the shift are the
// document's. Purely combinational.
module add_layer4
  import vhbcse_pkg::*;
(
  input  l3_t as5,
  input  l3_t as6,
  output p_t  p
);

  l4_t a7;

  always_comb begin
    a7 = (l4_t'(as5) << 8) + l4_t'(as6);
    p  = a7[L4_W-1:1];
  end

endmodule
