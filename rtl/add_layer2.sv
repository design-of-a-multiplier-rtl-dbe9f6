// add_layer2: controlled addition at layer 2 of the VHBCSE multiplier.
//
// Adders A1..A4 each join two neighbouring layer-1 products into the partial
// sum of one 4-bit coefficient group: A = (M_hi << 2) + M_lo.
//   AS1 = A1                                  (h[15:12], always computed)
//   AS2 = c1 ? AS1 : A2                       (h[11:8])
//   AS3 = c2 ? AS1 : c3 ? AS2 : A3            (h[7:4])
//   AS4 = c4 ? AS1 : c5 ? AS2 : c6 ? AS3 : A4 (h[3:0])
// This is the horizontal/vertical sharing of the document: a group equal to an
// earlier one reuses that group's sum instead of its own adder's. The order of
// the tests is the document's. A skipped adder has its operands held at zero
// (operand isolation), so it does not switch; that is this design's way of
// "skipping" an adder in a circuit where every adder physically exists.
// `skip` reports which of A2, A3, A4 were bypassed. Purely combinational.
module add_layer2
  import vhbcse_pkg::*;
(
  input  mux_set_t m,
  input  cs_t      c,
  output l2_set_t  as_o,
  output logic [2:0] skip   // {A4, A3, A2} skipped
);

  logic skip2, skip3, skip4;
  l2_t  a1, a2, a3, a4;

  // Adder with operand isolation: inputs forced to zero when its sum is unused
  function automatic l2_t pair_add(pp_t hi, pp_t lo, logic idle);
    l2_t h2, l2;
    h2 = idle ? '0 : (l2_t'(hi) << 2);
    l2 = idle ? '0 : l2_t'(lo);
    return h2 + l2;
  endfunction

  always_comb begin
    skip2 = c.c1;
    skip3 = c.c2 | c.c3;
    skip4 = c.c4 | c.c5 | c.c6;

    a1 = pair_add(m[7], m[6], 1'b0);
    a2 = pair_add(m[5], m[4], skip2);
    a3 = pair_add(m[3], m[2], skip3);
    a4 = pair_add(m[1], m[0], skip4);

    as_o[3] = a1;
    as_o[2] = c.c1 ? as_o[3] : a2;
    if (c.c2)      as_o[1] = as_o[3];
    else if (c.c3) as_o[1] = as_o[2];
    else           as_o[1] = a3;
    if (c.c4)      as_o[0] = as_o[3];
    else if (c.c5) as_o[0] = as_o[2];
    else if (c.c6) as_o[0] = as_o[1];
    else           as_o[0] = a4;

    skip = {skip4, skip3, skip2};
  end

endmodule
