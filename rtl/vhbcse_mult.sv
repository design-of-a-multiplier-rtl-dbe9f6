// vhbcse_mult: 16x16 unsigned multiplier built on vertical-horizontal binary
// common subexpression elimination (VHBCSE).
//
// Data flow, all combinational:
//   ppg        : 0, x, 2x, 3x (each doubled) by shift and add
//   mux_layer1 : M7..M0 pick one of them per 2-bit coefficient group
//   cl_gen     : compares the 4-bit and 8-bit coefficient groups -> c1..c7
//   add_layer2 : A1..A4 -> AS1..AS4, reusing an equal earlier group's sum
//   add_layer3 : A5, A6 -> AS5, AS6, A6 skipped when the bytes are equal
//   add_layer4 : A7, then a 1-bit right shift -> p = h*x
// `cs` reports the common subexpressions found for this coefficient and `skip`
// which adders were bypassed. The structure and the order of the comparisons
// are the document's; operands are unsigned (the document does not say how
// signs are handled). Registers around it belong to the filter (lut_fir).
module vhbcse_mult
  import vhbcse_pkg::*;
(
  input  x_t    x,
  input  h_t    h,
  output p_t    p,
  output cs_t   cs,
  output skip_t skip
);

  pp_set_t    pp;
  mux_set_t   m;
  l2_set_t    as_l2;
  l3_t        as5, as6;
  logic [2:0] skip_l2;

  ppg        u_ppg (.x(x), .pp(pp));
  cl_gen     u_cl  (.h(h), .c(cs));
  mux_layer1 u_mux (.pp(pp), .h(h), .m(m));
  add_layer2 u_l2  (.m(m), .c(cs), .as_o(as_l2), .skip(skip_l2));
  add_layer3 u_l3  (.as_i(as_l2), .c7(cs.c7), .as5(as5), .as6(as6));
  add_layer4 u_l4  (.as5(as5), .as6(as6), .p(p));

  assign skip = '{a6: cs.c7, a4: skip_l2[2], a3: skip_l2[1], a2: skip_l2[0]};

endmodule
