// cl_gen: control logic generator of the VHBCSE multiplier.
//
// Cuts the coefficient into four 4-bit groups (h[15:12], h[11:8], h[7:4],
// h[3:0]) and two 8-bit groups (h[15:8], h[7:0]) and compares them. Each match
// is a common subexpression: the partial sum of the later group equals that of
// the earlier one, so its adder can be skipped. Outputs c1..c6 steer layer 2,
// c7 steers layer 3 (see cs_t in vhbcse_pkg). The six 4-bit comparisons and
// the 8-bit one all run in parallel; the order in which the document tries
// them is applied as a priority in add_layer2. Purely combinational.
module cl_gen
  import vhbcse_pkg::*;
(
  input  h_t  h,
  output cs_t c
);

  logic [3:0] n3, n2, n1, n0;

  always_comb begin
    n3   = h[15:12];
    n2   = h[11:8];
    n1   = h[7:4];
    n0   = h[3:0];
    c.c1 = (n3 == n2);
    c.c2 = (n3 == n1);
    c.c3 = (n2 == n1);
    c.c4 = (n3 == n0);
    c.c5 = (n2 == n0);
    c.c6 = (n1 == n0);
    c.c7 = (h[15:8] == h[7:0]);
  end

endmodule
