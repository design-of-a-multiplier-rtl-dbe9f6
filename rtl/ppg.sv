// ppg: partial product generator of the VHBCSE multiplier.
//
// Forms, once per multiplicand, every product a 2-bit coefficient group can
// ask for, so that the layer-1 multiplexers only have to select. Shift-and-add
// only: pp[0] = 0, pp[1] = x<<1, pp[2] = x<<2, pp[3] = (x<<1) + (x<<2), one
// adder in all. Every value is twice k*x; the extra low bit is removed by the
// right shift after the final adder (A7). Purely combinational.
//
// The document names the block and says it uses shift and add; the set
// {0, x, 2x, 3x} follows from its 2-bit groups, and the doubled scaling is this
// design's reading of the final 1-bit right shift.
module ppg
  import vhbcse_pkg::*;
(
  input  x_t      x,
  output pp_set_t pp
);

  pp_t x2, x4;

  always_comb begin
    x2    = pp_t'(x) << 1;
    x4    = pp_t'(x) << 2;
    pp[0] = '0;
    pp[1] = x2;
    pp[2] = x4;
    pp[3] = x2 + x4;
  end

endmodule
