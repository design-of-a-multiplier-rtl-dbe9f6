// coef_lut: look-up table holding the FIR coefficients h0..h(TAPS-1).
//
// A read-only table indexed by the tap number; the read is combinational, so
// it maps to LUT logic rather than a block RAM. The coefficient of the tap
// being worked on is fed straight to the multiplier's coefficient input, where
// its bit groups drive the layer-1 multiplexers and the control logic.
// Addresses at or above TAPS read as zero.
//
// Five taps (h0..h4) follow the document; it gives no coefficient values. The
// default set is an unsigned binomial low-pass [1 4 6 4 1]/16 in 0.16 fixed
// point, this design's choice; pass COEFS to use another filter.
module coef_lut
  import vhbcse_pkg::*;
#(
  parameter int unsigned TAPS = 5,
  parameter int unsigned AW   = (TAPS > 1) ? $clog2(TAPS) : 1,
  // COEFS[k] = h_k
  parameter logic [TAPS-1:0][H_W-1:0] COEFS =
    {16'h1000, 16'h4000, 16'h6000, 16'h4000, 16'h1000}
)(
  input  logic [AW-1:0] addr,
  output h_t            h
);

  always_comb begin
    h = '0;
    for (int k = 0; k < TAPS; k++) begin
      if (addr == AW'(k)) h = COEFS[k];
    end
  end

endmodule
