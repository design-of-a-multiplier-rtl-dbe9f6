// lut_fir: FIR filter y[n] = sum_k h_k * x[n-k] with the coefficients in a
// look-up table and a single VHBCSE multiplier shared by all taps.
//
// A sample accepted on in_valid/in_ready enters the input register at the head
// of a TAPS-long delay line. The tap counter then steps k = 0..TAPS-1, one per
// clock: coef_lut returns h_k, the multiplier forms h_k * x[n-k], and the
// product is stored in the product register (prod_out, with its tap number and
// the common subexpressions the multiplier found). The next clock adds it to
// the accumulator; after the last tap the sum is presented on y_out with a
// one-cycle y_valid pulse.
//
// Timing: in_ready is high while idle and in the cycle of the last tap, so with
// in_valid held high one sample is taken every TAPS clocks. A sample taken at
// clock edge t has its products at edges t+1..t+TAPS and its y_valid pulse
// after edge t+TAPS+1. y_out is full precision (32 + clog2(TAPS) bits),
// unsigned. rst is synchronous and active high and clears the delay line.
//
// From the document: 16-bit input and coefficients, the coefficient LUT, the
// input and product registers, one coefficient product per clock for h0..h4.
// This design's choice: the delay line, the accumulator, the valid/ready
// handshake and the output width.
module lut_fir
  import vhbcse_pkg::*;
#(
  parameter int unsigned TAPS = 5,
  parameter logic [TAPS-1:0][H_W-1:0] COEFS =
    {16'h1000, 16'h4000, 16'h6000, 16'h4000, 16'h1000},
  localparam int unsigned TAP_W = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned ACC_W = P_W + $clog2(TAPS)
)(
  input  logic             clk,
  input  logic             rst,
  // input samples
  input  logic             in_valid,
  output logic             in_ready,
  input  x_t               x_in,
  // filter output
  output logic             y_valid,
  output logic [ACC_W-1:0] y_out,
  // product register: one coefficient product per clock
  output logic             prod_valid,
  output logic [TAP_W-1:0] prod_tap,
  output p_t               prod_out,
  output cs_t              prod_cs,
  output skip_t            prod_skip
);

  localparam logic [TAP_W-1:0] LAST = TAP_W'(TAPS - 1);

  x_t               dl [TAPS];   // dl[0] is the input register
  logic             busy;
  logic [TAP_W-1:0] tap;
  logic             prod_last;
  logic [ACC_W-1:0] acc, acc_sum;

  x_t    mul_x;
  h_t    mul_h;
  p_t    mul_p;
  cs_t   mul_cs;
  skip_t mul_skip;

  coef_lut #(.TAPS(TAPS), .AW(TAP_W), .COEFS(COEFS)) u_lut (
    .addr (tap),
    .h    (mul_h)
  );

  always_comb begin
    mul_x = '0;
    for (int k = 0; k < TAPS; k++) begin
      if (tap == TAP_W'(k)) mul_x = dl[k];
    end
  end

  vhbcse_mult u_mult (
    .x    (mul_x),
    .h    (mul_h),
    .p    (mul_p),
    .cs   (mul_cs),
    .skip (mul_skip)
  );

  assign in_ready = !busy || (tap == LAST);
  assign acc_sum  = ((prod_tap == '0) ? '0 : acc) + ACC_W'(prod_out);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      tap        <= '0;
      prod_valid <= 1'b0;
      prod_last  <= 1'b0;
      prod_tap   <= '0;
      prod_out   <= '0;
      prod_cs    <= '0;
      prod_skip  <= '0;
      acc        <= '0;
      y_valid    <= 1'b0;
      y_out      <= '0;
      for (int k = 0; k < TAPS; k++) dl[k] <= '0;
    end else begin
      // multiply one tap per clock into the product register
      prod_valid <= busy;
      if (busy) begin
        prod_out  <= mul_p;
        prod_tap  <= tap;
        prod_cs   <= mul_cs;
        prod_skip <= mul_skip;
        prod_last <= (tap == LAST);
        tap       <= tap + 1'b1;
        if (tap == LAST) begin
          busy <= 1'b0;
          tap  <= '0;
        end
      end
      // accept a new sample (may coincide with the last tap of the previous one)
      if (in_valid && in_ready) begin
        dl[0] <= x_in;
        for (int k = 1; k < TAPS; k++) dl[k] <= dl[k-1];
        busy <= 1'b1;
        tap  <= '0;
      end
      // accumulate
      y_valid <= 1'b0;
      if (prod_valid) begin
        acc <= acc_sum;
        if (prod_last) begin
          y_out   <= acc_sum;
          y_valid <= 1'b1;
        end
      end
    end
  end

  // the tap counter never leaves the table
  a_tap_range: assert property (@(posedge clk) disable iff (rst) tap <= LAST);
  // a result follows the last product of a sample, and nothing else
  a_y_after_last: assert property (@(posedge clk) disable iff (rst)
                                   y_valid |-> $past(prod_valid && prod_last));
  // products start the clock after a sample is taken
  a_busy_after_accept: assert property (@(posedge clk) disable iff (rst)
                                        in_valid && in_ready |=> prod_valid || busy);

endmodule
