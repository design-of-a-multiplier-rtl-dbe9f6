// lut_fir_tb: end-to-end test of the LUT/VHBCSE FIR filter.
//
// Two filters see the same input stream: one with the default binomial
// coefficients and one with a coefficient set chosen so that every kind of
// common subexpression occurs (h = AAAA repeats all nibbles and bytes, 3300 a
// leading and a trailing nibble pair, 5A5A and 0F0F repeated bytes, 1234
// none). The stream mixes a constant input of AAAA (as in the document's
// simulation), random samples, bursts with in_valid held high (back-to-back
// samples and stalls), idle gaps and a reset in mid-stream. fir_scoreboard
// checks every product, every sum, their cycles and in_ready. The test fails
// if any mechanism (each adder bypass, stalls, back-to-back samples, reset
// while busy) never happened.
module lut_fir_tb;
  import vhbcse_pkg::*;

  localparam logic [4:0][15:0] CUSTOM = {16'h0F0F, 16'h3300, 16'h5A5A, 16'h1234, 16'hAAAA};

  logic        clk = 1'b0;
  logic        rst;
  logic        in_valid;
  x_t          x_in;

  logic        rdy [2], yv [2], pv [2];
  logic [34:0] yo [2];
  logic [2:0]  pt [2];
  p_t          po [2];
  cs_t         pc [2];
  skip_t       ps [2];

  int chk [2], fl [2], outs [2], stl [2], b2b [2], s2 [2], s3 [2], s4 [2], s6 [2];
  int checks = 0, failures = 0;
  int busy_resets = 0;

  always #5 clk = ~clk;

  lut_fir dut_def (
    .clk, .rst, .in_valid, .in_ready(rdy[0]), .x_in,
    .y_valid(yv[0]), .y_out(yo[0]),
    .prod_valid(pv[0]), .prod_tap(pt[0]), .prod_out(po[0]), .prod_cs(pc[0]), .prod_skip(ps[0])
  );

  lut_fir #(.TAPS(5), .COEFS(CUSTOM)) dut_cus (
    .clk, .rst, .in_valid, .in_ready(rdy[1]), .x_in,
    .y_valid(yv[1]), .y_out(yo[1]),
    .prod_valid(pv[1]), .prod_tap(pt[1]), .prod_out(po[1]), .prod_cs(pc[1]), .prod_skip(ps[1])
  );

  fir_scoreboard sb_def (
    .clk, .rst, .in_valid, .in_ready(rdy[0]), .x_in,
    .y_valid(yv[0]), .y_out(yo[0]),
    .prod_valid(pv[0]), .prod_tap(pt[0]), .prod_out(po[0]), .prod_cs(pc[0]), .prod_skip(ps[0]),
    .checks(chk[0]), .failures(fl[0]), .outputs(outs[0]), .stalls(stl[0]), .back_to_back(b2b[0]),
    .skip_a2(s2[0]), .skip_a3(s3[0]), .skip_a4(s4[0]), .skip_a6(s6[0])
  );

  fir_scoreboard #(.TAPS(5), .COEFS(CUSTOM)) sb_cus (
    .clk, .rst, .in_valid, .in_ready(rdy[1]), .x_in,
    .y_valid(yv[1]), .y_out(yo[1]),
    .prod_valid(pv[1]), .prod_tap(pt[1]), .prod_out(po[1]), .prod_cs(pc[1]), .prod_skip(ps[1]),
    .checks(chk[1]), .failures(fl[1]), .outputs(outs[1]), .stalls(stl[1]), .back_to_back(b2b[1]),
    .skip_a2(s2[1]), .skip_a3(s3[1]), .skip_a4(s4[1]), .skip_a6(s6[1])
  );

  task automatic finish_tb();
    checks   += chk[0] + chk[1];
    failures += fl[0] + fl[1];
    $display("default: outputs=%0d stalls=%0d back_to_back=%0d bypass A2=%0d A3=%0d A4=%0d A6=%0d",
             outs[0], stl[0], b2b[0], s2[0], s3[0], s4[0], s6[0]);
    $display("custom : outputs=%0d stalls=%0d back_to_back=%0d bypass A2=%0d A3=%0d A4=%0d A6=%0d",
             outs[1], stl[1], b2b[1], s2[1], s3[1], s4[1], s6[1]);
    $display("resets while busy=%0d", busy_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  task automatic mech(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    rst      = 1'b1;
    in_valid = 1'b0;
    x_in     = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // constant input AAAA, in_valid held: one sample every 5 clocks
    in_valid = 1'b1;
    x_in     = 16'hAAAA;
    repeat (60) @(negedge clk);
    // random samples, random valid
    for (int n = 0; n < 6000; n++) begin
      in_valid = ($urandom % 4) != 0;
      x_in     = x_t'($urandom);
      @(negedge clk);
      while (in_valid && !rdy[0]) @(negedge clk);   // hold the sample until taken
    end
    // reset while a sample is in flight
    in_valid = 1'b1;
    x_in     = 16'hFFFF;
    @(negedge clk);
    @(negedge clk);
    if (!rdy[0]) busy_resets++;
    rst      = 1'b1;
    in_valid = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    // full-scale samples after the reset
    in_valid = 1'b1;
    repeat (40) @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);

    // every output counted, and both filters agree on the handshake
    mech("outputs (default)", outs[0]);
    mech("outputs (custom)", outs[1]);
    mech("stall", stl[0]);
    mech("back-to-back samples", b2b[0]);
    mech("reset while busy", busy_resets);
    mech("bypass A2", s2[0] + s2[1]);
    mech("bypass A3", s3[0] + s3[1]);
    mech("bypass A4", s4[0] + s4[1]);
    mech("bypass A6", s6[0] + s6[1]);
    checks++;
    if (outs[0] != outs[1]) failures++;
    finish_tb();
  end
endmodule
