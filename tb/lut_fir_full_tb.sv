// lut_fir_full_tb: the filter with every parameter at its default (five taps,
// binomial coefficients). After reset a constant input of AAAA is applied with
// in_valid held high, so the products h0*x .. h4*x appear one per clock, as in
// the document's simulation; then a stream of random samples follows.
// fir_scoreboard checks every product, every filter output and their cycles.
module lut_fir_full_tb;
  import vhbcse_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        in_valid, in_ready;
  x_t          x_in;
  logic        y_valid, prod_valid;
  logic [34:0] y_out;
  logic [2:0]  prod_tap;
  p_t          prod_out;
  cs_t         prod_cs;
  skip_t       prod_skip;

  int checks, failures, outputs, stalls, b2b, s2, s3, s4, s6;

  always #5 clk = ~clk;

  lut_fir dut (.*);

  fir_scoreboard sb (
    .clk, .rst, .in_valid, .in_ready, .x_in, .y_valid, .y_out,
    .prod_valid, .prod_tap, .prod_out, .prod_cs, .prod_skip,
    .checks, .failures, .outputs, .stalls, .back_to_back(b2b),
    .skip_a2(s2), .skip_a3(s3), .skip_a4(s4), .skip_a6(s6)
  );

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int f = 0;
    rst      = 1'b1;
    in_valid = 1'b0;
    x_in     = '0;
    repeat (3) @(negedge clk);
    rst      = 1'b0;
    in_valid = 1'b1;
    x_in     = 16'hAAAA;
    repeat (50) @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      in_valid = ($urandom % 3) != 0;
      x_in     = x_t'($urandom);
      @(negedge clk);
      while (in_valid && !in_ready) @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    if (outputs == 0) f++;
    $display("outputs=%0d back_to_back=%0d bypass A3=%0d A4=%0d", outputs, b2b, s3, s4);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + f);
    $finish;
  end
endmodule
