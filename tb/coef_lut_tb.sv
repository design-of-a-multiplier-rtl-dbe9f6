// coef_lut_tb: reads every address of two coefficient tables, the default
// binomial set and a custom one, and checks the values and that addresses past
// the last tap read as zero.
module coef_lut_tb;
  import vhbcse_pkg::*;

  localparam logic [4:0][15:0] BINOMIAL = {16'h1000, 16'h4000, 16'h6000, 16'h4000, 16'h1000};
  localparam logic [2:0][15:0] CUSTOM   = {16'hBEEF, 16'h0F0F, 16'h1234};

  logic       clk = 1'b0;
  logic [2:0] a5;
  logic [1:0] a3;
  h_t         h5, h3;
  int         checks = 0, failures = 0;

  coef_lut                                       u5 (.addr(a5), .h(h5));
  coef_lut #(.TAPS(3), .AW(2), .COEFS(CUSTOM))  u3 (.addr(a3), .h(h3));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      a5 = 3'(k);
      a3 = 2'(k);
      @(posedge clk);
      checks++;
      if (h5 !== ((k < 5) ? BINOMIAL[k] : 16'h0)) begin
        failures++;
        $display("FAIL default addr=%0d h=%h", k, h5);
      end
      if (k < 4) begin
        checks++;
        if (h3 !== ((k < 3) ? CUSTOM[k] : 16'h0)) begin
          failures++;
          $display("FAIL custom addr=%0d h=%h", k, h3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
