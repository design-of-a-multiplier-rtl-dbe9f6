// ppg_tb: checks the partial product generator against 2*k*x for all four
// group values, over corner and random multiplicands.
module ppg_tb;
  import vhbcse_pkg::*;

  logic    clk = 1'b0;
  x_t      x;
  pp_set_t pp;
  int      checks = 0, failures = 0;

  ppg dut (.x(x), .pp(pp));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_x(input x_t v);
    longint unsigned exp;
    x = v;
    @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      exp = 2 * longint'(k) * longint'(v);
      checks++;
      if (longint'(pp[k]) != exp) begin
        failures++;
        $display("FAIL x=%h k=%0d pp=%h exp=%h", v, k, pp[k], exp);
      end
    end
  endtask

  initial begin
    check_x('0);
    check_x('1);
    check_x(16'hFFFF);
    check_x(16'hAAAA);
    check_x(16'h5555);
    check_x(16'h8000);
    repeat (2000) check_x(x_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
