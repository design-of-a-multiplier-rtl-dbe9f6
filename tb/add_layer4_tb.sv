// add_layer4_tb: checks the final adder and right shift,
// p = ((AS5 * 256) + AS6) / 2, over consistent byte sums (which must give
// h * x exactly) and over arbitrary sums.
module add_layer4_tb;
  import vhbcse_pkg::*;

  logic clk = 1'b0;
  l3_t  as5, as6;
  p_t   p;
  int   checks = 0, failures = 0;

  add_layer4 dut (.as5(as5), .as6(as6), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    longint unsigned xv, hv;
    for (int n = 0; n < 3000; n++) begin
      xv  = longint'($urandom % 65536);
      hv  = longint'($urandom % 65536);
      if (n == 0) begin xv = 65535; hv = 65535; end
      as5 = l3_t'(2 * (hv >> 8) * xv);
      as6 = l3_t'(2 * (hv & 255) * xv);
      @(posedge clk);
      check("p", longint'(p), hv * xv);
    end
    for (int n = 0; n < 2000; n++) begin
      as5 = l3_t'($urandom);
      as6 = l3_t'($urandom);
      @(posedge clk);
      check("pr", longint'(p), ((longint'(as5) * 256 + longint'(as6)) % (64'd1 << L4_W)) / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
