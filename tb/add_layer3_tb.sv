// add_layer3_tb: checks the controlled layer-3 addition. With consistent
// layer-2 sums (2 * nibble * x) the byte sums must be 2 * h[15:8] * x and
// 2 * h[7:0] * x, including coefficients whose bytes are equal (c7). With
// arbitrary sums it checks that c7 makes AS6 a copy of AS5 and that otherwise
// AS6 is computed from AS3 and AS4.
module add_layer3_tb;
  import vhbcse_pkg::*;

  logic    clk = 1'b0;
  l2_set_t as_i;
  logic    c7;
  l3_t     as5, as6;
  int      checks = 0, failures = 0;
  int      c7_seen = 0;

  add_layer3 dut (.as_i(as_i), .c7(c7), .as5(as5), .as6(as6));

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
    int unsigned xv, hv, hi, lo;
    for (int n = 0; n < 3000; n++) begin
      xv = $urandom % 65536;
      hi = $urandom % 256;
      lo = (n % 3 == 0) ? hi : ($urandom % 256);
      hv = hi * 256 + lo;
      for (int g = 0; g < 4; g++) as_i[g] = l2_t'(2 * ((hv >> (4 * g)) & 15) * xv);
      c7 = (hi == lo);
      if (c7) c7_seen++;
      @(posedge clk);
      check("AS5", longint'(as5), 2 * longint'(hi) * longint'(xv));
      check("AS6", longint'(as6), 2 * longint'(lo) * longint'(xv));
    end
    for (int n = 0; n < 2000; n++) begin
      for (int g = 0; g < 4; g++) as_i[g] = l2_t'($urandom);
      c7 = 1'($urandom);
      @(posedge clk);
      check("AS5r", longint'(as5), (longint'(as_i[3]) * 16 + longint'(as_i[2])) % (64'd1 << L3_W));
      check("AS6r", longint'(as6), c7 ? longint'(as5)
                                      : (longint'(as_i[1]) * 16 + longint'(as_i[0])) % (64'd1 << L3_W));
    end
    check("c7 exercised", longint'(c7_seen > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
