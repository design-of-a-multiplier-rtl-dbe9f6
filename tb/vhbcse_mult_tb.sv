// vhbcse_mult_tb: checks the whole VHBCSE multiplier against the integer
// product h * x, plus its common-subexpression and skip reports, on corner
// values, on coefficients built to repeat nibbles and bytes, and on random
// operands. It also counts that each adder bypass (A2, A3, A4, A6) occurred.
module vhbcse_mult_tb;
  import vhbcse_pkg::*;

  logic  clk = 1'b0;
  x_t    x;
  h_t    h;
  p_t    p;
  cs_t   cs;
  skip_t skip;
  int    checks = 0, failures = 0;
  int    seen [4];

  vhbcse_mult dut (.x(x), .h(h), .p(p), .cs(cs), .skip(skip));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int unsigned xv, input int unsigned hv);
    int g [4];
    logic [6:0] ec;
    logic [3:0] es;
    x = x_t'(xv);
    h = h_t'(hv);
    @(posedge clk);
    for (int i = 0; i < 4; i++) g[i] = (hv >> (4 * i)) & 15;
    ec = {(hv >> 8) == (hv & 255), g[1] == g[0], g[2] == g[0], g[3] == g[0],
          g[2] == g[1], g[3] == g[1], g[3] == g[2]};
    es = {ec[6], ec[5] | ec[4] | ec[3], ec[2] | ec[1], ec[0]};
    checks++;
    if (longint'(p) != longint'(xv) * longint'(hv)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h h=%h p=%h exp=%h", x, h, p, longint'(xv) * longint'(hv));
    end
    checks++;
    if (cs !== ec || skip !== es) begin
      failures++;
      if (failures < 10) $display("FAIL h=%h cs=%b/%b skip=%b/%b", h, cs, ec, skip, es);
    end
    for (int i = 0; i < 4; i++) if (es[i]) seen[i]++;
  endtask

  initial begin
    int unsigned nib [4];
    for (int i = 0; i < 4; i++) seen[i] = 0;
    // corners
    run(0, 0);
    run(65535, 65535);
    run(16'hAAAA, 16'hAAAA);
    run(16'hAAAA, 16'h1234);
    run(1, 16'h8000);
    run(16'h8000, 1);
    // repeated nibbles and bytes
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < 4; i++) nib[i] = $urandom % 4;
      if (n % 4 == 0) begin nib[1] = nib[3]; nib[0] = nib[2]; end
      run($urandom % 65536, (nib[3] * 4096 + nib[2] * 256 + nib[1] * 16 + nib[0]) * (1 + $urandom % 4));
    end
    // random
    for (int n = 0; n < 20000; n++) run($urandom % 65536, $urandom % 65536);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL bypass %0d never occurred", i);
      end
    end
    $display("bypasses A2=%0d A3=%0d A4=%0d A6=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
