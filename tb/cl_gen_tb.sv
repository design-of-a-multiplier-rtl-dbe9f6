// cl_gen_tb: checks the seven common-subexpression flags of the control logic
// generator against nibble and byte comparisons done with integer arithmetic,
// over every coefficient value.
module cl_gen_tb;
  import vhbcse_pkg::*;

  logic clk = 1'b0;
  h_t   h;
  cs_t  c;
  int   checks = 0, failures = 0;
  int   hits [7];

  cl_gen dut (.h(h), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g [4];
    logic [6:0] exp, got;
    for (int i = 0; i < 7; i++) hits[i] = 0;
    for (int v = 0; v < 65536; v++) begin
      h = h_t'(v);
      @(posedge clk);
      for (int i = 0; i < 4; i++) g[i] = (v / (1 << (4 * i))) % 16;   // g[3] = h[15:12]
      exp[0] = (g[3] == g[2]);
      exp[1] = (g[3] == g[1]);
      exp[2] = (g[2] == g[1]);
      exp[3] = (g[3] == g[0]);
      exp[4] = (g[2] == g[0]);
      exp[5] = (g[1] == g[0]);
      exp[6] = ((v / 256) == (v % 256));
      got = {c.c7, c.c6, c.c5, c.c4, c.c3, c.c2, c.c1};
      for (int i = 0; i < 7; i++) if (exp[i]) hits[i]++;
      checks++;
      if (got !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL h=%h c=%b exp=%b", h, got, exp);
      end
    end
    // every flag must have been raised (each nibble pair matches 4096 times, the bytes 256 times)
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (hits[i] != ((i == 6) ? 256 : 4096)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
