// mux_layer1_tb: drives random partial products and coefficients into the
// layer-1 multiplexers and checks that M_i carries the product selected by
// coefficient bits [2i+1:2i].
module mux_layer1_tb;
  import vhbcse_pkg::*;

  logic     clk = 1'b0;
  pp_set_t  pp;
  h_t       h;
  mux_set_t m;
  int       checks = 0, failures = 0;

  mux_layer1 dut (.pp(pp), .h(h), .m(m));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel;
    for (int n = 0; n < 4000; n++) begin
      for (int k = 0; k < 4; k++) pp[k] = pp_t'($urandom);
      h = h_t'($urandom);
      @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        sel = (int'(h) >> (2 * i)) & 3;
        checks++;
        if (m[i] !== pp[sel]) begin
          failures++;
          if (failures < 10) $display("FAIL h=%h i=%0d m=%h exp=%h", h, i, m[i], pp[sel]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
