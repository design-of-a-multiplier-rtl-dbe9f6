// add_layer2_tb: checks the controlled layer-2 addition two ways.
//  1. Consistent operands: the multiplexer outputs and match flags are derived
//     from a random (x, h), with coefficients biased toward repeated nibbles;
//     every AS must equal 2 * nibble * x and the skip flags must follow the
//     nibble matches.
//  2. Arbitrary operands: random M values and random flags, so that a reused
//     sum differs from the bypassed adder's; the selection order is checked
//     against the priority c1 > ... written out per output.
module add_layer2_tb;
  import vhbcse_pkg::*;

  logic       clk = 1'b0;
  mux_set_t   m;
  cs_t        c;
  l2_set_t    as_o;
  logic [2:0] skip;
  int         checks = 0, failures = 0;
  int         skip_seen [3];

  add_layer2 dut (.m(m), .c(c), .as_o(as_o), .skip(skip));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned own_sum(int g);   // g = 3 is AS1
    return longint'(m[2*g+1]) * 4 + longint'(m[2*g]);
  endfunction

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    int nib [4];
    int unsigned xv, hv;
    longint unsigned e [4];
    for (int i = 0; i < 3; i++) skip_seen[i] = 0;

    // 1. consistent operands
    for (int n = 0; n < 3000; n++) begin
      xv = $urandom % 65536;
      for (int g = 0; g < 4; g++) nib[g] = (n % 2 == 0) ? ($urandom % 3) : ($urandom % 16);
      hv = nib[3] * 4096 + nib[2] * 256 + nib[1] * 16 + nib[0];
      for (int i = 0; i < 8; i++) m[i] = pp_t'(2 * ((hv >> (2 * i)) & 3) * xv);
      c = '{c7: (hv / 256) == (hv % 256),
            c6: nib[1] == nib[0], c5: nib[2] == nib[0], c4: nib[3] == nib[0],
            c3: nib[2] == nib[1], c2: nib[3] == nib[1], c1: nib[3] == nib[2]};
      @(posedge clk);
      for (int g = 0; g < 4; g++) check("AS", longint'(as_o[g]), 2 * longint'(nib[g]) * longint'(xv));
      check("skipA2", longint'(skip[0]), longint'(nib[2] == nib[3]));
      check("skipA3", longint'(skip[1]), longint'(nib[1] == nib[3] || nib[1] == nib[2]));
      check("skipA4", longint'(skip[2]),
            longint'(nib[0] == nib[3] || nib[0] == nib[2] || nib[0] == nib[1]));
      for (int i = 0; i < 3; i++) if (skip[i]) skip_seen[i]++;
    end

    // 2. arbitrary operands and flags: the selection order itself
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 8; i++) m[i] = pp_t'($urandom);
      c = cs_t'($urandom);
      @(posedge clk);
      e[3] = own_sum(3);
      e[2] = c.c1 ? e[3] : own_sum(2);
      e[1] = c.c2 ? e[3] : (c.c3 ? e[2] : own_sum(1));
      e[0] = c.c4 ? e[3] : (c.c5 ? e[2] : (c.c6 ? e[1] : own_sum(0)));
      for (int g = 0; g < 4; g++) check("ASsel", longint'(as_o[g]), e[g] % (64'd1 << L2_W));
    end

    for (int i = 0; i < 3; i++) check("skip exercised", longint'(skip_seen[i] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
