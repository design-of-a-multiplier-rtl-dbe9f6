// fir_scoreboard: reference model and checker for lut_fir, used by the filter
// testbenches.
//
// It watches the filter's ports on every rising clock edge (inputs are
// expected to change on the falling edge). Each accepted sample is pushed into
// a sample history; from it the scoreboard predicts, with plain integer
// arithmetic, the product COEFS[k] * x[n-k] of every tap, the match flags and
// adder bypasses of every coefficient, and the filter sum, together with the
// cycle in which each must appear: tap k of a sample taken at edge t is
// visible before edge t+2+k, the sum before edge t+TAPS+2. It also checks
// in_ready cycle by cycle: high exactly when no sample is in flight or the
// last tap is being multiplied. It counts what happened: outputs, stalls
// (in_valid while not ready), back-to-back samples and each adder bypass.
module fir_scoreboard
  import vhbcse_pkg::*;
#(
  parameter int unsigned TAPS = 5,
  parameter logic [TAPS-1:0][H_W-1:0] COEFS =
    {16'h1000, 16'h4000, 16'h6000, 16'h4000, 16'h1000},
  localparam int unsigned TAP_W = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned ACC_W = P_W + $clog2(TAPS)
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic             in_ready,
  input  x_t               x_in,
  input  logic             y_valid,
  input  logic [ACC_W-1:0] y_out,
  input  logic             prod_valid,
  input  logic [TAP_W-1:0] prod_tap,
  input  p_t               prod_out,
  input  cs_t              prod_cs,
  input  skip_t            prod_skip,
  output int               checks,
  output int               failures,
  output int               outputs,
  output int               stalls,
  output int               back_to_back,
  output int               skip_a2,
  output int               skip_a3,
  output int               skip_a4,
  output int               skip_a6
);

  typedef struct {
    longint          due;
    int              tap;
    longint unsigned val;
    logic [6:0]      cs;
    logic [3:0]      skip;
  } prod_exp_t;

  typedef struct {
    longint          due;
    longint unsigned val;
  } y_exp_t;

  longint unsigned hist [$];     // newest sample first
  prod_exp_t       pq [$];
  y_exp_t          yq [$];
  longint          cyc = 0;
  longint          last_accept = -1000;

  function automatic logic [6:0] ref_cs(longint unsigned hv);
    longint unsigned g [4];
    for (int i = 0; i < 4; i++) g[i] = (hv >> (4 * i)) & 15;
    return {(hv >> 8) == (hv & 255), g[1] == g[0], g[2] == g[0], g[3] == g[0],
            g[2] == g[1], g[3] == g[1], g[3] == g[2]};
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  initial begin
    checks = 0; failures = 0; outputs = 0; stalls = 0; back_to_back = 0;
    skip_a2 = 0; skip_a3 = 0; skip_a4 = 0; skip_a6 = 0;
  end

  always @(posedge clk) begin
    if (rst) begin
      hist.delete();
      pq.delete();
      yq.delete();
      last_accept = -1000;
    end else begin
      // handshake and rate: ready when idle or on the last tap
      checks++;
      if (in_ready !== (cyc >= last_accept + longint'(TAPS))) fail("in_ready");
      if (in_valid && !in_ready) stalls++;

      if (in_valid && in_ready) begin
        automatic longint unsigned sum = 0;
        if (cyc == last_accept + longint'(TAPS)) back_to_back++;
        hist.push_front(longint'(x_in));
        if (hist.size() > TAPS) void'(hist.pop_back());
        for (int k = 0; k < TAPS; k++) begin
          automatic prod_exp_t e;
          automatic longint unsigned xk = (k < hist.size()) ? hist[k] : 0;
          automatic longint unsigned hk = longint'(COEFS[k]);
          automatic logic [6:0] c = ref_cs(hk);
          e.due  = cyc + 2 + longint'(k);
          e.tap  = k;
          e.val  = hk * xk;
          e.cs   = c;
          e.skip = {c[6], c[5] | c[4] | c[3], c[2] | c[1], c[0]};
          sum   += e.val;
          pq.push_back(e);
        end
        yq.push_back('{due: cyc + longint'(TAPS) + 2, val: sum});
        last_accept = cyc;
      end

      // product register
      if (prod_valid) begin
        checks++;
        if (pq.size() == 0) fail("unexpected product");
        else begin
          automatic prod_exp_t e = pq.pop_front();
          if (e.due != cyc || e.tap != int'(prod_tap) || e.val != longint'(prod_out) ||
              e.cs != prod_cs || e.skip != prod_skip)
            fail($sformatf("product tap %0d = %h cs %b skip %b, expected tap %0d = %h cs %b skip %b at %0d",
                           prod_tap, prod_out, prod_cs, prod_skip, e.tap, e.val, e.cs, e.skip, e.due));
          if (prod_skip.a2) skip_a2++;
          if (prod_skip.a3) skip_a3++;
          if (prod_skip.a4) skip_a4++;
          if (prod_skip.a6) skip_a6++;
        end
      end else if (pq.size() > 0 && pq[0].due <= cyc) begin
        checks++;
        fail("missing product");
        void'(pq.pop_front());
      end

      // filter output
      if (y_valid) begin
        checks++;
        outputs++;
        if (yq.size() == 0) fail("unexpected output");
        else begin
          automatic y_exp_t e = yq.pop_front();
          if (e.due != cyc || e.val != longint'(y_out))
            fail($sformatf("y = %h, expected %h at %0d", y_out, e.val, e.due));
        end
      end else if (yq.size() > 0 && yq[0].due <= cyc) begin
        checks++;
        fail("missing output");
        void'(yq.pop_front());
      end
    end
    cyc++;
  end

endmodule
