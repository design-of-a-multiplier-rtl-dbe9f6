// vhbcse_pkg: widths and types shared by the VHBCSE constant-multiplier datapath
// and the FIR filter around it.
//
// The multiplier takes a 16-bit multiplicand x and a 16-bit coefficient h and
// returns the 32-bit product. The coefficient is cut into eight 2-bit groups
// (layer 1), four 4-bit groups (layer 2) and two 8-bit groups (layer 3). All
// intermediate values carry one extra low bit (they are twice the true partial
// sums); the final stage drops it with a 1-bit right shift. The widths below are
// the smallest that hold each layer's largest value for unsigned operands:
//   PP_W : 2*3*x       < 2^(X_W+3)
//   L2_W : 2*15*x      < 2^(X_W+5)
//   L3_W : 2*255*x     < 2^(X_W+9)
//   L4_W : 2*65535*x   < 2^(X_W+17)
// The 16/16/32-bit sizes are the document's; the doubled scaling is this
// design's reading of the final right shift.
package vhbcse_pkg;

  localparam int unsigned X_W  = 16;          // multiplicand (filter input)
  localparam int unsigned H_W  = 16;          // coefficient
  localparam int unsigned P_W  = X_W + H_W;   // product
  localparam int unsigned PP_W = X_W + 3;     // layer-1 partial products
  localparam int unsigned L2_W = X_W + 5;     // layer-2 sums AS1..AS4
  localparam int unsigned L3_W = X_W + 9;     // layer-3 sums AS5, AS6
  localparam int unsigned L4_W = X_W + 17;    // layer-4 sum A7

  typedef logic [X_W-1:0]  x_t;
  typedef logic [H_W-1:0]  h_t;
  typedef logic [P_W-1:0]  p_t;
  typedef logic [PP_W-1:0] pp_t;
  typedef logic [L2_W-1:0] l2_t;
  typedef logic [L3_W-1:0] l3_t;
  typedef logic [L4_W-1:0] l4_t;

  // PPG outputs, indexed by the 2-bit coefficient group value k: pp[k] = 2*k*x
  typedef pp_t [3:0] pp_set_t;
  // Layer-1 multiplexer outputs M7..M0, index i is driven by h[2i+1:2i]
  typedef pp_t [7:0] mux_set_t;
  // Layer-2 sums, index 3 = AS1 (h[15:12]) .. index 0 = AS4 (h[3:0])
  typedef l2_t [3:0] l2_set_t;

  // Common subexpressions found by the control logic generator.
  //   c1: h[15:12] == h[11:8]   (A2 skipped)
  //   c2: h[15:12] == h[7:4]    (A3 skipped, AS1 reused)
  //   c3: h[11:8]  == h[7:4]    (A3 skipped, AS2 reused)
  //   c4: h[15:12] == h[3:0]    (A4 skipped, AS1 reused)
  //   c5: h[11:8]  == h[3:0]    (A4 skipped, AS2 reused)
  //   c6: h[7:4]   == h[3:0]    (A4 skipped, AS3 reused)
  //   c7: h[15:8]  == h[7:0]    (A6 skipped, AS5 reused)
  typedef struct packed {
    logic c7;
    logic c6;
    logic c5;
    logic c4;
    logic c3;
    logic c2;
    logic c1;
  } cs_t;

  // Adders whose result was not used for the current coefficient
  typedef struct packed {
    logic a6;
    logic a4;
    logic a3;
    logic a2;
  } skip_t;

endpackage
