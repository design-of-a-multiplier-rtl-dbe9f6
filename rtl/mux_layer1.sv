// mux_layer1: multiplexer unit at layer 1 of the VHBCSE multiplier.
//
// Eight 4-to-1 multiplexers M7..M0. Multiplexer M_i takes the 2-bit
// coefficient group h[2i+1:2i] as its select lines and passes the matching
// partial product from the PPG: m[i] = pp[h[2i+1:2i]]. This replaces one
// generated partial product per coefficient bit by one selected product per
// bit pair. Purely combinational.
module mux_layer1
  import vhbcse_pkg::*;
(
  input  pp_set_t  pp,
  input  h_t       h,
  output mux_set_t m
);

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      m[i] = pp[h[2*i +: 2]];
    end
  end

endmodule
