// aria_round: one combinational ARIA round, shared by the key schedule and the
// encryption cores.
//
//   odd round  (i_even = 0): o_q = A(SL1(i_d ^ i_rk))
//   even round (i_even = 1): o_q = A(SL2(i_d ^ i_rk))
//   last round (i_last = 1): o_q = SL2(i_d ^ i_rk)   (no diffusion)
// SL1 applies SB1,SB2,SB3,SB4 to bytes 0,1,2,3 (repeating); SL2 applies
// SB3,SB4,SB1,SB2. Each byte lane holds the two S-boxes it can need and a mux.
module aria_round
  import aria_pkg::*;
(
  input  blk_t i_d,
  input  blk_t i_rk,
  input  logic i_even,
  input  logic i_last,
  output blk_t o_q
);

  blk_t x, s;

  assign x = i_d ^ i_rk;

  for (genvar i = 0; i < 16; i++) begin : g_lane
    // SL1 kind for lane i and its SL2 counterpart (1<->3, 2<->4)
    localparam int unsigned K1 = (i % 4) + 1;
    localparam int unsigned K2 = ((i % 4) + 2) % 4 + 1;
    logic [7:0] y1, y2;
    aria_sbox #(.KIND(K1)) u_s1 (.i_x(x[127-8*i -: 8]), .o_y(y1));
    aria_sbox #(.KIND(K2)) u_s2 (.i_x(x[127-8*i -: 8]), .o_y(y2));
    assign s[127-8*i -: 8] = (i_even || i_last) ? y2 : y1;
  end

  assign o_q = i_last ? s : diffuse(s);

endmodule
