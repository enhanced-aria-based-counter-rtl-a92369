// aria_enc_core: iterative ARIA-128 encryption, one round per clock
// (C0_ENC_CORE / C1_ENC_CORE of the update module).
//
// i_start loads i_pt. Rounds 1..11 apply FO (odd) or FE (even) with round keys
// ek1..ek11; round 12 applies SL2 with ek12 and the result is XORed with ek13. o_ct
// is registered and o_done pulses in the clock it becomes valid, 13 clocks after
// the clock that samples i_start (one load clock, then 12 rounds). i_rk must stay
// stable while the core is busy. o_ct holds its value until the next i_start.
// Iterating one round per clock is this design's choice.
module aria_enc_core
  import aria_pkg::*;
(
  input  logic   i_clk,
  input  logic   i_rstn,
  input  logic   i_start,
  input  blk_t   i_pt,
  input  rkeys_t i_rk,
  output blk_t   o_ct,
  output logic   o_done,
  output logic   o_busy
);

  blk_t       r_x, w_q;
  logic [3:0] r_rnd;        // 0-based index of the round being computed
  logic       r_busy;

  aria_round u_round (
    .i_d(r_x), .i_rk(i_rk[r_rnd]), .i_even(r_rnd[0]), .i_last(r_rnd == 4'(NR - 1)),
    .o_q(w_q)
  );

  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      r_x <= '0; r_rnd <= '0; r_busy <= 1'b0; o_done <= 1'b0;
    end else begin
      o_done <= 1'b0;
      if (i_start) begin
        r_x    <= i_pt;
        r_rnd  <= '0;
        r_busy <= 1'b1;
      end else if (r_busy) begin
        if (r_rnd == 4'(NR - 1)) begin
          r_x    <= w_q ^ i_rk[NR];
          r_busy <= 1'b0;
          o_done <= 1'b1;
        end else begin
          r_x   <= w_q;
          r_rnd <= r_rnd + 4'd1;
        end
      end
    end
  end

  assign o_ct   = r_x;
  assign o_busy = r_busy;

endmodule
