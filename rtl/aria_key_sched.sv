// aria_key_sched: ARIA-128 key expansion (the KEY_SCHED block of the update module).
//
// On i_start the 128-bit key is taken as W0 (KL; KR = 0 for a 128-bit key). One
// shared round unit then computes, one per clock,
//   W1 = FO(W0, C1),  W2 = FE(W1, C2) ^ W0,  W3 = FO(W2, C3) ^ W1,
// after which the 13 round keys are fixed XOR/rotate combinations of W0..W3
// (aria_pkg::expand). o_done pulses four clocks after the clock that samples
// i_start (one load clock, then W1, W2, W3); o_rk stays valid and
// stable until the next i_start, so encryption cores may read it directly.
// The algorithm is the published ARIA key schedule; the one-word-per-clock
// sequencing is this design's choice.
module aria_key_sched
  import aria_pkg::*;
(
  input  logic   i_clk,
  input  logic   i_rstn,
  input  logic   i_start,
  input  blk_t   i_key,
  output rkeys_t o_rk,
  output logic   o_done,
  output logic   o_busy
);

  blk_t        r_w0, r_w1, r_w2, r_w3;
  logic [1:0]  r_step;      // which word the round unit produces next
  logic        r_busy;
  blk_t        w_d, w_ck, w_f, w_prev;

  always_comb begin
    unique case (r_step)
      2'd0:    begin w_d = r_w0; w_ck = C1; w_prev = '0;   end
      2'd1:    begin w_d = r_w1; w_ck = C2; w_prev = r_w0; end
      default: begin w_d = r_w2; w_ck = C3; w_prev = r_w1; end
    endcase
  end

  aria_round u_round (
    .i_d(w_d), .i_rk(w_ck), .i_even(r_step == 2'd1), .i_last(1'b0), .o_q(w_f)
  );

  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      r_w0 <= '0; r_w1 <= '0; r_w2 <= '0; r_w3 <= '0;
      r_step <= '0; r_busy <= 1'b0; o_done <= 1'b0;
    end else begin
      o_done <= 1'b0;
      if (i_start) begin
        r_w0   <= i_key;
        r_step <= 2'd0;
        r_busy <= 1'b1;
      end else if (r_busy) begin
        unique case (r_step)
          2'd0:    r_w1 <= w_f ^ w_prev;
          2'd1:    r_w2 <= w_f ^ w_prev;
          default: r_w3 <= w_f ^ w_prev;
        endcase
        if (r_step == 2'd2) begin
          r_busy <= 1'b0;
          o_done <= 1'b1;
        end
        r_step <= r_step + 2'd1;
      end
    end
  end

  assign o_rk   = expand(r_w0, r_w1, r_w2, r_w3);
  assign o_busy = r_busy;

endmodule
