// iuf: CTR-DRBG internal state update (Update function of SP 800-90A) for ARIA-128.
//
//   (Key', V') = leftmost/rightmost 128 bits of
//                (Enc(Key, V+1) || Enc(Key, V+2)) ^ provided_data
//
// FSM (IUF_IDLE -> IUF_KS -> IUF_ENC -> IUF_END -> IUF_IDLE):
//   IUF_IDLE  wait for i_iuf_en; inputs are captured in that clock.
//   IUF_KS    KEY_SCHED expands i_key into the 13 round keys.
//   IUF_ENC   phase 1: C0_ENC_CORE encrypts V+1 and C1_ENC_CORE encrypts V+2 in
//             parallel; their outputs land in r_enc_buffer0/1.
//   IUF_END   phase 2: o_iuf_data = {r_enc_buffer0, r_enc_buffer1} ^ i_data when
//             i_data_en is set, the bare buffers otherwise (provided_data = 0);
//             o_iuf_done pulses for one clock.
// o_iuf_data is registered and holds until the next update. One update takes 21
// clocks from the clock that samples i_iuf_en to o_iuf_done. The FSM, the two
// parallel cores and the buffers follow the source description; the counter addition is
// modulo 2^128 (ctr_len = block length), and the exact clock count is this design's.
module iuf
  import aria_pkg::*;
(
  input  logic  i_clk,
  input  logic  i_rstn,
  input  blk_t  i_value,
  input  blk_t  i_key,
  input  seed_t i_data,
  input  logic  i_data_en,
  input  logic  i_iuf_en,
  output seed_t o_iuf_data,
  output logic  o_iuf_done
);

  typedef enum logic [1:0] {IUF_IDLE, IUF_KS, IUF_ENC, IUF_END} iuf_state_e;
  iuf_state_e r_state;

  blk_t   r_value, r_key, r_enc_buffer0, r_enc_buffer1;
  seed_t  r_data;
  logic   r_data_en;
  logic   r_ks_start, r_enc_start;
  rkeys_t w_rk;
  logic   w_key_expand, w_ks_busy;
  blk_t   w_ct0, w_ct1;
  logic   w_aria_c0_done, w_aria_c1_done, w_c0_busy, w_c1_busy;
  logic   w_enc_done;

  aria_key_sched u_key_sched (
    .i_clk, .i_rstn, .i_start(r_ks_start), .i_key(r_key),
    .o_rk(w_rk), .o_done(w_key_expand), .o_busy(w_ks_busy)
  );

  aria_enc_core u_c0_enc_core (
    .i_clk, .i_rstn, .i_start(r_enc_start), .i_pt(r_value + 128'd1), .i_rk(w_rk),
    .o_ct(w_ct0), .o_done(w_aria_c0_done), .o_busy(w_c0_busy)
  );

  aria_enc_core u_c1_enc_core (
    .i_clk, .i_rstn, .i_start(r_enc_start), .i_pt(r_value + 128'd2), .i_rk(w_rk),
    .o_ct(w_ct1), .o_done(w_aria_c1_done), .o_busy(w_c1_busy)
  );

  // Encryption ends with core 0's done pulse; core 1 finishes in the same clock.
  assign w_enc_done = w_aria_c0_done;

  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      r_state       <= IUF_IDLE;
      r_value       <= '0;
      r_key         <= '0;
      r_data        <= '0;
      r_data_en     <= 1'b0;
      r_ks_start    <= 1'b0;
      r_enc_start   <= 1'b0;
      r_enc_buffer0 <= '0;
      r_enc_buffer1 <= '0;
      o_iuf_data    <= '0;
      o_iuf_done    <= 1'b0;
    end else begin
      r_ks_start  <= 1'b0;
      r_enc_start <= 1'b0;
      o_iuf_done  <= 1'b0;
      unique case (r_state)
        IUF_IDLE: if (i_iuf_en) begin
          r_value    <= i_value;
          r_key      <= i_key;
          r_data     <= i_data;
          r_data_en  <= i_data_en;
          r_ks_start <= 1'b1;
          r_state    <= IUF_KS;
        end
        IUF_KS: if (w_key_expand) begin
          r_enc_start <= 1'b1;
          r_state     <= IUF_ENC;
        end
        IUF_ENC: if (w_enc_done) begin
          r_enc_buffer0 <= w_ct0;
          r_enc_buffer1 <= w_ct1;
          r_state       <= IUF_END;
        end
        IUF_END: begin
          o_iuf_data <= {r_enc_buffer0, r_enc_buffer1} ^ (r_data_en ? r_data : '0);
          o_iuf_done <= 1'b1;
          r_state    <= IUF_IDLE;
        end
        default: r_state <= IUF_IDLE;
      endcase
    end
  end

  // The two cores start together on the same round keys and must finish together.
  a_twin_done: assert property (@(posedge i_clk) disable iff (!i_rstn)
                                w_aria_c0_done == w_aria_c1_done);

endmodule
