// twin_ctr: ARIA-CTR output generator with two encryption cores (TWIN_CTR).
//
// On i_start the key is expanded, then each step encrypts V+1 and V+2 in parallel
// and offers the 256-bit result {Enc(Key,V+1), Enc(Key,V+2)} on o_data with
// o_data_valid. The word is held until i_out_ready is seen high with o_data_valid
// (valid/ready handshake), then V advances by 2 and the next step starts.
// After i_nwords words, o_value = V + 2*i_nwords and o_done pulses. i_nwords = 0 is
// treated as 1. The first word is valid 20 clocks after the clock that samples
// i_start (key expansion and one encryption); when each word is taken at once, the
// next follows 15 clocks later. The two parallel cores follow the source
// description; the 256-bit output unit and the handshake are this design's choices.
module twin_ctr
  import aria_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_rstn,
  input  logic        i_start,
  input  blk_t        i_key,
  input  blk_t        i_value,
  input  logic [31:0] i_nwords,
  input  logic        i_out_ready,
  output seed_t       o_data,
  output logic        o_data_valid,
  output blk_t        o_value,
  output logic        o_done
);

  typedef enum logic [1:0] {C_IDLE, C_KS, C_ENC, C_OUT} ctr_state_e;
  ctr_state_e r_state;

  blk_t        r_key, r_v;
  logic [31:0] r_left;
  logic        r_ks_start, r_enc_start;
  rkeys_t      w_rk;
  logic        w_ks_done, w_ks_busy;
  blk_t        w_ct0, w_ct1;
  logic        w_done0, w_done1, w_busy0, w_busy1;

  aria_key_sched u_key_sched (
    .i_clk, .i_rstn, .i_start(r_ks_start), .i_key(r_key),
    .o_rk(w_rk), .o_done(w_ks_done), .o_busy(w_ks_busy)
  );

  aria_enc_core u_c0_enc_core (
    .i_clk, .i_rstn, .i_start(r_enc_start), .i_pt(r_v + 128'd1), .i_rk(w_rk),
    .o_ct(w_ct0), .o_done(w_done0), .o_busy(w_busy0)
  );

  aria_enc_core u_c1_enc_core (
    .i_clk, .i_rstn, .i_start(r_enc_start), .i_pt(r_v + 128'd2), .i_rk(w_rk),
    .o_ct(w_ct1), .o_done(w_done1), .o_busy(w_busy1)
  );

  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      r_state      <= C_IDLE;
      r_key        <= '0;
      r_v          <= '0;
      r_left       <= '0;
      r_ks_start   <= 1'b0;
      r_enc_start  <= 1'b0;
      o_data       <= '0;
      o_data_valid <= 1'b0;
      o_done       <= 1'b0;
    end else begin
      r_ks_start  <= 1'b0;
      r_enc_start <= 1'b0;
      o_done      <= 1'b0;
      unique case (r_state)
        C_IDLE: if (i_start) begin
          r_key      <= i_key;
          r_v        <= i_value;
          r_left     <= (i_nwords == 32'd0) ? 32'd1 : i_nwords;
          r_ks_start <= 1'b1;
          r_state    <= C_KS;
        end
        C_KS: if (w_ks_done) begin
          r_enc_start <= 1'b1;
          r_state     <= C_ENC;
        end
        C_ENC: if (w_done0) begin
          o_data       <= {w_ct0, w_ct1};
          o_data_valid <= 1'b1;
          r_v          <= r_v + 128'd2;
          r_left       <= r_left - 32'd1;
          r_state      <= C_OUT;
        end
        C_OUT: if (i_out_ready) begin
          o_data_valid <= 1'b0;
          if (r_left == 32'd0) begin
            o_done  <= 1'b1;
            r_state <= C_IDLE;
          end else begin
            r_enc_start <= 1'b1;
            r_state     <= C_ENC;
          end
        end
        default: r_state <= C_IDLE;
      endcase
    end
  end

  assign o_value = r_v;

  // A word once offered stays on o_data until it is taken.
  a_hold: assert property (@(posedge i_clk) disable iff (!i_rstn)
                           o_data_valid && !i_out_ready |=> o_data_valid && $stable(o_data));

  // The two cores start together on the same round keys and must finish together.
  a_twin_done: assert property (@(posedge i_clk) disable iff (!i_rstn) w_done0 == w_done1);

endmodule
