// drbg_gf: output generation function (GF) of the CTR-DRBG.
//
// FSM with four states:
//   IDLE     wait for i_gf_en. With i_pre_ctr_en it goes to PRE_CTR, otherwise
//            straight to CTR_RUN.
//   PRE_CTR  (Key, V) = Update(AD, Key, V) through the iuf; left on w_iuf_done.
//   CTR_RUN  TWIN_CTR produces i_len_output words of 256 bits on o_data from the
//            current Key and V, leaving V + 2*i_len_output; left on w_ctr_done.
//   IUF_RUN  (Key, V) = Update(AD, Key, V+n) through the same iuf; o_gf_done pulses
//            and o_key / o_value hold the new state.
// AD is the 256-bit additional input i_ad, used when i_ad_en is high and replaced by
// zero otherwise. The two multiplexers in front of the iuf and the CTR block select,
// by state, between the incoming state and the fed-back one, as in the block
// diagram of the source description. Output words follow the valid/ready
// handshake of twin_ctr (o_data_valid, i_out_ready). Skipping PRE_CTR when i_pre_ctr_en is low and the
// 256-bit output unit are this design's choices.
module drbg_gf
  import aria_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_rstn,
  input  logic        i_gf_en,
  input  logic        i_pre_ctr_en,
  input  seed_t       i_ad,
  input  logic        i_ad_en,
  input  blk_t        i_key,
  input  blk_t        i_value,
  input  logic [31:0] i_len_output,
  input  logic        i_out_ready,
  output seed_t       o_data,
  output logic        o_data_valid,
  output blk_t        o_key,
  output blk_t        o_value,
  output logic        o_gf_done
);

  typedef enum logic [1:0] {IDLE, PRE_CTR, CTR_RUN, IUF_RUN} gf_state_e;
  gf_state_e r_state;

  blk_t        r_key, r_value;        // state entering the current step
  seed_t       r_ad;
  logic        r_ad_en;
  logic [31:0] r_len;
  logic        r_iuf_start, r_ctr_start;
  seed_t       w_iuf_data;
  logic        w_iuf_done, w_ctr_done;
  blk_t        w_ctr_value;

  iuf u_iuf (
    .i_clk, .i_rstn, .i_value(r_value), .i_key(r_key), .i_data(r_ad),
    .i_data_en(r_ad_en), .i_iuf_en(r_iuf_start),
    .o_iuf_data(w_iuf_data), .o_iuf_done(w_iuf_done)
  );

  twin_ctr u_twin_ctr (
    .i_clk, .i_rstn, .i_start(r_ctr_start), .i_key(r_key), .i_value(r_value),
    .i_nwords(r_len), .i_out_ready, .o_data, .o_data_valid,
    .o_value(w_ctr_value), .o_done(w_ctr_done)
  );

  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      r_state <= IDLE;
      r_key <= '0; r_value <= '0; r_ad <= '0; r_ad_en <= 1'b0; r_len <= '0;
      r_iuf_start <= 1'b0; r_ctr_start <= 1'b0;
      o_key <= '0; o_value <= '0; o_gf_done <= 1'b0;
    end else begin
      r_iuf_start <= 1'b0;
      r_ctr_start <= 1'b0;
      o_gf_done   <= 1'b0;
      unique case (r_state)
        IDLE: if (i_gf_en) begin
          r_key   <= i_key;
          r_value <= i_value;
          r_ad    <= i_ad;
          r_ad_en <= i_ad_en;
          r_len   <= i_len_output;
          if (i_pre_ctr_en) begin
            r_iuf_start <= 1'b1;
            r_state     <= PRE_CTR;
          end else begin
            r_ctr_start <= 1'b1;
            r_state     <= CTR_RUN;
          end
        end
        PRE_CTR: if (w_iuf_done) begin
          r_key       <= w_iuf_data[255:128];
          r_value     <= w_iuf_data[127:0];
          r_ctr_start <= 1'b1;
          r_state     <= CTR_RUN;
        end
        CTR_RUN: if (w_ctr_done) begin
          r_value     <= w_ctr_value;
          r_iuf_start <= 1'b1;
          r_state     <= IUF_RUN;
        end
        IUF_RUN: if (w_iuf_done) begin
          o_key     <= w_iuf_data[255:128];
          o_value   <= w_iuf_data[127:0];
          o_gf_done <= 1'b1;
          r_state   <= IDLE;
        end
        default: r_state <= IDLE;
      endcase
    end
  end

endmodule
