// drbg_top: ARIA-128 CTR-DRBG IP with an SFR host interface.
//
// Holds the DRBG internal state (Key, V) and an instantiated flag, and sequences
// the three functions of the generator:
//   INST     drbg_if with Key = V = 0 builds the first state from entropy (+nonce)
//            (+personalization string), with or without the derivation function;
//   RESEED   drbg_if from the current state, with new entropy and additional input;
//   GEN      drbg_gf produces GENLEN x 256 random bits and updates the state;
//   ZEROIZE  clears Key, V and the instantiated flag (internal state extinction).
// Commands come from drbg_sfr (register map in that file); one runs at a time and
// a command given while BUSY, or RESEED/GEN before INST, is ignored. The state
// registers load on the completion pulse of IF or GF, which also sets STATUS.DONE
// and o_irq. Input words reach drbg_if through the SFR DATA register; output words
// leave drbg_gf through the SFR OUT registers with back-pressure. The split into IF
// and GF modules follows the source description; the command sequencing is this design's.
module drbg_top
  import aria_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_rstn,
  input  logic [7:0]  i_sfr_addr,
  input  logic        i_sfr_wr,
  input  logic [31:0] i_sfr_wdata,
  input  logic        i_sfr_rd,
  output logic [31:0] o_sfr_rdata,
  output logic        o_irq
);

  blk_t  r_key, r_value;
  logic  r_inst, r_busy;

  logic        w_inst_start, w_reseed_start, w_gen_start, w_zeroize;
  logic        w_df_en, w_pre_ctr_en, w_ad_en;
  logic [30:0] w_elen, w_pslen;
  logic [31:0] w_n, w_gen_len, w_data;
  logic        w_data_en, w_data_ready;
  seed_t       w_ad, w_out_data;
  logic        w_out_valid, w_out_ready;
  logic        w_if_start, w_gf_start;
  blk_t        w_if_key, w_if_value, w_gf_key, w_gf_value;
  logic        w_if_done, w_gf_done;

  drbg_sfr u_sfr (
    .i_clk, .i_rstn, .i_sfr_addr, .i_sfr_wr, .i_sfr_wdata, .i_sfr_rd, .o_sfr_rdata, .o_irq,
    .o_inst_start(w_inst_start), .o_reseed_start(w_reseed_start),
    .o_gen_start(w_gen_start), .o_zeroize(w_zeroize),
    .o_df_en(w_df_en), .o_pre_ctr_en(w_pre_ctr_en), .o_ad_en(w_ad_en),
    .o_elen(w_elen), .o_pslen(w_pslen), .o_n(w_n), .o_gen_len(w_gen_len),
    .o_ad(w_ad), .o_data(w_data), .o_data_en(w_data_en),
    .i_data_ready(w_data_ready), .i_busy(r_busy), .i_done(w_if_done || w_gf_done),
    .i_instantiated(r_inst), .i_out_data(w_out_data), .i_out_valid(w_out_valid),
    .o_out_ready(w_out_ready)
  );

  assign w_if_start = !r_busy && (w_inst_start || (w_reseed_start && r_inst));
  assign w_gf_start = !r_busy && !w_if_start && w_gen_start && r_inst;

  drbg_if u_if (
    .i_clk, .i_rstn, .i_init_en(w_if_start), .i_reseed(!w_inst_start),
    .i_df_en(w_df_en), .i_Elen(w_elen), .i_PSlen(w_pslen), .i_N(w_n),
    .i_data(w_data), .i_data_en(w_data_en), .o_data_ready(w_data_ready),
    .i_key(r_key), .i_value(r_value), .o_key(w_if_key), .o_value(w_if_value),
    .o_if_done(w_if_done)
  );

  drbg_gf u_gf (
    .i_clk, .i_rstn, .i_gf_en(w_gf_start), .i_pre_ctr_en(w_pre_ctr_en),
    .i_ad(w_ad), .i_ad_en(w_ad_en), .i_key(r_key), .i_value(r_value),
    .i_len_output(w_gen_len), .i_out_ready(w_out_ready),
    .o_data(w_out_data), .o_data_valid(w_out_valid),
    .o_key(w_gf_key), .o_value(w_gf_value), .o_gf_done(w_gf_done)
  );

  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      r_key <= '0; r_value <= '0; r_inst <= 1'b0; r_busy <= 1'b0;
    end else begin
      if (w_if_start || w_gf_start) r_busy <= 1'b1;
      if (w_if_done) begin
        r_key   <= w_if_key;
        r_value <= w_if_value;
        r_inst  <= 1'b1;
        r_busy  <= 1'b0;
      end else if (w_gf_done) begin
        r_key   <= w_gf_key;
        r_value <= w_gf_value;
        r_busy  <= 1'b0;
      end else if (w_zeroize && !r_busy) begin
        r_key   <= '0;
        r_value <= '0;
        r_inst  <= 1'b0;
      end
    end
  end

endmodule
