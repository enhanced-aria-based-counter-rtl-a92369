// drbg_if: unified instantiate / reseed module (IF) of the CTR-DRBG.
//
// Instantiate and reseed differ only in the state they start from, so one module
// serves both: i_reseed = 0 starts from Key = V = 0 (instantiate), i_reseed = 1 from
// i_key / i_value (reseed). The seed material is built one of two ways:
//   i_df_en = 1: seed = df(Entropy || Nonce || PS)    through drbg_df
//   i_df_en = 0: seed = Entropy ^ PS                    (PS absent: 0)
// and then (Key, V) = Update(seed, start state) through the iuf.
// For a reseed, PS stands for the additional input.
//
// Interface: i_init_en (one-clock start) latches the mode, the start state and the
// lengths i_Elen / i_PSlen (bits; with the DF, i_Elen counts entropy and nonce
// together) and i_N (bytes, DF header). The input words then stream on
// i_data / i_data_en, most significant word first, entropy before PS, each taken in a
// clock where o_data_ready is high. Without the DF, i_Elen must be 256 and i_PSlen
// 256 or 0. o_key / o_value are registered; o_if_done pulses once when they are valid.
module drbg_if
  import aria_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_rstn,
  input  logic        i_init_en,
  input  logic        i_reseed,
  input  logic        i_df_en,
  input  logic [30:0] i_Elen,
  input  logic [30:0] i_PSlen,
  input  logic [31:0] i_N,
  input  logic [31:0] i_data,
  input  logic        i_data_en,
  output logic        o_data_ready,
  input  blk_t        i_key,
  input  blk_t        i_value,
  output blk_t        o_key,
  output blk_t        o_value,
  output logic        o_if_done
);

  typedef enum logic [1:0] {I_IDLE, I_DF, I_COLLECT, I_IUF} if_state_e;
  if_state_e r_state;

  logic        r_df_start, r_iuf_start;
  blk_t        r_key, r_value;
  seed_t       r_ent, r_ps, r_seed;
  logic [25:0] r_ecnt, r_pcnt;     // words of entropy / PS still to collect
  seed_t       w_df_data, w_iuf_data;
  logic        w_df_done, w_df_ready, w_iuf_done;

  drbg_df u_df (
    .i_clk, .i_rstn, .i_df_en(r_df_start), .i_Elen, .i_PSlen, .i_N,
    .i_data, .i_data_en(i_data_en && r_state == I_DF),
    .o_data_ready(w_df_ready), .o_df_data(w_df_data), .o_df_done(w_df_done)
  );

  iuf u_iuf (
    .i_clk, .i_rstn, .i_value(r_value), .i_key(r_key), .i_data(r_seed),
    .i_data_en(1'b1), .i_iuf_en(r_iuf_start),
    .o_iuf_data(w_iuf_data), .o_iuf_done(w_iuf_done)
  );

  assign o_data_ready = (r_state == I_DF) ? w_df_ready
                      : (r_state == I_COLLECT && (r_ecnt != '0 || r_pcnt != '0));

  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      r_state <= I_IDLE;
      r_df_start <= 1'b0; r_iuf_start <= 1'b0;
      r_key <= '0; r_value <= '0; r_ent <= '0; r_ps <= '0; r_seed <= '0;
      r_ecnt <= '0; r_pcnt <= '0;
      o_key <= '0; o_value <= '0; o_if_done <= 1'b0;
    end else begin
      r_df_start  <= 1'b0;
      r_iuf_start <= 1'b0;
      o_if_done   <= 1'b0;
      unique case (r_state)
        I_IDLE: if (i_init_en) begin
          r_key   <= i_reseed ? i_key   : '0;
          r_value <= i_reseed ? i_value : '0;
          r_ent   <= '0;
          r_ps    <= '0;
          r_ecnt  <= i_Elen[30:5];
          r_pcnt  <= i_PSlen[30:5];
          if (i_df_en) begin
            r_df_start <= 1'b1;
            r_state    <= I_DF;
          end else begin
            r_state    <= I_COLLECT;
          end
        end
        I_DF: if (w_df_done) begin
          r_seed      <= w_df_data;
          r_iuf_start <= 1'b1;
          r_state     <= I_IUF;
        end
        I_COLLECT: begin
          if (r_ecnt == '0 && r_pcnt == '0) begin
            r_seed      <= r_ent ^ r_ps;
            r_iuf_start <= 1'b1;
            r_state     <= I_IUF;
          end else if (i_data_en) begin
            if (r_ecnt != '0) begin
              r_ent  <= {r_ent[223:0], i_data};
              r_ecnt <= r_ecnt - 26'd1;
            end else begin
              r_ps   <= {r_ps[223:0], i_data};
              r_pcnt <= r_pcnt - 26'd1;
            end
          end
        end
        I_IUF: if (w_iuf_done) begin
          o_key     <= w_iuf_data[255:128];
          o_value   <= w_iuf_data[127:0];
          o_if_done <= 1'b1;
          r_state   <= I_IDLE;
        end
        default: r_state <= I_IDLE;
      endcase
    end
  end

endmodule
