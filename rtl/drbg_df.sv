// drbg_df: block-cipher derivation function (Block_Cipher_df of SP 800-90A) on
// ARIA-128, returning seedlen = 256 bits.
//
//   S    = L || N || input || 0x80 || 0...0   (padded to whole 128-bit blocks)
//   Key  = BCC(K0, IV0 || S),  X = BCC(K0, IV1 || S)   K0 = 00 01 .. 0F,
//                                                    IVi = i (32 bits) || 0^96
//   out  = Enc(Key, X) || Enc(Key, Enc(Key, X))
// where BCC is a CBC-MAC with a zero start value. The two BCC chains see the same
// blocks, so they run side by side on two encryption cores sharing one key schedule;
// this halves the chaining time, as the source description proposes.
//
// Interface: i_df_en (one-clock start) latches i_Elen, i_PSlen (bits) and i_N
// (bytes requested, placed in the header). The input string, i_Elen + i_PSlen bits,
// then arrives as 32-bit words, most significant first, on i_data; a word is taken in
// each clock where i_data_en and o_data_ready are both high. L and N, the 0x80 pad
// word and the zero fill are inserted internally, one word per clock. o_df_data is
// registered and o_df_done pulses once when it is valid. Each 128-bit block costs 4
// word clocks plus 14 clocks of encryption. Lengths must be multiples of 32 bits and
// the result is always 256 bits: both are this design's restrictions.
module drbg_df
  import aria_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_rstn,
  input  logic        i_df_en,
  input  logic [30:0] i_Elen,
  input  logic [30:0] i_PSlen,
  input  logic [31:0] i_N,
  input  logic [31:0] i_data,
  input  logic        i_data_en,
  output logic        o_data_ready,
  output seed_t       o_df_data,
  output logic        o_df_done
);

  typedef enum logic [3:0] {D_IDLE, D_KS0, D_IV, D_FILL, D_BCC, D_KS1, D_X1, D_X2}
    df_state_e;
  df_state_e r_state;

  logic [31:0] r_nin;        // input words
  logic [31:0] r_L, r_N;     // header words
  logic [31:0] r_widx;       // index of the next word of S
  logic [1:0]  r_wcnt;       // words already in r_blk
  logic [95:0] r_blk;        // first three words of the block being built
  logic        r_final;      // the block being encrypted is the last of S
  blk_t        r_chain0, r_chain1, r_x1, r_ks_key, r_pt0, r_pt1;
  logic        r_ks_start, r_enc_start;

  rkeys_t      w_rk;
  logic        w_ks_done, w_ks_busy;
  blk_t        w_ct0, w_ct1;
  logic        w_done0, w_done1, w_busy0, w_busy1;
  logic        w_ext, w_take;
  logic [31:0] w_word;

  aria_key_sched u_key_sched (
    .i_clk, .i_rstn, .i_start(r_ks_start), .i_key(r_ks_key),
    .o_rk(w_rk), .o_done(w_ks_done), .o_busy(w_ks_busy)
  );

  aria_enc_core u_c0_enc_core (
    .i_clk, .i_rstn, .i_start(r_enc_start), .i_pt(r_pt0), .i_rk(w_rk),
    .o_ct(w_ct0), .o_done(w_done0), .o_busy(w_busy0)
  );

  aria_enc_core u_c1_enc_core (
    .i_clk, .i_rstn, .i_start(r_enc_start), .i_pt(r_pt1), .i_rk(w_rk),
    .o_ct(w_ct1), .o_done(w_done1), .o_busy(w_busy1)
  );

  // Source of the next word of S.
  always_comb begin
    w_ext = 1'b0;
    if (r_widx == 32'd0)                 w_word = r_L;
    else if (r_widx == 32'd1)            w_word = r_N;
    else if (r_widx < r_nin + 32'd2) begin
      w_word = i_data;
      w_ext  = 1'b1;
    end
    else if (r_widx == r_nin + 32'd2)    w_word = 32'h8000_0000;
    else                                 w_word = 32'h0000_0000;
  end

  assign o_data_ready = (r_state == D_FILL) && w_ext;
  assign w_take       = (r_state == D_FILL) && (!w_ext || i_data_en);

  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      r_state <= D_IDLE;
      r_nin <= '0; r_L <= '0; r_N <= '0; r_widx <= '0; r_wcnt <= '0; r_blk <= '0;
      r_final <= 1'b0;
      r_chain0 <= '0; r_chain1 <= '0; r_x1 <= '0; r_ks_key <= '0; r_pt0 <= '0; r_pt1 <= '0;
      r_ks_start <= 1'b0; r_enc_start <= 1'b0;
      o_df_data <= '0; o_df_done <= 1'b0;
    end else begin
      r_ks_start  <= 1'b0;
      r_enc_start <= 1'b0;
      o_df_done   <= 1'b0;
      unique case (r_state)
        D_IDLE: if (i_df_en) begin
          r_nin      <= 32'((i_Elen + i_PSlen) >> 5);
          r_L        <= 32'((i_Elen + i_PSlen) >> 3);
          r_N        <= i_N;
          r_widx     <= '0;
          r_wcnt     <= '0;
          r_ks_key   <= DF_KEY;
          r_ks_start <= 1'b1;
          r_state    <= D_KS0;
        end
        D_KS0: if (w_ks_done) begin
          // BCC starts from zero, so the first block is just the IV.
          r_pt0       <= {32'd0, 96'd0};
          r_pt1       <= {32'd1, 96'd0};
          r_enc_start <= 1'b1;
          r_state     <= D_IV;
        end
        D_IV: if (w_done0) begin
          r_chain0 <= w_ct0;
          r_chain1 <= w_ct1;
          r_state  <= D_FILL;
        end
        D_FILL: if (w_take) begin
          r_widx <= r_widx + 32'd1;
          r_wcnt <= r_wcnt + 2'd1;
          if (r_wcnt == 2'd3) begin
            r_pt0       <= r_chain0 ^ {r_blk, w_word};
            r_pt1       <= r_chain1 ^ {r_blk, w_word};
            r_final     <= (r_widx >= r_nin + 32'd2);
            r_enc_start <= 1'b1;
            r_state     <= D_BCC;
          end else begin
            r_blk <= {r_blk[63:0], w_word};
          end
        end
        D_BCC: if (w_done0) begin
          r_chain0 <= w_ct0;
          r_chain1 <= w_ct1;
          if (r_final) begin
            r_ks_key   <= w_ct0;
            r_ks_start <= 1'b1;
            r_state    <= D_KS1;
          end else begin
            r_state <= D_FILL;
          end
        end
        D_KS1: if (w_ks_done) begin
          r_pt0       <= r_chain1;
          r_enc_start <= 1'b1;
          r_state     <= D_X1;
        end
        D_X1: if (w_done0) begin
          r_x1        <= w_ct0;
          r_pt0       <= w_ct0;
          r_enc_start <= 1'b1;
          r_state     <= D_X2;
        end
        D_X2: if (w_done0) begin
          o_df_data <= {r_x1, w_ct0};
          o_df_done <= 1'b1;
          r_state   <= D_IDLE;
        end
        default: r_state <= D_IDLE;
      endcase
    end
  end

  // The two cores start together on the same round keys and must finish together.
  a_twin_done: assert property (@(posedge i_clk) disable iff (!i_rstn) w_done0 == w_done1);

endmodule
