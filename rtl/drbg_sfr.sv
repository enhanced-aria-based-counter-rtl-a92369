// drbg_sfr: special function register (SFR) interface of the CTR-DRBG IP.
//
// A 32-bit register bank on a simple synchronous bus: a write happens in a clock
// with i_sfr_wr high; o_sfr_rdata shows the register at i_sfr_addr combinationally,
// and i_sfr_rd marks a read (only OUT7 has a read side effect). Word addresses:
//   0x00 CTRL    W  bit0 INST, bit1 RESEED, bit2 GEN, bit3 ZEROIZE: one-clock
//                   commands, read back as 0
//               RW  bit4 DF_EN, bit5 PRE_CTR_EN, bit6 AD_EN: mode bits
//   0x04 STATUS  R  bit0 BUSY, bit1 DATA_READY, bit2 OUT_FULL, bit3 DONE,
//                   bit4 INSTANTIATED;  W  1 to bit3 clears DONE
//   0x08 ELEN    RW entropy (and nonce) length in bits, 31 bits
//   0x0C PSLEN   RW personalization string / additional input length in bits, 31 bits
//   0x10 N       RW DF output length in bytes (header word N), reset value 32
//   0x14 GENLEN  RW number of 256-bit output words per GEN command, reset value 1
//   0x18 DATA    W  next input word; accepted only while DATA_READY is set
//   0x20-0x3C AD0..AD7  RW 256-bit additional input for GEN, AD0 most significant
//   0x40-0x5C OUT0..OUT7 R  last 256-bit output word, OUT0 most significant;
//                   reading OUT7 empties the buffer so the next word can enter.
// DONE is set by the core's completion pulse and drives o_irq. The source
// description states only that the IP has an SFR interface: the whole map is this
// design's choice.
module drbg_sfr
  import aria_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_rstn,
  input  logic [7:0]  i_sfr_addr,
  input  logic        i_sfr_wr,
  input  logic [31:0] i_sfr_wdata,
  input  logic        i_sfr_rd,
  output logic [31:0] o_sfr_rdata,
  output logic        o_irq,
  // towards the DRBG core
  output logic        o_inst_start,
  output logic        o_reseed_start,
  output logic        o_gen_start,
  output logic        o_zeroize,
  output logic        o_df_en,
  output logic        o_pre_ctr_en,
  output logic        o_ad_en,
  output logic [30:0] o_elen,
  output logic [30:0] o_pslen,
  output logic [31:0] o_n,
  output logic [31:0] o_gen_len,
  output seed_t       o_ad,
  output logic [31:0] o_data,
  output logic        o_data_en,
  input  logic        i_data_ready,
  input  logic        i_busy,
  input  logic        i_done,
  input  logic        i_instantiated,
  input  seed_t       i_out_data,
  input  logic        i_out_valid,
  output logic        o_out_ready
);

  localparam logic [7:0] A_CTRL = 8'h00, A_STATUS = 8'h04, A_ELEN = 8'h08,
                         A_PSLEN = 8'h0C, A_N = 8'h10, A_GENLEN = 8'h14,
                         A_DATA = 8'h18, A_AD0 = 8'h20, A_OUT0 = 8'h40, A_OUT7 = 8'h5C;

  logic [7:0][31:0] r_ad, r_out;    // index 7 = word 0 (most significant)
  logic             r_out_full, r_done;
  logic             w_wr_ad, w_rd_ad, w_rd_out;
  logic [2:0]       w_word;

  assign w_word   = i_sfr_addr[4:2];
  assign w_wr_ad  = i_sfr_addr[7:5] == 3'b001;   // 0x20..0x3C
  assign w_rd_ad  = w_wr_ad;
  assign w_rd_out = i_sfr_addr[7:5] == 3'b010;   // 0x40..0x5C

  always_ff @(posedge i_clk or negedge i_rstn) begin
    if (!i_rstn) begin
      o_inst_start <= 1'b0; o_reseed_start <= 1'b0; o_gen_start <= 1'b0; o_zeroize <= 1'b0;
      o_df_en <= 1'b0; o_pre_ctr_en <= 1'b0; o_ad_en <= 1'b0;
      o_elen <= 31'd256; o_pslen <= '0; o_n <= 32'd32; o_gen_len <= 32'd1;
      o_data <= '0; o_data_en <= 1'b0;
      r_ad <= '0; r_out <= '0; r_out_full <= 1'b0; r_done <= 1'b0;
    end else begin
      o_inst_start   <= 1'b0;
      o_reseed_start <= 1'b0;
      o_gen_start    <= 1'b0;
      o_zeroize      <= 1'b0;
      o_data_en      <= 1'b0;
      if (i_done) r_done <= 1'b1;
      if (i_sfr_wr) begin
        unique case (i_sfr_addr)
          A_CTRL: begin
            o_inst_start   <= i_sfr_wdata[0];
            o_reseed_start <= i_sfr_wdata[1];
            o_gen_start    <= i_sfr_wdata[2];
            o_zeroize      <= i_sfr_wdata[3];
            o_df_en        <= i_sfr_wdata[4];
            o_pre_ctr_en   <= i_sfr_wdata[5];
            o_ad_en        <= i_sfr_wdata[6];
          end
          A_STATUS: if (i_sfr_wdata[3] && !i_done) r_done <= 1'b0;
          A_ELEN:   o_elen    <= i_sfr_wdata[30:0];
          A_PSLEN:  o_pslen   <= i_sfr_wdata[30:0];
          A_N:      o_n       <= i_sfr_wdata;
          A_GENLEN: o_gen_len <= i_sfr_wdata;
          A_DATA: if (i_data_ready && !o_data_en) begin
            o_data    <= i_sfr_wdata;
            o_data_en <= 1'b1;
          end
          default: if (w_wr_ad) r_ad[3'd7 - w_word] <= i_sfr_wdata;
        endcase
      end
      // One output word is buffered; it is taken from the core when the buffer is free.
      if (i_out_valid && !r_out_full) begin
        r_out      <= i_out_data;
        r_out_full <= 1'b1;
      end else if (i_sfr_rd && i_sfr_addr == A_OUT7) begin
        r_out_full <= 1'b0;
      end
    end
  end

  always_comb begin
    o_sfr_rdata = '0;
    unique case (i_sfr_addr)
      A_CTRL:   o_sfr_rdata = {25'd0, o_ad_en, o_pre_ctr_en, o_df_en, 4'd0};
      A_STATUS: o_sfr_rdata = {27'd0, i_instantiated, r_done, r_out_full,
                               i_data_ready && !o_data_en, i_busy};
      A_ELEN:   o_sfr_rdata = {1'b0, o_elen};
      A_PSLEN:  o_sfr_rdata = {1'b0, o_pslen};
      A_N:      o_sfr_rdata = o_n;
      A_GENLEN: o_sfr_rdata = o_gen_len;
      default: begin
        if (w_rd_ad)  o_sfr_rdata = r_ad[3'd7 - w_word];
        if (w_rd_out) o_sfr_rdata = r_out[3'd7 - w_word];
      end
    endcase
  end

  assign o_ad        = r_ad;
  assign o_irq       = r_done;
  assign o_out_ready = !r_out_full;

endmodule
