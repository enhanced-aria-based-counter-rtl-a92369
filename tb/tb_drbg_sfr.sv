// tb_drbg_sfr: checks the SFR register bank on its own: reset values, read-back of
// the length and AD registers, one-clock command pulses and sticky mode bits, DATA
// writes accepted only while the core is ready, the single-word output buffer
// (capture, back-pressure, pop on reading OUT7) and the DONE / irq bit.
module tb_drbg_sfr;
  import aria_pkg::*;

  logic        clk = 1'b0, rstn = 1'b0;
  logic [7:0]  addr = '0;
  logic        wr = 1'b0, rd = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic        irq, inst, rs, gen, zero, dfen, pre, aden, den, oready;
  logic [30:0] elen, pslen;
  logic [31:0] n, glen, data;
  seed_t       ad;
  logic        dready = 1'b0, busy = 1'b0, done = 1'b0, insted = 1'b0, ovalid = 1'b0;
  seed_t       odata = '0;
  int          checks = 0, failures = 0;
  int          n_inst = 0, n_rs = 0, n_gen = 0, n_zero = 0, n_den = 0;

  always #5 clk = ~clk;

  drbg_sfr dut (.i_clk(clk), .i_rstn(rstn), .i_sfr_addr(addr), .i_sfr_wr(wr),
                .i_sfr_wdata(wdata), .i_sfr_rd(rd), .o_sfr_rdata(rdata), .o_irq(irq),
                .o_inst_start(inst), .o_reseed_start(rs), .o_gen_start(gen), .o_zeroize(zero),
                .o_df_en(dfen), .o_pre_ctr_en(pre), .o_ad_en(aden), .o_elen(elen),
                .o_pslen(pslen), .o_n(n), .o_gen_len(glen), .o_ad(ad), .o_data(data),
                .o_data_en(den), .i_data_ready(dready), .i_busy(busy), .i_done(done),
                .i_instantiated(insted), .i_out_data(odata), .i_out_valid(ovalid),
                .o_out_ready(oready));

  always @(posedge clk) if (rstn) begin
    n_inst += int'(inst); n_rs += int'(rs); n_gen += int'(gen); n_zero += int'(zero);
    n_den += int'(den);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic sfr_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1'b1;
    @(negedge clk); wr = 1'b0;
  endtask

  task automatic sfr_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd = 1'b1;
    #1 d = rdata;
    @(negedge clk); rd = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    seed_t exp;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    sfr_rd(8'h08, d); check(d == 32'd256, "ELEN reset");
    sfr_rd(8'h10, d); check(d == 32'd32,  "N reset");
    sfr_rd(8'h14, d); check(d == 32'd1,   "GENLEN reset");
    sfr_wr(8'h08, 32'd384); sfr_wr(8'h0C, 32'd128); sfr_wr(8'h10, 32'd48); sfr_wr(8'h14, 32'd5);
    sfr_rd(8'h08, d); check(d == 32'd384 && elen == 31'd384, "ELEN");
    sfr_rd(8'h0C, d); check(d == 32'd128 && pslen == 31'd128, "PSLEN");
    sfr_rd(8'h10, d); check(d == 32'd48 && n == 32'd48, "N");
    sfr_rd(8'h14, d); check(d == 32'd5 && glen == 32'd5, "GENLEN");
    for (int w = 0; w < 8; w++) sfr_wr(8'h20 + 8'(4 * w), 32'hA0000000 + 32'(w));
    for (int w = 0; w < 8; w++) exp[255 - 32*w -: 32] = 32'hA0000000 + 32'(w);
    check(ad == exp, "AD word order");
    sfr_rd(8'h34, d); check(d == 32'hA0000005, "AD5 read back");
    // commands: one pulse each, mode bits stay
    sfr_wr(8'h00, 32'h7F);
    @(negedge clk);
    check(n_inst == 1 && n_rs == 1 && n_gen == 1 && n_zero == 1,
          $sformatf("command pulses %0d %0d %0d %0d", n_inst, n_rs, n_gen, n_zero));
    check(dfen && pre && aden, "mode bits set");
    sfr_rd(8'h00, d); check(d == 32'h70, "CTRL read back");
    // DATA: dropped while not ready, accepted while ready
    sfr_wr(8'h18, 32'h1234);
    @(negedge clk);
    check(n_den == 0, "DATA dropped when not ready");
    dready = 1'b1;
    sfr_rd(8'h04, d); check(d[1], "DATA_READY shown");
    sfr_wr(8'h18, 32'hCAFEF00D);
    @(negedge clk);
    check(n_den == 1 && data == 32'hCAFEF00D, "DATA accepted");
    dready = 1'b0;
    // output buffer
    odata = {8{32'h5A5A0000}} ^ {32'd0, 32'd1, 32'd2, 32'd3, 32'd4, 32'd5, 32'd6, 32'd7};
    @(negedge clk); ovalid = 1'b1;
    @(negedge clk);
    check(!oready, "buffer full after capture");
    odata = '1;   // a new word waits while the buffer is full
    sfr_rd(8'h04, d); check(d[2], "OUT_FULL shown");
    for (int w = 0; w < 8; w++) begin
      sfr_rd(8'h40 + 8'(4 * w), d);
      check(d == (32'h5A5A0000 ^ 32'(w)), $sformatf("OUT%0d %h", w, d));
    end
    @(negedge clk);
    check(!oready || dut.r_out == '1, "next word captured after pop");
    ovalid = 1'b0;
    sfr_rd(8'h40, d); check(d == 32'hFFFFFFFF, "second word");
    // DONE
    @(negedge clk); done = 1'b1; @(negedge clk); done = 1'b0;
    sfr_rd(8'h04, d); check(d[3] && irq, "DONE set");
    sfr_wr(8'h04, 32'h8);
    sfr_rd(8'h04, d); check(!d[3] && !irq, "DONE cleared");
    busy = 1'b1; insted = 1'b1;
    sfr_rd(8'h04, d); check(d[0] && d[4], "BUSY / INSTANTIATED");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
