// tb_drbg_top: end-to-end test of the CTR-DRBG IP through its SFR interface, at the
// design's default configuration, against an independent software model of SP
// 800-90A CTR-DRBG on ARIA-128. A host model runs:
//   GEN before INST (must be ignored), INST with DF (entropy+nonce 12 words, PS 8),
//   GEN 2 words, RESEED without DF (entropy 8, additional input 8), GEN 3 words with
//   PRE_CTR and AD, RESEED with DF (entropy only), GEN 1 word, ZEROIZE, INST without
//   DF and PS, GEN 1 word.
// Word i of an input string is 0x01020304*(i+1) + 0x9E3779B9*i + s (mod 2^32) with a
// per-string offset s. Every output word and the state after INST / RESEED are
// compared. The test also counts how often each mechanism occurred and fails if one
// never did: DF and non-DF seeding, reseed, PRE_CTR, a rejected command, zeroize,
// a DATA write that had to wait, and an output word held back by a full buffer.
module tb_drbg_top;
  import aria_pkg::*;

  logic        clk = 1'b0, rstn = 1'b0;
  logic [7:0]  addr = '0;
  logic        wr = 1'b0, rd = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic        irq;
  int          checks = 0, failures = 0;
  int          n_df = 0, n_nodf = 0, n_reseed = 0, n_pre = 0, n_reject = 0, n_zero = 0,
               n_data_wait = 0, n_out_stall = 0;

  localparam seed_t AD = 256'h00112233445566778899aabbccddeeff0123456789abcdeffedcba9876543210;

  always #5 clk = ~clk;

  drbg_top dut (.i_clk(clk), .i_rstn(rstn), .i_sfr_addr(addr), .i_sfr_wr(wr),
                .i_sfr_wdata(wdata), .i_sfr_rd(rd), .o_sfr_rdata(rdata), .o_irq(irq));

  // Clocks each operation keeps the core busy (includes waiting for the host).
  int busy_start = 0, clk_count = 0;
  always @(posedge clk) begin
    clk_count++;
    if (dut.w_if_start || dut.w_gf_start) busy_start = clk_count;
    if (dut.w_if_done) $display("IF operation: %0d clocks", clk_count - busy_start);
    if (dut.w_gf_done) $display("GF operation: %0d clocks", clk_count - busy_start);
  end

  always @(posedge clk) begin
    if (dut.w_out_valid && !dut.w_out_ready) n_out_stall++;
    if (dut.u_gf.r_state == dut.u_gf.PRE_CTR && dut.u_gf.r_iuf_start) n_pre++;
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

  function automatic logic [31:0] word(input int i, input logic [31:0] s);
    return 32'h01020304 * 32'(i + 1) + 32'h9e3779b9 * 32'(i) + s;
  endfunction

  task automatic push_string(input int n, input logic [31:0] s);
    logic [31:0] st;
    for (int i = 0; i < n; i++) begin
      forever begin
        sfr_rd(8'h04, st);
        if (st[1]) break;
        n_data_wait++;
      end
      sfr_wr(8'h18, word(i, s));
    end
  endtask

  task automatic wait_done();
    logic [31:0] st;
    do sfr_rd(8'h04, st); while (!st[3]);
    check(irq, "irq with DONE");
    sfr_wr(8'h04, 32'h8);
    sfr_rd(8'h04, st);
    check(!st[3] && !st[0] && !irq, "DONE cleared, not busy");
  endtask

  task automatic read_word(input seed_t exp, input string what);
    logic [31:0] st, d;
    seed_t got;
    do sfr_rd(8'h04, st); while (!st[2]);
    repeat ($urandom_range(0, 40)) @(negedge clk);   // slow host
    for (int w = 0; w < 8; w++) begin
      sfr_rd(8'h40 + 8'(4 * w), d);
      got[255 - 32*w -: 32] = d;
    end
    check(got == exp, $sformatf("%s: %h", what, got));
  endtask

  task automatic check_state(input blk_t k, input blk_t v, input string what);
    check(dut.r_key == k && dut.r_value == v, $sformatf("%s state %h %h", what, dut.r_key, dut.r_value));
  endtask

  initial begin
    logic [31:0] st;
    repeat (3) @(posedge clk);
    rstn = 1'b1;

    // GEN before INST is ignored
    sfr_wr(8'h00, 32'h4);
    repeat (5) @(negedge clk);
    sfr_rd(8'h04, st);
    check(st[4:0] == 5'b0, $sformatf("ignored GEN, status %h", st));
    if (st[0] == 1'b0) n_reject++;

    // INST with DF: entropy+nonce 384 bits, PS 256 bits
    sfr_wr(8'h08, 32'd384); sfr_wr(8'h0C, 32'd256);
    sfr_wr(8'h00, 32'h11);
    push_string(12, 32'h0); push_string(8, 32'h1111);
    wait_done(); n_df++;
    sfr_rd(8'h04, st); check(st[4], "instantiated");
    check_state(128'h3dfea578c70b463ffe59547e5555b281, 128'h31b890de8b6ccd89c29329e05c433b6a, "INST");

    // GEN 2 words, no additional input
    sfr_wr(8'h14, 32'd2);
    sfr_wr(8'h00, 32'h4);
    read_word(256'h7d854998826827eed54fe3267d9d644bbe952c83755216d1c6ed2994517afbb2, "GEN1 w0");
    read_word(256'h32f7d7424c1e1584c0a2fc13b304a1042cd7e324bd16c1a21e87ce8a3d7bbd8e, "GEN1 w1");
    wait_done();
    check_state(128'h32ca1c495ee942827b33af0e184d3d68, 128'he4d7b59c5bc73eee951a794261db98ee, "GEN1");

    // RESEED without DF: entropy 256 bits, additional input 256 bits
    sfr_wr(8'h08, 32'd256); sfr_wr(8'h0C, 32'd256);
    sfr_wr(8'h00, 32'h2);
    // a command while busy is ignored
    sfr_wr(8'h00, 32'h4);
    sfr_rd(8'h04, st); if (st[0]) n_reject++;
    push_string(8, 32'h2222); push_string(8, 32'h3333);
    wait_done(); n_nodf++; n_reseed++;
    check_state(128'hc42dbb271c44c162a8acdfb9aa37411c, 128'h799488a221bb5a6aad94c412853781a5, "RESEED");

    // GEN 3 words with PRE_CTR and additional input
    for (int w = 0; w < 8; w++) sfr_wr(8'h20 + 8'(4 * w), AD[255 - 32*w -: 32]);
    sfr_rd(8'h2C, st); check(st == AD[159:128], "AD3 read back");
    sfr_wr(8'h14, 32'd3);
    sfr_wr(8'h00, 32'h64);
    read_word(256'h4a160493cd3714e2322034f193fbfd583cbebae8e4e54b767e391ec9d77aa8ad, "GEN2 w0");
    read_word(256'h22d334483c6add6dfce11ab7a4642b25bd406069c6f149c46c24673bb416a2e2, "GEN2 w1");
    read_word(256'h74ca4c063931ed3338247e6246ac8c84c41cc2a0449bc6fdfeef8ec318d2ec13, "GEN2 w2");
    wait_done();
    check_state(128'hd9ba4d46c1fc7aec10971a0e2116c91f, 128'h99daf9b2ab8ebaf0901af7da7635134b, "GEN2");

    // RESEED with DF, entropy only
    sfr_wr(8'h0C, 32'd0);
    sfr_wr(8'h00, 32'h12);
    push_string(8, 32'h4444);
    wait_done(); n_df++; n_reseed++;
    check_state(128'h95fc9508df2269b1895f162e76bf7291, 128'hc943587d07aef1073648ebaa0c61612b, "RESEED2");
    sfr_wr(8'h14, 32'd1);
    sfr_wr(8'h00, 32'h0);
    sfr_wr(8'h00, 32'h4);
    read_word(256'ha7fb2fe7dbffcccccc4f34a075f9000247560fcb24676df8eb01d745d4270eb7, "GEN3");
    wait_done();

    // ZEROIZE
    sfr_wr(8'h00, 32'h8);
    sfr_rd(8'h04, st);
    check(!st[4], "zeroized");
    check_state('0, '0, "ZEROIZE");
    n_zero++;

    // INST without DF, no PS
    sfr_wr(8'h00, 32'h1);
    push_string(8, 32'h5555);
    wait_done(); n_nodf++;
    check_state(128'hb524b9fde1cd0eea145875c10ea8a3b0, 128'h2f41ef815290270a1b74bcb2d8408fd8, "INST2");
    sfr_wr(8'h00, 32'h4);
    read_word(256'h1148ef40b13e3cab20ac6e9828f8026ff020dc68b1737ceaf99755c21c542e71, "GEN4");
    wait_done();

    $display("mechanisms: df=%0d nodf=%0d reseed=%0d pre_ctr=%0d reject=%0d zeroize=%0d data_wait=%0d out_stall=%0d",
             n_df, n_nodf, n_reseed, n_pre, n_reject, n_zero, n_data_wait, n_out_stall);
    check(n_df > 0, "DF seeding happened");
    check(n_nodf > 0, "non-DF seeding happened");
    check(n_reseed > 0, "reseed happened");
    check(n_pre > 0, "PRE_CTR happened");
    check(n_reject > 0, "rejected command happened");
    check(n_zero > 0, "zeroize happened");
    check(n_data_wait > 0, "DATA wait happened");
    check(n_out_stall > 0, "output back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
