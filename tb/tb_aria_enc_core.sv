// tb_aria_enc_core: encrypts the RFC 5794 ARIA-128 example block and three random
// blocks and compares with an independent software model; also checks the
// 13-clock latency (load plus 12 rounds) from i_start to o_done. Round keys come
// from aria_key_sched.
module tb_aria_enc_core;
  import aria_pkg::*;

  logic   clk = 1'b0, rstn = 1'b0, ks_start = 1'b0, start = 1'b0;
  blk_t   key, pt, ct;
  rkeys_t rk;
  logic   ks_done, ks_busy, done, busy;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  aria_key_sched u_ks (.i_clk(clk), .i_rstn(rstn), .i_start(ks_start), .i_key(key),
                       .o_rk(rk), .o_done(ks_done), .o_busy(ks_busy));
  aria_enc_core dut (.i_clk(clk), .i_rstn(rstn), .i_start(start), .i_pt(pt), .i_rk(rk),
                     .o_ct(ct), .o_done(done), .o_busy(busy));

  blk_t vk [4] = '{128'h000102030405060708090a0b0c0d0e0f, 128'h6513270e269e0d37f2a74de452e6b438,
                   128'h9531985d5d9dc9f81818e811892f902b, 128'h6b0d549b6f03675a1600a35a099950d8};
  blk_t vp [4] = '{128'h00112233445566778899aabbccddeeff, 128'hd23f0824128b2f330c5c7fd0a6a3a450,
                   128'h36f675cc81e74ef5e8e25d940ed90475, 128'h8d116ece1738f7d93d9c172411e20b8f};
  blk_t vc [4] = '{128'hd718fbd6ab644c739da95f3be6451778, 128'h41b95e82e4605d40861c138f41459017,
                   128'h12a833a1ee72cecdff0519ba4294b333, 128'he481919cf88d57d9d22046b4ea0f6625};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int cyc;
    key = '0; pt = '0;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    for (int t = 0; t < 4; t++) begin
      @(negedge clk); key = vk[t]; ks_start = 1'b1;
      @(negedge clk); ks_start = 1'b0;
      while (!ks_done) @(negedge clk);
      pt = vp[t]; start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == 13, $sformatf("latency %0d", cyc));
      check(ct == vc[t], $sformatf("ct %0d: %h", t, ct));
      @(negedge clk);
      check(ct == vc[t] && !busy, "ct held after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
