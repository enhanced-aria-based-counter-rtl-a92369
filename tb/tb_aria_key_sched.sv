// tb_aria_key_sched: checks ARIA-128 key expansion against round keys computed by an
// independent software model of the cipher, for the RFC 5794 example key and three
// random keys. Checks ek1, ek7 and ek13 and that o_done comes 4 clocks after the clock that samples start.
module tb_aria_key_sched;
  import aria_pkg::*;

  logic   clk = 1'b0, rstn = 1'b0, start = 1'b0;
  blk_t   key;
  rkeys_t rk;
  logic   done, busy;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  aria_key_sched dut (.i_clk(clk), .i_rstn(rstn), .i_start(start), .i_key(key),
                      .o_rk(rk), .o_done(done), .o_busy(busy));

  blk_t vk [4] = '{128'h000102030405060708090a0b0c0d0e0f, 128'h6513270e269e0d37f2a74de452e6b438,
                   128'h9531985d5d9dc9f81818e811892f902b, 128'h6b0d549b6f03675a1600a35a099950d8};
  blk_t e1 [4] = '{128'hd415a75c794b85c5e0d2a0b3cb793bf6, 128'h309deb65e29986ef0566da75855577f3,
                   128'h9d27a6bb93ca666409299e7d70103a53, 128'h52e9fd8600d29ba16acec7a8f6970dd6};
  blk_t e7 [4] = '{128'h324286db44ba4db6c44ac306f2a84b2c, 128'h39cb2d0bb0c56c24d9dc86e3c2fcb60b,
                   128'hfb4770d2d2568ddbb0c379f6658679bf, 128'hf4ac6308383d0bd24fe2d6e536ecdcfc};
  blk_t e13[4] = '{128'h0f0aa16daee61bd7dfee5a599970fb35, 128'h4a70f80878d953f8fd8a1bdf6349a426,
                   128'h2b41dc98842e2d06b1f8c84972b4a975, 128'h98e0a7a2fcc89b63623844c8adecef9f};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int cyc;
    key = '0;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    for (int t = 0; t < 4; t++) begin
      @(negedge clk); key = vk[t]; start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == 4, $sformatf("latency %0d", cyc));
      check(rk[0]  == e1[t],  $sformatf("ek1 key %0d", t));
      check(rk[6]  == e7[t],  $sformatf("ek7 key %0d", t));
      check(rk[12] == e13[t], $sformatf("ek13 key %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
