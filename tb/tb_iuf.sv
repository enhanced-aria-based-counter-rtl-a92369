// tb_iuf: checks the internal state update against an independent software model of
// (Enc(K,V+1) || Enc(K,V+2)) ^ data for four cases: all-zero state, V = 2^128-1
// (counter wrap), a small provided data word, and i_data_en = 0 with non-zero
// i_data (which must be ignored). Also checks the 21-clock latency and the FSM
// order IUF_IDLE -> IUF_KS -> IUF_ENC -> IUF_END.
module tb_iuf;
  import aria_pkg::*;

  logic  clk = 1'b0, rstn = 1'b0, en = 1'b0, den;
  blk_t  key, value;
  seed_t data, q;
  logic  done;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  iuf dut (.i_clk(clk), .i_rstn(rstn), .i_value(value), .i_key(key), .i_data(data),
           .i_data_en(den), .i_iuf_en(en), .o_iuf_data(q), .o_iuf_done(done));

  blk_t  vk [4] = '{128'h0, 128'h000102030405060708090a0b0c0d0e0f,
                    128'h0123456789abcdeffedcba9876543210, 128'h000102030405060708090a0b0c0d0e0f};
  blk_t  vv [4] = '{128'h0, {128{1'b1}}, 128'h55555555aaaaaaaa55555555aaaaaaaa, {128{1'b1}}};
  seed_t vd [4] = '{256'h0,
                    256'h1122334455667788990011223344556677889900aabbccddeeff001122334455,
                    256'hdeadbeef,
                    256'h1122334455667788990011223344556677889900aabbccddeeff001122334455};
  logic  ve [4] = '{1'b0, 1'b1, 1'b1, 1'b0};
  seed_t vq [4] = '{256'hb426e1a441f6dbfc2b2d2412d0066d2052a9a4cc4fb1ef00a72ff87583d44e5c,
                    256'heb0a1495160afd090073524c53e812f6d16baac3e8c7b8f9e8c2aaae3788410e,
                    256'h8a87b4bf5b8526f13b5aae7da0c49252c6efaffdf23228ed4b51726b3aec4363,
                    256'h0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Record the order of FSM states visited.
  int seen_ks = 0, seen_enc = 0, seen_end = 0, order_err = 0;
  always @(posedge clk) if (rstn) begin
    if (dut.r_state == dut.IUF_KS  && seen_enc != 0) order_err++;
    if (dut.r_state == dut.IUF_ENC && seen_ks  == 0) order_err++;
    if (dut.r_state == dut.IUF_END && seen_enc == 0) order_err++;
    if (dut.r_state == dut.IUF_KS)  seen_ks++;
    if (dut.r_state == dut.IUF_ENC) seen_enc++;
    if (dut.r_state == dut.IUF_END) seen_end++;
    if (dut.r_state == dut.IUF_IDLE) begin seen_ks = 0; seen_enc = 0; seen_end = 0; end
  end

  initial begin
    int cyc;
    key = '0; value = '0; data = '0; den = 1'b0;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      key = vk[t]; value = vv[t]; data = vd[t]; den = ve[t]; en = 1'b1;
      @(negedge clk); en = 1'b0;
      // inputs are captured at the start: changing them now must not matter
      key = ~key; value = ~value; data = ~data;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == 21, $sformatf("latency %0d", cyc));
      check(q == (t == 3 ? 256'hfa2827d1436c8a819973436e60ac4790a6e333c3427c7424063daabf15bb055b
                         : vq[t]), $sformatf("case %0d: %h", t, q));
      check(order_err == 0, "FSM order");
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
