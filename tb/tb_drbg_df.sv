// tb_drbg_df: checks the derivation function against an independent software model
// of Block_Cipher_df on ARIA-128 for input strings of 8, 12, 16, 5 and 2 words
// (the input ending before, at and after a block boundary, and the pad falling in
// every word position). Words w[i] = 0x01020304*(i+1) + 0x9E3779B9*i (mod 2^32) are
// offered with random gaps; the test checks the 256-bit result, that exactly the
// announced number of words was taken, and that o_df_done pulses once.
module tb_drbg_df;
  import aria_pkg::*;

  logic        clk = 1'b0, rstn = 1'b0, start = 1'b0, den = 1'b0;
  logic [30:0] elen, pslen;
  logic [31:0] n, data;
  logic        ready, done;
  seed_t       q;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  drbg_df dut (.i_clk(clk), .i_rstn(rstn), .i_df_en(start), .i_Elen(elen), .i_PSlen(pslen),
               .i_N(n), .i_data(data), .i_data_en(den), .o_data_ready(ready),
               .o_df_data(q), .o_df_done(done));

  int    nw [5] = '{8, 12, 16, 5, 2};
  seed_t ex [5] = '{256'h0bb56f88a1408a10a2fd34740f28c7cbae3238c339cf6bbb18d8a2612c40db34,
                    256'hbff807a03a1005932b79d01907b210fb963cc35051d7ea820e700b117e558844,
                    256'hb37c7d70cf973e2054854451b7bdf3dc38fade183da992579e4855caa401ce83,
                    256'h3381435db5cf0232e35d4b0df59db80aee1d4a37961d118b641ac31d11ec8c24,
                    256'hf3d710bb1be9a239a11f3b0980ce61cf03a89ddd8c3758819d3679b363b143ca};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int sent, ndone;
    elen = '0; pslen = '0; n = 32'd32; data = '0;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    for (int t = 0; t < 5; t++) begin
      @(negedge clk);
      // split the string between "entropy" and "PS" lengths; only the sum matters
      elen  = 31'(32 * (nw[t] - nw[t] / 2));
      pslen = 31'(32 * (nw[t] / 2));
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      sent = 0; ndone = 0;
      while (!done) begin
        den  = ($urandom_range(0, 3) != 0) && sent < nw[t];
        data = 32'h01020304 * 32'(sent + 1) + 32'h9e3779b9 * 32'(sent);
        @(posedge clk);
        if (den && ready) sent++;
        @(negedge clk);
      end
      den = 1'b0;
      ndone++;
      check(sent == nw[t], $sformatf("words taken %0d of %0d", sent, nw[t]));
      check(q == ex[t], $sformatf("df %0d words: %h", nw[t], q));
      @(negedge clk);
      check(!done && !ready, "single done pulse, no further words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
