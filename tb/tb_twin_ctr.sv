// tb_twin_ctr: checks the two-core CTR generator against an independent software
// model: three 256-bit words from V = 2^128 - 3, so the counter wraps inside the run,
// and the final V = 3. The first run takes every word at once and checks the timing
// (first word 20 clocks after the start clock, then one every 15 clocks); the second
// run holds i_out_ready low at random and checks that words are neither lost nor
// repeated.
module tb_twin_ctr;
  import aria_pkg::*;

  logic  clk = 1'b0, rstn = 1'b0, start = 1'b0, ready = 1'b0;
  seed_t q;
  logic  valid, done;
  blk_t  vout;
  localparam blk_t K0 = 128'h0123456789abcdeffedcba9876543210;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  twin_ctr dut (.i_clk(clk), .i_rstn(rstn), .i_start(start), .i_key(K0),
                .i_value({{126{1'b1}}, 2'b01}), .i_nwords(32'd3), .i_out_ready(ready),
                .o_data(q), .o_data_valid(valid), .o_value(vout), .o_done(done));

  seed_t ex [3] = '{256'h6c2b3f1273aa7ce96afa926e543393a04d12d39ff6e46bc3e6a238688965fb5c,
                    256'h0d8343e85790c4517171800c71657d9cd13cc5da9fe80dadcd4b8e6f1de64699,
                    256'hcb5054fb5aa215392a205116ea8dfdb6a61a3dc9ebe89e06a441d0a14ad26a7b};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int cyc, got, last;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1; got = 0; last = 0;
      while (!done) begin
        ready = (run == 0) ? 1'b1 : ($urandom_range(0, 3) == 0);
        @(posedge clk);
        if (valid && ready) begin
          check(got < 3 && q == ex[got], $sformatf("run %0d word %0d: %h", run, got, q));
          if (run == 0)
            check(got == 0 ? cyc == 20 : cyc - last == 15,
                  $sformatf("word %0d at clock %0d", got, cyc));
          last = cyc;
          got++;
        end
        @(negedge clk);
        cyc++;
      end
      check(got == 3, $sformatf("run %0d words %0d", run, got));
      check(vout == 128'd3, $sformatf("final V %h", vout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
