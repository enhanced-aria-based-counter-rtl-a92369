// tb_drbg_gf: checks the output generation function against an independent software
// model of CTR-DRBG Generate on ARIA-128, from a fixed Key, V:
//   case 0: 1 word, no PRE_CTR, no additional input
//   case 1: 3 words, PRE_CTR with additional input AD, final update with AD
//   case 2: 2 words, no PRE_CTR, final update with AD
// Each case checks every output word, the new Key and V, and whether the FSM passed
// through PRE_CTR. Output words are taken with random back-pressure.
module tb_drbg_gf;
  import aria_pkg::*;

  logic  clk = 1'b0, rstn = 1'b0, start = 1'b0, pre, aden, ready = 1'b0;
  logic [31:0] len;
  seed_t q;
  logic  valid, done;
  blk_t  okey, oval;
  localparam blk_t  K0 = 128'h0123456789abcdeffedcba9876543210;
  localparam blk_t  V0 = 128'hfedcba98765432100123456789abcdef;
  localparam seed_t AD = 256'h00112233445566778899aabbccddeeff0123456789abcdeffedcba9876543210;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  drbg_gf dut (.i_clk(clk), .i_rstn(rstn), .i_gf_en(start), .i_pre_ctr_en(pre),
               .i_ad(AD), .i_ad_en(aden), .i_key(K0), .i_value(V0), .i_len_output(len),
               .i_out_ready(ready), .o_data(q), .o_data_valid(valid),
               .o_key(okey), .o_value(oval), .o_gf_done(done));

  int    c_n   [3] = '{1, 3, 2};
  logic  c_pre [3] = '{0, 1, 0};
  logic  c_ad  [3] = '{0, 1, 1};
  seed_t c_out [3][3] = '{
    '{256'hf773a929846bb3d6672e674c037615dced76e06b9750b9965c0d3910c9bf7f32, 256'h0, 256'h0},
    '{256'h1090d54c1b36f7bcebc07560dca75db356cdde1814cf4a5bbf44ea335294c797,
      256'h947b37dcfd2250e9a7227cfecdb309710cefa1fe7c58320e0abe0d4df605a780,
      256'hd4e9ebd5f5953ca9ead543ff217bc9c821df900a2608aa8f429527917c6a198f},
    '{256'hf773a929846bb3d6672e674c037615dced76e06b9750b9965c0d3910c9bf7f32,
      256'h05ed98ec034fba85d3dc3a47aac3a9bdb0b62e3de14a35f42c5d84ab515e72d7, 256'h0}};
  blk_t  c_k [3] = '{128'h05ed98ec034fba85d3dc3a47aac3a9bd, 128'h970349533f8c5fdbdb4859fd91d55e63,
                     128'he84e335e16ac1704f5ecb8945bf65f1a};
  blk_t  c_v [3] = '{128'hb0b62e3de14a35f42c5d84ab515e72d7, 128'had3b8fb8c2b29333df66ee3aa895ae08,
                     128'h010189f5371b710eaf54606b48d38ea8};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int pre_seen = 0;
  always @(posedge clk) if (dut.r_state == dut.PRE_CTR) pre_seen++;

  initial begin
    int got;
    pre = 1'b0; aden = 1'b0; len = '0;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    for (int t = 0; t < 3; t++) begin
      @(negedge clk);
      pre = c_pre[t]; aden = c_ad[t]; len = 32'(c_n[t]); start = 1'b1;
      pre_seen = 0;
      @(negedge clk); start = 1'b0;
      got = 0;
      while (!done) begin
        ready = ($urandom_range(0, 2) == 0);
        @(posedge clk);
        if (valid && ready) begin
          check(got < c_n[t] && q == c_out[t][got], $sformatf("case %0d word %0d: %h", t, got, q));
          got++;
        end
        @(negedge clk);
      end
      check(got == c_n[t], $sformatf("case %0d words %0d", t, got));
      check(okey == c_k[t], $sformatf("case %0d key %h", t, okey));
      check(oval == c_v[t], $sformatf("case %0d value %h", t, oval));
      check((pre_seen != 0) == c_pre[t], $sformatf("case %0d PRE_CTR visited %0d", t, pre_seen));
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
