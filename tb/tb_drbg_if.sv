// tb_drbg_if: checks instantiate and reseed, with and without the derivation
// function, against an independent software model of SP 800-90A CTR-DRBG on ARIA-128.
// Entropy word i is 0x01020304*(i+1) + 0x9E3779B9*i, PS / additional-input word i
// the same plus 0x1111 (mod 2^32). Reseeds start from a fixed Key, V. Words are
// offered with random gaps; each case checks the new Key and V and the word count.
module tb_drbg_if;
  import aria_pkg::*;

  logic        clk = 1'b0, rstn = 1'b0, start = 1'b0, reseed, dfen, den = 1'b0;
  logic [30:0] elen, pslen;
  logic [31:0] data;
  logic        ready, done;
  blk_t        okey, oval;
  localparam blk_t K0 = 128'h0123456789abcdeffedcba9876543210;
  localparam blk_t V0 = 128'hfedcba98765432100123456789abcdef;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  drbg_if dut (.i_clk(clk), .i_rstn(rstn), .i_init_en(start), .i_reseed(reseed),
               .i_df_en(dfen), .i_Elen(elen), .i_PSlen(pslen), .i_N(32'd32),
               .i_data(data), .i_data_en(den), .o_data_ready(ready),
               .i_key(K0), .i_value(V0), .o_key(okey), .o_value(oval), .o_if_done(done));

  // reseed, df, entropy words, PS words, expected Key, expected V
  logic c_rs [6] = '{0, 0, 0, 1, 1, 0};
  logic c_df [6] = '{1, 0, 0, 1, 0, 1};
  int   c_ne [6] = '{12, 8, 8, 8, 8, 8};
  int   c_np [6] = '{8, 8, 0, 0, 8, 0};
  blk_t c_k  [6] = '{128'h3dfea578c70b463ffe59547e5555b281, 128'hb426f6b541f634ef2b2cd5e3d0069e57,
                     128'hb524e2a0e1cda43d1459d86c0ea8141b, 128'hfcc6c6a1252b39c6c5d353380c5ed217,
                     128'hf773be38846b5cc5672f96bd0376e6ab, 128'hbf938e2ce0b651ec89d01066df2eaaeb};
  blk_t c_v  [6] = '{128'h31b890de8b6ccd89c29329e05c433b6a, 128'h52a6563d4fb11e73a72e178483d45f33,
                     128'h2f4e513452909db51b751707d8402273, 128'h4344d8a8ae9fd22d44d59b71e5ffa406,
                     128'hed79129a975048e55c0cd6e1c9bf6e5d, 128'hfc9b9c0f767e84bbbff75a14af949568};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] word(input int i, input logic [31:0] s);
    return 32'h01020304 * 32'(i + 1) + 32'h9e3779b9 * 32'(i) + s;
  endfunction

  initial begin
    int sent, total;
    reseed = 1'b0; dfen = 1'b0; elen = '0; pslen = '0; data = '0;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    for (int t = 0; t < 6; t++) begin
      @(negedge clk);
      reseed = c_rs[t]; dfen = c_df[t];
      elen = 31'(32 * c_ne[t]); pslen = 31'(32 * c_np[t]);
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      sent = 0; total = c_ne[t] + c_np[t];
      while (!done) begin
        den  = ($urandom_range(0, 2) != 0) && sent < total;
        data = (sent < c_ne[t]) ? word(sent, 0) : word(sent - c_ne[t], 32'h1111);
        @(posedge clk);
        if (den && ready) sent++;
        @(negedge clk);
      end
      den = 1'b0;
      check(sent == total, $sformatf("case %0d words %0d of %0d", t, sent, total));
      check(okey == c_k[t], $sformatf("case %0d key %h", t, okey));
      check(oval == c_v[t], $sformatf("case %0d value %h", t, oval));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
