// Testbench of option_vote: random option lengths (with ties and lengths
// around the uncompressed size 16*16 = 256 bits); the declared ID must be
// 1 + the index of the first minimum, or 15 when the minimum is not below
// 256 or when no compression is forced. One clock latency.
module tb_option_vote;
  import snap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic fnc = 0, lv = 0, ov; logic [LEN_W-1:0] len [N_OPT]; logic [1:0] lch = 0, och;
  logic [ID_W-1:0] oid;
  option_vote #(.N(16), .J(16)) dut (.clk, .rst_n, .force_nocomp(fnc), .len_valid(lv), .len,
    .len_ch(lch), .opt_valid(ov), .opt_id(oid), .opt_ch(och));
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int best, bi, e;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int k = 0; k < N_OPT; k++)
        len[k] = LEN_W'((t % 4 == 0) ? 240 + ($urandom % 40) : (t % 4 == 1) ? ($urandom % 8) + 100 : $urandom % 5000);
      fnc = (t % 50) == 7; lch = 2'(t);
      best = 1 << 30; bi = 0;
      for (int k = 0; k < N_OPT; k++) if (int'(len[k]) < best) begin best = int'(len[k]); bi = k; end
      e = (fnc || best >= 256) ? 15 : bi + 1;
      lv = 1;
      @(negedge clk); lv = 0;
      checks++;
      if (!ov || int'(oid) != e || och != 2'(t)) begin failures++; $display("t%0d id %0d exp %0d", t, oid, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
