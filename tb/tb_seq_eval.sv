// Testbench of seq_eval: random blocks of 16 samples (small, large and
// mixed magnitudes) stream in with gaps; the 14 option lengths reported
// after the last sample are compared with sum((d >> k) + 1 + k), and must
// appear exactly one clock after the last sample.
module tb_seq_eval;
  import snap_pkg::*;
  localparam int J = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv = 0, il = 0, lv; logic [15:0] id; logic [1:0] ic = 0, lch;
  logic [LEN_W-1:0] len [N_OPT];
  seq_eval #(.N(16)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .in_ch(ic), .in_last(il),
    .len_valid(lv), .len, .len_ch(lch));
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int e [N_OPT]; int d;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int b = 0; b < 200; b++) begin
      for (int k = 0; k < N_OPT; k++) e[k] = 0;
      for (int n = 0; n < J; n++) begin
        case (b % 3) 0: d = int'($urandom % 8); 1: d = int'($urandom % 65536); default: d = int'($urandom % 300); endcase
        for (int k = 0; k < N_OPT; k++) e[k] += (d >> k) + 1 + k;
        @(negedge clk); iv = 1; id = 16'(d); il = (n == J - 1); ic = 2'(b);
        @(negedge clk); iv = 0;
        if (n != J - 1 && ($urandom % 2)) @(negedge clk);
        if (n != J - 1) begin checks++; if (lv) begin failures++; $display("early len_valid"); end end
      end
      // the clock after the last sample
      checks++;
      if (!lv) begin failures++; $display("len_valid missing"); end
      else begin
        for (int k = 0; k < N_OPT; k++)
          if (int'(len[k]) != e[k]) begin failures++; $display("blk %0d k%0d len %0d exp %0d", b, k, len[k], e[k]); end
        if (lch != 2'(b)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
