// Testbench of prescaler: loads a square-root table (threshold of code c is
// floor(c*c/256), so a pixel x maps to about sqrt(256*x)), then checks random
// and edge pixels against a linear scan of the same table, the latency of
// CODE_W+1 clocks per pixel, and the pass-through with en low.
module tb_prescaler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, we = 0, iv = 0, ir, ov, ordy = 1;
  logic [11:0] wa; logic [15:0] wd, id, od; logic [1:0] ic = 0, oc;
  prescaler #(.PIX_W(16), .CODE_W(12)) dut (.clk, .rst_n, .en, .wr_en(we), .wr_addr(wa),
    .wr_data(wd), .in_valid(iv), .in_ready(ir), .in_data(id), .in_ch(ic),
    .out_valid(ov), .out_ready(ordy), .out_data(od), .out_ch(oc));

  int tab [4096];
  function automatic int ref_code(int x);
    int c = 0;
    for (int n = 0; n < 4096; n++) if (tab[n] <= x) c = n;
    return c;
  endfunction

  initial begin
    repeat (200000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int x, lat;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4096; n++) begin
      tab[n] = (n * n) / 256;
      @(negedge clk); we = 1; wa = 12'(n); wd = 16'(tab[n]);
    end
    @(negedge clk); we = 0; en = 1;
    for (int n = 0; n < 300; n++) begin
      x = (n < 4) ? (n == 0 ? 0 : n == 1 ? 65535 : n == 2 ? 15 : 16) : int'($urandom % 65536);
      @(negedge clk); iv = 1; id = 16'(x); ic = 2'(n);
      while (!ir) @(negedge clk);
      @(posedge clk); lat = 0;
      @(negedge clk); iv = 0;
      while (!ov) begin @(negedge clk); lat++; end
      checks++;
      if (int'(od) != ref_code(x) || oc != 2'(n)) begin failures++; $display("x=%0d code %0d exp %0d", x, od, ref_code(x)); end
      checks++;
      if (lat != 13) begin failures++; $display("latency %0d", lat); end
    end
    en = 0;
    for (int n = 0; n < 20; n++) begin
      x = int'($urandom % 65536);
      @(negedge clk); iv = 1; id = 16'(x);
      while (!ir) @(negedge clk);
      @(posedge clk); @(negedge clk); iv = 0;
      while (!ov) @(negedge clk);
      checks++; if (int'(od) != x) begin failures++; $display("bypass %0d %0d", od, x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
