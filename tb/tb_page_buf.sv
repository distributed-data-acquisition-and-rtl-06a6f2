// Testbench of page_buf (reduced to 64-byte pages): a byte stream with gaps
// is written while pages are read with back-pressure; pages must come out
// whole and in order. Checks the byte count, that writing stalls with two
// full pages, flush padding of a partial page with 0xFF (not counted), and
// early release of a page being read.
module tb_page_buf;
  localparam int PB = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wv = 0, wr, fl = 0, fli, rv, rr = 0, rl, rel = 0; logic [7:0] wd, rd; logic [31:0] bc;
  page_buf #(.PAGE_BYTES(PB)) dut (.clk, .rst_n, .clear(1'b0), .wr_valid(wv), .wr_ready(wr),
    .wr_data(wd), .flush(fl), .flushing(fli), .rd_valid(rv), .rd_ready(rr), .rd_data(rd),
    .rd_page_last(rl), .rd_release(rel), .byte_count(bc));
  logic [7:0] sent [$], got [$];
  logic rd_on = 0;
  always @(posedge clk) if (rst_n) begin
    if (rv && rr) got.push_back(rd);
    rr <= rd_on && (($urandom % 3) != 0);
  end
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2 * PB; n++) begin
      @(negedge clk); wv = 1; wd = 8'($urandom); sent.push_back(wd);
      @(posedge clk);
    end
    @(negedge clk); wv = 0;
    checks++; if (wr || !rv) begin failures++; $display("full state wrong"); end
    rd_on = 1;
    for (int n = 0; n < 6 * PB + 10; n++) begin
      @(negedge clk); wv = ($urandom % 2); wd = 8'($urandom);
      while (!(wv && wr)) begin @(negedge clk); wv = ($urandom % 2); end
      sent.push_back(wd);
      @(posedge clk);
    end
    @(negedge clk); wv = 0; fl = 1; @(negedge clk); fl = 0;
    repeat (2000) @(posedge clk);
    for (int n = 0; n < 10; n++) sent.push_back(8'hFF);
    for (int n = 10; n < PB - 10; n++) sent.push_back(8'hFF);
    checks++; if (got.size() != 9 * PB) begin failures++; $display("read %0d bytes", got.size()); end
    for (int n = 0; n < got.size() && n < sent.size(); n++) begin
      checks++; if (got[n] !== sent[n]) begin failures++; $display("byte %0d %h exp %h", n, got[n], sent[n]); end
    end
    checks++; if (bc != 32'(8 * PB + 10)) begin failures++; $display("byte count %0d", bc); end
    // early release
    rd_on = 0;
    for (int n = 0; n < PB; n++) begin @(negedge clk); wv = 1; wd = 8'(n); @(posedge clk); end
    @(negedge clk); wv = 0; rel = 1; @(negedge clk); rel = 0;
    checks++; if (rv) begin failures++; $display("page not released"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
