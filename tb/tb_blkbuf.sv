// Testbench of blkbuf: interleaved samples are written with random gaps and
// read with random back-pressure; the read order must be channel block by
// channel block within each group of four blocks. Also checks that nothing
// is readable before a whole group is in (start-up latency) and that the
// FIFO stops accepting after two unread groups.
module tb_blkbuf;
  localparam int J = 16, NCH = 4, G = J * NCH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv = 0, ir, ov, ordy = 0, ol; logic [15:0] id, od; logic [1:0] oc;
  blkbuf #(.W(16), .J(J), .NCH(NCH)) dut (.clk, .rst_n, .clear(1'b0), .in_valid(iv), .in_ready(ir),
    .in_data(id), .out_valid(ov), .out_ready(ordy), .out_data(od), .out_ch(oc), .out_last(ol));

  logic [15:0] s [$];
  int nread = 0;
  logic reading = 0;
  always @(posedge clk) if (rst_n && reading) begin
    if (ov && ordy) begin
      automatic int g = nread / G, r = nread % G, ch = r / J, i = r % J;
      checks++;
      if (od !== s[g*G + i*NCH + ch] || oc != 2'(ch) || ol != (i == J-1)) begin
        failures++; $display("read %0d: %h ch%0d last%0d exp %h ch%0d", nread, od, oc, ol, s[g*G + i*NCH + ch], ch);
      end
      nread++;
    end
    ordy <= ($urandom % 3) != 0;
  end

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // fill two groups with no reads: latency and full checks
    for (n = 0; n < 2 * G; n++) begin
      s.push_back(16'($urandom));
      @(negedge clk); iv = 1; id = s[n];
      checks++; if (!ir) begin failures++; $display("not ready at %0d", n); end
      if (n == G - 1) begin checks++; if (ov) begin failures++; $display("readable before group complete"); end end
      @(posedge clk);
    end
    @(negedge clk); iv = 0;
    checks++; if (ir) begin failures++; $display("still ready when full"); end
    checks++; if (!ov) begin failures++; $display("not readable"); end
    reading = 1;
    for (; n < 12 * G; n++) begin
      s.push_back(16'($urandom));
      @(negedge clk); iv = ($urandom % 4) != 0; id = s[n];
      while (!(iv && ir)) begin @(negedge clk); iv = ($urandom % 4) != 0; end
      @(posedge clk);
    end
    @(negedge clk); iv = 0;
    repeat (2000) @(posedge clk);
    checks++; if (nread != 12 * G) begin failures++; $display("read %0d", nread); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
