// Testbench of block_id_ram: fills all 256 entries with random block IDs,
// reads them back in random order and checks the one-cycle read latency.
module tb_block_id_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0; logic [7:0] wa, ra; logic [15:0] wd, rd;
  block_id_ram #(.DEPTH(256)) dut (.clk, .wr_en(we), .wr_addr(wa), .wr_data(wd), .rd_addr(ra), .rd_data(rd));
  logic [15:0] m [256];
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 256; n++) begin
      m[n] = 16'($urandom); @(negedge clk); we = 1; wa = 8'(n); wd = m[n];
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 600; n++) begin
      ra = 8'($urandom); @(posedge clk); #1;
      checks++; if (rd !== m[ra]) begin failures++; $display("addr %0d %h exp %h", ra, rd, m[ra]); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
