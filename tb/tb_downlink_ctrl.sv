// Testbench of downlink_ctrl: a page source stands in for the page buffers
// (64-byte pages). A file of 150 bytes is sent; the serial line is decoded
// here (start bit, 8 data bits LSB first, even parity, stop bit, BIT_CLKS
// clocks per bit) and the bytes compared. The controller must stop after
// exactly 150 bytes, release the partly used third page and report done.
// A second file is cut short by clearing the enable bit: the early
// termination code must be set.
module tb_downlink_ctrl;
  import snap_pkg::*;
  localparam int BC = 4, PB = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 0, start = 0, rv, rr, rel, tx, act, done; logic [31:0] fb = 0, sent; logic [3:0] err;
  logic [7:0] rd;
  downlink_ctrl #(.BIT_CLKS(BC), .PAGE_BYTES(PB)) dut (.clk, .rst_n, .en, .start, .file_bytes(fb),
    .rd_valid(rv), .rd_ready(rr), .rd_data(rd), .rd_release(rel), .tx, .active(act), .done,
    .sent, .err_code(err));

  logic [7:0] src [$]; int sp = 0; int releases = 0;
  assign rv = (src.size() > sp);
  assign rd = rv ? src[sp] : 8'h00;
  always @(posedge clk) if (rst_n) begin
    if (rv && rel) begin releases++; sp <= ((sp / PB) + 1) * PB; end
    else if (rv && rr) sp <= sp + 1;
  end

  logic [7:0] rx [$]; int perr = 0;
  initial begin
    logic [7:0] b; logic p;
    forever begin
      @(negedge tx);
      repeat (BC / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BC) @(posedge clk); b[i] = tx; end
      repeat (BC) @(posedge clk); p = tx;
      repeat (BC) @(posedge clk);
      if (!tx || p != ^b) perr++;
      rx.push_back(b);
    end
  end

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t0;
    for (int n = 0; n < 3 * PB; n++) src.push_back(8'($urandom));
    repeat (3) @(posedge clk); rst_n = 1;
    fb = 150;
    @(negedge clk); en = 1; start = 1; t0 = $time; @(negedge clk); start = 0;
    wait (done);
    repeat (3 * BC) @(posedge clk);
    checks++; if (rx.size() != 150 || sent != 150) begin failures++; $display("sent %0d/%0d", rx.size(), sent); end
    for (int n = 0; n < rx.size(); n++) begin
      checks++; if (rx[n] !== src[n]) begin failures++; $display("byte %0d", n); end
    end
    checks++; if (perr != 0) begin failures++; $display("framing/parity"); end
    checks++; if (releases != 1 || sp != 3 * PB) begin failures++; $display("release %0d sp %0d", releases, sp); end
    checks++; if (err != ERR_NONE) failures++;
    // line rate: 11 bits of BC clocks per byte, plus at most 1 clock per byte
    checks++; if (($time - t0) / 10 > 150 * (11 * BC + 2) + 20) begin failures++; $display("too slow"); end
    // early termination
    for (int n = 0; n < 2 * PB; n++) src.push_back(8'($urandom));
    fb = 100;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (sent == 30);
    @(negedge clk); en = 0;
    repeat (20 * BC) @(posedge clk);
    checks++; if (err != ERR_EARLY_TERM || done) begin failures++; $display("early termination err=%0d", err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
