// Testbench of cmd_proc: an SPI-like ICU master sends 32-bit command words.
// Slice writes must appear once on the register bus and not be forwarded;
// slice reads must return {slice channel, 0, register, data} in the next
// frame; front end and broadcast words must be forwarded bit-exact to a
// front end slave model, whose reply returns to the ICU as
// {slice channel, reply[23:0]}. A short frame must be flagged.
module tb_cmd_proc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sclk = 0, cs_n = 1, mosi = 0, miso, rw, rr; logic [6:0] ra; logic [15:0] wd, rdat;
  logic fsclk, fcs_n, fmosi, fmiso; logic [15:0] fcnt; logic ferr;
  localparam logic [7:0] ID = 8'h9C, CH = 8'h2B;
  cmd_proc #(.FE_DIV(2)) dut (.clk, .rst_n, .fpga_id(ID), .slice_ch(CH), .icu_sclk(sclk),
    .icu_cs_n(cs_n), .icu_mosi(mosi), .icu_miso(miso), .reg_wr(rw), .reg_rd(rr), .reg_addr(ra),
    .reg_wdata(wd), .reg_rdata(rdat), .fe_sclk(fsclk), .fe_cs_n(fcs_n), .fe_mosi(fmosi),
    .fe_miso(fmiso), .fwd_count(fcnt), .frame_err(ferr));
  assign rdat = {9'h15A, ra};

  // register bus monitor
  int nwr = 0; logic [6:0] lwa; logic [15:0] lwd;
  int nfe = 0;
  always @(posedge clk) if (rst_n) begin
    if (rw) begin nwr++; lwa = ra; lwd = wd; end
    if (ferr) nfe++;
  end
  // front end slave
  logic [31:0] fe_rx, fe_reply = 32'hA5C3_0F96, fsh; int nfwd = 0;
  always @(negedge fcs_n) begin fsh = fe_reply; end
  assign fmiso = fsh[31];
  always @(posedge fsclk) fe_rx = {fe_rx[30:0], fmosi};
  always @(negedge fsclk) fsh = {fsh[30:0], 1'b0};
  always @(posedge fcs_n) if (rst_n) nfwd++;

  task automatic frame(input logic [31:0] w, output logic [31:0] r, input int nb = 32);
    cs_n = 0; repeat (8) @(posedge clk);
    for (int i = 31; i > 31 - nb; i--) begin
      mosi = w[i]; repeat (4) @(posedge clk);
      sclk = 1; r[i] = miso; repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (6) @(posedge clk); cs_n = 1; repeat (200) @(posedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] r;
    repeat (3) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);
    frame({ID, 1'b1, 7'h05, 16'h1234}, r);
    checks++; if (nwr != 1 || lwa != 7'h05 || lwd != 16'h1234 || nfwd != 0) begin failures++; $display("slice write"); end
    frame({ID, 1'b0, 7'h11, 16'h0000}, r);
    frame({ID, 1'b0, 7'h22, 16'h0000}, r);
    checks++; if (r != {CH, 1'b0, 7'h11, 9'h15A, 7'h11}) begin failures++; $display("read response %h", r); end
    checks++; if (nwr != 1) begin failures++; $display("read caused write"); end
    frame({8'h03, 1'b1, 7'h40, 16'hBEEF}, r);
    checks++; if (r != {CH, 1'b0, 7'h22, 9'h15A, 7'h22}) begin failures++; $display("read response 2 %h", r); end
    checks++; if (nfwd != 1 || fe_rx != {8'h03, 1'b1, 7'h40, 16'hBEEF} || nwr != 1) begin failures++; $display("forward %h", fe_rx); end
    frame({8'hFF, 1'b1, 7'h01, 16'h0042}, r);
    checks++; if (r != {CH, fe_reply[23:0]}) begin failures++; $display("fe reply %h", r); end
    checks++; if (nfwd != 2 || fe_rx != {8'hFF, 1'b1, 7'h01, 16'h0042} || fcnt != 16'd2) begin failures++; $display("broadcast"); end
    frame(32'h0, r, 20);
    checks++; if (nfe != 1 || nwr != 1 || nfwd != 2) begin failures++; $display("short frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
