// Testbench of sdram_ctrl with a behavioural SDRAM and a stand-in for the
// accumulator (64-word buffers, 1000 pixels = 16 chunks). The SDRAM starts
// with a known pattern; each pre-loaded chunk must hold that pattern, the
// stand-in adds a per-word offset and returns the buffer, and at the end the
// SDRAM must hold pattern + offset. The transfer to compression must then
// deliver the low 16 bits of the first 1000 words in order with channel =
// index mod 4. Checks that no SDRAM timing rule of the model is broken and
// that the number of refresh cycles matches the time elapsed.
module tb_sdram_ctrl;
  localparam int BW = 64, NP = 1000, RI = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 1, as = 0, xs = 0; logic [1:0] bf = 0, ld; logic sel, we; logic [5:0] addr;
  logic [31:0] wdat, rdat; logic pv, pr = 1; logic [15:0] pd; logic [1:0] pc;
  logic cs_n, ras_n, cas_n, we_n, oe, idone, busy; logic [1:0] ba; logic [11:0] a;
  logic [31:0] dqo, dqi; logic [15:0] nref;
  sdram_ctrl #(.BUF_WORDS(BW), .INIT_CLKS(100), .REF_INTERVAL(RI)) dut (
    .clk, .rst_n, .en, .acc_start(as), .xfer_start(xs), .n_pixels(32'(NP)), .buf_full(bf),
    .sd_loaded(ld), .sd_sel(sel), .sd_addr(addr), .sd_we(we), .sd_wdata(wdat), .sd_rdata(rdat),
    .pix_valid(pv), .pix_ready(pr), .pix_data(pd), .pix_ch(pc),
    .sdr_cs_n(cs_n), .sdr_ras_n(ras_n), .sdr_cas_n(cas_n), .sdr_we_n(we_n), .sdr_ba(ba), .sdr_a(a),
    .sdr_dq_o(dqo), .sdr_dq_oe(oe), .sdr_dq_i(dqi), .init_done(idone), .busy, .refreshes(nref));
  sdram_model #(.CL(2), .T_RCD(2)) mem (.clk, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a, .dq_i(dqo), .dq_o(dqi));

  logic [31:0] tbuf [2][BW];
  assign rdat = tbuf[sel][addr];
  always @(posedge clk) if (we) tbuf[sel][addr] <= wdat;

  function automatic logic [31:0] pat(int w); return 32'(w * 7 + 3); endfunction
  function automatic logic [31:0] off(int w); return 32'(w * 13 + 100); endfunction

  int got = 0;
  int nld [2] = '{0, 0};                  // loaded strobes seen per buffer
  always @(posedge clk) if (rst_n) for (int b = 0; b < 2; b++) if (ld[b]) nld[b]++;
  always @(posedge clk) if (rst_n) begin
    if (pv && pr) begin
      checks++;
      if (pd != 16'(pat(got) + off(got)) || pc != 2'(got)) begin failures++; $display("pixel %0d %h", got, pd); end
      got++;
    end
    pr <= ($urandom % 3) != 0;
  end

  initial begin
    repeat (300000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int nch = (NP + BW - 1) / BW, t0;
    for (int w = 0; w < nch * BW; w++)
      mem.mem[((w >> 9) << 9) | (w & 511)] = pat(w);
    repeat (3) @(posedge clk); rst_n = 1;
    wait (idone); t0 = $time;
    @(negedge clk); as = 1; @(negedge clk); as = 0;
    for (int c = 0; c < nch; c++) begin
      automatic int b = c % 2;
      while (nld[b] < c / 2 + 1) @(posedge clk);
      @(negedge clk);
      for (int n = 0; n < BW; n++) begin
        checks++;
        if (tbuf[b][n] != pat(c * BW + n)) begin failures++; if (failures < 5) $display("chunk %0d word %0d %h", c, n, tbuf[b][n]); end
        tbuf[b][n] = tbuf[b][n] + off(c * BW + n);
      end
      repeat (BW) @(posedge clk);           // accumulation time of a chunk
      @(negedge clk); bf[b] = 1;
      // the stand-in takes the buffer back once it is reloaded
      if (c + 2 < nch) fork automatic int bb = b, cc = c; begin
        while (nld[bb] < cc / 2 + 2) @(posedge clk);
        @(negedge clk); bf[bb] = 0;
      end join_none
    end
    wait (!busy);
    for (int w = 0; w < nch * BW; w++) begin
      checks++; if (mem.mem[w] != pat(w) + off(w)) begin failures++; if (failures < 8) $display("sdram word %0d %h", w, mem.mem[w]); end
    end
    checks++;
    if (nref < 16'(($time - t0) / 10 / RI - 2)) begin failures++; $display("refreshes %0d in %0d clocks", nref, ($time - t0) / 10); end
    bf = 0;
    @(negedge clk); xs = 1; @(negedge clk); xs = 0;
    repeat (5) @(posedge clk); wait (!busy);
    checks++; if (got != NP) begin failures++; $display("streamed %0d", got); end
    checks++; if (mem.violations != 0) begin failures++; $display("%0d SDRAM timing violations", mem.violations); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
