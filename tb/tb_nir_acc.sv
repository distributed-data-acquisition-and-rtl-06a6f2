// Testbench of nir_acc (64-word buffers, 300-pixel frames = 5 chunks, the
// last one partial). The test plays the SDRAM controller: it fills a buffer
// with the running sums of its chunk, signals sd_loaded, and when the
// buffer comes back full it checks every word against sums computed here,
// then loads the chunk two further on. Three readout cycles of one
// exposure: a first negative readout (sums = -pixel), a positive readout
// (sum + pixel), and a last positive readout scaled by a 1-bit shift and
// clamped to 0..65535. Pixels arrive with random gaps.
module tb_nir_acc;
  localparam int BW = 64, NP = 300, NCH = (NP + BW - 1) / BW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, first = 0, sub = 0, last = 0; logic [3:0] shift = 0;
  logic pv = 0, pr; logic [15:0] pd; logic [1:0] ld = 0, bf; logic done;
  logic sel = 0, we = 0; logic [5:0] addr = 0; logic [31:0] wd = 0, rd;
  nir_acc #(.BUF_WORDS(BW)) dut (.clk, .rst_n, .en(1'b1), .start, .first, .sub, .last, .shift,
    .n_pixels(32'(NP)), .pix_valid(pv), .pix_ready(pr), .pix_data(pd), .sd_loaded(ld),
    .buf_full(bf), .done, .sd_sel(sel), .sd_addr(addr), .sd_we(we), .sd_wdata(wd), .sd_rdata(rd));

  longint S [NP]; int px [NP];

  task automatic load(input int c);
    for (int n = 0; n < BW; n++) begin
      @(negedge clk); sel = 1'(c % 2); addr = 6'(n); we = 1;
      wd = (c * BW + n < NP) ? 32'(S[c * BW + n]) : 32'hFFFF_FFFF;
    end
    @(negedge clk); we = 0; ld[c % 2] = 1; @(negedge clk); ld = 0;
  endtask

  task automatic readout(input logic f, input logic s, input logic l, input int sh);
    @(negedge clk); first = f; sub = s; last = l; shift = 4'(sh);
    start = 1; @(negedge clk); start = 0;
    for (int n = 0; n < NP; n++) px[n] = int'($urandom % 65536);
    fork
      begin : pixels
        for (int n = 0; n < NP; n++) begin
          @(negedge clk); pv = ($urandom % 3) != 0; pd = 16'(px[n]);
          while (!(pv && pr)) begin @(negedge clk); pv = ($urandom % 3) != 0; end
          @(posedge clk);
        end
        @(negedge clk); pv = 0;
      end
      begin : sdram_side
        load(0); load(1);
        for (int c = 0; c < NCH; c++) begin
          while (!bf[c % 2]) @(posedge clk);
          for (int n = 0; n < BW && c * BW + n < NP; n++) begin
            automatic int p = c * BW + n;
            automatic longint e = (f ? 0 : S[p]) + (s ? -px[p] : px[p]);
            if (l) begin e = e >>> sh; if (e < 0) e = 0; if (e > 65535) e = 65535; end
            @(negedge clk); sel = 1'(c % 2); addr = 6'(n); #1;
            checks++;
            if (rd != 32'(e)) begin failures++; if (failures < 6) $display("pixel %0d %h exp %h", p, rd, 32'(e)); end
            S[p] = e;
          end
          if (c + 2 < NCH) load(c + 2);
        end
      end
    join
    checks++; if (!done) begin failures++; $display("done missing"); end
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < NP; n++) S[n] = 12345;
    repeat (3) @(posedge clk); rst_n = 1;
    readout(1, 1, 0, 0);
    readout(0, 0, 0, 0);
    readout(0, 0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
