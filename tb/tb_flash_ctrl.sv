// Testbench of flash_ctrl with two behavioural NAND banks (64-byte pages,
// 4 pages per block to keep it short).
// Readout: three allocated blocks on both banks, one of them failing its
// program status; 12 pages are supplied, each must land in the right
// chip/block/page and the failing block must appear in the bad block list;
// a 13th page must raise the block overflow code and suspend.
// Downlink: a file of 5 pages minus 10 bytes is read back through the page
// buffer write port and compared. Erase: two blocks, then reading shows 0xFF.
module tb_flash_ctrl;
  import snap_pkg::*;
  localparam int PB = 64, PPB = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 0, start = 0; flash_cmd_e cmd = FC_NONE; logic [8:0] nblk = 0; logic [31:0] fbytes = 0;
  logic [7:0] ba; logic [15:0] bd; logic [15:0] blist [256];
  logic prv, prr, pwv, pwr = 1; logic [7:0] prd, pwd;
  logic [7:0] ce_n; logic [1:0] cle, ale, we_n, re_n, oe, rb_n; logic [7:0] io_o [2], io_i [2];
  logic busy, susp; logic [3:0] err; logic [8:0] bused; logic [4:0] nbad; logic [15:0] badl [16];
  logic [15:0] pdone;

  always_ff @(posedge clk) bd <= blist[ba];

  flash_ctrl #(.PAGE_BYTES(PB), .PAGES_PER_BLOCK(PPB), .BRAM_DEPTH(256), .NBAD(16)) dut (
    .clk, .rst_n, .en, .start, .cmd, .n_blocks(nblk), .file_bytes(fbytes),
    .bram_addr(ba), .bram_data(bd), .pb_rd_valid(prv), .pb_rd_ready(prr), .pb_rd_data(prd),
    .pb_wr_valid(pwv), .pb_wr_ready(pwr), .pb_wr_data(pwd),
    .nf_ce_n(ce_n), .nf_cle(cle), .nf_ale(ale), .nf_we_n(we_n), .nf_re_n(re_n), .nf_io_oe(oe),
    .nf_io_o(io_o), .nf_io_i(io_i), .nf_rb_n(rb_n), .busy, .suspend(susp), .err_code(err),
    .blocks_used(bused), .n_bad(nbad), .bad_list(badl), .pages_done(pdone));

  nand_model #(.PAGE(PB), .BUSY(15), .PW(2)) bank0 (.clk, .ce_n(ce_n[3:0]), .cle(cle[0]), .ale(ale[0]),
    .we_n(we_n[0]), .re_n(re_n[0]), .io_i(io_o[0]), .io_o(io_i[0]), .rb_n(rb_n[0]));
  nand_model #(.PAGE(PB), .BUSY(15), .PW(2)) bank1 (.clk, .ce_n(ce_n[7:4]), .cle(cle[1]), .ale(ale[1]),
    .we_n(we_n[1]), .re_n(re_n[1]), .io_i(io_o[1]), .io_o(io_i[1]), .rb_n(rb_n[1]));

  // page source (acts as the page buffer read side)
  logic [7:0] pages [$];
  int pidx = 0;
  assign prv = (pages.size() > pidx);
  assign prd = prv ? pages[pidx] : 8'h00;
  always @(posedge clk) if (rst_n && prv && prr) pidx <= pidx + 1;
  // page sink (acts as the page buffer write side)
  logic [7:0] rdback [$];
  always @(posedge clk) if (rst_n) begin
    if (pwv && pwr) rdback.push_back(pwd);
    pwr <= ($urandom % 3) != 0;
  end

  function automatic logic [7:0] stored(int entry, int page, int n);
    int chip = (entry >> 13) & 3, blk = entry & 16'h1FFF;
    int key = (chip << 28) | (((blk << 2) | page) << 11) | n;
    if (entry[15]) return bank1.mem.exists(key) ? bank1.mem[key] : 8'hFF;
    return bank0.mem.exists(key) ? bank0.mem[key] : 8'hFF;
  endfunction

  task automatic go(input flash_cmd_e c);
    @(negedge clk); cmd = c; en = 1; start = 1; @(negedge clk); start = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] img [$];
    blist[0] = {3'd1, 13'd10}; blist[1] = {3'd6, 13'd300}; blist[2] = {3'd3, 13'd7};
    bank1.bad.push_back((2 << 16) | 300);           // chip 6 = bank 1 chip 2
    repeat (3) @(posedge clk); rst_n = 1;
    nblk = 3;
    go(FC_READOUT);
    for (int p = 0; p < 12 * PB; p++) img.push_back(8'($urandom));
    for (int p = 0; p < 12 * PB; p++) pages.push_back(img[p]);
    wait (pidx == 12 * PB);
    repeat (200) @(posedge clk);
    for (int p = 0; p < 12; p++)
      for (int n = 0; n < PB; n++) begin
        checks++;
        if (stored(blist[p / PPB], p % PPB, n) !== img[p * PB + n]) begin
          failures++; if (failures < 5) $display("page %0d byte %0d %h exp %h", p, n, stored(blist[p / PPB], p % PPB, n), img[p*PB+n]);
        end
      end
    checks++; if (nbad != 1 || badl[0] != blist[1]) begin failures++; $display("bad list %0d %h", nbad, badl[0]); end
    checks++; if (err != ERR_NONE || susp) begin failures++; $display("early overflow"); end
    for (int n = 0; n < PB; n++) pages.push_back(8'hAA);        // one page too many
    repeat (50) @(posedge clk);
    checks++; if (err != ERR_BLOCK_OVERFLOW || !susp) begin failures++; $display("no overflow err=%0d", err); end
    checks++; if (bank0.programs + bank1.programs != 12) begin failures++; $display("programs %0d", bank0.programs + bank1.programs); end
    @(negedge clk); en = 0; repeat (5) @(posedge clk);
    checks++; if (busy) begin failures++; $display("still busy"); end
    // downlink
    fbytes = 5 * PB - 10;
    go(FC_DOWNLINK);
    repeat (20) @(posedge clk);
    wait (!busy);
    checks++; if (rdback.size() != 5 * PB) begin failures++; $display("read %0d bytes", rdback.size()); end
    for (int n = 0; n < rdback.size(); n++) begin
      checks++; if (rdback[n] !== img[n]) begin failures++; if (failures < 8) $display("dl byte %0d", n); end
    end
    // erase blocks 0 and 2
    blist[1] = blist[2]; nblk = 2;
    go(FC_ERASE);
    repeat (20) @(posedge clk); wait (!busy);
    checks++; if (bank0.erases + bank1.erases != 2) begin failures++; $display("erases"); end
    checks++; if (stored(blist[0], 1, 5) !== 8'hFF || stored(blist[1], 3, 0) !== 8'hFF) begin failures++; $display("not erased"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
