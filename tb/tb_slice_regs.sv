// Testbench of slice_regs: writes and reads back the configuration
// registers, checks the auto-incrementing write ports of the flash block ID
// RAM and the pre-scaler table, the one-clock start strobes, and the status
// registers including the bad block list window.
module tb_slice_regs;
  import snap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr = 0; logic [6:0] a = 0; logic [15:0] wd = 0, rd;
  logic [15:0] en, eid; flash_cmd_e fc; logic [8:0] nb; logic [31:0] fbytes, npix;
  logic [10:0] apid; logic [7:0] acc; logic [5:0] st; logic bw, lw; logic [7:0] baddr;
  logic [15:0] bdata, ldata; logic [11:0] laddr; logic [15:0] badl [16];
  slice_regs dut (.clk, .rst_n, .reg_wr(wr), .reg_addr(a), .reg_wdata(wd), .reg_rdata(rd),
    .enable(en), .flash_cmd(fc), .n_blocks(nb), .file_bytes(fbytes), .expo_id(eid), .apid,
    .acc_ctrl(acc), .nir_pixels(npix), .start(st), .bram_wr(bw), .bram_addr(baddr),
    .bram_data(bdata), .lut_wr(lw), .lut_addr(laddr), .lut_data(ldata),
    .bytes_written(32'h0001_2345), .flash_err(4'd1), .dl_err(4'd2), .n_bad(5'd3), .bad_list(badl),
    .blocks_used(9'd77), .status(16'h00F0), .rx_errors(16'd9));
  initial for (int n = 0; n < 16; n++) badl[n] = 16'(n * 3 + 1);

  logic [15:0] bram_seen [$]; logic [7:0] bram_at [$]; int nstart = 0;
  always @(posedge clk) if (rst_n) begin
    if (bw) begin bram_seen.push_back(bdata); bram_at.push_back(baddr); end
    if (st != 0) nstart++;
  end
  task automatic w(input logic [6:0] ad, input logic [15:0] d);
    @(negedge clk); wr = 1; a = ad; wd = d; @(negedge clk); wr = 0;
  endtask
  task automatic chk(input logic [6:0] ad, input logic [15:0] e);
    @(negedge clk); a = ad; #1;
    checks++; if (rd !== e) begin failures++; $display("reg %h = %h exp %h", ad, rd, e); end
  endtask
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    w(R_ENABLE, 16'h0107); w(R_FLASH_CMD, 16'd2); w(R_NBLOCKS, 16'd200);
    w(R_FBYTES_LO, 16'h5678); w(R_FBYTES_HI, 16'h0012); w(R_EXPO_ID, 16'hCAFE);
    w(R_APID, 16'h07FF); w(R_ACC_CTRL, 16'h0035); w(R_NIR_PIX_LO, 16'h0000); w(R_NIR_PIX_HI, 16'h0040);
    chk(R_ENABLE, 16'h0107); chk(R_FBYTES_LO, 16'h5678); chk(R_FBYTES_HI, 16'h0012);
    checks++; if (fc != FC_DOWNLINK || nb != 9'd200 || fbytes != 32'h0012_5678 || npix != 32'h0040_0000 || apid != 11'h7FF || acc != 8'h35)
      begin failures++; $display("config outputs"); end
    w(R_BLKRAM_A, 16'd10); w(R_BLKRAM_D, 16'h1111); w(R_BLKRAM_D, 16'h2222); w(R_BLKRAM_D, 16'h3333);
    repeat (2) @(posedge clk);
    checks++; if (bram_seen.size() != 3 || bram_at[0] != 10 || bram_at[2] != 12 || bram_seen[1] != 16'h2222)
      begin failures++; $display("block RAM writes"); end
    w(R_LUT_A, 16'd4094); w(R_LUT_D, 16'h1); w(R_LUT_D, 16'h2);
    repeat (2) @(posedge clk);
    checks++; if (laddr != 12'd0) begin failures++; $display("lut address %0d", laddr); end
    w(R_START, 16'h0021);
    repeat (3) @(posedge clk);
    checks++; if (nstart != 1) begin failures++; $display("start strobes %0d", nstart); end
    chk(R_BYTES_LO, 16'h2345); chk(R_BYTES_HI, 16'h0001); chk(R_FLASH_ERR, 16'd1); chk(R_DL_ERR, 16'd2);
    chk(R_NBAD, 16'd3); chk(R_BLKUSED, 16'd77); chk(R_RXERR, 16'd9); chk(R_BAD0 + 7'd2, 16'd7);
    chk(R_STATUS, 16'h00F0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
