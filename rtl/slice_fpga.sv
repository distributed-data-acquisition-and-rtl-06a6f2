// Slice FPGA of the distributed data acquisition system (top level).
// One slice receives the science data of one detector element, compresses
// it, stores it as CCSDS source packets in NAND flash and later sends stored
// files down. The ICU commands it over an SPI-like control link: the command
// processor executes slice commands on the register file (block enable
// register, configuration, status) and forwards all other commands to the
// front end ASICs.
// CCD operation: serial frames of four interleaved pixels are converted by
// the CCD receiver and compressed on the fly; packet bytes fill the page
// buffers and the flash controller programs each full page into the next
// allocated flash block.
// NIR operation (enable bit EN_NIR): pixels of the four synchronous NIR links
// are accumulated (added or subtracted per readout cycle) in two buffers that
// the SDRAM controller writes back to and pre-loads from SDRAM; after the
// last readout the SDRAM controller streams the averaged pixels into the
// compressor.
// Downlink: the flash controller reads a file's pages into the page buffers
// and the downlink controller serialises exactly the file's byte count.
// 'suspend' (block overflow) stops pixel acceptance from the front end.
module slice_fpga
  import snap_pkg::*;
#(
  parameter int J               = 16,
  parameter int PKT_BLOCKS      = 60,
  parameter int PAGE_BYTES      = 2048,
  parameter int PAGES_PER_BLOCK = 64,
  parameter int BIT_CLKS        = 4,
  parameter int FE_DIV          = 2,
  parameter int BUF_WORDS       = 256,
  parameter int INIT_CLKS       = 20000,
  parameter int REF_INTERVAL    = 780
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  fpga_id,
  input  logic [7:0]  slice_ch,
  // ICU control interface
  input  logic        icu_sclk,
  input  logic        icu_cs_n,
  input  logic        icu_mosi,
  output logic        icu_miso,
  // front end control interface
  output logic        fe_sclk,
  output logic        fe_cs_n,
  output logic        fe_mosi,
  input  logic        fe_miso,
  // front end data interface
  input  logic        ccd_rx,
  input  logic [3:0]  nir_rx,
  // flash memory interface (two banks)
  output logic [7:0]  nf_ce_n,
  output logic [1:0]  nf_cle,
  output logic [1:0]  nf_ale,
  output logic [1:0]  nf_we_n,
  output logic [1:0]  nf_re_n,
  output logic [1:0]  nf_io_oe,
  output logic [7:0]  nf_io_o [2],
  input  logic [7:0]  nf_io_i [2],
  input  logic [1:0]  nf_rb_n,
  // SDRAM interface
  output logic        sdr_cs_n,
  output logic        sdr_ras_n,
  output logic        sdr_cas_n,
  output logic        sdr_we_n,
  output logic [1:0]  sdr_ba,
  output logic [11:0] sdr_a,
  output logic [31:0] sdr_dq_o,
  output logic        sdr_dq_oe,
  input  logic [31:0] sdr_dq_i,
  // downlink control interface
  output logic        dl_tx
);
  // register bus
  logic        reg_wr, reg_rd; logic [6:0] reg_addr; logic [15:0] reg_wdata, reg_rdata;
  logic [15:0] enable, expo_id; flash_cmd_e flash_cmd; logic [8:0] n_blocks;
  logic [31:0] file_bytes, nir_pixels; logic [10:0] apid; logic [7:0] acc_ctrl;
  logic [5:0]  start;
  logic        bram_wr; logic [7:0] bram_waddr; logic [15:0] bram_wdata;
  logic        lut_wr; logic [11:0] lut_addr; logic [15:0] lut_data;
  logic [15:0] fwd_count; logic cmd_ferr;
  logic        nir;
  assign nir = enable[EN_NIR];

  cmd_proc #(.FE_DIV(FE_DIV)) u_cmd (
    .clk, .rst_n, .fpga_id, .slice_ch, .icu_sclk, .icu_cs_n, .icu_mosi, .icu_miso,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata,
    .fe_sclk, .fe_cs_n, .fe_mosi, .fe_miso, .fwd_count, .frame_err(cmd_ferr));

  // front end data processing
  logic ccd_v, ccd_r, ccd_pe, ccd_fe, ccd_or; logic [15:0] ccd_d; logic [1:0] ccd_c;
  logic nir_v, nir_r, nir_pe, nir_fe, nir_or; logic [15:0] nir_d; logic [1:0] nir_c;
  fe_rx #(.LANES(1), .WORDS(4), .PIX_W(16), .BIT_CLKS(BIT_CLKS)) u_ccd_rx (
    .clk, .rst_n, .en(enable[EN_FRONTEND] && !nir), .rx(ccd_rx),
    .pix_valid(ccd_v), .pix_ready(ccd_r), .pix_data(ccd_d), .pix_ch(ccd_c),
    .parity_err(ccd_pe), .frame_err(ccd_fe), .overrun(ccd_or));
  fe_rx #(.LANES(4), .WORDS(1), .PIX_W(16), .BIT_CLKS(BIT_CLKS)) u_nir_rx (
    .clk, .rst_n, .en(enable[EN_FRONTEND] && nir), .rx(nir_rx),
    .pix_valid(nir_v), .pix_ready(nir_r), .pix_data(nir_d), .pix_ch(nir_c),
    .parity_err(nir_pe), .frame_err(nir_fe), .overrun(nir_or));

  logic [15:0] rx_errors;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rx_errors <= '0;
    else if (ccd_pe || ccd_fe || ccd_or || nir_pe || nir_fe || nir_or || cmd_ferr)
      rx_errors <= rx_errors + 1'b1;

  // NIR accumulation and SDRAM
  logic [1:0] sd_loaded, buf_full; logic sd_sel, sd_we, acc_done;
  logic [$clog2(BUF_WORDS)-1:0] sd_addr; logic [31:0] sd_wdata, sd_rdata;
  logic sdp_v, sdp_r; logic [15:0] sdp_d; logic [1:0] sdp_c;
  logic sd_init, sd_busy; logic [15:0] refreshes;
  logic suspend;

  nir_acc #(.BUF_WORDS(BUF_WORDS)) u_acc (
    .clk, .rst_n, .en(enable[EN_ACCUM] && !suspend), .start(start[3]),
    .first(acc_ctrl[0]), .sub(acc_ctrl[1]), .last(acc_ctrl[2]), .shift(acc_ctrl[7:4]),
    .n_pixels(nir_pixels), .pix_valid(nir_v), .pix_ready(nir_r), .pix_data(nir_d),
    .sd_loaded, .buf_full, .done(acc_done),
    .sd_sel, .sd_addr, .sd_we, .sd_wdata, .sd_rdata);

  sdram_ctrl #(.BUF_WORDS(BUF_WORDS), .INIT_CLKS(INIT_CLKS), .REF_INTERVAL(REF_INTERVAL)) u_sdc (
    .clk, .rst_n, .en(enable[EN_SDRAM]), .acc_start(start[3]), .xfer_start(start[4]),
    .n_pixels(nir_pixels), .buf_full, .sd_loaded, .sd_sel, .sd_addr, .sd_we, .sd_wdata,
    .sd_rdata, .pix_valid(sdp_v), .pix_ready(sdp_r), .pix_data(sdp_d), .pix_ch(sdp_c),
    .sdr_cs_n, .sdr_ras_n, .sdr_cas_n, .sdr_we_n, .sdr_ba, .sdr_a, .sdr_dq_o, .sdr_dq_oe,
    .sdr_dq_i, .init_done(sd_init), .busy(sd_busy), .refreshes);

  // data compression: CCD pixels directly, NIR pixels from SDRAM
  logic cp_v, cp_r, cp_go; logic [15:0] cp_d; logic [1:0] cp_c;
  logic co_v, co_r; logic [7:0] co_d; logic [15:0] pkt_count; logic opt_ovf;
  assign cp_go = enable[EN_COMPRESS] && !suspend;
  assign cp_v  = cp_go && (nir ? sdp_v : ccd_v);
  assign cp_d  = nir ? sdp_d : ccd_d;
  assign cp_c  = nir ? sdp_c : ccd_c;
  assign ccd_r = cp_go && !nir && cp_r;
  assign sdp_r = cp_go && nir && cp_r;

  compressor #(.J(J), .CODE_W(12), .PKT_BLOCKS(PKT_BLOCKS)) u_comp (
    .clk, .rst_n, .clear(start[5]), .prescale_en(enable[EN_PRESCALE]),
    .force_nocomp(enable[EN_NOCOMP]), .apid, .expo_id, .slice_id(slice_ch),
    .lut_wr, .lut_addr, .lut_data,
    .pix_valid(cp_v), .pix_ready(cp_r), .pix_data(cp_d), .pix_ch(cp_c),
    .out_valid(co_v), .out_ready(co_r), .out_data(co_d), .pkt_count, .opt_overflow(opt_ovf));

  // page buffers: written by the compressor (readout) or the flash (downlink),
  // read by the flash (readout) or the downlink controller (downlink)
  logic downlink;
  logic pw_v, pw_r, pr_v, pr_r, pr_last, pr_rel, pb_fl; logic [7:0] pw_d, pr_d;
  logic [31:0] bytes_written;
  logic fr_r, fw_v; logic [7:0] fw_d;
  logic dr_r, dr_rel;
  assign downlink = (flash_cmd == FC_DOWNLINK);
  assign pw_v = downlink ? fw_v : co_v;
  assign pw_d = downlink ? fw_d : co_d;
  assign co_r = !downlink && pw_r;
  assign pr_r   = downlink ? dr_r : fr_r;
  assign pr_rel = downlink && dr_rel;

  page_buf #(.PAGE_BYTES(PAGE_BYTES)) u_pb (
    .clk, .rst_n, .clear(start[5]), .wr_valid(pw_v), .wr_ready(pw_r), .wr_data(pw_d),
    .flush(start[2]), .flushing(pb_fl), .rd_valid(pr_v), .rd_ready(pr_r), .rd_data(pr_d),
    .rd_page_last(pr_last), .rd_release(pr_rel), .byte_count(bytes_written));

  logic [15:0] bram_rdata; logic [7:0] bram_raddr;
  block_id_ram #(.DEPTH(256)) u_bram (
    .clk, .wr_en(bram_wr), .wr_addr(bram_waddr), .wr_data(bram_wdata),
    .rd_addr(bram_raddr), .rd_data(bram_rdata));

  logic f_busy; logic [3:0] f_err; logic [8:0] blocks_used; logic [4:0] n_bad;
  logic [15:0] bad_list [16]; logic [15:0] pages_done;
  flash_ctrl #(.PAGE_BYTES(PAGE_BYTES), .PAGES_PER_BLOCK(PAGES_PER_BLOCK), .BRAM_DEPTH(256)) u_fc (
    .clk, .rst_n, .en(enable[EN_FLASH]), .start(start[0]), .cmd(flash_cmd),
    .n_blocks, .file_bytes, .bram_addr(bram_raddr), .bram_data(bram_rdata),
    .pb_rd_valid(pr_v && !downlink), .pb_rd_ready(fr_r), .pb_rd_data(pr_d),
    .pb_wr_valid(fw_v), .pb_wr_ready(pw_r && downlink), .pb_wr_data(fw_d),
    .nf_ce_n, .nf_cle, .nf_ale, .nf_we_n, .nf_re_n, .nf_io_oe, .nf_io_o, .nf_io_i, .nf_rb_n,
    .busy(f_busy), .suspend, .err_code(f_err), .blocks_used, .n_bad, .bad_list, .pages_done);

  logic dl_active, dl_done; logic [31:0] dl_sent; logic [3:0] dl_err;
  downlink_ctrl #(.BIT_CLKS(BIT_CLKS), .PAGE_BYTES(PAGE_BYTES)) u_dl (
    .clk, .rst_n, .en(enable[EN_DOWNLINK]), .start(start[1]), .file_bytes,
    .rd_valid(pr_v && downlink), .rd_ready(dr_r), .rd_data(pr_d), .rd_release(dr_rel),
    .tx(dl_tx), .active(dl_active), .done(dl_done), .sent(dl_sent), .err_code(dl_err));

  slice_regs u_regs (
    .clk, .rst_n, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .enable, .flash_cmd, .n_blocks, .file_bytes, .expo_id, .apid, .acc_ctrl, .nir_pixels,
    .start, .bram_wr, .bram_addr(bram_waddr), .bram_data(bram_wdata),
    .lut_wr, .lut_addr, .lut_data,
    .bytes_written, .flash_err(f_err), .dl_err, .n_bad, .bad_list, .blocks_used,
    .status({4'd0, opt_ovf, pb_fl, sd_init, sd_busy, acc_done, dl_done, dl_active, f_busy,
             suspend, pr_last, reg_rd, 1'b0}),
    .rx_errors);

  logic unused;
  assign unused = ^{pkt_count, fwd_count, pages_done, dl_sent, refreshes, nir_c};
endmodule
