// Data compression block: optional square-root pre-scaler, prediction error
// mapper, input FIFO #1 feeding the parallel sequence length evaluation and
// option voting tree, input FIFO #2 feeding the compressed data sequence
// construction, and CCSDS source packet formation with two packet buffers.
// Pixels of four interleaved channels enter on pix_valid/pix_ready; packet
// bytes leave on out_valid/out_ready towards the flash page buffers. Both
// input FIFOs receive every mapped sample, so FIFO #2 holds a block until
// the option declared for it from FIFO #1 arrives (the option is fed forward).
module compressor
  import snap_pkg::*;
#(
  parameter int J          = 16,
  parameter int CODE_W     = 12,
  parameter int PKT_BLOCKS = 60
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              prescale_en,
  input  logic              force_nocomp,
  input  logic [10:0]       apid,
  input  logic [15:0]       expo_id,
  input  logic [7:0]        slice_id,
  input  logic              lut_wr,
  input  logic [CODE_W-1:0] lut_addr,
  input  logic [15:0]       lut_data,
  input  logic              pix_valid,
  output logic              pix_ready,
  input  logic [15:0]       pix_data,
  input  logic [1:0]        pix_ch,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_data,
  output logic [15:0]       pkt_count,
  output logic              opt_overflow
);
  logic        ps_v, ps_r; logic [15:0] ps_d; logic [1:0] ps_c;
  logic        pm_v, pm_r; logic [15:0] pm_d; logic [1:0] pm_c;
  logic        b1_v, b1_l; logic [15:0] b1_d; logic [1:0] b1_c;
  logic        b2_v, b2_r, b2_l; logic [15:0] b2_d; logic [1:0] b2_c;
  logic        f1_r, f2_r;
  logic        lv; logic [LEN_W-1:0] len [N_OPT]; logic [1:0] lch;
  logic        ov; logic [ID_W-1:0] oid; logic [1:0] och;
  logic        sc_v, sc_r, sc_l; logic [7:0] sc_d;
  logic [1:0]  mode;

  assign mode = force_nocomp ? 2'd0 : (prescale_en ? 2'd1 : 2'd2);

  prescaler #(.PIX_W(16), .CODE_W(CODE_W)) u_ps (
    .clk, .rst_n, .en(prescale_en), .wr_en(lut_wr), .wr_addr(lut_addr), .wr_data(lut_data),
    .in_valid(pix_valid), .in_ready(pix_ready), .in_data(pix_data), .in_ch(pix_ch),
    .out_valid(ps_v), .out_ready(ps_r), .out_data(ps_d), .out_ch(ps_c));

  pem #(.N(16), .NCH(NCH)) u_pem (
    .clk, .rst_n, .clear, .in_valid(ps_v), .in_ready(ps_r), .in_data(ps_d), .in_ch(ps_c),
    .out_valid(pm_v), .out_ready(pm_r), .out_data(pm_d), .out_ch(pm_c));

  assign pm_r = f1_r && f2_r;

  blkbuf #(.W(16), .J(J), .NCH(NCH)) u_fifo1 (
    .clk, .rst_n, .clear, .in_valid(pm_v && f2_r), .in_ready(f1_r), .in_data(pm_d),
    .out_valid(b1_v), .out_ready(1'b1), .out_data(b1_d), .out_ch(b1_c), .out_last(b1_l));

  blkbuf #(.W(16), .J(J), .NCH(NCH)) u_fifo2 (
    .clk, .rst_n, .clear, .in_valid(pm_v && f1_r), .in_ready(f2_r), .in_data(pm_d),
    .out_valid(b2_v), .out_ready(b2_r), .out_data(b2_d), .out_ch(b2_c), .out_last(b2_l));

  seq_eval #(.N(16)) u_eval (
    .clk, .rst_n, .in_valid(b1_v), .in_data(b1_d), .in_ch(b1_c), .in_last(b1_l),
    .len_valid(lv), .len(len), .len_ch(lch));

  option_vote #(.N(16), .J(J)) u_vote (
    .clk, .rst_n, .force_nocomp, .len_valid(lv), .len(len), .len_ch(lch),
    .opt_valid(ov), .opt_id(oid), .opt_ch(och));

  seq_construct #(.N(16), .J(J), .PKT_BLOCKS(PKT_BLOCKS)) u_seq (
    .clk, .rst_n, .clear, .opt_valid(ov), .opt_id(oid), .opt_overflow,
    .in_valid(b2_v), .in_ready(b2_r), .in_data(b2_d), .in_last(b2_l),
    .out_valid(sc_v), .out_ready(sc_r), .out_data(sc_d), .out_last(sc_l));

  packet_former #(.BUF_BYTES(2048), .PKT_PIXELS(PKT_BLOCKS * J)) u_pkt (
    .clk, .rst_n, .clear, .apid, .expo_id, .slice_id, .comp_mode(mode),
    .in_valid(sc_v), .in_ready(sc_r), .in_data(sc_d), .in_last(sc_l),
    .out_valid, .out_ready, .out_data, .pkt_count);

  // block channel order of both FIFOs must agree with the option order
  logic unused;
  assign unused = ^{b2_c, och};
endmodule
