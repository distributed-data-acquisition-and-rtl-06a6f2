// CCSDS source packet formation with two alternating packet buffers.
// Compressed bytes of one packet (a fixed number of pixels, closed by
// in_last) are written into one packet buffer while the other buffer, if it
// holds a finished packet, is read out towards the page buffers. The header
// is produced on read-out, when the packet length is known:
//   primary header (6 bytes): version 0, type 0, secondary header flag 1,
//     11-bit APID, sequence flags 11 (unsegmented), 14-bit sequence count,
//     16-bit packet data length (= bytes after the primary header - 1);
//   secondary header (8 bytes): 16-bit packet ID, 16-bit exposure ID, and a
//     state description {compression mode, slice ID, 16-bit pixels/packet}.
// Compression mode: 0 no compression, 1 lossless with pre-scaler, 2 lossless
// without pre-scaler. Both sides use valid/ready; one byte per cycle.
module packet_former #(
  parameter int BUF_BYTES  = 2048,
  parameter int PKT_PIXELS = 960
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [10:0] apid,
  input  logic [15:0] expo_id,
  input  logic [7:0]  slice_id,
  input  logic [1:0]  comp_mode,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic [15:0] pkt_count
);
  localparam int AW  = $clog2(BUF_BYTES);
  localparam int HDR = 14;
  logic [7:0]    mem [2][BUF_BYTES];
  logic          wsel, rsel;
  logic [AW:0]   wptr;
  logic [AW:0]   len  [2];
  logic [13:0]   seqn [2];
  logic [1:0]    full;
  logic [AW+1:0] rptr;                  // header bytes then data bytes
  logic [13:0]   seq;
  logic [15:0]   dlen;
  logic [7:0]    hdr [HDR];

  assign in_ready  = !full[wsel];
  assign out_valid = full[rsel];
  assign dlen      = 16'(len[rsel]) + 16'(HDR - 6 - 1);

  always_comb begin
    hdr[0]  = {3'b000, 1'b0, 1'b1, apid[10:8]};
    hdr[1]  = apid[7:0];
    hdr[2]  = {2'b11, seqn[rsel][13:8]};
    hdr[3]  = seqn[rsel][7:0];
    hdr[4]  = dlen[15:8];
    hdr[5]  = dlen[7:0];
    hdr[6]  = {2'b00, seqn[rsel][13:8]};   // packet ID
    hdr[7]  = seqn[rsel][7:0];
    hdr[8]  = expo_id[15:8];
    hdr[9]  = expo_id[7:0];
    hdr[10] = {6'd0, comp_mode};
    hdr[11] = slice_id;
    hdr[12] = 8'(PKT_PIXELS >> 8);
    hdr[13] = 8'(PKT_PIXELS);
    out_data = (rptr < (AW+2)'(HDR)) ? hdr[rptr[3:0]] : mem[rsel][AW'(rptr - (AW+2)'(HDR))];
  end

  always_ff @(posedge clk) if (in_valid && in_ready) mem[wsel][wptr[AW-1:0]] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel <= 1'b0; rsel <= 1'b0; wptr <= '0; full <= '0; rptr <= '0; seq <= '0;
      len[0] <= '0; len[1] <= '0; seqn[0] <= '0; seqn[1] <= '0; pkt_count <= '0;
    end else if (clear) begin
      wsel <= 1'b0; rsel <= 1'b0; wptr <= '0; full <= '0; rptr <= '0; seq <= '0;
      pkt_count <= '0;
    end else begin
      if (in_valid && in_ready) begin
        wptr <= wptr + 1'b1;
        if (in_last) begin
          len[wsel]  <= wptr + 1'b1;
          seqn[wsel] <= seq;
          seq        <= seq + 1'b1;
          full[wsel] <= 1'b1;
          wsel       <= !wsel;
          wptr       <= '0;
        end
      end
      if (out_valid && out_ready) begin
        if (rptr == (AW+2)'(HDR) + (AW+2)'(len[rsel]) - 1'b1) begin
          rptr       <= '0;
          full[rsel] <= 1'b0;
          rsel       <= !rsel;
          pkt_count  <= pkt_count + 1'b1;
        end else rptr <= rptr + 1'b1;
      end
    end
  end
endmodule
