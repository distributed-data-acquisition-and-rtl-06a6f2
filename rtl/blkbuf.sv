// Compression input FIFO with block de-interleaving (input FIFO #1 and #2).
// Samples of NCH channels arrive interleaved (ch0, ch1, ..., ch0, ...). The
// FIFO stores them in groups of NCH*J samples, that is NCH full compression
// blocks, and holds two such groups. A group becomes readable only once it is
// complete (the fixed start-up latency of the compressor); its FIFO control
// then reads it back channel block by channel block: the J samples of channel
// 0, then those of channel 1, and so on. out_last marks the last sample of a
// block. Handshakes are valid/ready on both sides; the read data is
// combinational from the storage array.
module blkbuf #(
  parameter int W   = 16,
  parameter int J   = 16,
  parameter int NCH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [W-1:0]           in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [W-1:0]           out_data,
  output logic [$clog2(NCH)-1:0] out_ch,
  output logic                   out_last
);
  localparam int G  = NCH * J;           // samples per group
  localparam int GW = $clog2(G);
  localparam int JW = $clog2(J);
  localparam int CW = $clog2(NCH);
  logic [W-1:0]    mem [2*G];
  logic [GW-1:0]   widx;
  logic [1:0]      wgrp, rgrp;           // group counters with wrap bit
  logic [JW-1:0]   ri;                   // sample within block
  logic [CW-1:0]   rc;                   // channel block being read
  logic [GW:0]     raddr;

  assign in_ready  = (wgrp - rgrp) != 2'd2;
  assign out_valid = (wgrp != rgrp);
  assign raddr     = {rgrp[0], GW'(ri) * GW'(NCH) + GW'(rc)};
  assign out_data  = mem[raddr];
  assign out_ch    = rc;
  assign out_last  = (ri == JW'(J - 1));

  always_ff @(posedge clk) if (in_valid && in_ready) mem[{wgrp[0], widx}] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx <= '0; wgrp <= '0; rgrp <= '0; ri <= '0; rc <= '0;
    end else if (clear) begin
      widx <= '0; wgrp <= '0; rgrp <= '0; ri <= '0; rc <= '0;
    end else begin
      if (in_valid && in_ready) begin
        widx <= (widx == GW'(G - 1)) ? '0 : widx + 1'b1;
        if (widx == GW'(G - 1)) wgrp <= wgrp + 1'b1;
      end
      if (out_valid && out_ready) begin
        ri <= out_last ? '0 : ri + 1'b1;
        if (out_last) begin
          rc <= (rc == CW'(NCH - 1)) ? '0 : rc + 1'b1;
          if (rc == CW'(NCH - 1)) rgrp <= rgrp + 1'b1;
        end
      end
    end
  end
endmodule
