// NIR accumulator controller with the pair of accumulation buffers.
// During an NIR readout cycle the pixels of the frame arrive in order; pixel
// p belongs to chunk p / BUF_WORDS, and chunk c is accumulated in buffer
// c % 2. The SDRAM controller fills a buffer with the running sums of its
// chunk (sd_loaded) before the accumulator may use it; each pixel is then
// added to (positive readout) or subtracted from (negative readout, 'sub')
// the stored sum. On the first readout of an exposure ('first') the stored
// value is ignored; on the last ('last') the new sum is scaled by an
// arithmetic right shift of 'shift' bits and clamped to 0..65535 before it
// is stored. When a buffer's chunk is complete it is handed back to the SDRAM
// controller (buf_full) for write-back. Sums are 32-bit two's complement.
// The SDRAM controller reaches the buffers through the sd_* port.
module nir_acc #(
  parameter int BUF_WORDS = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         start,      // new readout cycle
  input  logic                         first,
  input  logic                         sub,
  input  logic                         last,
  input  logic [3:0]                   shift,
  input  logic [31:0]                  n_pixels,
  input  logic                         pix_valid,
  output logic                         pix_ready,
  input  logic [15:0]                  pix_data,
  // buffer hand-over
  input  logic [1:0]                   sd_loaded,  // pulse: buffer b holds sums of its next chunk
  output logic [1:0]                   buf_full,   // buffer b waits for write-back
  output logic                         done,
  // SDRAM controller access to the buffers
  input  logic                         sd_sel,
  input  logic [$clog2(BUF_WORDS)-1:0] sd_addr,
  input  logic                         sd_we,
  input  logic [31:0]                  sd_wdata,
  output logic [31:0]                  sd_rdata
);
  localparam int AW = $clog2(BUF_WORDS);
  logic [31:0]   mem [2][BUF_WORDS];
  logic [1:0]    ready;
  logic [31:0]   pcnt;
  logic          cur;
  logic [AW-1:0] off;
  logic          active;
  logic signed [31:0] old, sum, scaled;
  logic [31:0]   nv;

  assign pix_ready = en && active && ready[cur];
  assign sd_rdata  = mem[sd_sel][sd_addr];

  always_comb begin
    old    = first ? 32'sd0 : signed'(mem[cur][off]);
    sum    = sub ? old - signed'({16'd0, pix_data}) : old + signed'({16'd0, pix_data});
    scaled = sum >>> shift;
    if (!last)               nv = sum;
    else if (scaled < 0)     nv = 32'd0;
    else if (scaled > 65535) nv = 32'd65535;
    else                     nv = scaled;
  end

  // each buffer has one writer at a time: the accumulator or the SDRAM side
  always_ff @(posedge clk)
    for (int b = 0; b < 2; b++) begin
      if (pix_valid && pix_ready && cur == 1'(b)) mem[b][off] <= nv;
      else if (sd_we && sd_sel == 1'(b))         mem[b][sd_addr] <= sd_wdata;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= '0; buf_full <= '0; pcnt <= '0; cur <= 1'b0; off <= '0;
      active <= 1'b0; done <= 1'b0;
    end else begin
      for (int b = 0; b < 2; b++) if (sd_loaded[b]) begin ready[b] <= 1'b1; buf_full[b] <= 1'b0; end
      if (start) begin
        active <= 1'b1; done <= 1'b0; pcnt <= '0; cur <= 1'b0; off <= '0;
        ready <= '0; buf_full <= '0;
      end else if (pix_valid && pix_ready) begin
        pcnt <= pcnt + 1'b1;
        off  <= off + 1'b1;
        if (off == AW'(BUF_WORDS - 1) || pcnt + 1'b1 == n_pixels) begin
          ready[cur]    <= 1'b0;
          buf_full[cur] <= 1'b1;
          cur <= !cur; off <= '0;
        end
        if (pcnt + 1'b1 == n_pixels) begin active <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
