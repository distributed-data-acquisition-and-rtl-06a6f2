// Flash page buffers: two buffers of one flash page each, used alternately.
// The writer (packet formation during readout, the flash controller during
// downlink) fills one buffer byte by byte; a buffer that holds PAGE_BYTES
// bytes is handed to the reader (the flash controller during readout, the
// downlink controller during downlink) and the writer moves to the other.
// flush closes a partly written page by filling the rest with 0xFF.
// rd_release frees the page being read before its end (end of a file).
// byte_count counts the bytes written by the writer, padding excluded: during
// readout this is the compressed byte count of the exposure.
// Read data is combinational from the array at rd_ptr.
module page_buf #(
  parameter int PAGE_BYTES = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [7:0]  wr_data,
  input  logic        flush,
  output logic        flushing,
  output logic        rd_valid,
  input  logic        rd_ready,
  output logic [7:0]  rd_data,
  output logic        rd_page_last,
  input  logic        rd_release,
  output logic [31:0] byte_count
);
  localparam int AW = $clog2(PAGE_BYTES);
  logic [7:0]    mem [2][PAGE_BYTES];
  logic          wsel, rsel, fl;
  logic [1:0]    full;
  logic [AW-1:0] wptr, rptr;
  logic          we;
  logic [7:0]    wd;

  assign wr_ready     = !full[wsel] && !fl;
  assign flushing     = fl;
  assign rd_valid     = full[rsel];
  assign rd_data      = mem[rsel][rptr];
  assign rd_page_last = (rptr == AW'(PAGE_BYTES - 1));
  assign we           = fl ? !full[wsel] : (wr_valid && wr_ready);
  assign wd           = fl ? 8'hFF : wr_data;

  always_ff @(posedge clk) if (we) mem[wsel][wptr] <= wd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel <= 1'b0; rsel <= 1'b0; full <= '0; wptr <= '0; rptr <= '0; fl <= 1'b0;
      byte_count <= '0;
    end else if (clear) begin
      wsel <= 1'b0; rsel <= 1'b0; full <= '0; wptr <= '0; rptr <= '0; fl <= 1'b0;
      byte_count <= '0;
    end else begin
      if (flush && wptr != 0) fl <= 1'b1;
      if (we) begin
        if (!fl) byte_count <= byte_count + 1'b1;
        wptr <= wptr + 1'b1;
        if (wptr == AW'(PAGE_BYTES - 1)) begin
          full[wsel] <= 1'b1; wsel <= !wsel; wptr <= '0; fl <= 1'b0;
        end
      end
      if (rd_valid && (rd_release || (rd_ready && rd_page_last))) begin
        full[rsel] <= 1'b0; rsel <= !rsel; rptr <= '0;
      end else if (rd_valid && rd_ready) rptr <= rptr + 1'b1;
    end
  end
endmodule
