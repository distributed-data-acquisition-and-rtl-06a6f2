// Square-root pre-scaler (optional, not strictly lossless).
// A lookup table of 2**CODE_W thresholds holds, for each code word c, the
// smallest pixel value that is represented by c; the table is monotonic and
// entry 0 is 0. The code of a pixel x is the largest c with lut[c] <= x,
// found by a binary search that settles one code bit per clock, most
// significant first: CODE_W = log2(N) steps. The table is written by the ICU
// through wr_en/wr_addr/wr_data (loaded with square-root spaced thresholds).
// With en low the pixel passes unchanged in one cycle. Handshake: a pixel is
// taken on in_valid & in_ready; the result is held on out_valid until
// out_ready. Latency with en high: CODE_W + 1 cycles.
module prescaler #(
  parameter int PIX_W  = 16,
  parameter int CODE_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              wr_en,
  input  logic [CODE_W-1:0] wr_addr,
  input  logic [PIX_W-1:0]  wr_data,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [PIX_W-1:0]  in_data,
  input  logic [1:0]        in_ch,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [PIX_W-1:0]  out_data,
  output logic [1:0]        out_ch
);
  localparam int SW = $clog2(CODE_W + 1);
  logic [PIX_W-1:0]  lut [2**CODE_W];
  logic [PIX_W-1:0]  x;
  logic [CODE_W-1:0] code, trial;
  logic [SW-1:0]     step;        // bits still to decide
  logic              busy;

  always_ff @(posedge clk) if (wr_en) lut[wr_addr] <= wr_data;

  assign in_ready = !busy && (!out_valid || out_ready);
  assign trial    = code | (CODE_W'(1) << (step - 1'b1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; out_valid <= 1'b0; out_data <= '0; out_ch <= '0;
      x <= '0; code <= '0; step <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_ch <= in_ch;
        if (en) begin
          busy <= 1'b1; x <= in_data; code <= '0; step <= SW'(CODE_W);
        end else begin
          out_valid <= 1'b1; out_data <= in_data;
        end
      end else if (busy) begin
        if (step != 0) begin
          if (lut[trial] <= x) code <= trial;
          step <= step - 1'b1;
        end else begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          out_data  <= PIX_W'(code);
        end
      end
    end
  end
endmodule
