// Prediction error mapper (PEM) of the lossless compressor.
// A unit-delay predictor per interleaved channel: the prediction of a sample
// is the previous sample of the same channel (0 after clear). The prediction
// error delta is mapped to a non-negative integer as in the CCSDS lossless
// recommendation, with theta = min(pred, XMAX - pred):
//   0 <= delta <= theta  -> 2*delta
//   -theta <= delta < 0  -> 2*|delta| - 1
//   otherwise            -> theta + |delta|
// One-cycle registered stage with a valid/ready handshake; clear resets the
// predictors at the start of an exposure. No reference sample is inserted.
module pem #(
  parameter int N   = 16,
  parameter int NCH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [N-1:0]           in_data,
  input  logic [$clog2(NCH)-1:0] in_ch,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [N-1:0]           out_data,
  output logic [$clog2(NCH)-1:0] out_ch
);
  logic [N-1:0] pred [NCH];
  logic [N-1:0] p, theta, mag, mapped;
  logic         neg;

  always_comb begin
    p     = pred[in_ch];
    theta = (p < ~p) ? p : ~p;               // ~p == XMAX - p
    neg   = in_data < p;
    mag   = neg ? p - in_data : in_data - p;
    if (mag <= theta) mapped = neg ? N'((mag << 1) - 1'b1) : N'(mag << 1);
    else              mapped = theta + mag;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= '0; out_ch <= '0;
      for (int c = 0; c < NCH; c++) pred[c] <= '0;
    end else if (clear) begin
      out_valid <= 1'b0;
      for (int c = 0; c < NCH; c++) pred[c] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid   <= 1'b1;
        out_data    <= mapped;
        out_ch      <= in_ch;
        pred[in_ch] <= in_data;
      end
    end
  end
endmodule
