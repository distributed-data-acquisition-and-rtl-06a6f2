// Parallel sequence length evaluation.
// While the J mapped samples of a block stream in, N_OPT accumulators run in
// parallel, one per coding option: option k (k = 0..N_OPT-1, k = 0 being the
// fundamental sequence) codes a sample d in (d >> k) + 1 + k bits. When the
// last sample of the block has been added the lengths (data bits only, the
// option ID excluded) are presented for one cycle on len_valid together with
// the block's channel. One sample per cycle, always ready.
module seq_eval
  import snap_pkg::*;
#(
  parameter int N = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0]          in_data,
  input  logic [1:0]            in_ch,
  input  logic                  in_last,
  output logic                  len_valid,
  output logic [LEN_W-1:0]      len [N_OPT],
  output logic [1:0]            len_ch
);
  logic [LEN_W-1:0] acc [N_OPT];
  logic [LEN_W-1:0] add [N_OPT];

  always_comb
    for (int k = 0; k < N_OPT; k++)
      add[k] = LEN_W'(in_data >> k) + LEN_W'(k + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_valid <= 1'b0; len_ch <= '0;
      for (int k = 0; k < N_OPT; k++) begin acc[k] <= '0; len[k] <= '0; end
    end else begin
      len_valid <= 1'b0;
      if (in_valid) begin
        for (int k = 0; k < N_OPT; k++) begin
          if (in_last) begin
            len[k] <= acc[k] + add[k];
            acc[k] <= '0;
          end else acc[k] <= acc[k] + add[k];
        end
        if (in_last) begin len_valid <= 1'b1; len_ch <= in_ch; end
      end
    end
  end
endmodule
