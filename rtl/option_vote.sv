// Option voting tree.
// A binary tree of compare-and-select nodes picks the shortest of the N_OPT
// option lengths; on a tie the lower option wins. If the winner is not
// shorter than the uncompressed block (J*N bits), or force_nocomp is set, the
// result is the "no compression" ID. Option k is reported as CCSDS ID k+1.
// The tree is combinational; the result is registered (one cycle latency).
module option_vote
  import snap_pkg::*;
#(
  parameter int N = 16,
  parameter int J = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             force_nocomp,
  input  logic             len_valid,
  input  logic [LEN_W-1:0] len [N_OPT],
  input  logic [1:0]       len_ch,
  output logic             opt_valid,
  output logic [ID_W-1:0]  opt_id,
  output logic [1:0]       opt_ch
);
  localparam int LEAVES = 16;             // N_OPT padded to a power of two
  logic [LEN_W-1:0] lv [2*LEAVES];        // heap-ordered tree, node 1 = root
  logic [ID_W-1:0]  iv [2*LEAVES];
  logic [ID_W-1:0]  win;

  always_comb begin
    for (int i = 0; i < LEAVES; i++) begin
      lv[LEAVES+i] = (i < N_OPT) ? len[i] : '1;
      iv[LEAVES+i] = ID_W'(i + 1);
    end
    lv[0] = '0; iv[0] = '0;
    for (int n = LEAVES - 1; n >= 1; n--) begin
      if (lv[2*n+1] < lv[2*n]) begin lv[n] = lv[2*n+1]; iv[n] = iv[2*n+1]; end
      else                     begin lv[n] = lv[2*n];   iv[n] = iv[2*n];   end
    end
    win = (force_nocomp || lv[1] >= LEN_W'(J * N)) ? ID_NOCOMP : iv[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opt_valid <= 1'b0; opt_id <= '0; opt_ch <= '0;
    end else begin
      opt_valid <= len_valid;
      if (len_valid) begin opt_id <= win; opt_ch <= len_ch; end
    end
  end
endmodule
