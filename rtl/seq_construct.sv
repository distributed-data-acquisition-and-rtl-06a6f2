// Compressed data sequence construction.
// For every block whose option has been declared by the voting tree (queued
// in a small option FIFO), the J mapped samples are taken from input FIFO #2
// and the coded block is produced one bit per clock in CCSDS split-sample
// order: the 4-bit option ID; for ID 15 (no compression) the J samples of N
// bits; otherwise, with k = ID-1, the fundamental sequence code of every
// sample (d >> k zeros followed by a one), then the k low bits of every
// sample. Bits are packed most significant first into bytes that leave on
// out_valid/out_ready. After PKT_BLOCKS blocks the stream is padded with zero
// bits to a byte boundary and the final byte is flagged out_last: a packet
// always covers a fixed number of pixels (PKT_BLOCKS*J).
module seq_construct
  import snap_pkg::*;
#(
  parameter int N          = 16,
  parameter int J          = 16,
  parameter int PKT_BLOCKS = 60
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  // declared options
  input  logic            opt_valid,
  input  logic [ID_W-1:0] opt_id,
  output logic            opt_overflow,
  // input FIFO #2
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [N-1:0]    in_data,
  input  logic            in_last,
  // bytes to packet formation
  output logic            out_valid,
  input  logic            out_ready,
  output logic [7:0]      out_data,
  output logic            out_last
);
  localparam int QD = 8;
  localparam int JW = $clog2(J);
  localparam int BW = $clog2(PKT_BLOCKS + 1);
  localparam int NW = $clog2(N + 1);

  // option queue
  logic [ID_W-1:0] q [QD];
  logic [3:0]      qw, qr;
  logic            q_empty;
  assign q_empty = (qw == qr);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ID, S_FS, S_SPLIT, S_RAW, S_PAD} st_e;
  st_e st;
  logic [N-1:0]    smp [J];
  logic [ID_W-1:0] id;
  logic [NW-1:0]   k;
  logic [JW-1:0]   i;            // sample index
  logic [N-1:0]    z;            // zeros left of the current FS code word
  logic [NW-1:0]   b;            // bit index inside a field
  logic [BW-1:0]   nblk;         // blocks of the current packet
  logic [7:0]      sr;
  logic [2:0]      nb;
  logic            last_blk;
  logic            can_emit;
  logic            ebit, efin, emit;

  assign in_ready = (st == S_LOAD);
  assign can_emit = !out_valid;
  assign last_blk = (nblk == BW'(PKT_BLOCKS - 1));
  assign k        = NW'(id - 1'b1);

  // bit to emit in the current state, and whether it is the packet's final bit
  always_comb begin
    ebit = 1'b0; efin = 1'b0; emit = 1'b0;
    case (st)
      S_ID:    begin emit = 1'b1; ebit = id[ID_W-1 - int'(b)]; end
      S_FS:    begin
        emit = 1'b1; ebit = (z == 0);
        efin = last_blk && (z == 0) && (i == JW'(J - 1)) && (k == 0);
      end
      S_SPLIT: begin
        emit = 1'b1; ebit = smp[i][k - 1'b1 - b];
        efin = last_blk && (i == JW'(J - 1)) && (b == k - 1'b1);
      end
      S_RAW:   begin
        emit = 1'b1; ebit = smp[i][N-1 - int'(b)];
        efin = last_blk && (i == JW'(J - 1)) && (b == NW'(N - 1));
      end
      S_PAD:   begin emit = 1'b1; ebit = 1'b0; efin = (nb == 3'd7); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qw <= '0; qr <= '0; opt_overflow <= 1'b0;
      st <= S_IDLE; id <= '0; i <= '0; z <= '0; b <= '0; nblk <= '0;
      sr <= '0; nb <= '0; out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0;
      for (int n = 0; n < QD; n++) q[n] <= '0;
      for (int n = 0; n < J; n++) smp[n] <= '0;
    end else if (clear) begin
      qw <= '0; qr <= '0; st <= S_IDLE; nblk <= '0; nb <= '0; out_valid <= 1'b0;
    end else begin
      if (opt_valid) begin
        if (qw - qr == 4'(QD)) opt_overflow <= 1'b1;
        else begin q[qw[2:0]] <= opt_id; qw <= qw + 1'b1; end
      end
      if (out_valid && out_ready) out_valid <= 1'b0;

      // bit packer
      if (emit && can_emit) begin
        sr <= {sr[6:0], ebit};
        nb <= nb + 1'b1;
        if (nb == 3'd7) begin
          out_valid <= 1'b1; out_data <= {sr[6:0], ebit}; out_last <= efin;
        end
      end

      case (st)
        S_IDLE: if (!q_empty) begin
          id <= q[qr[2:0]]; qr <= qr + 1'b1; st <= S_LOAD; i <= '0;
        end
        S_LOAD: if (in_valid) begin
          smp[i] <= in_data;
          i <= i + 1'b1;
          if (in_last || i == JW'(J - 1)) begin st <= S_ID; b <= '0; end
        end
        S_ID: if (can_emit) begin
          b <= b + 1'b1;
          if (b == NW'(ID_W - 1)) begin
            b <= '0; i <= '0;
            if (id == ID_NOCOMP) st <= S_RAW;
            else begin st <= S_FS; z <= smp[0] >> k; end
          end
        end
        S_FS: if (can_emit) begin
          if (z != 0) z <= z - 1'b1;
          else if (i == JW'(J - 1)) begin
            i <= '0; b <= '0;
            if (k == 0) begin
              nblk <= last_blk ? '0 : nblk + 1'b1;
              st   <= (last_blk && nb != 3'd7) ? S_PAD : S_IDLE;
            end else st <= S_SPLIT;
          end else begin
            i <= i + 1'b1; z <= smp[i + 1'b1] >> k;
          end
        end
        S_SPLIT, S_RAW: if (can_emit) begin
          if (b == ((st == S_RAW) ? NW'(N - 1) : k - 1'b1)) begin
            b <= '0;
            if (i == JW'(J - 1)) begin
              nblk <= last_blk ? '0 : nblk + 1'b1;
              st   <= (last_blk && nb != 3'd7) ? S_PAD : S_IDLE;
            end else i <= i + 1'b1;
          end else b <= b + 1'b1;
        end
        S_PAD: if (can_emit && nb == 3'd7) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
