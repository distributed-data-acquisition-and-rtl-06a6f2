// Behavioural model of a single data rate SDRAM (not synthesizable):
// 4 banks, 12-bit rows, 9-bit columns, 32-bit words, burst length 1, CAS
// latency CL. Commands are decoded from CS#/RAS#/CAS#/WE# on the rising
// clock edge. It counts protocol violations: READ/WRITE to a bank without
// an open row or earlier than T_RCD after ACTIVE, ACTIVE to an open bank,
// AUTO REFRESH with a bank open or any command before LOAD MODE (other than
// PRECHARGE/REFRESH/NOP).
module sdram_model #(
  parameter int CL    = 2,
  parameter int T_RCD = 2
) (
  input  logic        clk,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [11:0] a,
  input  logic [31:0] dq_i,
  output logic [31:0] dq_o
);
  logic [31:0] mem [int];
  int  row [4]; logic open [4]; int act_t [4];
  int  cyc = 0, violations = 0, refreshes = 0, mode_set = 0;
  logic [31:0] pipe [CL+1];
  initial begin for (int b = 0; b < 4; b++) open[b] = 0; end
  assign dq_o = pipe[CL];
  always @(posedge clk) begin
    cyc++;
    for (int n = CL; n > 0; n--) pipe[n] <= pipe[n-1];
    pipe[0] <= 32'hDEAD_BEEF;
    if (!cs_n) begin
      case ({ras_n, cas_n, we_n})
        3'b011: begin                                   // ACTIVE
          if (open[ba] || !mode_set) violations++;
          open[ba] = 1; row[ba] = a; act_t[ba] = cyc;
        end
        3'b101, 3'b100: begin                           // READ / WRITE
          automatic int addr = (int'(ba) << 21) | (row[ba] << 9) | int'(a[8:0]);
          if (!open[ba] || cyc - act_t[ba] < T_RCD) violations++;
          if (we_n) pipe[0] <= mem.exists(addr) ? mem[addr] : 32'h0;
          else mem[addr] = dq_i;
        end
        3'b010: if (a[10]) for (int b = 0; b < 4; b++) open[b] = 0; else open[ba] = 0;
        3'b001: begin refreshes++; for (int b = 0; b < 4; b++) if (open[b]) violations++; end
        3'b000: mode_set = 1;
        default: ;
      endcase
    end
  end
endmodule
