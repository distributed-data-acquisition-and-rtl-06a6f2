// NAND flash controller of a slice.
// Commanded by a code and a start strobe while its block enable bit is set:
//  FC_READOUT  each filled page buffer is committed by a page program
//              (80h, 5 address cycles, PAGE_BYTES data cycles, 10h), followed
//              by a program status read (70h); a failing status (I/O bit 0)
//              records the block in the bad block list. A page counter moves
//              to the next allocated block of the block ID RAM when a block's
//              pages are used up. If a page must be written after all
//              allocated blocks are consumed, ERR_BLOCK_OVERFLOW is written
//              to the error register and 'suspend' stops data acceptance.
//              Ends when the enable bit is cleared.
//  FC_DOWNLINK reads ceil(file_bytes / PAGE_BYTES) pages of the listed blocks
//              (00h, 5 address cycles, 30h, wait ready, data out) into the
//              page buffers for the downlink controller.
//  FC_ERASE    erases the n_blocks listed blocks (60h, 3 row cycles, D0h)
//              and checks the status of each.
// Block ID RAM entries are {chip[2:0], block[12:0]}; chip bit 2 selects the
// bank (each bank has its own I/O bus), the chip selects one of 8 CE lines.
// Address cycles: column 0 (two bytes), then the row {block, page} in three
// bytes. Bus timing: a write cycle holds WE# low one clock, high one clock;
// a read cycle holds RE# low at least two clocks (data sampled at the end
// of the second, longer while the page buffer cannot take the byte) and high
// one clock. Busy waits allow T_WB clocks before R/B# is watched.
module flash_ctrl
  import snap_pkg::*;
#(
  parameter int PAGE_BYTES      = 2048,
  parameter int PAGES_PER_BLOCK = 64,
  parameter int BRAM_DEPTH      = 256,
  parameter int NBAD            = 16,
  parameter int T_WB            = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic                          start,
  input  flash_cmd_e                    cmd,
  input  logic [$clog2(BRAM_DEPTH):0]   n_blocks,
  input  logic [31:0]                   file_bytes,
  // flash block ID RAM read port (1 cycle latency)
  output logic [$clog2(BRAM_DEPTH)-1:0] bram_addr,
  input  logic [15:0]                   bram_data,
  // page buffers: read side (readout), write side (downlink)
  input  logic                          pb_rd_valid,
  output logic                          pb_rd_ready,
  input  logic [7:0]                    pb_rd_data,
  output logic                          pb_wr_valid,
  input  logic                          pb_wr_ready,
  output logic [7:0]                    pb_wr_data,
  // NAND flash, two banks
  output logic [7:0]                    nf_ce_n,
  output logic [1:0]                    nf_cle,
  output logic [1:0]                    nf_ale,
  output logic [1:0]                    nf_we_n,
  output logic [1:0]                    nf_re_n,
  output logic [1:0]                    nf_io_oe,
  output logic [7:0]                    nf_io_o [2],
  input  logic [7:0]                    nf_io_i [2],
  input  logic [1:0]                    nf_rb_n,
  // status
  output logic                          busy,
  output logic                          suspend,
  output logic [3:0]                    err_code,
  output logic [$clog2(BRAM_DEPTH):0]   blocks_used,
  output logic [4:0]                    n_bad,
  output logic [15:0]                   bad_list [NBAD],
  output logic [15:0]                   pages_done
);
  localparam int BAW = $clog2(BRAM_DEPTH);
  localparam int PW  = $clog2(PAGES_PER_BLOCK);
  localparam int DW  = $clog2(PAGE_BYTES);

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_FETCH2, S_WAITPG, S_CMD1, S_ADDR, S_DATA, S_CMD2,
    S_BUSY, S_STCMD, S_STRD, S_RDATA, S_NEXT
  } st_e;
  st_e           st;
  flash_cmd_e    op;
  logic [1:0]    ph;
  logic [15:0]   blk;                // current block entry
  logic [BAW:0]  bidx;               // index of current block in the list
  logic [PW-1:0] page;
  logic [2:0]    acnt;
  logic [DW:0]   dcnt;
  logic [3:0]    wcnt;
  logic [15:0]   pg_need;
  logic [23:0]   row;
  logic [7:0]    iob, abyte, cmd_byte;
  logic          bank;
  logic [7:0]    io_in;

  assign bank      = blk[15];
  assign row       = 24'({blk[12:0], page});
  assign io_in     = nf_io_i[bank];
  assign bram_addr = bidx[BAW-1:0];
  assign busy      = (st != S_IDLE);

  always_comb begin
    case (acnt)
      3'd0, 3'd1: abyte = 8'h00;
      3'd2:       abyte = row[7:0];
      3'd3:       abyte = row[15:8];
      default:    abyte = row[23:16];
    endcase
    case (st)
      S_CMD1:  cmd_byte = (op == FC_READOUT) ? 8'h80 : (op == FC_DOWNLINK) ? 8'h00 : 8'h60;
      S_CMD2:  cmd_byte = (op == FC_READOUT) ? 8'h10 : (op == FC_DOWNLINK) ? 8'h30 : 8'hD0;
      default: cmd_byte = 8'h70;
    endcase
  end

  // bus drive
  always_comb begin
    nf_ce_n = '1; nf_cle = '0; nf_ale = '0; nf_we_n = '1; nf_re_n = '1; nf_io_oe = '0;
    nf_io_o[0] = '0; nf_io_o[1] = '0;
    iob = 8'h00;
    if (st inside {S_CMD1, S_ADDR, S_DATA, S_CMD2, S_BUSY, S_STCMD, S_STRD, S_RDATA})
      nf_ce_n[blk[15:13]] = 1'b0;
    case (st)
      S_CMD1, S_CMD2, S_STCMD: begin nf_cle[bank] = 1'b1; iob = cmd_byte; end
      S_ADDR:                  begin nf_ale[bank] = 1'b1; iob = abyte; end
      S_DATA:                  iob = pb_rd_data;
      default: ;
    endcase
    if (st inside {S_CMD1, S_ADDR, S_CMD2, S_STCMD} || (st == S_DATA && pb_rd_valid)) begin
      nf_io_oe[bank] = 1'b1;
      nf_io_o[bank]  = iob;
      nf_we_n[bank]  = (ph != 2'd0);
    end
    if ((st == S_STRD && ph != 2'd2) || (st == S_RDATA && (ph == 2'd1 || (ph == 2'd0 && pb_wr_ready))))
      nf_re_n[bank] = 1'b0;
  end

  assign pb_rd_ready = (st == S_DATA) && pb_rd_valid && (ph == 2'd1);
  assign pb_wr_valid = (st == S_RDATA) && (ph == 2'd1);
  assign pb_wr_data  = io_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; op <= FC_NONE; ph <= '0; blk <= '0; bidx <= '0; page <= '0;
      acnt <= '0; dcnt <= '0; wcnt <= '0; pg_need <= '0; suspend <= 1'b0;
      err_code <= ERR_NONE; blocks_used <= '0; n_bad <= '0; pages_done <= '0;
      for (int n = 0; n < NBAD; n++) bad_list[n] <= '0;
    end else begin
      case (st)
        S_IDLE: if (en && start && cmd != FC_NONE) begin
          op <= cmd; bidx <= '0; page <= '0; suspend <= 1'b0; err_code <= ERR_NONE;
          blocks_used <= '0; n_bad <= '0; pages_done <= '0;
          pg_need <= 16'((file_bytes + 32'(PAGE_BYTES - 1)) / 32'(PAGE_BYTES));
          st <= S_FETCH;
        end
        S_FETCH: begin
          // block list exhausted?
          if (bidx == n_blocks || (op == FC_DOWNLINK && pages_done == pg_need)) begin
            if (op == FC_READOUT) begin
              st <= S_WAITPG;             // overflow is declared when data arrives
            end else st <= S_IDLE;
          end else st <= S_FETCH2;
        end
        S_FETCH2: begin
          blk <= bram_data; blocks_used <= bidx + 1'b1;
          st  <= (op == FC_READOUT) ? S_WAITPG : S_CMD1;
        end
        S_WAITPG: begin
          if (!en) st <= S_IDLE;
          else if (pb_rd_valid) begin
            if (bidx == n_blocks) begin
              err_code <= ERR_BLOCK_OVERFLOW; suspend <= 1'b1;
            end else st <= S_CMD1;
          end
        end
        S_CMD1, S_CMD2, S_STCMD: begin
          ph <= ph + 1'b1;
          if (ph == 2'd1) begin
            ph <= '0;
            if (st == S_CMD1) begin st <= S_ADDR; acnt <= (op == FC_ERASE) ? 3'd2 : 3'd0; end
            else if (st == S_CMD2) begin st <= S_BUSY; wcnt <= '0; end
            else st <= S_STRD;
          end
        end
        S_ADDR: begin
          ph <= ph + 1'b1;
          if (ph == 2'd1) begin
            ph <= '0; acnt <= acnt + 1'b1;
            if (acnt == 3'd4) begin
              if (op == FC_READOUT) begin st <= S_DATA; dcnt <= '0; end
              else st <= S_CMD2;
            end
          end
        end
        S_DATA: if (pb_rd_valid) begin
          ph <= ph + 1'b1;
          if (ph == 2'd1) begin
            ph <= '0; dcnt <= dcnt + 1'b1;
            if (dcnt == (DW+1)'(PAGE_BYTES - 1)) st <= S_CMD2;
          end
        end
        S_BUSY: begin
          if (wcnt != 4'(T_WB)) wcnt <= wcnt + 1'b1;
          else if (nf_rb_n[bank]) begin
            if (op == FC_DOWNLINK) begin st <= S_RDATA; dcnt <= '0; ph <= '0; end
            else st <= S_STCMD;
          end
        end
        S_STRD: begin
          ph <= ph + 1'b1;
          if (ph == 2'd1 && io_in[0] && n_bad != 5'(NBAD) &&
              (n_bad == 0 || bad_list[n_bad[$clog2(NBAD)-1:0] - 1'b1] != blk)) begin
            bad_list[n_bad[$clog2(NBAD)-1:0]] <= blk;
            n_bad <= n_bad + 1'b1;
          end
          if (ph == 2'd2) begin ph <= '0; st <= S_NEXT; end
        end
        S_RDATA: if (pb_wr_ready || ph == 2'd2) begin
          ph <= ph + 1'b1;
          if (ph == 2'd2) begin
            ph <= '0; dcnt <= dcnt + 1'b1;
            if (dcnt == (DW+1)'(PAGE_BYTES - 1)) st <= S_NEXT;
          end
        end
        S_NEXT: begin
          pages_done <= pages_done + 1'b1;
          if (op == FC_ERASE || page == PW'(PAGES_PER_BLOCK - 1)) begin
            page <= '0; bidx <= bidx + 1'b1; st <= S_FETCH;
          end else begin
            page <= page + 1'b1;
            if (op == FC_READOUT) st <= S_WAITPG;
            else if (pages_done + 1'b1 == pg_need) st <= S_IDLE;
            else st <= S_CMD1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
