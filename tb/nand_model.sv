// Behavioural model of one NAND flash bank (not synthesizable): four chips
// on a shared 8-bit bus with CLE/ALE/WE#/RE# and per-chip CE#. It accepts
// page program (80h, 5 address cycles, data, 10h), page read (00h, 5 address
// cycles, 30h, data on RE#), block erase (60h, 3 row cycles, D0h) and read
// status (70h). Commands, addresses and data are latched on the rising edge
// of WE#; read data is driven while RE# is low and advances on its rising
// edge. R/B# goes low for BUSY clocks after 10h, 30h and D0h. A program or
// erase of a block listed in bad[] reports a failing status (bit 0).
module nand_model #(
  parameter int PAGE  = 2048,
  parameter int BUSY  = 20,
  parameter int PW    = 6             // log2(pages per block)
) (
  input  logic       clk,
  input  logic [3:0] ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic [7:0] io_i,
  output logic [7:0] io_o,
  output logic       rb_n
);
  logic [7:0] mem [int];             // key: {chip, row, column}
  int         bad [$];
  int         programs = 0, erases = 0, reads = 0;
  logic [7:0] cmd;
  int         acnt, col, row, chip, busy_c = 0;
  logic       status_mode = 0, fail = 0;
  logic [7:0] pbuf [PAGE];

  function automatic int chip_of();
    for (int c = 0; c < 4; c++) if (!ce_n[c]) return c;
    return -1;
  endfunction
  function automatic logic is_bad(int ch, int rw);
    foreach (bad[n]) if (bad[n] == ((ch << 16) | (rw >> PW))) return 1'b1;
    return 1'b0;
  endfunction
  function automatic logic [7:0] rd(int ch, int rw, int c);
    int key = (ch << 28) | (rw << 11) | c;
    return mem.exists(key) ? mem[key] : 8'hFF;
  endfunction

  assign rb_n = (busy_c == 0);
  always @(posedge clk) if (busy_c != 0) busy_c <= busy_c - 1;

  assign io_o = status_mode ? {1'b1, rb_n, 5'd0, fail} : pbuf[col % PAGE];

  always @(posedge we_n) if (chip_of() >= 0) begin
    if (cle) begin
      cmd = io_i; status_mode = 0;
      case (io_i)
        8'h80, 8'h00: begin acnt = 0; col = 0; row = 0; chip = chip_of();
                            if (io_i == 8'h80) for (int n = 0; n < PAGE; n++) pbuf[n] = 8'hFF; end
        8'h60: begin acnt = 2; row = 0; chip = chip_of(); end
        8'h10: begin
          programs++; fail = is_bad(chip, row);
          for (int n = 0; n < PAGE; n++) mem[(chip << 28) | (row << 11) | n] = pbuf[n];
          busy_c = BUSY;
        end
        8'h30: begin
          reads++; for (int n = 0; n < PAGE; n++) pbuf[n] = rd(chip, row, n);
          col = 0; busy_c = BUSY;
        end
        8'hD0: begin
          erases++; fail = is_bad(chip, row);
          for (int p = 0; p < (1 << PW); p++) for (int n = 0; n < PAGE; n++)
            if (mem.exists((chip << 28) | ((((row >> PW) << PW) | p) << 11) | n))
              mem.delete((chip << 28) | ((((row >> PW) << PW) | p) << 11) | n);
          busy_c = BUSY;
        end
        8'h70: status_mode = 1;
        default: ;
      endcase
    end else if (ale) begin
      case (acnt)
        0: col = io_i; 1: col |= int'(io_i) << 8;
        2: row = io_i; 3: row |= int'(io_i) << 8; default: row |= int'(io_i) << 16;
      endcase
      acnt++;
    end else if (cmd == 8'h80) begin
      pbuf[col % PAGE] = io_i; col++;
    end
  end
  always @(posedge re_n) if (!status_mode && chip_of() >= 0) col++;
endmodule
