// Flash block ID RAM. Holds the list of flash blocks the ICU has allocated
// for an exposure (or the blocks of a file to read back, or blocks to erase).
// Each 16-bit entry is {chip ID[2:0], block address[12:0]}; the chip ID
// selects one of eight flash devices (bit 2 = bank). Written by the ICU
// through the command processor, read by the flash controller with one cycle
// latency.
module block_id_ram #(
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [15:0]              wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [15:0]              rd_data
);
  logic [15:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
