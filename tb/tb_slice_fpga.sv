// End-to-end test of slice_fpga at reduced sizes (256-byte pages, 4 pages
// per block, 64-pixel packets, 64-word accumulation buffers, 200-clock SDRAM
// power-up, refresh every 300 clocks). The stimulus, the models of the flash,
// SDRAM, front ends, ICU and downlink receiver, and all checks are in
// slice_tb_inc.svh. Ends with the TB_RESULT line.
module tb_slice_fpga;
  localparam bit FULL = 1'b0;
  `include "slice_tb_inc.svh"
  slice_fpga #(.PAGE_BYTES(PAGE), .PAGES_PER_BLOCK(PPB), .PKT_BLOCKS(PKB), .BUF_WORDS(BUFW),
               .INIT_CLKS(200), .REF_INTERVAL(300)) dut (.*);
endmodule
