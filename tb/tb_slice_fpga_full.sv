// End-to-end test of slice_fpga at the design's default sizes (2048-byte
// pages, 64 pages per block, 960-pixel packets, 256-word accumulation
// buffers, 20000-clock SDRAM power-up, refresh every 780 clocks). Same
// scenario as tb_slice_fpga (see slice_tb_inc.svh) without the pre-scaler
// table load and the block change, which take long at this size.
module tb_slice_fpga_full;
  localparam bit FULL = 1'b1;
  `include "slice_tb_inc.svh"
  slice_fpga dut (.*);
endmodule
