// Slice register file: the block enable register (one enable bit per
// programmable block), configuration registers written by the ICU, write
// ports into the flash block ID RAM and the pre-scaler lookup table (an
// address register plus a data register whose writes auto-increment the
// address), a start register that issues one-cycle command strobes, and the
// status registers the ICU reads after an operation (byte count, error
// codes, bad block list, blocks used). The register map is in snap_pkg.
// Reads are combinational on reg_addr.
// Start register bits: 0 flash controller start, 1 downlink start, 2 flush
// the last partial page, 3 NIR accumulation start, 4 SDRAM transfer to
// compression start, 5 clear the data path for a new exposure.
module slice_regs
  import snap_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_wr,
  input  logic [6:0]  reg_addr,
  input  logic [15:0] reg_wdata,
  output logic [15:0] reg_rdata,
  // configuration
  output logic [15:0] enable,
  output flash_cmd_e  flash_cmd,
  output logic [8:0]  n_blocks,
  output logic [31:0] file_bytes,
  output logic [15:0] expo_id,
  output logic [10:0] apid,
  output logic [7:0]  acc_ctrl,
  output logic [31:0] nir_pixels,
  output logic [5:0]  start,
  output logic        bram_wr,
  output logic [7:0]  bram_addr,
  output logic [15:0] bram_data,
  output logic        lut_wr,
  output logic [11:0] lut_addr,
  output logic [15:0] lut_data,
  // status
  input  logic [31:0] bytes_written,
  input  logic [3:0]  flash_err,
  input  logic [3:0]  dl_err,
  input  logic [4:0]  n_bad,
  input  logic [15:0] bad_list [16],
  input  logic [8:0]  blocks_used,
  input  logic [15:0] status,
  input  logic [15:0] rx_errors
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= '0; flash_cmd <= FC_NONE; n_blocks <= '0; file_bytes <= '0;
      expo_id <= '0; apid <= '0; acc_ctrl <= '0; nir_pixels <= '0; start <= '0;
      bram_wr <= 1'b0; bram_addr <= '0; bram_data <= '0;
      lut_wr <= 1'b0; lut_addr <= '0; lut_data <= '0;
    end else begin
      start <= '0;
      if (bram_wr) bram_addr <= bram_addr + 1'b1;
      if (lut_wr)  lut_addr  <= lut_addr + 1'b1;
      bram_wr <= 1'b0; lut_wr <= 1'b0;
      if (reg_wr) begin
        case (reg_addr)
          R_ENABLE:     enable <= reg_wdata;
          R_FLASH_CMD:  flash_cmd <= flash_cmd_e'(reg_wdata[1:0]);
          R_NBLOCKS:    n_blocks <= reg_wdata[8:0];
          R_BLKRAM_A:   bram_addr <= reg_wdata[7:0];
          R_BLKRAM_D:   begin bram_wr <= 1'b1; bram_data <= reg_wdata; end
          R_LUT_A:      lut_addr <= reg_wdata[11:0];
          R_LUT_D:      begin lut_wr <= 1'b1; lut_data <= reg_wdata; end
          R_FBYTES_LO:  file_bytes[15:0] <= reg_wdata;
          R_FBYTES_HI:  file_bytes[31:16] <= reg_wdata;
          R_EXPO_ID:    expo_id <= reg_wdata;
          R_APID:       apid <= reg_wdata[10:0];
          R_ACC_CTRL:   acc_ctrl <= reg_wdata[7:0];
          R_NIR_PIX_LO: nir_pixels[15:0] <= reg_wdata;
          R_NIR_PIX_HI: nir_pixels[31:16] <= reg_wdata;
          R_START:      start <= reg_wdata[5:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (reg_addr)
      R_ENABLE:     reg_rdata = enable;
      R_FLASH_CMD:  reg_rdata = 16'(flash_cmd);
      R_NBLOCKS:    reg_rdata = 16'(n_blocks);
      R_BLKRAM_A:   reg_rdata = 16'(bram_addr);
      R_LUT_A:      reg_rdata = 16'(lut_addr);
      R_FBYTES_LO:  reg_rdata = file_bytes[15:0];
      R_FBYTES_HI:  reg_rdata = file_bytes[31:16];
      R_EXPO_ID:    reg_rdata = expo_id;
      R_APID:       reg_rdata = 16'(apid);
      R_ACC_CTRL:   reg_rdata = 16'(acc_ctrl);
      R_NIR_PIX_LO: reg_rdata = nir_pixels[15:0];
      R_NIR_PIX_HI: reg_rdata = nir_pixels[31:16];
      R_BYTES_LO:   reg_rdata = bytes_written[15:0];
      R_BYTES_HI:   reg_rdata = bytes_written[31:16];
      R_FLASH_ERR:  reg_rdata = 16'(flash_err);
      R_DL_ERR:     reg_rdata = 16'(dl_err);
      R_NBAD:       reg_rdata = 16'(n_bad);
      R_STATUS:     reg_rdata = status;
      R_BLKUSED:    reg_rdata = 16'(blocks_used);
      R_RXERR:      reg_rdata = rx_errors;
      default:      reg_rdata = (reg_addr[6:4] == 3'b010) ? bad_list[reg_addr[3:0]] : 16'h0000;
    endcase
  end
endmodule
