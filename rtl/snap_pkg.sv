// Shared constants and types of the slice FPGA data acquisition design.
// Pixel words are 16 bits (2 scale-factor bits in the top); compression works
// on blocks of J samples per channel, four interleaved channels. The option
// identifier follows the CCSDS lossless convention for 16-bit samples: a
// 4-bit ID where 1 is the fundamental sequence (k = 0), 2..14 are split
// options k = 1..13 and 15 marks an uncompressed block.
package snap_pkg;
  localparam int PIX_W      = 16;
  localparam int NCH        = 4;
  localparam int N_OPT      = 14;
  localparam int ID_W       = 4;
  localparam logic [ID_W-1:0] ID_NOCOMP = 4'hF;
  localparam int LEN_W      = 22;

  // Command codes written to the flash controller
  typedef enum logic [1:0] {
    FC_NONE     = 2'd0,
    FC_READOUT  = 2'd1,  // "data readout": program pages as buffers fill
    FC_DOWNLINK = 2'd2,  // read file pages into the page buffers
    FC_ERASE    = 2'd3   // "erase flash blocks"
  } flash_cmd_e;

  // Error register codes
  localparam logic [3:0] ERR_NONE           = 4'd0;
  localparam logic [3:0] ERR_BLOCK_OVERFLOW = 4'd1;
  localparam logic [3:0] ERR_EARLY_TERM     = 4'd2;

  // Bits of the block enable register
  localparam int EN_FRONTEND = 0;
  localparam int EN_COMPRESS = 1;
  localparam int EN_FLASH    = 2;
  localparam int EN_DOWNLINK = 3;
  localparam int EN_ACCUM    = 4;
  localparam int EN_SDRAM    = 5;
  localparam int EN_PRESCALE = 6;
  localparam int EN_NOCOMP   = 7;   // force "no compression"
  localparam int EN_NIR      = 8;   // slice works as an NIR channel

  // Slice register map (7-bit register address of a command word)
  localparam logic [6:0] R_ENABLE     = 7'h00;
  localparam logic [6:0] R_FLASH_CMD  = 7'h01;
  localparam logic [6:0] R_NBLOCKS    = 7'h02;
  localparam logic [6:0] R_BLKRAM_A   = 7'h03;
  localparam logic [6:0] R_BLKRAM_D   = 7'h04;  // write: data, address auto-increments
  localparam logic [6:0] R_LUT_A      = 7'h05;
  localparam logic [6:0] R_LUT_D      = 7'h06;  // write: data, address auto-increments
  localparam logic [6:0] R_FBYTES_LO  = 7'h07;  // file byte count
  localparam logic [6:0] R_FBYTES_HI  = 7'h08;
  localparam logic [6:0] R_EXPO_ID    = 7'h09;
  localparam logic [6:0] R_APID       = 7'h0A;
  localparam logic [6:0] R_ACC_CTRL   = 7'h0B;  // [0] first [1] subtract [2] last [7:4] shift
  localparam logic [6:0] R_NIR_PIX_LO = 7'h0C;
  localparam logic [6:0] R_NIR_PIX_HI = 7'h0D;
  localparam logic [6:0] R_START      = 7'h0E;  // write 1: start commanded operation
  localparam logic [6:0] R_BYTES_LO   = 7'h10;  // read: bytes written to flash
  localparam logic [6:0] R_BYTES_HI   = 7'h11;
  localparam logic [6:0] R_FLASH_ERR  = 7'h12;
  localparam logic [6:0] R_DL_ERR     = 7'h13;
  localparam logic [6:0] R_NBAD       = 7'h14;
  localparam logic [6:0] R_BAD0       = 7'h20;  // 0x20..0x2F bad block list
  localparam logic [6:0] R_STATUS     = 7'h15;
  localparam logic [6:0] R_BLKUSED    = 7'h16;
  localparam logic [6:0] R_RXERR      = 7'h17;
endpackage
