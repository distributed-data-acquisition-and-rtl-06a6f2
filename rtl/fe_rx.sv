// Front end science data receiver: serial-to-parallel conversion.
// Each lane carries frames of a start bit (0), WORDS pixel words of PIX_W bits
// sent most significant bit first, one parity bit over all data bits of the
// lane, and a stop bit (1); an idle line is held high. All lanes run in step:
// the start bit of lane 0 times the frame. A CCD channel is LANES=1, WORDS=4
// (four interleaved pixels per frame); an NIR channel is LANES=4, WORDS=1
// (four synchronous connections). The line is oversampled by BIT_CLKS system
// clocks per bit and sampled in the middle of each bit.
// After the stop bit the LANES*WORDS pixels are handed out one per accepted
// cycle on pix_valid/pix_ready, channel index = word index (CCD) or lane
// index (NIR). parity_err pulses for a bad parity (even parity assumed),
// frame_err for a missing stop bit (the frame is then dropped), overrun when a
// frame completes before the previous one was fully taken.
module fe_rx #(
  parameter int LANES    = 1,
  parameter int WORDS    = 4,
  parameter int PIX_W    = 16,
  parameter int BIT_CLKS = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [LANES-1:0] rx,
  output logic             pix_valid,
  input  logic             pix_ready,
  output logic [PIX_W-1:0] pix_data,
  output logic [1:0]       pix_ch,
  output logic             parity_err,
  output logic             frame_err,
  output logic             overrun
);
  localparam int NBITS = WORDS * PIX_W;       // data bits per lane
  localparam int NPIX  = WORDS * LANES;
  localparam int CW    = $clog2(BIT_CLKS + 1);
  localparam int BW    = $clog2(NBITS + 3);
  localparam int PW    = $clog2(NPIX + 1);

  typedef enum logic [1:0] {IDLE, BITS} st_e;
  st_e st;
  logic [CW-1:0]    cnt;
  logic [BW-1:0]    bitn;       // 0 start, 1..NBITS data, NBITS+1 parity, NBITS+2 stop
  logic [NBITS-1:0] sh [LANES];
  logic [LANES-1:0] par;
  logic [PIX_W-1:0] hold [NPIX];
  logic [PW-1:0]    left;       // pixels still to hand out
  logic [PW-1:0]    idx;

  assign pix_valid = (left != 0);
  assign pix_data  = hold[idx];
  assign pix_ch    = (LANES == 1) ? 2'(idx) : 2'(idx % LANES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; cnt <= '0; bitn <= '0; par <= '0;
      left <= '0; idx <= '0;
      parity_err <= 1'b0; frame_err <= 1'b0; overrun <= 1'b0;
      for (int l = 0; l < LANES; l++) sh[l] <= '0;
      for (int p = 0; p < NPIX; p++) hold[p] <= '0;
    end else begin
      parity_err <= 1'b0; frame_err <= 1'b0; overrun <= 1'b0;
      if (pix_valid && pix_ready) begin
        left <= left - 1'b1;
        idx  <= idx + 1'b1;
      end
      case (st)
        IDLE: if (en && !rx[0]) begin
          st <= BITS; bitn <= '0; par <= '0;
          cnt <= CW'(BIT_CLKS / 2 - 1);       // to the middle of the start bit
        end
        BITS: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            cnt  <= CW'(BIT_CLKS - 1);
            bitn <= bitn + 1'b1;
            if (bitn == 0) begin
              if (rx[0]) st <= IDLE;             // glitch, not a start bit
            end else if (bitn <= BW'(NBITS)) begin
              for (int l = 0; l < LANES; l++) begin
                sh[l]  <= {sh[l][NBITS-2:0], rx[l]};
                par[l] <= par[l] ^ rx[l];
              end
            end else if (bitn == BW'(NBITS + 1)) begin
              for (int l = 0; l < LANES; l++) par[l] <= par[l] ^ rx[l];
            end else begin
              st <= IDLE;
              if (rx != '1) frame_err <= 1'b1;
              else begin
                parity_err <= (par != '0);
                overrun    <= (left > 1) || (left == 1 && !pix_ready);
                for (int w = 0; w < WORDS; w++)
                  for (int l = 0; l < LANES; l++)
                    hold[w*LANES + l] <= sh[l][NBITS-1-w*PIX_W -: PIX_W];
                left <= PW'(NPIX);
                idx  <= '0;
              end
            end
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
