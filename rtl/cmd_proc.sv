// Command processor and output formatter.
// The ICU sends 32-bit command words over an SPI-like link (chip select low
// for a frame, data sampled on the rising clock edge, most significant bit
// first; the response is shifted out on the falling edge during the next
// frame). The link signals are synchronised and oversampled by the system
// clock, so the link clock must be at most a quarter of it.
// Command word: [31:24] ASIC ID, [23] write, [22:16] register, [15:0] data.
// A word whose ASIC ID equals this FPGA's ID is executed on the slice
// register bus (write or read) and filtered from the command stream; every
// other word, the broadcast ID 0xFF included, is forwarded unchanged to the
// front end ASICs over the front end control interface (same framing, FE_DIV
// system clocks per half link clock), and the word returned by the front end
// during that frame is captured. The output formatter builds the response to
// the last command: {slice channel address, write bit, register, data} for a
// slice read, or {slice channel address, bits 23:0 of the front end reply}.
module cmd_proc #(
  parameter int FE_DIV = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  fpga_id,
  input  logic [7:0]  slice_ch,
  // ICU control interface
  input  logic        icu_sclk,
  input  logic        icu_cs_n,
  input  logic        icu_mosi,
  output logic        icu_miso,
  // slice register bus
  output logic        reg_wr,
  output logic        reg_rd,
  output logic [6:0]  reg_addr,
  output logic [15:0] reg_wdata,
  input  logic [15:0] reg_rdata,
  // front end control interface
  output logic        fe_sclk,
  output logic        fe_cs_n,
  output logic        fe_mosi,
  input  logic        fe_miso,
  output logic [15:0] fwd_count,
  output logic        frame_err
);
  logic [2:0]  s_clk, s_cs, s_mo;
  logic [31:0] shin, shout, resp, fword, fin;
  logic [5:0]  nbits, fbit;
  logic        rd_pend, fwd;
  logic [$clog2(FE_DIV+1)-1:0] fdiv;

  wire sclk_rise = s_clk[1] && !s_clk[2];
  wire sclk_fall = !s_clk[1] && s_clk[2];
  wire cs_fall   = !s_cs[1] && s_cs[2];
  wire cs_rise   = s_cs[1] && !s_cs[2];

  assign icu_miso = shout[31];
  assign fe_mosi  = fword[31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_clk <= '0; s_cs <= '1; s_mo <= '0; shin <= '0; shout <= '0; resp <= '0;
      nbits <= '0; reg_wr <= 1'b0; reg_rd <= 1'b0; reg_addr <= '0; reg_wdata <= '0;
      rd_pend <= 1'b0; fwd <= 1'b0; fword <= '0; fin <= '0; fbit <= '0; fdiv <= '0;
      fe_sclk <= 1'b0; fe_cs_n <= 1'b1; fwd_count <= '0; frame_err <= 1'b0;
    end else begin
      s_clk <= {s_clk[1:0], icu_sclk};
      s_cs  <= {s_cs[1:0], icu_cs_n};
      s_mo  <= {s_mo[1:0], icu_mosi};
      reg_wr <= 1'b0; reg_rd <= 1'b0; frame_err <= 1'b0;

      // ICU side
      if (cs_fall) begin nbits <= '0; shout <= resp; end
      if (!s_cs[1] && sclk_rise) begin shin <= {shin[30:0], s_mo[1]}; nbits <= nbits + 1'b1; end
      if (!s_cs[1] && sclk_fall && nbits != 0) shout <= {shout[30:0], 1'b0};
      if (cs_rise) begin
        if (nbits != 6'd32) frame_err <= 1'b1;
        else if (shin[31:24] == fpga_id) begin
          reg_addr <= shin[22:16]; reg_wdata <= shin[15:0];
          if (shin[23]) begin
            reg_wr <= 1'b1;
            resp   <= {slice_ch, shin[23:0]};
          end else begin
            reg_rd <= 1'b1; rd_pend <= 1'b1;
          end
        end else if (!fwd) begin
          fwd <= 1'b1; fword <= shin; fbit <= '0; fdiv <= '0; fe_cs_n <= 1'b0;
          fwd_count <= fwd_count + 1'b1;
        end else frame_err <= 1'b1;       // forwarding still busy
      end
      if (rd_pend && !reg_rd) begin
        rd_pend <= 1'b0;
        resp    <= {slice_ch, 1'b0, reg_addr, reg_rdata};
      end

      // front end side: FE_DIV clocks per half period
      if (fwd) begin
        if (fdiv != ($clog2(FE_DIV+1))'(FE_DIV - 1)) fdiv <= fdiv + 1'b1;
        else begin
          fdiv <= '0;
          if (fbit == 6'd32) begin
            fwd <= 1'b0; fe_cs_n <= 1'b1;
            resp <= {slice_ch, fin[23:0]};
          end else if (!fe_sclk) begin
            fe_sclk <= 1'b1; fin <= {fin[30:0], fe_miso};
          end else begin
            fe_sclk <= 1'b0; fword <= {fword[30:0], 1'b0}; fbit <= fbit + 1'b1;
          end
        end
      end
    end
  end
endmodule
