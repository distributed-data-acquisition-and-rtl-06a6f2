// SDRAM controller of an NIR slice (single data rate SDRAM, 4 banks,
// 4096 rows, 512 columns of 32 bits = 256 Mbit; burst length 1, CAS
// latency CL). Every transfer moves one chunk of BUF_WORDS words between an
// accumulation buffer and SDRAM: ACTIVE, T_RCD wait, one READ or WRITE per
// clock, then PRECHARGE ALL. Chunk c occupies words c*BUF_WORDS.. of the
// SDRAM (word address = {bank, row, column}).
// Accumulation (acc_start): chunks 0 and 1 are pre-loaded into buffers 0 and
// 1; whenever the accumulator returns a full buffer, its chunk is written
// back and the chunk two further on is pre-loaded into the same buffer.
// After each transfer, and whenever it is idle, the controller reads the
// autonomous refresh counter and executes that many AUTO REFRESH cycles
// (T_RFC each) before it returns to data transfers. Transfer to compression (xfer_start): the final values
// are read chunk by chunk into buffer 0 and handed out as 16-bit pixel words
// with a word strobe (pix_valid/pix_ready), channel = pixel index mod 4.
// Power-up: INIT_CLKS wait, PRECHARGE ALL, two AUTO REFRESH, LOAD MODE.
// The data paths are plain wires: write data to SDRAM comes straight from the
// buffer read port, read data goes straight into the buffer write port and
// the pixel word is the low half of the buffer read port; chip select is
// held active (the single device is always selected, NOP is coded by RAS#,
// CAS# and WE#).
module sdram_ctrl #(
  parameter int BUF_WORDS   = 256,
  parameter int CL          = 2,
  parameter int T_RCD       = 2,
  parameter int T_RP        = 2,
  parameter int T_RFC       = 7,
  parameter int T_WR        = 2,
  parameter int INIT_CLKS   = 20000,
  parameter int REF_INTERVAL = 780
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         acc_start,
  input  logic                         xfer_start,
  input  logic [31:0]                  n_pixels,
  // accumulation buffers
  input  logic [1:0]                   buf_full,
  output logic [1:0]                   sd_loaded,
  output logic                         sd_sel,
  output logic [$clog2(BUF_WORDS)-1:0] sd_addr,
  output logic                         sd_we,
  output logic [31:0]                  sd_wdata,
  input  logic [31:0]                  sd_rdata,
  // word strobes to data compression
  output logic                         pix_valid,
  input  logic                         pix_ready,
  output logic [15:0]                  pix_data,
  output logic [1:0]                   pix_ch,
  // SDRAM pins
  output logic                         sdr_cs_n,
  output logic                         sdr_ras_n,
  output logic                         sdr_cas_n,
  output logic                         sdr_we_n,
  output logic [1:0]                   sdr_ba,
  output logic [11:0]                  sdr_a,
  output logic [31:0]                  sdr_dq_o,
  output logic                         sdr_dq_oe,
  input  logic [31:0]                  sdr_dq_i,
  // status
  output logic                         init_done,
  output logic                         busy,
  output logic [15:0]                  refreshes
);
  localparam int AW = $clog2(BUF_WORDS);
  typedef enum logic [3:0] {
    S_INIT, S_IPRE, S_IREF1, S_IREF2, S_IMRS, S_IDLE, S_SCHED,
    S_ACT, S_RW, S_TAIL, S_PRE, S_REF, S_STREAM
  } st_e;
  typedef enum logic [1:0] {M_IDLE, M_ACC, M_XFER} mode_e;
  st_e         st;
  mode_e       mode;
  logic [15:0] wait_c;
  logic [22:0] waddr;                 // word address of the chunk start
  logic [22:0] nchunks, wb_cnt, xchunk;
  logic [22:0] chunk [2];
  logic [1:0]  need_load, wb_done;
  logic        is_wr, b;
  logic [AW:0] i;
  logic [CL:0] rv;                    // read data valid pipeline
  logic [AW-1:0] ra [CL+1];           // read index pipeline
  logic [7:0]  ref_n, ref_cnt;
  logic        ref_take;
  logic [AW:0] xn;                    // words of the chunk streamed out
  logic        acc_req, xfer_req;     // start strobes held until taken

  refresh_counter #(.INTERVAL(REF_INTERVAL)) u_refc (
    .clk, .rst_n, .take(ref_take), .take_n(ref_n), .count(ref_cnt));

  assign busy = (mode != M_IDLE);
  // accumulation buffer port
  assign sd_sel   = (mode == M_XFER) ? 1'b0 : b;
  assign sd_we    = rv[CL];
  assign sd_wdata = sdr_dq_i;
  assign sd_addr  = (st == S_STREAM) ? xn[AW-1:0] : rv[CL] ? ra[CL] : i[AW-1:0];
  assign sdr_dq_o = sd_rdata;
  assign pix_valid = (st == S_STREAM) && (wait_c == 0) && (xn != (AW+1)'(BUF_WORDS)) &&
                     ((xchunk * 23'(BUF_WORDS) + 23'(xn)) < 23'(n_pixels));
  assign pix_data  = sd_rdata[15:0];
  assign pix_ch    = 2'(xn);

  // command outputs
  always_comb begin
    {sdr_cs_n, sdr_ras_n, sdr_cas_n, sdr_we_n} = 4'b0111;    // NOP
    sdr_ba = waddr[22:21]; sdr_a = '0; sdr_dq_oe = 1'b0;
    if (wait_c == 0) begin
      case (st)
        S_IPRE, S_PRE: begin {sdr_ras_n, sdr_cas_n, sdr_we_n} = 3'b010; sdr_a[10] = 1'b1; end
        S_IREF1, S_IREF2, S_REF: {sdr_ras_n, sdr_cas_n, sdr_we_n} = 3'b001;
        S_IMRS: begin {sdr_ras_n, sdr_cas_n, sdr_we_n} = 3'b000; sdr_ba = '0;
                      sdr_a = {5'b00000, 3'(CL), 4'b0000}; end
        S_ACT:  begin {sdr_ras_n, sdr_cas_n, sdr_we_n} = 3'b011; sdr_a = waddr[20:9]; end
        default: ;
      endcase
    end
    if (st == S_RW && wait_c == 0 && i != (AW+1)'(BUF_WORDS)) begin
      {sdr_ras_n, sdr_cas_n, sdr_we_n} = is_wr ? 3'b100 : 3'b101;
      sdr_a     = {3'b000, waddr[8:0] | 9'(i)};
      sdr_dq_oe = is_wr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_INIT; mode <= M_IDLE; wait_c <= 16'(INIT_CLKS); waddr <= '0;
      nchunks <= '0; wb_cnt <= '0; xchunk <= '0; chunk[0] <= '0; chunk[1] <= '0;
      need_load <= '0; wb_done <= '0; is_wr <= 1'b0; b <= 1'b0; i <= '0; rv <= '0;
      for (int n = 0; n <= CL; n++) ra[n] <= '0;
      ref_n <= '0; ref_take <= 1'b0; sd_loaded <= '0; init_done <= 1'b0;
      refreshes <= '0; xn <= '0; acc_req <= 1'b0; xfer_req <= 1'b0;
    end else begin
      ref_take <= 1'b0; sd_loaded <= '0;
      if (acc_start)  acc_req  <= 1'b1;
      if (xfer_start) xfer_req <= 1'b1;
      rv <= {rv[CL-1:0], st == S_RW && wait_c == 0 && !is_wr && i != (AW+1)'(BUF_WORDS)};
      ra[0] <= i[AW-1:0];
      for (int n = 1; n <= CL; n++) ra[n] <= ra[n-1];
      if (wait_c != 0) wait_c <= wait_c - 1'b1;
      else case (st)
        S_INIT:  st <= S_IPRE;
        S_IPRE:  begin st <= S_IREF1; wait_c <= 16'(T_RP); end
        S_IREF1: begin st <= S_IREF2; wait_c <= 16'(T_RFC); end
        S_IREF2: begin st <= S_IMRS;  wait_c <= 16'(T_RFC); end
        S_IMRS:  begin st <= S_IDLE;  wait_c <= 16'd2; init_done <= 1'b1; end
        S_IDLE: begin
          if (en && acc_req) begin
            acc_req <= 1'b0; mode <= M_ACC; st <= S_SCHED; wb_cnt <= '0;
            nchunks <= 23'((n_pixels + 32'(BUF_WORDS - 1)) / 32'(BUF_WORDS));
            chunk[0] <= 23'd0; chunk[1] <= 23'd1;
            need_load <= {n_pixels > 32'(BUF_WORDS), n_pixels != 0};
            wb_done <= '0;
          end else if (en && xfer_req) begin
            xfer_req <= 1'b0; mode <= M_XFER; st <= S_SCHED; xchunk <= '0;
            nchunks <= 23'((n_pixels + 32'(BUF_WORDS - 1)) / 32'(BUF_WORDS));
            need_load <= '0;
          end else if (ref_cnt != 0) begin
            // keep the stored sums refreshed between readouts
            ref_n <= ref_cnt; ref_take <= 1'b1; st <= S_REF;
          end
        end
        S_SCHED: begin
          // refresh first if owed, then data transfers
          if (ref_cnt != 0) begin
            ref_n <= ref_cnt; ref_take <= 1'b1; st <= S_REF;
          end else if (mode == M_ACC) begin
            if (buf_full[0] && !wb_done[0])      begin b <= 1'b0; is_wr <= 1'b1; st <= S_ACT; waddr <= 23'(chunk[0] * BUF_WORDS); end
            else if (buf_full[1] && !wb_done[1]) begin b <= 1'b1; is_wr <= 1'b1; st <= S_ACT; waddr <= 23'(chunk[1] * BUF_WORDS); end
            else if (need_load[0])               begin b <= 1'b0; is_wr <= 1'b0; st <= S_ACT; waddr <= 23'(chunk[0] * BUF_WORDS); end
            else if (need_load[1])               begin b <= 1'b1; is_wr <= 1'b0; st <= S_ACT; waddr <= 23'(chunk[1] * BUF_WORDS); end
            else if (wb_cnt == nchunks)          begin mode <= M_IDLE; st <= S_IDLE; end
          end else if (mode == M_XFER) begin
            if (xchunk == nchunks) begin mode <= M_IDLE; st <= S_IDLE; end
            else begin b <= 1'b0; is_wr <= 1'b0; st <= S_ACT; waddr <= 23'(xchunk * BUF_WORDS); end
          end else st <= S_IDLE;
          i <= '0;
        end
        S_ACT: begin st <= S_RW; wait_c <= 16'(T_RCD - 1); i <= '0; end
        S_RW: begin
          if (i != (AW+1)'(BUF_WORDS)) i <= i + 1'b1;
          else begin st <= S_TAIL; wait_c <= 16'(is_wr ? T_WR : CL); end
        end
        S_TAIL: st <= S_PRE;
        S_PRE: begin
          wait_c <= 16'(T_RP);
          if (mode == M_XFER) begin st <= S_STREAM; xn <= '0; end
          else begin
            st <= S_SCHED;
            if (is_wr) begin
              wb_done[b] <= 1'b1; wb_cnt <= wb_cnt + 1'b1;
              chunk[b] <= chunk[b] + 23'd2;
              need_load[b] <= (chunk[b] + 23'd2) < nchunks;
            end else begin
              need_load[b] <= 1'b0; wb_done[b] <= 1'b0; sd_loaded[b] <= 1'b1;
            end
          end
        end
        S_REF: begin
          refreshes <= refreshes + 1'b1;
          wait_c <= 16'(T_RFC);
          ref_n <= ref_n - 1'b1;
          if (ref_n == 8'd1) st <= S_SCHED;
        end
        S_STREAM: begin
          if (pix_valid && pix_ready) xn <= xn + 1'b1;
          else if (!pix_valid) begin st <= S_SCHED; xchunk <= xchunk + 1'b1; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
