// Downlink (data output) controller.
// After start, with its enable bit set, it takes file bytes from filled page
// buffers and sends each on the serial downlink as a start bit (0), eight
// data bits least significant first, an even parity bit and a stop bit (1);
// the line idles high. BIT_CLKS system clocks per bit. Transmitted bytes are
// counted; when the count reaches the file byte count programmed by the ICU
// the rest of the page is released and the controller stops (done). If the
// enable bit is cleared before that, ERR_EARLY_TERM is set in its error
// register.
module downlink_ctrl
  import snap_pkg::*;
#(
  parameter int BIT_CLKS   = 4,
  parameter int PAGE_BYTES = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        start,
  input  logic [31:0] file_bytes,
  input  logic        rd_valid,
  output logic        rd_ready,
  input  logic [7:0]  rd_data,
  output logic        rd_release,
  output logic        tx,
  output logic        active,
  output logic        done,
  output logic [31:0] sent,
  output logic [3:0]  err_code
);
  localparam int CW = $clog2(BIT_CLKS + 1);
  typedef enum logic [1:0] {S_IDLE, S_GET, S_SEND} st_e;
  st_e        st;
  logic [9:0] sh;          // stop, parity, data[7:0] (start bit sent first)
  logic [3:0] nbit;
  logic [CW-1:0] cnt;

  assign active     = (st != S_IDLE);
  assign rd_ready   = (st == S_GET) && en;
  assign rd_release = (st == S_GET) && en && rd_valid && (sent == file_bytes);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; sh <= '1; nbit <= '0; cnt <= '0; tx <= 1'b1;
      done <= 1'b0; sent <= '0; err_code <= ERR_NONE;
    end else begin
      case (st)
        S_IDLE: if (en && start) begin
          st <= S_GET; sent <= '0; done <= 1'b0; err_code <= ERR_NONE;
        end
        S_GET: begin
          if (!en) begin st <= S_IDLE; err_code <= ERR_EARLY_TERM; end
          else if (sent == file_bytes) begin
            if (rd_valid || (sent & 32'(PAGE_BYTES - 1)) == 0) begin st <= S_IDLE; done <= 1'b1; end
          end else if (rd_valid) begin
            sh   <= {1'b1, ^rd_data, rd_data};
            tx   <= 1'b0;                   // start bit
            nbit <= '0; cnt <= CW'(BIT_CLKS - 1);
            sent <= sent + 1'b1;
            st   <= S_SEND;
          end
        end
        S_SEND: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            cnt <= CW'(BIT_CLKS - 1);
            if (nbit == 4'd10) begin
              st <= S_GET;
              if (!en) begin st <= S_IDLE; err_code <= ERR_EARLY_TERM; end
            end else begin
              tx   <= sh[0];
              sh   <= {1'b1, sh[9:1]};
              nbit <= nbit + 1'b1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
