// Autonomous SDRAM refresh counter. It counts one owed refresh every
// INTERVAL clocks. The SDRAM controller reads the count between data
// transfers, executes that many refresh cycles, and then subtracts the
// number it took (take/take_n); increments arriving meanwhile are kept.
module refresh_counter #(
  parameter int INTERVAL = 780
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       take,
  input  logic [7:0] take_n,
  output logic [7:0] count
);
  logic [$clog2(INTERVAL)-1:0] t;
  logic tick;
  assign tick = (t == ($clog2(INTERVAL))'(INTERVAL - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin t <= '0; count <= '0; end
    else begin
      t <= tick ? '0 : t + 1'b1;
      count <= count + {7'd0, tick && count != 8'hFF} - (take ? take_n : 8'd0);
    end
  end
endmodule
