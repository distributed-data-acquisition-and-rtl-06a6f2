// Testbench of packet_former: packets of random length (1..2034 bytes) are
// written while packets are read out with random back-pressure. Each packet
// read must be the 14 header bytes (fields rebuilt here from the CCSDS
// primary header layout and the secondary header definition) followed by the
// data bytes in order; the sequence count must increase by one per packet.
// Also checks that writing stalls while both packet buffers are full.
module tb_packet_former;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv = 0, ir, il = 0, ov, ordy = 0; logic [7:0] id, od; logic [15:0] pc;
  packet_former #(.BUF_BYTES(2048), .PKT_PIXELS(960)) dut (.clk, .rst_n, .clear(1'b0),
    .apid(11'h5A3), .expo_id(16'hBEEF), .slice_id(8'h21), .comp_mode(2'd2),
    .in_valid(iv), .in_ready(ir), .in_data(id), .in_last(il),
    .out_valid(ov), .out_ready(ordy), .out_data(od), .pkt_count(pc));

  localparam int NP = 8;
  int plen [NP]; logic [7:0] pdata [NP][$];
  logic [7:0] got [$];
  logic rd_on = 0;
  always @(posedge clk) if (rst_n) begin
    if (ov && ordy) got.push_back(od);
    ordy <= rd_on && (($urandom % 3) != 0);
  end
  initial begin
    repeat (400000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int pos, dl;
    logic [7:0] h [14];
    for (int p = 0; p < NP; p++) begin
      plen[p] = (p == 1) ? 2034 : 1 + int'($urandom % 600);
      for (int n = 0; n < plen[p]; n++) pdata[p].push_back(8'($urandom));
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      for (int n = 0; n < plen[p]; n++) begin
        @(negedge clk); iv = 1; id = pdata[p][n]; il = (n == plen[p] - 1);
        if (p == 2 && n == 0) begin
          checks++; if (ir) begin failures++; $display("accepts with both buffers full"); end
          rd_on = 1;
        end
        while (!ir) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk); iv = 0;
    end
    repeat (20000) @(posedge clk);
    pos = 0;
    for (int p = 0; p < NP; p++) begin
      dl = plen[p] + 8 - 1;
      h = '{8'h08 | 8'h05, 8'hA3, 8'hC0 | 8'(p >> 8), 8'(p), 8'(dl >> 8), 8'(dl),
            8'(p >> 8), 8'(p), 8'hBE, 8'hEF, 8'd2, 8'h21, 8'h03, 8'hC0};
      for (int n = 0; n < 14; n++) begin
        checks++; if (got[pos + n] !== h[n]) begin failures++; $display("pkt %0d hdr %0d: %h exp %h", p, n, got[pos+n], h[n]); end
      end
      pos += 14;
      for (int n = 0; n < plen[p]; n++) begin
        checks++; if (got[pos + n] !== pdata[p][n]) begin failures++; $display("pkt %0d byte %0d", p, n); end
      end
      pos += plen[p];
    end
    checks++; if (pos != got.size() || pc != 16'(NP)) begin failures++; $display("size %0d exp %0d count %0d", got.size(), pos, pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
