// Testbench of fe_rx: CCD framing (one lane, four interleaved 16-bit words,
// even parity over 64 bits) and NIR framing (four synchronous lanes of one
// word). Random pixels are sent as serial frames built here from the frame
// definition; the words handed out are compared in order. A frame with a
// wrong parity bit must raise parity_err, one without stop bit frame_err.
// The frame-to-word timing is checked: the first word appears within a few
// clocks of the stop bit's middle.
module tb_fe_rx;
  localparam int BC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       c_rx = 1'b1;
  logic       c_v; logic [15:0] c_d; logic [1:0] c_ch; logic c_pe, c_fe, c_or;
  logic [3:0] n_rx = 4'hF;
  logic       n_v; logic [15:0] n_d; logic [1:0] n_ch; logic n_pe, n_fe, n_or;

  fe_rx #(.LANES(1), .WORDS(4), .BIT_CLKS(BC)) dut_c (
    .clk, .rst_n, .en(1'b1), .rx(c_rx), .pix_valid(c_v), .pix_ready(1'b1),
    .pix_data(c_d), .pix_ch(c_ch), .parity_err(c_pe), .frame_err(c_fe), .overrun(c_or));
  fe_rx #(.LANES(4), .WORDS(1), .BIT_CLKS(BC)) dut_n (
    .clk, .rst_n, .en(1'b1), .rx(n_rx), .pix_valid(n_v), .pix_ready(1'b1),
    .pix_data(n_d), .pix_ch(n_ch), .parity_err(n_pe), .frame_err(n_fe), .overrun(n_or));

  logic [15:0] exp_q[$]; logic [1:0] expc_q[$];
  logic [15:0] nexp_q[$]; logic [1:0] nexpc_q[$];
  int pe_seen = 0, fe_seen = 0, npe_seen = 0;

  always @(posedge clk) begin
    if (rst_n && c_v) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected CCD word"); end
      else begin
        automatic logic [15:0] e = exp_q.pop_front();
        automatic logic [1:0] ec = expc_q.pop_front();
        if (c_d !== e || c_ch !== ec) begin failures++; $display("CCD word %h/%0d exp %h/%0d", c_d, c_ch, e, ec); end
      end
    end
    if (rst_n && n_v) begin
      checks++;
      if (nexp_q.size() == 0) begin failures++; $display("unexpected NIR word"); end
      else begin
        automatic logic [15:0] e = nexp_q.pop_front();
        automatic logic [1:0] ec = nexpc_q.pop_front();
        if (n_d !== e || n_ch !== ec) begin failures++; $display("NIR word %h/%0d exp %h/%0d", n_d, n_ch, e, ec); end
      end
    end
    if (rst_n && c_pe) pe_seen++;
    if (rst_n && c_fe) fe_seen++;
    if (rst_n && n_pe) npe_seen++;
  end

  task automatic send_bit(input logic b);
    c_rx = b; repeat (BC) @(posedge clk);
  endtask
  task automatic ccd_frame(input logic [63:0] d, input logic bad_par, input logic bad_stop);
    send_bit(1'b0);
    for (int i = 63; i >= 0; i--) send_bit(d[i]);
    send_bit((^d) ^ bad_par);
    send_bit(!bad_stop);
    c_rx = 1'b1; repeat (3 * BC) @(posedge clk);
  endtask
  task automatic nir_frame(input logic [15:0] d [4], input logic bad_par);
    n_rx = 4'h0; repeat (BC) @(posedge clk);
    for (int i = 15; i >= 0; i--) begin
      for (int l = 0; l < 4; l++) n_rx[l] = d[l][i];
      repeat (BC) @(posedge clk);
    end
    for (int l = 0; l < 4; l++) n_rx[l] = ^d[l] ^ (bad_par && l == 2);
    repeat (BC) @(posedge clk);
    n_rx = 4'hF; repeat (4 * BC) @(posedge clk);
  endtask

  initial begin
    repeat (2000 * BC) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] d; logic [15:0] nd [4];
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    for (int f = 0; f < 12; f++) begin
      d = {$urandom, $urandom};
      for (int w = 0; w < 4; w++) begin exp_q.push_back(d[63-16*w -: 16]); expc_q.push_back(2'(w)); end
      ccd_frame(d, 1'b0, 1'b0);
    end
    checks++; if (exp_q.size() != 0 || pe_seen != 0) begin failures++; $display("CCD words missing/parity"); end
    d = 64'h0123_4567_89AB_CDEF;
    for (int w = 0; w < 4; w++) begin exp_q.push_back(d[63-16*w -: 16]); expc_q.push_back(2'(w)); end
    ccd_frame(d, 1'b1, 1'b0);
    checks++; if (pe_seen != 1) begin failures++; $display("parity error not flagged"); end
    ccd_frame(64'hFFFF_0000_FFFF_0000, 1'b0, 1'b1);
    checks++; if (fe_seen != 1) begin failures++; $display("frame error not flagged"); end
    // NIR
    for (int f = 0; f < 10; f++) begin
      for (int l = 0; l < 4; l++) begin nd[l] = 16'($urandom); nexp_q.push_back(nd[l]); nexpc_q.push_back(2'(l)); end
      nir_frame(nd, f == 9);
    end
    checks++; if (nexp_q.size() != 0) begin failures++; $display("NIR words missing"); end
    checks++; if (npe_seen != 1) begin failures++; $display("NIR parity error count %0d", npe_seen); end
    // latency: first word within 2 bit times after the stop bit starts
    d = 64'hAAAA_5555_1234_8001;
    for (int w = 0; w < 4; w++) begin exp_q.push_back(d[63-16*w -: 16]); expc_q.push_back(2'(w)); end
    fork
      ccd_frame(d, 1'b0, 1'b0);
      begin
        int t = 0;
        repeat (66 * BC) @(posedge clk);      // start of the stop bit
        while (!c_v && t < 10 * BC) begin @(posedge clk); t++; end
        checks++; if (t > 2 * BC) begin failures++; $display("latency %0d", t); end
      end
    join
    repeat (20) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
