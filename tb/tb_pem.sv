// Testbench of pem: random samples on four interleaved channels, with
// extreme values mixed in; each mapped value is compared with a reference
// mapping written from the CCSDS definition (theta = min(pred, max - pred)).
// Also checks back-pressure (no sample lost or duplicated while out_ready
// toggles) and that clear resets the predictors.
module tb_pem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, iv = 0, ir, ov, ordy = 1;
  logic [15:0] id, od; logic [1:0] ic, oc;
  pem #(.N(16), .NCH(4)) dut (.clk, .rst_n, .clear, .in_valid(iv), .in_ready(ir), .in_data(id),
    .in_ch(ic), .out_valid(ov), .out_ready(ordy), .out_data(od), .out_ch(oc));

  int pred [4];
  int exp_q[$];
  function automatic int map(int x, int p);
    int th = (p < 65535 - p) ? p : 65535 - p;
    int d = x - p;
    if (d >= 0 && d <= th) return 2 * d;
    if (d < 0 && -d <= th) return -2 * d - 1;
    return th + (d < 0 ? -d : d);
  endfunction

  always @(posedge clk) begin
    ordy <= ($urandom % 4) != 0;
    if (rst_n && ov && ordy) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output at %0t", $time); end
      else begin
        automatic int e = exp_q.pop_front();
        if (int'(od) != e) begin failures++; $display("mapped %0d exp %0d", od, e); end
      end
    end
  end
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int x;
    for (int c = 0; c < 4; c++) pred[c] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      case ($urandom % 6)
        0: x = 0; 1: x = 65535; 2: x = pred[n % 4] + int'($urandom % 9) - 4;
        default: x = int'($urandom % 65536);
      endcase
      if (x < 0) x = 0; if (x > 65535) x = 65535;
      @(negedge clk); iv = 1; id = 16'(x); ic = 2'(n % 4);
      while (!ir) @(negedge clk);
      @(posedge clk);
      exp_q.push_back(map(x, pred[n % 4])); pred[n % 4] = x;
      if (n == 1000) begin
        @(negedge clk); iv = 0; repeat (5) @(posedge clk);
        clear <= 1; @(posedge clk); clear <= 0;
        for (int c = 0; c < 4; c++) pred[c] = 0;
        exp_q.delete();
      end
    end
    iv <= 0; repeat (20) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
