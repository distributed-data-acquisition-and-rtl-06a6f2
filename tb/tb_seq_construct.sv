// Testbench of seq_construct: blocks of 16 samples with randomly chosen
// option IDs (split options, fundamental sequence and "no compression") are
// coded with PKT_BLOCKS = 3. The bytes produced are decoded here bit by bit
// following the split-sample format (ID, all FS code words, all k-bit low
// parts; raw samples for ID 15) and compared with the samples sent. The
// final byte of every packet must carry out_last, with zero padding bits.
module tb_seq_construct;
  import snap_pkg::*;
  localparam int J = 16, PB = 3, NB = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ov = 0, oovf, iv = 0, ir, il, bv, br = 1, bl; logic [ID_W-1:0] oid; logic [15:0] id;
  logic [7:0] bd;
  seq_construct #(.N(16), .J(J), .PKT_BLOCKS(PB)) dut (.clk, .rst_n, .clear(1'b0),
    .opt_valid(ov), .opt_id(oid), .opt_overflow(oovf), .in_valid(iv), .in_ready(ir), .in_data(id),
    .in_last(il), .out_valid(bv), .out_ready(br), .out_data(bd), .out_last(bl));

  int ids [NB]; int smp [NB][J];
  logic [7:0] bytes [$]; int lasts [$];
  always @(posedge clk) if (rst_n) begin
    if (bv && br) begin bytes.push_back(bd); if (bl) lasts.push_back(bytes.size()); end
    br <= ($urandom % 4) != 0;
  end

  int bp;
  function automatic int getb();
    int v = bytes[bp / 8][7 - bp % 8]; bp++; return v;
  endfunction
  function automatic int getn(int n);
    int v = 0; for (int q = 0; q < n; q++) v = (v << 1) | getb(); return v;
  endfunction

  initial begin
    repeat (400000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int k, got, z, fs [J];
    for (int b = 0; b < NB; b++) begin
      ids[b] = (b % 7 == 3) ? 15 : 1 + int'($urandom % 14);
      k = ids[b] - 1;
      for (int n = 0; n < J; n++)
        smp[b][n] = (ids[b] == 15) ? int'($urandom % 65536) : ((int'($urandom % 12) << k) | int'($urandom % (1 << k))) & 16'hFFFF;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk); ov = 1; oid = ID_W'(ids[b]);
      @(negedge clk); ov = 0;
      for (int n = 0; n < J; n++) begin
        iv = 1; id = 16'(smp[b][n]); il = (n == J - 1);
        while (!ir) @(negedge clk);
        @(posedge clk); @(negedge clk);
      end
      iv = 0;
    end
    repeat (3000) @(posedge clk);
    // decode
    bp = 0;
    for (int p = 0; p < NB / PB; p++) begin
      for (int q = 0; q < PB; q++) begin
        automatic int b = p * PB + q;
        got = getn(4);
        checks++; if (got != ids[b]) begin failures++; $display("blk %0d id %0d exp %0d", b, got, ids[b]); end
        k = got - 1;
        if (got == 15) for (int n = 0; n < J; n++) fs[n] = getn(16);
        else begin
          for (int n = 0; n < J; n++) begin z = 0; while (getb() == 0 && z < 70000) z++; fs[n] = z; end
          for (int n = 0; n < J; n++) fs[n] = (fs[n] << k) | getn(k);
        end
        for (int n = 0; n < J; n++) begin
          checks++; if (fs[n] != smp[b][n]) begin failures++; $display("blk %0d s%0d %0d exp %0d", b, n, fs[n], smp[b][n]); end
        end
      end
      while (bp % 8 != 0) begin checks++; if (getb() != 0) begin failures++; $display("pad bit"); end end
      checks++;
      if (lasts.size() == 0 || lasts.pop_front() != bp / 8) begin failures++; $display("packet %0d end not flagged at byte %0d", p, bp / 8); end
    end
    checks++; if (bp / 8 != bytes.size()) begin failures++; $display("extra bytes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
