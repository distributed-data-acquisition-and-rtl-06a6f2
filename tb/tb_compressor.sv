// Testbench of the compressor (J = 16, four channels, PKT_BLOCKS = 4, so a
// packet covers 64 pixels). Three phases, each 8 packets of interleaved
// pixels mixing smooth, constant and noisy blocks:
//   1. lossless without pre-scaler, 2. with the square-root pre-scaler
//   (table floor(c*c/256)), 3. forced no compression.
// The packets are parsed here: header fields (length, sequence count,
// compression mode), then every block is decoded (option ID, fundamental
// sequences, split bits) and the mapped values compared with values computed
// here from the pixels by the CCSDS unit-delay mapping. The chosen option
// must give the shortest coded length (ties to the lower option), or "no
// compression" when nothing is shorter than 256 bits.
module tb_compressor;
  import snap_pkg::*;
  localparam int J = 16, PBK = 4, NPK = 8, NPIX = NPK * PBK * J;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, pse = 0, fnc = 0, lw = 0; logic [11:0] la = 0; logic [15:0] ld = 0;
  logic pv = 0, pr, ov, ordy = 1, oovf; logic [15:0] pd; logic [1:0] pc = 0; logic [7:0] od;
  logic [15:0] pkc;
  compressor #(.J(J), .CODE_W(12), .PKT_BLOCKS(PBK)) dut (.clk, .rst_n, .clear,
    .prescale_en(pse), .force_nocomp(fnc), .apid(11'h123), .expo_id(16'h0042), .slice_id(8'h07),
    .lut_wr(lw), .lut_addr(la), .lut_data(ld), .pix_valid(pv), .pix_ready(pr), .pix_data(pd),
    .pix_ch(pc), .out_valid(ov), .out_ready(ordy), .out_data(od), .pkt_count(pkc), .opt_overflow(oovf));

  logic [7:0] bytes [$];
  always @(posedge clk) if (rst_n) begin
    if (ov && ordy) bytes.push_back(od);
    ordy <= ($urandom % 4) != 0;
  end

  int px [NPIX]; int mp [4][$];       // mapped values per channel, in order
  int bp;
  function automatic int getb(); int v = bytes[bp / 8][7 - bp % 8]; bp++; return v; endfunction
  function automatic int getn(int n); int v = 0; for (int q = 0; q < n; q++) v = (v << 1) | getb(); return v; endfunction
  function automatic int map(int x, int p);
    int th = (p < 65535 - p) ? p : 65535 - p; int d = x - p;
    if (d >= 0 && d <= th) return 2 * d;
    if (d < 0 && -d <= th) return -2 * d - 1;
    return th + (d < 0 ? -d : d);
  endfunction
  function automatic int sqcode(int x);
    int c = 0; for (int n = 0; n < 4096; n++) if ((n * n) / 256 <= x) c = n; return c;
  endfunction

  task automatic phase(input int mode);
    int pred [4], v, lenk, best, bi, id, k, dec [J], base;
    for (int c = 0; c < 4; c++) begin pred[c] = 0; mp[c].delete(); end
    for (int n = 0; n < NPIX; n++) begin
      automatic int blk = n / (4 * J);
      case (blk % 4)
        0: px[n] = 30000 + (n / 4) * 3 + int'($urandom % 5);
        1: px[n] = 1000;
        2: px[n] = int'($urandom % 65536);
        default: px[n] = 20000 + int'($urandom % 200);
      endcase
      v = (mode == 2) ? sqcode(px[n]) : px[n];
      mp[n % 4].push_back(map(v, pred[n % 4])); pred[n % 4] = v;
    end
    bytes.delete();
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int n = 0; n < NPIX; n++) begin
      @(negedge clk); pv = 1; pd = 16'(px[n]); pc = 2'(n % 4);
      while (!pr) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk); pv = 0;
    repeat (8000) @(posedge clk);
    // parse
    bp = 0;
    for (int p = 0; p < NPK; p++) begin
      int plen;
      base = bp / 8;
      checks++;
      if (bytes.size() < base + 14) begin failures++; $display("packet %0d missing", p); return; end
      plen = (int'(bytes[base + 4]) << 8 | bytes[base + 5]) + 1 + 6;
      if (bytes[base] != 8'h09 || bytes[base + 1] != 8'h23 || {bytes[base + 2][5:0], bytes[base + 3]} != 14'(p)
          || bytes[base + 10] != 8'(mode == 3 ? 0 : 3 - mode) || bytes[base + 11] != 8'h07) begin
        failures++; $display("packet %0d header %h %h %h %h", p, bytes[base], bytes[base+1], bytes[base+3], bytes[base+10]);
      end
      bp = (base + 14) * 8;
      for (int q = 0; q < PBK; q++) begin
        automatic int ch = q % 4;
        automatic int grp = (p * PBK + q) / 4;
        id = getn(4); k = id - 1;
        if (id == 15) for (int n = 0; n < J; n++) dec[n] = getn(16);
        else begin
          for (int n = 0; n < J; n++) begin automatic int z = 0; while (getb() == 0 && z < 70000) z++; dec[n] = z; end
          for (int n = 0; n < J; n++) dec[n] = (dec[n] << k) | getn(k);
        end
        best = 1 << 30; bi = 0;
        for (int kk = 0; kk < 14; kk++) begin
          lenk = 0;
          for (int n = 0; n < J; n++) lenk += (mp[ch][grp * J + n] >> kk) + 1 + kk;
          if (lenk < best) begin best = lenk; bi = kk; end
        end
        checks++;
        if (id != ((mode == 3 || best >= 256) ? 15 : bi + 1)) begin failures++; $display("mode %0d pkt %0d blk %0d id %0d exp %0d", mode, p, q, id, bi + 1); end
        for (int n = 0; n < J; n++) begin
          checks++;
          if (dec[n] != mp[ch][grp * J + n]) begin failures++; if (failures < 10) $display("mode %0d pkt %0d blk %0d s%0d %0d exp %0d", mode, p, q, n, dec[n], mp[ch][grp*J+n]); end
        end
      end
      bp = ((bp + 7) / 8) * 8;
      checks++; if (bp / 8 != base + plen) begin failures++; $display("packet %0d length %0d decoded %0d", p, plen, bp / 8 - base); end
    end
    checks++; if (bp / 8 != bytes.size()) begin failures++; $display("extra bytes"); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4096; n++) begin @(negedge clk); lw = 1; la = 12'(n); ld = 16'((n * n) / 256); end
    @(negedge clk); lw = 0;
    phase(1);                      // mode code 2 in the header: lossless, no pre-scaler
    pse = 1; phase(2); pse = 0;
    fnc = 1; phase(3); fnc = 0;
    checks++; if (oovf) begin failures++; $display("option queue overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
