// End-to-end test bench for slice_fpga, included by tb_slice_fpga (reduced
// sizes) and tb_slice_fpga_full (the design's default sizes); the including
// module sets FULL and instantiates the device as 'dut' with implicit .*
// connections to the signals declared here.
// It plays the ICU (SPI-like command frames), the CCD and NIR front ends
// (serial science data frames), a front end ASIC (forwarded commands), two
// NAND flash banks, the SDRAM and the downlink receiver, and runs:
//   1. a forwarded front end command and a broadcast;
//   2. a CCD exposure readout: pixels compressed on the fly, packets stored
//      in allocated flash blocks (one block failing its program status),
//      last page flushed; byte count, bad block list and blocks used read
//      back by the ICU;
//   3. the file downlink of that exposure: the serial byte stream is parsed
//      as CCSDS packets, every block decoded and compared with the mapped
//      pixel values computed here;
//   4. the same exposure with the square-root pre-scaler (reduced run only,
//      loading its 4096-entry table takes long at link speed);
//   5. a readout with no block allocated: block overflow code and suspend;
//   6. an erase of the file's blocks;
//   7. an NIR exposure: three readouts (negative, positive, last positive
//      with a 1-bit shift) accumulated through the SDRAM, then compressed,
//      stored and downlinked, and the result compared with the expected
//      averages;
//   8. a downlink cut short by the ICU: early termination code.
// Each mechanism is counted; one that never happened counts as a failure.
  import snap_pkg::*;
  localparam int PAGE = FULL ? 2048 : 256;
  localparam int PPB  = FULL ? 64 : 4;
  localparam int PKB  = FULL ? 60 : 4;
  localparam int BUFW = FULL ? 256 : 64;
  localparam int J    = 16, BC = 4;
  localparam int NCCD = FULL ? 3 * PKB * J : 12 * PKB * J;   // CCD pixels
  localparam int NNIR = FULL ? 1024 : 256;                    // NIR pixels (multiple of PKB*J)
  localparam logic [7:0] FID = 8'hA0, SCH = 8'h11;

  int checks, failures;
  logic clk = 0, rst_n = 0;
  logic [7:0] fpga_id = FID, slice_ch = SCH;
  always #5 clk = ~clk;

  logic icu_sclk = 0, icu_cs_n = 1, icu_mosi = 0, icu_miso;
  logic fe_sclk, fe_cs_n, fe_mosi, fe_miso;
  logic ccd_rx = 1; logic [3:0] nir_rx = 4'hF;
  logic [7:0] nf_ce_n; logic [1:0] nf_cle, nf_ale, nf_we_n, nf_re_n, nf_io_oe, nf_rb_n;
  logic [7:0] nf_io_o [2], nf_io_i [2];
  logic sdr_cs_n, sdr_ras_n, sdr_cas_n, sdr_we_n, sdr_dq_oe; logic [1:0] sdr_ba; logic [11:0] sdr_a;
  logic [31:0] sdr_dq_o, sdr_dq_i;
  logic dl_tx;

  nand_model #(.PAGE(PAGE), .BUSY(30), .PW($clog2(PPB))) bank0 (.clk, .ce_n(nf_ce_n[3:0]),
    .cle(nf_cle[0]), .ale(nf_ale[0]), .we_n(nf_we_n[0]), .re_n(nf_re_n[0]), .io_i(nf_io_o[0]),
    .io_o(nf_io_i[0]), .rb_n(nf_rb_n[0]));
  nand_model #(.PAGE(PAGE), .BUSY(30), .PW($clog2(PPB))) bank1 (.clk, .ce_n(nf_ce_n[7:4]),
    .cle(nf_cle[1]), .ale(nf_ale[1]), .we_n(nf_we_n[1]), .re_n(nf_re_n[1]), .io_i(nf_io_o[1]),
    .io_o(nf_io_i[1]), .rb_n(nf_rb_n[1]));
  sdram_model #(.CL(2), .T_RCD(2)) sdram (.clk, .cs_n(sdr_cs_n), .ras_n(sdr_ras_n), .cas_n(sdr_cas_n),
    .we_n(sdr_we_n), .ba(sdr_ba), .a(sdr_a), .dq_i(sdr_dq_o), .dq_o(sdr_dq_i));

  // mechanism counters
  int m_fwd = 0, m_bad = 0, m_blkchg = 0, m_ovf = 0, m_flush = 0, m_nocomp = 0, m_split = 0,
      m_fs = 0, m_presc = 0, m_nir_sub = 0, m_nir_clamp = 0, m_refresh = 0, m_early = 0,
      m_release = 0, m_erase = 0, m_parity = 0, m_pktswap = 0;

  // front end ASIC: counts forwarded words
  logic [31:0] fe_word, fe_sh = 32'h0;
  int fe_frames = 0;
  assign fe_miso = fe_sh[31];
  always @(posedge fe_sclk) fe_word = {fe_word[30:0], fe_mosi};
  always @(posedge fe_cs_n) if (rst_n) fe_frames++;

  // downlink receiver
  logic [7:0] dl_bytes [$];
  initial begin
    logic [7:0] b; logic p;
    forever begin
      @(negedge dl_tx);
      repeat (BC / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BC) @(posedge clk); b[i] = dl_tx; end
      repeat (BC) @(posedge clk); p = dl_tx;
      repeat (BC) @(posedge clk);
      if (!dl_tx || p != ^b) begin failures++; $display("downlink framing error"); end
      dl_bytes.push_back(b);
    end
  end

  // ---------------- ICU ----------------
  task automatic frame(input logic [31:0] w, output logic [31:0] r);
    icu_cs_n = 0; repeat (6) @(posedge clk);
    for (int i = 31; i >= 0; i--) begin
      icu_mosi = w[i]; repeat (4) @(posedge clk);
      icu_sclk = 1; r[i] = icu_miso; repeat (4) @(posedge clk);
      icu_sclk = 0;
    end
    repeat (4) @(posedge clk); icu_cs_n = 1; repeat (12) @(posedge clk);
  endtask
  task automatic wr(input logic [6:0] a, input logic [15:0] d);
    logic [31:0] r; frame({FID, 1'b1, a, d}, r);
  endtask
  task automatic rd(input logic [6:0] a, output logic [15:0] d);
    logic [31:0] r;
    frame({FID, 1'b0, a, 16'h0}, r);
    frame({8'hFE, 1'b0, 7'h0, 16'h0}, r);       // next frame carries the response
    if (r[31:24] != SCH || r[22:16] != a) begin failures++; $display("response address %h", r); end
    d = r[15:0];
  endtask
  task automatic wait_status(input int bitn, input logic val);
    logic [15:0] s;
    int n = 0;
    do begin
      repeat (200) @(posedge clk); rd(R_STATUS, s); n++;
      if (n % 100 == 0) $display("%t waiting for status bit %0d, status %h", $time, bitn, s);
    end while (s[bitn] != val);
  endtask

  // ---------------- front end data ----------------
  task automatic ccd_bit(input logic b); ccd_rx = b; repeat (BC) @(posedge clk); endtask
  task automatic ccd_frame(input logic [63:0] d, input logic badpar);
    ccd_bit(0); for (int i = 63; i >= 0; i--) ccd_bit(d[i]); ccd_bit(^d ^ badpar); ccd_bit(1);
    ccd_rx = 1; repeat (BC) @(posedge clk);
  endtask
  task automatic nir_frame(input logic [15:0] d [4]);
    nir_rx = 0; repeat (BC) @(posedge clk);
    for (int i = 15; i >= 0; i--) begin for (int l = 0; l < 4; l++) nir_rx[l] = d[l][i]; repeat (BC) @(posedge clk); end
    for (int l = 0; l < 4; l++) nir_rx[l] = ^d[l];
    repeat (BC) @(posedge clk);
    nir_rx = 4'hF; repeat (2 * BC) @(posedge clk);
  endtask

  // ---------------- reference ----------------
  function automatic int map(int x, int p);
    int th = (p < 65535 - p) ? p : 65535 - p; int d = x - p;
    if (d >= 0 && d <= th) return 2 * d;
    if (d < 0 && -d <= th) return -2 * d - 1;
    return th + (d < 0 ? -d : d);
  endfunction
  function automatic int sqcode(int x);
    int lo = 0, hi = 4095;
    while (lo < hi) begin automatic int mid = (lo + hi + 1) / 2; if ((mid * mid) / 256 <= x) lo = mid; else hi = mid - 1; end
    return lo;
  endfunction

  int bp;
  function automatic int getb(); int v = dl_bytes[bp / 8][7 - bp % 8]; bp++; return v; endfunction
  function automatic int getn(int n); int v = 0; for (int q = 0; q < n; q++) v = (v << 1) | getb(); return v; endfunction

  // parse the downlinked file and compare with pixel values px (after the
  // optional pre-scaler) of npix interleaved pixels
  task automatic check_file(input int px [$], input bit presc, input int exp_mode);
    int mp [4][$]; int pred [4]; int v, base, plen, id, k, dec [J], npk;
    for (int c = 0; c < 4; c++) pred[c] = 0;
    for (int n = 0; n < px.size(); n++) begin
      v = presc ? sqcode(px[n]) : px[n];
      mp[n % 4].push_back(map(v, pred[n % 4])); pred[n % 4] = v;
    end
    npk = px.size() / (PKB * J);
    if (npk > 1) m_pktswap++;
    bp = 0;
    for (int p = 0; p < npk; p++) begin
      base = bp / 8;
      checks++;
      if (dl_bytes.size() < base + 14) begin failures++; $display("file ends before packet %0d", p); return; end
      plen = (int'(dl_bytes[base + 4]) << 8 | dl_bytes[base + 5]) + 7;
      if ({dl_bytes[base + 2][5:0], dl_bytes[base + 3]} != 14'(p) || dl_bytes[base + 10] != 8'(exp_mode)
          || dl_bytes[base + 11] != SCH) begin failures++; $display("packet %0d header", p); end
      bp = (base + 14) * 8;
      for (int q = 0; q < PKB; q++) begin
        automatic int blk = p * PKB + q, ch = blk % 4, grp = blk / 4;
        id = getn(4); k = id - 1;
        if (id == 15) begin m_nocomp++; for (int n = 0; n < J; n++) dec[n] = getn(16); end
        else begin
          if (id == 1) m_fs++; else m_split++;
          for (int n = 0; n < J; n++) begin automatic int z = 0; while (getb() == 0 && z < 70000) z++; dec[n] = z; end
          for (int n = 0; n < J; n++) dec[n] = (dec[n] << k) | getn(k);
        end
        for (int n = 0; n < J; n++) begin
          checks++;
          if (dec[n] != mp[ch][grp * J + n]) begin
            failures++; if (failures < 10) $display("packet %0d block %0d sample %0d: %0d exp %0d", p, q, n, dec[n], mp[ch][grp*J+n]);
          end
        end
      end
      bp = ((bp + 7) / 8) * 8;
      checks++; if (bp / 8 != base + plen) begin failures++; $display("packet %0d length", p); end
    end
    checks++; if (bp / 8 != dl_bytes.size()) begin failures++; $display("file has %0d bytes, packets end at %0d", dl_bytes.size(), bp / 8); end
  endtask

  // ---------------- scenario pieces ----------------
  logic [15:0] blocks [4] = '{ {3'd0, 13'd5}, {3'd5, 13'd9}, {3'd2, 13'd100}, {3'd7, 13'd1} };

  task automatic set_blocks(input int n);
    wr(R_BLKRAM_A, 0);
    for (int b = 0; b < n; b++) wr(R_BLKRAM_D, blocks[b]);
    wr(R_NBLOCKS, 16'(n));
  endtask

  task automatic readout_ccd(input int px [$], input int nblk, input bit presc, output int nbytes);
    logic [15:0] lo, hi, s;
    set_blocks(nblk);
    wr(R_FLASH_CMD, 16'(FC_READOUT));
    wr(R_ENABLE, 16'((1 << EN_FRONTEND) | (1 << EN_COMPRESS) | (1 << EN_FLASH) | (presc << EN_PRESCALE)));
    wr(R_START, 16'h0020);                 // clear the data path
    wr(R_START, 16'h0001);                 // flash controller start
    for (int n = 0; n < px.size(); n += 4)
      ccd_frame({16'(px[n]), 16'(px[n+1]), 16'(px[n+2]), 16'(px[n+3])}, 1'b0);
    repeat (30000) @(posedge clk);
    wr(R_START, 16'h0004);                 // flush the last page
    m_flush++;
    repeat (4 * PAGE + 2000) @(posedge clk);
    rd(R_BYTES_LO, lo); rd(R_BYTES_HI, hi);
    nbytes = {hi, lo};
    wr(R_ENABLE, 16'h0000);
  endtask

  task automatic downlink(input int nbytes, input int nblk);
    logic [15:0] s;
    dl_bytes.delete();
    set_blocks(nblk);
    wr(R_FBYTES_LO, 16'(nbytes)); wr(R_FBYTES_HI, 16'(nbytes >> 16));
    wr(R_FLASH_CMD, 16'(FC_DOWNLINK));
    wr(R_ENABLE, 16'((1 << EN_FLASH) | (1 << EN_DOWNLINK)));
    wr(R_START, 16'h0020);                 // drop pages left by an aborted readout
    wr(R_START, 16'h0003);
    wait_status(6, 1'b1);                  // downlink done
    repeat (20 * BC) @(posedge clk);
    rd(R_DL_ERR, s);
    checks++; if (s != 0) begin failures++; $display("downlink error %0d", s); end
    checks++; if (dl_bytes.size() != nbytes) begin failures++; $display("downlinked %0d of %0d bytes", dl_bytes.size(), nbytes); end
    if (nbytes % PAGE != 0) m_release++;
    wr(R_ENABLE, 16'h0000);
  endtask

  int img [$], img2 [$];
  initial begin
    logic [31:0] r; logic [15:0] s, nb, bu; int nbytes, t;
    checks = 0; failures = 0;
    // one allocated block fails its program status: chip 5 (bank 1 chip 1)
    // block 9 in the reduced run, where the file spans two blocks; chip 0
    // block 5, the first one, at full size
    if (FULL) bank0.bad.push_back(5); else bank1.bad.push_back((1 << 16) | 9);
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (FULL ? 20500 : 400) @(posedge clk);   // SDRAM power-up

    // 1. forwarded commands

    frame({8'h05, 1'b1, 7'h12, 16'h3456}, r);
    frame({8'hFF, 1'b1, 7'h01, 16'h0001}, r);
    repeat (300) @(posedge clk);
    checks++; if (fe_frames != 2 || fe_word != {8'hFF, 1'b1, 7'h01, 16'h0001}) begin failures++; $display("forwarding"); end
    else m_fwd++;
    wr(R_EXPO_ID, 16'h0007); wr(R_APID, 16'h0155);

    // 2. CCD exposure

    for (int n = 0; n < NCCD; n++) begin
      automatic int blk = n / (4 * J);
      case (blk % 4)
        0: img.push_back(30000 + (n / 4) * 5 + int'($urandom % 7));
        1: img.push_back(int'($urandom % 65536));
        2: img.push_back(2000 + int'($urandom % 40));
        default: img.push_back(2000);
      endcase
    end
    readout_ccd(img, 3, 0, nbytes);
    rd(R_NBAD, nb); rd(R_BLKUSED, bu); rd(R_FLASH_ERR, s);
    $display("CCD exposure: %0d pixels -> %0d bytes, %0d blocks used, %0d bad", NCCD, nbytes, bu, nb);
    checks++; if (s != 0) begin failures++; $display("flash error %0d", s); end
    checks++; if (bank0.programs + bank1.programs != (nbytes + PAGE - 1) / PAGE) begin
      failures++; $display("%0d pages programmed", bank0.programs + bank1.programs); end
    if (bu > 1) m_blkchg++;
    if (nb == 1) begin rd(R_BAD0, s); checks++; if (s != blocks[FULL ? 0 : 1]) failures++; else m_bad++; end

    // 3. downlink of the exposure

    downlink(nbytes, 3);
    check_file(img, 0, 2);

    // 4. with pre-scaler

    if (!FULL) begin
      wr(R_LUT_A, 0);
      for (int c = 0; c < 4096; c++) wr(R_LUT_D, 16'((c * c) / 256));
      readout_ccd(img, 3, 1, nbytes);
      downlink(nbytes, 3);
      check_file(img, 1, 1);
      m_presc++;
    end

    // 5. block overflow

    readout_ccd(img, 0, 0, nbytes);
    rd(R_FLASH_ERR, s);
    checks++; if (s != 16'(ERR_BLOCK_OVERFLOW)) begin failures++; $display("no block overflow"); end
    else m_ovf++;

    // 6. erase

    t = bank0.erases + bank1.erases;
    set_blocks(3);
    wr(R_FLASH_CMD, 16'(FC_ERASE)); wr(R_ENABLE, 16'(1 << EN_FLASH)); wr(R_START, 16'h0001);
    repeat (2000) @(posedge clk);
    checks++; if (bank0.erases + bank1.erases != t + 3) begin failures++; $display("erase"); end
    else m_erase++;
    wr(R_ENABLE, 16'h0000);

    // a frame with a parity error is counted
    rd(R_RXERR, nb);
    wr(R_ENABLE, 16'(1 << EN_FRONTEND));
    ccd_frame(64'h1234_5678_9ABC_DEF0, 1'b1);
    rd(R_RXERR, s);
    checks++; if (s != nb + 1) begin failures++; $display("parity error not counted"); end else m_parity++;
    wr(R_ENABLE, 16'h0000);

    // 7. NIR exposure

    begin
      int sum [NNIR]; logic [15:0] d [4]; int v;
      wr(R_NIR_PIX_LO, 16'(NNIR)); wr(R_NIR_PIX_HI, 0);
      for (int rdo = 0; rdo < 3; rdo++) begin
        wr(R_ACC_CTRL, (rdo == 0) ? 16'h0003 : (rdo == 1) ? 16'h0000 : 16'h0014);
        wr(R_ENABLE, 16'((1 << EN_FRONTEND) | (1 << EN_ACCUM) | (1 << EN_SDRAM) | (1 << EN_NIR)));
        wr(R_START, 16'h0008);
        repeat (3 * BUFW + 200) @(posedge clk);   // both buffers pre-loaded before the readout
        for (int n = 0; n < NNIR; n += 4) begin
          for (int l = 0; l < 4; l++) begin
            v = (rdo == 0) ? 1000 + int'($urandom % 500) : (n < NNIR / 8) ? 0 : 5000 + (n / 4) * 3 + int'($urandom % 9);
            d[l] = 16'(v);
            if (rdo == 0) sum[n + l] = -v; else sum[n + l] += v;
          end
          nir_frame(d);
        end
        wait_status(8, 1'b0);             // SDRAM controller idle again
        $display("%t readout %0d accumulated", $time, rdo);
      end
      for (int n = 0; n < NNIR; n++) begin
        v = sum[n] >>> 1;
        if (v < 0) begin v = 0; m_nir_clamp++; end
        if (v > 65535) v = 65535;
        img2.push_back(v);
      end
      m_nir_sub++;
      if (sdram.refreshes > 0) m_refresh++;
      set_blocks(2);
      wr(R_FLASH_CMD, 16'(FC_READOUT));
      wr(R_ENABLE, 16'((1 << EN_COMPRESS) | (1 << EN_FLASH) | (1 << EN_SDRAM) | (1 << EN_NIR)));
      wr(R_START, 16'h0020);
      wr(R_START, 16'h0011);               // flash start + SDRAM transfer to compression
      wait_status(8, 1'b0);
      repeat (20000) @(posedge clk);
      wr(R_START, 16'h0004);
      repeat (4 * PAGE + 2000) @(posedge clk);
      rd(R_BYTES_LO, nb); rd(R_BYTES_HI, s);
      nbytes = {s, nb};
      wr(R_ENABLE, 16'h0000);
      downlink(nbytes, 2);
      check_file(img2, 0, 2);
      checks++; if (sdram.violations != 0) begin failures++; $display("SDRAM timing violations %0d", sdram.violations); end
    end

    // 8. early termination of a downlink

    dl_bytes.delete();
    set_blocks(2);
    wr(R_FBYTES_LO, 16'(nbytes)); wr(R_FBYTES_HI, 0);
    wr(R_FLASH_CMD, 16'(FC_DOWNLINK));
    wr(R_ENABLE, 16'((1 << EN_FLASH) | (1 << EN_DOWNLINK)));
    wr(R_START, 16'h0020);                 // drop pages left by an aborted readout
    wr(R_START, 16'h0003);
    repeat (20 * 11 * BC) @(posedge clk);
    wr(R_ENABLE, 16'h0000);
    repeat (20 * BC) @(posedge clk);
    rd(R_DL_ERR, s);
    checks++; if (s != 16'(ERR_EARLY_TERM)) begin failures++; $display("no early termination code"); end else m_early++;

    $display("mechanisms: fwd=%0d bad=%0d blkchg=%0d ovf=%0d flush=%0d nocomp=%0d split=%0d fs=%0d presc=%0d nir=%0d clamp=%0d refresh=%0d early=%0d release=%0d erase=%0d parity=%0d pktswap=%0d",
      m_fwd, m_bad, m_blkchg, m_ovf, m_flush, m_nocomp, m_split, m_fs, m_presc, m_nir_sub, m_nir_clamp,
      m_refresh, m_early, m_release, m_erase, m_parity, m_pktswap);
    foreach1(m_fwd); foreach1(m_bad); foreach1(FULL ? 1 : m_blkchg); foreach1(m_ovf); foreach1(m_flush);
    foreach1(m_nocomp); foreach1(m_split); foreach1(m_fs); foreach1(FULL ? 1 : m_presc); foreach1(m_nir_sub);
    foreach1(m_nir_clamp); foreach1(m_refresh); foreach1(m_early); foreach1(m_release); foreach1(m_erase);
    foreach1(m_parity); foreach1(m_pktswap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void foreach1(int cnt);
    checks++; if (cnt == 0) failures++;
  endfunction

  initial begin
    #400ms;
    $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
