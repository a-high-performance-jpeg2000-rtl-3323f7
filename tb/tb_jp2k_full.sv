// tb_jp2k_full: the encoder at its default size - a 128 x 128 tile, five
// decomposition levels, 32 x 32 code blocks, 128-entry CXD buffers.
//
// Two tiles: (9,7) with quantization and bypass, and (5,3) lossless
// without bypass, both on a synthetic image (smooth gradients, edges and
// noise). Every code block's information and byte stream is compared with
// the reference models (DWT, formatter, EBCOT, MQ), exactly as in
// tb_jp2k_top, and the cycle count of each tile is printed. The blocks of
// the lossless tile are then decoded with the top's code-block decoder and
// must give back the coded coefficients. The mechanism counters of
// tb_jp2k_top are printed too; here only the ones a natural image must
// produce are required (decoding, bypass, run-length coding, LPS, carry,
// split sub-bands, LL band).
module tb_jp2k_full;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;

  localparam int N = 128;
  localparam int CB = 32;
  localparam int AW = $clog2(N * N);
  localparam int BW = $clog2(N / CB) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  filter_e filter = FILT_53;
  logic [2:0] levels = 3'd1;
  logic bypass_en = 1'b0, qen = 1'b0;
  logic [15:0] qscale [3];
  logic pix_we = 1'b0;
  logic [AW-1:0] pix_addr = '0;
  logic [7:0] pix_data = '0;
  logic start = 1'b0;
  logic busy, done;
  logic [2:0] cb_valid, cb_level, cs_valid, cs_end;
  logic [BW-1:0] cb_by, cb_bx;
  band_e cb_band [3];
  logic [3:0] cb_numbps [3];
  logic [7:0] cs_byte [3];
  logic dec_start = 1'b0, dec_in_valid = 1'b0, dec_rd_en = 1'b0;
  band_e dec_band = BAND_LL;
  logic [3:0] dec_numbps = '0;
  logic [$clog2(CB):0] dec_size = '0;
  logic [7:0] dec_in_byte = '0;
  logic [$clog2(CB)-1:0] dec_rd_row = '0, dec_rd_col = '0;
  logic dec_busy, dec_done, dec_in_ready, dec_out_valid;
  logic [15:0] dec_out_data;

  jp2k_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_raw = 0, n_rlc = 0, n_lps = 0, n_carry = 0, n_ff = 0;
  int n_zero = 0, n_multi = 0, n_ll = 0, n_blocks = 0;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected code blocks per pair
  typedef struct {
    int lvl, by, bx, band, nbp;
    byte_q bytes;
  } blk_t;
  blk_t exp_q [3][$];
  // blocks coded without bypass, kept for the decoder test
  typedef struct {
    int band, nbp, size;
    byte_q bytes;
    int val[];
  } dblk_t;
  dblk_t dec_list[$];
  int n_dec = 0;
  blk_t cur [3];
  byte_q got [3];

  // ------------------------------------------------------------ monitors
  for (genvar k = 0; k < 3; k++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_pair[k].bpc_valid && !dut.g_pair[k].bpc_ready) n_stall++;
      if (dut.g_pair[k].bac_valid && dut.g_pair[k].bac_ready) begin
        if (dut.g_pair[k].bac_data.cx == CX_RAW) n_raw++;
        if (dut.g_pair[k].bac_data.cx == CX_RUN) n_rlc++;
      end
      // BAC state encodings: 4 = arithmetic step, 6 = carry into C[31:16]
      if (5'(dut.g_pair[k].u_bac.state) == 5'd4 &&
          dut.g_pair[k].u_bac.sym_reg != dut.g_pair[k].u_bac.mps) n_lps++;
      if (5'(dut.g_pair[k].u_bac.state) == 5'd6) n_carry++;
      if (cs_valid[k]) begin
        got[k].push_back(cs_byte[k]);
        if (cs_byte[k] == 8'hFF) n_ff++;
      end
      if (cb_valid[k]) begin
        n_blocks++;
        if (cb_numbps[k] == 4'd0) n_zero++;
        if (cb_by != '0 || cb_bx != '0) n_multi++;
        if (k == 0 && cb_band[0] == BAND_LL) n_ll++;
        checks++;
        if (exp_q[k].size() == 0) begin
          failures++;
          $display("pair %0d: unexpected code block", k);
        end else begin
          cur[k] = exp_q[k].pop_front();
          if (int'(cb_level) != cur[k].lvl || int'(cb_by) != cur[k].by ||
              int'(cb_bx) != cur[k].bx || int'(cb_band[k]) != cur[k].band ||
              int'(cb_numbps[k]) != cur[k].nbp) begin
            failures++;
            $display("pair %0d: block info lvl %0d (%0d,%0d) band %0d nbp %0d, expected lvl %0d (%0d,%0d) band %0d nbp %0d",
                     k, cb_level, cb_by, cb_bx, cb_band[k], cb_numbps[k],
                     cur[k].lvl, cur[k].by, cur[k].bx, cur[k].band, cur[k].nbp);
          end
        end
        got[k] = {};
      end
      if (cs_end[k]) begin
        bit bad;
        bad = (got[k].size() != cur[k].bytes.size());
        foreach (got[k][i]) if (i < cur[k].bytes.size() && got[k][i] != cur[k].bytes[i]) bad = 1'b1;
        checks++;
        if (bad) begin
          failures++;
          $display("pair %0d: lvl %0d block (%0d,%0d): %0d bytes, expected %0d",
                   k, cur[k].lvl, cur[k].by, cur[k].bx, got[k].size(), cur[k].bytes.size());
        end
      end
    end
  end

  // ------------------------------------------------------------ reference
  task automatic add_block(input int img[], input int lvl, input int nlev, input int by,
                           input int bx, input int size, input int band, input int k,
                           input bit q, input int qs, input bit byp);
    int mag[], orv, s;
    bit neg[];
    cxd_t pairs[$];
    blk_t b;
    mag = new[size * size];
    neg = new[size * size];
    orv = 0;
    s = 1 << (lvl - 1);
    for (int i = 0; i < size; i++)
      for (int j = 0; j < size; j++) begin
        int gi, gj, r, c, v, m;
        gi = by * size + i;
        gj = bx * size + j;
        if (band == int'(BAND_LL)) begin
          r = gi << nlev; c = gj << nlev;
        end else begin
          r = 2 * gi * s + ((band != int'(BAND_HL)) ? s : 0);
          c = 2 * gj * s + ((band != int'(BAND_LH)) ? s : 0);
        end
        v = img[r * N + c];
        m = (v < 0) ? -v : v;
        if (q) begin
          m = (m * qs) >> 8;
          if (m > 32767) m = 32767;
        end
        mag[i * size + j] = m;
        neg[i * size + j] = (v < 0) && (m != 0);
        orv |= m;
      end
    b.nbp = 0;
    while (orv != 0) begin b.nbp++; orv >>= 1; end
    ebcot_encode(mag, neg, size, size, band, b.nbp, byp, pairs);
    b.bytes = mq_encode(pairs);
    if (!byp && dec_list.size() < 40) begin
      dblk_t db;
      db.band = band; db.nbp = b.nbp; db.size = size; db.bytes = b.bytes;
      db.val = new[size * size];
      foreach (mag[i]) db.val[i] = neg[i] ? -mag[i] : mag[i];
      dec_list.push_back(db);
    end
    b.lvl = (band == int'(BAND_LL)) ? nlev : lvl;
    b.by = by; b.bx = bx; b.band = band;
    exp_q[k].push_back(b);
  endtask

  task automatic run_tile(input int pix[], input filter_e f, input int nlev, input bit byp,
                          input bit q, input int qs0, input int qs1, input int qs2);
    int img[], qs[3], cyc;
    qs = '{qs0, qs1, qs2};
    img = new[N * N];
    foreach (pix[a]) img[a] = pix[a] - 128;
    dwt_forward(img, N, nlev, f == FILT_97);
    for (int lvl = 1; lvl <= nlev; lvl++) begin
      int sb, size, nb;
      sb = N >> lvl;
      size = (sb > CB) ? CB : sb;
      nb = sb / size;
      for (int by = 0; by < nb; by++)
        for (int bx = 0; bx < nb; bx++)
          for (int k = 0; k < 3; k++)
            add_block(img, lvl, nlev, by, bx, size, k + 1, k, q, qs[k], byp);
    end
    begin
      int sb, size, nb;
      sb = N >> nlev;
      size = (sb > CB) ? CB : sb;
      nb = sb / size;
      for (int by = 0; by < nb; by++)
        for (int bx = 0; bx < nb; bx++)
          add_block(img, nlev, nlev, by, bx, size, int'(BAND_LL), 0, q, qs[0], byp);
    end
    // load and run
    foreach (pix[a]) begin
      pix_we = 1'b1; pix_addr = AW'(a); pix_data = 8'(pix[a]);
      @(negedge clk);
    end
    pix_we = 1'b0;
    filter = f; levels = 3'(nlev); bypass_en = byp; qen = q;
    qscale[0] = 16'(qs0); qscale[1] = 16'(qs1); qscale[2] = 16'(qs2);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    repeat (2) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (exp_q[k].size() != 0) begin
        failures++;
        $display("pair %0d: %0d code blocks never coded", k, exp_q[k].size());
      end
    end
    $display("tile %s levels %0d bypass %0d quant %0d: %0d cycles", f.name(), nlev, byp, q, cyc);
  endtask

  // decode a saved block with the top's code-block decoder
  task automatic decode_block(input dblk_t db);
    int bidx, bad;
    qen = 1'b0;
    dec_band = band_e'(db.band); dec_numbps = 4'(db.nbp); dec_size = ($clog2(CB)+1)'(db.size);
    dec_start = 1'b1;
    @(negedge clk);
    dec_start = 1'b0;
    bidx = 0;
    while (!dec_done) begin
      dec_in_valid = ($urandom_range(3) != 0);
      dec_in_byte  = (bidx < db.bytes.size()) ? db.bytes[bidx] : 8'hFF;
      @(posedge clk);
      if (dec_in_valid && dec_in_ready) bidx++;
      @(negedge clk);
    end
    dec_in_valid = 1'b0;
    bad = 0;
    for (int i = 0; i < db.size * db.size; i++) begin
      dec_rd_en = 1'b1;
      dec_rd_row = $clog2(CB)'(i / db.size); dec_rd_col = $clog2(CB)'(i % db.size);
      @(negedge clk);
      dec_rd_en = 1'b0;
      @(negedge clk);
      checks++;
      if (!dec_out_valid || int'($signed(dec_out_data)) != db.val[i]) begin
        failures++;
        if (bad++ < 3) $display("decoded block band %0d sample %0d: %0d expected %0d",
                                db.band, i, $signed(dec_out_data), db.val[i]);
      end
    end
    n_dec++;
  endtask

  initial begin
    int pix[];
    pix = new[N * N];
    qscale = '{16'd256, 16'd256, 16'd256};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    foreach (pix[a]) begin
      int r, c, v;
      r = a / N; c = a % N;
      v = 40 + r + c / 2 + int'($urandom_range(15));
      if ((r - 64) * (r - 64) + (c - 50) * (c - 50) < 900) v += 70;
      if (c > 96 && ((r / 8) % 2 == 0)) v = 230 - int'($urandom_range(20));
      pix[a] = (v > 255) ? 255 : v;
    end
    run_tile(pix, FILT_97, 5, 1'b1, 1'b1, 230, 230, 200);
    run_tile(pix, FILT_53, 5, 1'b0, 1'b0, 256, 256, 256);

    foreach (dec_list[i]) decode_block(dec_list[i]);

    $display("blocks %0d decoded %0d stalls %0d raw %0d rlc %0d lps %0d carry %0d ff %0d zero %0d multi %0d ll %0d",
             n_blocks, n_dec, n_stall, n_raw, n_rlc, n_lps, n_carry, n_ff, n_zero, n_multi, n_ll);
    checks += 7;
    if (n_dec == 0)   begin failures++; $display("nothing decoded"); end
    if (n_raw == 0)   begin failures++; $display("no bypass decisions"); end
    if (n_rlc == 0)   begin failures++; $display("no run-length coding"); end
    if (n_lps == 0)   begin failures++; $display("no LPS coded"); end
    if (n_carry == 0) begin failures++; $display("no carry"); end
    if (n_multi == 0) begin failures++; $display("no split sub-band"); end
    if (n_ll == 0)    begin failures++; $display("LL band never coded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
