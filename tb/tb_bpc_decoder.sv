// tb_bpc_decoder: self-checking testbench of the bit-plane decoder.
//
// Random code blocks (sizes 4 x 4 to 32 x 32, all four band orientations,
// an all-zero block) are turned into context/decision pairs by the reference
// EBCOT model (jp2k_ref_pkg::ebcot_encode, no bypass). The testbench plays
// the MQ decoder: every context the decoder asks for must equal the next
// reference context, and it is answered, after a random delay, with the
// reference decision. At the end all pairs must have been used and the
// words read back must equal the original magnitudes and signs.
module tb_bpc_decoder;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;

  localparam int R = 32;
  localparam int C = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  band_e band = BAND_LL;
  logic [3:0] numbps = '0;
  logic [$clog2(R):0] cb_h = '0;
  logic [$clog2(C):0] cb_w = '0;
  logic busy, done;
  logic cx_valid, cx_ready = 1'b0;
  logic [CXW-1:0] cx;
  logic d_valid = 1'b0, d = 1'b0;
  logic rd_en = 1'b0;
  logic [$clog2(R)-1:0] rd_row = '0;
  logic [$clog2(C)-1:0] rd_col = '0;
  logic [15:0] rd_data;

  bpc_decoder #(.R(R), .C(C)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hs[8] = '{32, 16, 8, 4, 32, 32, 16, 32};
    int ws[8] = '{32, 16, 8, 4, 16, 32, 16, 32};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 8; blk++) begin
      int h, w, nbp, orv, idx, bad;
      int mag[];
      bit neg[];
      cxd_t pairs[$];
      h = hs[blk]; w = ws[blk];
      mag = new[h*w]; neg = new[h*w];
      orv = 0;
      foreach (mag[i]) begin
        int k;
        k = int'($urandom_range(11));
        mag[i] = ($urandom_range(2) == 0) ? 0 : int'($urandom & ((1 << k) - 1));
        if (blk == 3) mag[i] = 0;
        neg[i] = (mag[i] != 0) && ($urandom_range(1) == 1);
        orv |= mag[i];
      end
      nbp = 0;
      while (orv != 0) begin nbp++; orv >>= 1; end
      ebcot_encode(mag, neg, h, w, blk % 4, nbp, 1'b0, pairs);
      void'(pairs.pop_back());   // CX_END is not part of the decoder's dialogue
      band = band_e'(blk % 4); numbps = 4'(nbp);
      cb_h = ($clog2(R)+1)'(h); cb_w = ($clog2(C)+1)'(w);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      idx = 0;
      bad = 0;
      while (!done) begin
        if (cx_valid) begin
          cx_ready = 1'b1;
          @(negedge clk);
          cx_ready = 1'b0;
          checks++;
          if (idx >= pairs.size() || cx != pairs[idx].cx) begin
            failures++;
            bad++;
            if (bad < 5) $display("block %0d pair %0d: context %0d expected %0d", blk, idx, cx,
                                  (idx < pairs.size()) ? int'(pairs[idx].cx) : -1);
          end
          repeat ($urandom_range(2)) @(negedge clk);
          d_valid = 1'b1;
          d = (idx < pairs.size()) ? pairs[idx].d : 1'b0;
          idx++;
          @(negedge clk);
          d_valid = 1'b0;
        end else @(negedge clk);
      end
      checks++;
      if (idx != pairs.size()) begin
        failures++; $display("block %0d: %0d of %0d pairs used", blk, idx, pairs.size());
      end
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++) begin
          rd_en = 1'b1; rd_row = $clog2(R)'(r); rd_col = $clog2(C)'(c);
          @(negedge clk);
          rd_en = 1'b0;
          checks++;
          if (rd_data != {neg[r*w+c], 15'(mag[r*w+c])}) begin
            failures++;
            if (bad++ < 5) $display("block %0d (%0d,%0d): %h expected %0d%s", blk, r, c, rd_data,
                                    mag[r*w+c], neg[r*w+c] ? " negative" : "");
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
