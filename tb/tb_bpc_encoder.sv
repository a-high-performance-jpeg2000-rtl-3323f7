// tb_bpc_encoder: self-checking testbench of the bit-plane coder.
//
// The coder reads its code block from a subband_memory. Eight blocks of
// random sign-magnitude samples (sizes 32x32, 16x16, 8x8, 4x4, 32x16, all
// four sub-band orientations, with and without bypass) are written into the
// memory, coded with random backpressure on the output, and the sequence of
// context/data pairs is compared pair by pair with the reference EBCOT
// model. The cycle count per block is checked against the coder's
// schedule bound: per pass and strip column 3 cycles, plus one cycle per
// sample, plus one per emitted pair, plus the stall cycles.
module tb_bpc_encoder;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;

  localparam int R = 32, C = 32;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, bypass_en = 1'b0;
  band_e band = BAND_LL;
  logic [3:0] numbps = '0;
  logic [5:0] cb_h = '0, cb_w = '0;
  logic busy, done;
  logic sm_rd_en;
  logic [2:0] sm_strip;
  logic [4:0] sm_col;
  logic [3:0] sm_plane, sm_bits, sm_signs;
  logic out_valid, out_ready = 1'b0;
  cxd_t out_data;
  logic wr_en = 1'b0;
  logic [4:0] wr_row = '0, wr_col = '0;
  logic [15:0] wr_data = '0;
  logic [63:0] rd_row;
  int checks = 0, failures = 0;
  cxd_t got[$];
  int stalls = 0;

  subband_memory #(.R(R), .C(C)) u_sm (
    .clk, .wr_en, .wr_row, .wr_col, .wr_data,
    .rd_en(sm_rd_en), .rd_strip(sm_strip), .rd_col(sm_col), .rd_plane(sm_plane),
    .rd_row, .rd_bits(sm_bits), .rd_signs(sm_signs)
  );

  bpc_encoder #(.R(R), .C(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_data);
    if (out_valid && !out_ready) stalls++;
  end
  always @(negedge clk) out_ready <= ($urandom_range(3) != 0);

  initial begin
    int hs[8] = '{32, 16, 8, 4, 32, 32, 16, 32};
    int ws[8] = '{32, 16, 8, 4, 16, 32, 16, 32};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 8; blk++) begin
      int h, w, nbp, orv, cyc, bound;
      int mag[];
      bit neg[];
      cxd_t exp[$];
      h = hs[blk]; w = ws[blk];
      mag = new[h*w]; neg = new[h*w];
      orv = 0;
      foreach (mag[i]) begin
        int k;
        k = int'($urandom_range(11));
        mag[i] = ($urandom_range(2) == 0) ? 0 : int'($urandom & ((1 << k) - 1));
        if (blk == 3) mag[i] = 0;   // an all-zero block
        neg[i] = (mag[i] != 0) && ($urandom_range(1) == 1);
        orv |= mag[i];
      end
      nbp = 0;
      for (int b = 0; b < 15; b++) if (((orv >> b) & 1) != 0) nbp = b + 1;
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++) begin
          @(negedge clk);
          wr_en = 1'b1; wr_row = 5'(r); wr_col = 5'(c);
          wr_data = {neg[r*w + c], 15'(mag[r*w + c])};
        end
      @(negedge clk);
      wr_en = 1'b0;
      band = band_e'(blk % 4);
      bypass_en = (blk >= 5);
      ebcot_encode(mag, neg, h, w, blk % 4, nbp, bypass_en, exp);
      got = {};
      stalls = 0;
      numbps = 4'(nbp); cb_h = 6'(h); cb_w = 6'(w);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (got.size() != exp.size()) begin
        failures++;
        $display("block %0d: %0d pairs, expected %0d", blk, got.size(), exp.size());
      end
      for (int i = 0; i < exp.size() && i < got.size(); i++) begin
        checks++;
        if (got[i] != exp[i]) begin
          failures++;
          if (failures < 10) $display("block %0d pair %0d: cx %0d d %0d expected cx %0d d %0d",
                                      blk, i, got[i].cx, got[i].d, exp[i].cx, exp[i].d);
        end
      end
      // schedule bound
      bound = (nbp == 0) ? 0 : (3 * nbp - 2) * (h * w + 3 * (h / 4) * w + 1);
      bound += exp.size() + stalls + 4;
      checks++;
      if (cyc > bound) begin
        failures++;
        $display("block %0d: %0d cycles, bound %0d", blk, cyc, bound);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
