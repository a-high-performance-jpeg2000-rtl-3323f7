// tb_bac_decoder: self-checking testbench of the MQ decoder.
//
// Random context/decision sequences (all 19 contexts, skewed and uniform
// decision statistics so that MPS, LPS, exchanges and switches occur) are
// encoded with the reference MQ coder (jp2k_ref_pkg::mq_encode, ended with
// CX_END). The byte stream, followed by 0xFF fill, is offered to the decoder
// with random gaps; the contexts are presented one at a time and every
// decision must equal the original one. 12 code blocks, the decoder is
// re-initialised before each. 0xFF bytes in the streams are counted and
// must occur.
module tb_bac_decoder;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0;
  logic cx_valid = 1'b0, cx_ready;
  logic [CXW-1:0] cx = '0;
  logic d_valid, d;
  logic in_valid = 1'b0, in_ready;
  logic [7:0] in_byte = '0;
  logic busy;

  bac_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ff = 0;
  byte_q stream;
  int bidx = 0;
  bit feed = 0;
  logic acc_q = 1'b0;
  always @(posedge clk) acc_q <= cx_valid && cx_ready;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // byte source: the stream, then 0xFF
  always @(posedge clk) if (in_valid && in_ready) bidx++;
  always @(negedge clk) begin
    in_valid = feed && ($urandom_range(3) != 0);
    in_byte  = (bidx < stream.size()) ? stream[bidx] : 8'hFF;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 12; blk++) begin
      cxd_t pairs[$];
      int n, skew;
      n = 200 + int'($urandom_range(1500));
      skew = blk % 3;   // 0: uniform, 1: mostly 0, 2: mostly 1
      for (int i = 0; i < n; i++) begin
        cxd_t p;
        p.cx = CXW'($urandom_range(NCTX - 1));
        if (blk % 4 == 1) p.cx = CXW'($urandom_range(2));   // few contexts: fast adaptation
        case (skew)
          0: p.d = 1'($urandom_range(1));
          1: p.d = ($urandom_range(15) == 0);
          default: p.d = ($urandom_range(15) != 0);
        endcase
        pairs.push_back(p);
      end
      begin
        byte_q s;
        cxd_t all[$];
        all = pairs;
        all.push_back('{cx: CX_END, d: 1'b0});
        s = mq_encode(all);
        foreach (s[i]) if (s[i] == 8'hFF) n_ff++;
        stream = s;
      end
      bidx = 0;
      feed = 1;
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      foreach (pairs[i]) begin
        while ($urandom_range(3) == 0) @(negedge clk);
        cx_valid = 1'b1;
        cx = pairs[i].cx;
        do @(negedge clk); while (!acc_q);
        cx_valid = 1'b0;
        while (!d_valid) @(negedge clk);
        checks++;
        if (d != pairs[i].d) begin
          failures++;
          if (failures < 10) $display("block %0d symbol %0d (cx %0d): %0d expected %0d", blk, i, pairs[i].cx, d, pairs[i].d);
        end
      end
      feed = 0;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (n_ff == 0) begin failures++; $display("no 0xFF byte in the streams"); end
    $display("0xFF bytes %0d", n_ff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
