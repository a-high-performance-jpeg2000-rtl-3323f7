// tb_bac_encoder: self-checking testbench of the MQ encoder.
//
// Ten code blocks of random context/data pairs are fed through the
// in_valid/in_ready handshake with random idle cycles. The data bits are
// skewed per context so that both MPS and LPS paths, renormalisation,
// carries and 0xFF bytes occur. Blocks 4..9 mix in runs of raw (bypass)
// bits. Every block ends with CX_END. The bytes produced up to cb_done are
// compared with the reference MQ encoder.
module tb_bac_encoder;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0;
  logic in_valid = 1'b0, in_ready;
  cxd_t in_data = '0;
  logic out_valid, cb_done, busy;
  logic [7:0] out_byte;
  int checks = 0, failures = 0;
  byte_q got;

  bac_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic acc_q = 1'b0;
  always @(posedge clk) acc_q <= in_valid && in_ready;
  always @(posedge clk) if (out_valid) got.push_back(out_byte);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 10; blk++) begin
      cxd_t pairs[$];
      byte_q exp;
      int n;
      int bias[NCTX];
      pairs = {};
      for (int k = 0; k < NCTX; k++) bias[k] = int'($urandom_range(100));
      n = 200 + int'($urandom_range(1500));
      for (int i = 0; i < n; i++) begin
        cxd_t p;
        if (blk >= 4 && ((i / 60) % 3) == 1) begin
          p.cx = CX_RAW;
          p.d  = ($urandom_range(99) < 50);
        end else begin
          p.cx = 5'($urandom_range(NCTX - 1));
          p.d  = (int'($urandom_range(99)) < bias[p.cx]);
        end
        pairs.push_back(p);
      end
      pairs.push_back('{cx: CX_END, d: 1'b0});
      exp = mq_encode(pairs);
      got = {};
      foreach (pairs[i]) begin
        while ($urandom_range(3) == 0) @(negedge clk);
        in_valid = 1'b1;
        in_data  = pairs[i];
        do @(negedge clk); while (!acc_q);
        in_valid = 1'b0;
      end
      while (!cb_done) @(posedge clk);
      @(posedge clk);
      checks++;
      if (got.size() != exp.size()) begin
        failures++;
        $display("block %0d: %0d bytes, expected %0d", blk, got.size(), exp.size());
      end
      for (int i = 0; i < exp.size() && i < got.size(); i++) begin
        checks++;
        if (got[i] != exp[i]) begin
          failures++;
          if (failures < 10) $display("block %0d byte %0d: %02x expected %02x", blk, i, got[i], exp[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
