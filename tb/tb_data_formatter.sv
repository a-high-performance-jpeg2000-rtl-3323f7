// tb_data_formatter: self-checking testbench of the data formatter.
//
// Encoding: random two's complement coefficients (with and without
// quantization, random scale factors, including the extreme values) must
// come out one cycle later as {sign, magnitude} with magnitude =
// min(floor(|x| * qscale / 256), 32767) (or |x| without quantization) and
// no sign on a zero magnitude; the address travels along. After each block
// numbps must be the number of bits of the largest magnitude of the block
// (cb_start clears it). Decoding: random sign-magnitude words must come
// out as two's complement, the magnitude scaled by qscale / 256 when
// quantization is on.
module tb_data_formatter;
  localparam int AW = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic decode = 1'b0, qen = 1'b0, cb_start = 1'b0, in_valid = 1'b0;
  logic [15:0] qscale = 16'd256, in_data = '0;
  logic [AW-1:0] in_addr = '0;
  logic out_valid;
  logic [15:0] out_data;
  logic [AW-1:0] out_addr;
  logic [3:0] numbps;

  data_formatter #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] expect_enc(int x, bit q, int qs);
    int m;
    m = (x < 0) ? -x : x;
    if (q) m = (m * qs) >> 8;
    if (m > 32767) m = 32767;
    return {(x < 0) && (m != 0), 15'(m)};
  endfunction

  function automatic logic [15:0] expect_dec(logic [15:0] w, bit q, int qs);
    int m;
    m = int'(w[14:0]);
    if (q) m = (m * qs) >> 8;
    if (m > 32767) m = 32767;
    return w[15] ? 16'(-m) : 16'(m);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 60; blk++) begin
      int maxm, nbp;
      bit q;
      int qs;
      decode = (blk % 4 == 3);
      q = (blk % 2 == 1);
      qs = (blk % 6 == 1) ? 65535 : int'($urandom_range(1, 600));
      qen = q; qscale = 16'(qs);
      @(negedge clk);
      cb_start = 1'b1;
      @(negedge clk);
      cb_start = 1'b0;
      maxm = 0;
      for (int i = 0; i < 100; i++) begin
        int x;
        logic [15:0] e, w;
        int k;
        k = int'($urandom_range(15));
        x = int'($urandom & ((1 << k) - 1)) * (($urandom_range(1) == 1) ? -1 : 1);
        if (i == 0 && blk % 5 == 0) x = -32768;
        if (i == 1 && blk % 5 == 0) x = 32767;
        if (blk == 8) x = 0;
        w = 16'($urandom);
        if (!decode) begin
          in_data = 16'(x);
          e = expect_enc(int'($signed(16'(x))), q, qs);
          if (int'(e[14:0]) > maxm) maxm = int'(e[14:0]);
        end else begin
          in_data = w;
          e = expect_dec(w, q, qs);
        end
        in_valid = 1'b1;
        in_addr = AW'($urandom);
        @(posedge clk);
        #1;
        in_valid = 1'b0;
        checks++;
        if (!out_valid || out_data != e || out_addr != in_addr) begin
          failures++;
          if (failures < 10)
            $display("blk %0d decode %0d q %0d qs %0d in %h: out %h valid %0d, expected %h",
                     blk, decode, q, qs, in_data, out_data, out_valid, e);
        end
        @(negedge clk);
        if ($urandom_range(3) == 0) @(negedge clk);
      end
      if (!decode) begin
        nbp = 0;
        while (maxm != 0) begin nbp++; maxm >>= 1; end
        checks++;
        if (int'(numbps) != nbp) begin
          failures++; $display("blk %0d numbps %0d expected %0d", blk, numbps, nbp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
