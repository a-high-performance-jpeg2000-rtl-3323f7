// tb_subband_memory: self-checking testbench of the sub-band memory.
//
// A 32 x 32 code block of random sign-magnitude words is written in a random
// order, one word per cycle; then every strip column is read for every bit
// plane 0..14 and the sign plane. One cycle after rd_en, rd_bits must hold
// bit p of the words of the four rows of the strip (bit r for row r),
// rd_signs their sign bits, and rd_row the whole column interleaved by
// plane (bit 4*b + r = bit b of row r).
module tb_subband_memory;
  localparam int R = 32;
  localparam int C = 32;

  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [$clog2(R)-1:0] wr_row = '0;
  logic [$clog2(C)-1:0] wr_col = '0, rd_col = '0;
  logic [15:0] wr_data = '0;
  logic [$clog2(R/4)-1:0] rd_strip = '0;
  logic [3:0] rd_plane = '0;
  logic [63:0] rd_row;
  logic [3:0] rd_bits, rd_signs;

  subband_memory #(.R(R), .C(C)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] model [R][C];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[R * C];
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (order[i]) begin
      @(negedge clk);
      wr_en = 1'b1;
      wr_row = $clog2(R)'(order[i] / C);
      wr_col = $clog2(C)'(order[i] % C);
      wr_data = 16'($urandom);
      model[wr_row][wr_col] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int s = 0; s < R / 4; s++)
      for (int c = 0; c < C; c++)
        for (int p = 0; p < 15; p++) begin
          logic [3:0] eb, es;
          logic [63:0] er;
          @(negedge clk);
          rd_en = 1'b1; rd_strip = $clog2(R/4)'(s); rd_col = $clog2(C)'(c); rd_plane = 4'(p);
          for (int r = 0; r < 4; r++) begin
            eb[r] = model[4 * s + r][c][p];
            es[r] = model[4 * s + r][c][15];
            for (int b = 0; b < 16; b++) er[4 * b + r] = model[4 * s + r][c][b];
          end
          @(negedge clk);
          rd_en = 1'b0;
          checks++;
          if (rd_bits != eb || rd_signs != es || rd_row != er) begin
            failures++;
            if (failures < 10)
              $display("strip %0d col %0d plane %0d: bits %b signs %b, expected %b %b",
                       s, c, p, rd_bits, rd_signs, eb, es);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
