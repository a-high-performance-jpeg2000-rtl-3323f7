// tb_cxd_buffer: self-checking testbench of the CXD buffer (FIFO).
//
// A 16-entry buffer is driven with random writes and reads in phases that
// favour the writer (the buffer fills, wr_ready drops), the reader (the
// buffer runs empty) or neither, and with occasional clear pulses. A queue
// model checks every cycle: level, wr_ready (not full), rd_valid (not
// empty) and, when valid, rd_data = the oldest entry. Full and empty
// conditions and clears are counted and must each occur.
module tb_cxd_buffer;
  import jp2k_pkg::*;

  localparam int DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, wr_valid = 1'b0, rd_ready = 1'b0;
  cxd_t wr_data = '0;
  logic wr_ready, rd_valid;
  cxd_t rd_data;
  logic [$clog2(DEPTH):0] level;

  cxd_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_clear = 0;
  cxd_t model[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(level) != model.size() || wr_ready != (model.size() < DEPTH) ||
        rd_valid != (model.size() > 0) || (rd_valid && rd_data != model[0])) begin
      failures++;
      if (failures < 10)
        $display("level %0d wr_ready %0d rd_valid %0d data %h, model size %0d head %h",
                 level, wr_ready, rd_valid, rd_data, model.size(), (model.size() > 0) ? model[0] : '0);
    end
    if (!wr_ready) n_full++;
    if (!rd_valid) n_empty++;
    if (clear) begin
      n_clear++;
      model = {};
    end else begin
      if (rd_valid && rd_ready) void'(model.pop_front());
      if (wr_valid && model.size() + ((rd_valid && rd_ready) ? 1 : 0) < DEPTH + 1 && wr_ready)
        model.push_back(wr_data);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int ph = 0; ph < 30; ph++) begin
      int pw, pr;
      pw = (ph % 3 == 0) ? 9 : (ph % 3 == 1) ? 2 : 5;
      pr = (ph % 3 == 0) ? 2 : (ph % 3 == 1) ? 9 : 5;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        wr_valid = ($urandom_range(9) < pw);
        rd_ready = ($urandom_range(9) < pr);
        wr_data  = cxd_t'($urandom);
        clear    = ($urandom_range(499) == 0);
      end
    end
    @(negedge clk);
    wr_valid = 1'b0; rd_ready = 1'b0; clear = 1'b0;
    @(negedge clk);
    checks += 3;
    if (n_full == 0)  begin failures++; $display("never full"); end
    if (n_empty == 0) begin failures++; $display("never empty"); end
    if (n_clear == 0) begin failures++; $display("never cleared"); end
    $display("full %0d empty %0d clear %0d", n_full, n_empty, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
