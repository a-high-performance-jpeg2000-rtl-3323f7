// tb_dwt_memory: self-checking testbench of the DWT tile memory.
//
// A 16 x 16 memory is filled with random words, then both read ports read
// random addresses every cycle while the write port keeps writing random
// words to random addresses. Each read must return, one cycle after the
// address, the word written last before that clock edge (read-before-write
// for a read and a write of the same address in the same cycle).
module tb_dwt_memory;
  localparam int N = 16;
  localparam int AW = $clog2(N * N);

  logic clk = 1'b0;
  logic [AW-1:0] ra_addr = '0, rb_addr = '0, wa_addr = '0;
  logic [15:0] ra_data, rb_data, wa_data = '0;
  logic we = 1'b0;

  dwt_memory #(.N(N), .DATA_W(16)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] model [N * N];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ea, eb;
    for (int a = 0; a < N * N; a++) begin
      @(negedge clk);
      we = 1'b1; wa_addr = AW'(a); wa_data = 16'($urandom); model[a] = wa_data;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      ra_addr = AW'($urandom); rb_addr = ($urandom_range(3) == 0) ? ra_addr : AW'($urandom);
      ea = model[ra_addr]; eb = model[rb_addr];
      we = ($urandom_range(1) == 1);
      wa_addr = ($urandom_range(3) == 0) ? ra_addr : AW'($urandom);
      wa_data = 16'($urandom);
      if (we) model[wa_addr] = wa_data;
      @(negedge clk);
      we = 1'b0;
      checks += 2;
      if (ra_data != ea) begin failures++; $display("port A addr %0d: %h expected %h", ra_addr, ra_data, ea); end
      if (rb_data != eb) begin failures++; $display("port B addr %0d: %h expected %h", rb_addr, rb_data, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
