// tb_dwt: self-checking testbench of the DWT (memory, processor, controller).
//
// A 16 x 16 tile of random level-shifted 8-bit pixels is loaded through the
// external write port and transformed to 3 levels. The memory contents are
// compared word by word with the reference lifting model for
//   (5,3) forward, (5,3) inverse (must restore the tile exactly),
//   (9,7) forward, (9,7) inverse (bit-exact with the reference inverse and
//   within +-10 of the original tile: the 8-bit fraction coefficients make
//   the (9,7) round trip lossy).
// The number of cycles from start to done is compared with the controller's
// schedule: per iteration 1 setup cycle, M*M/2 samples, M preload cycles for
// a predict step, 9 drain cycles; plus the start and done cycles.
module tb_dwt;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;

  localparam int N = 16;
  localparam int L = 3;
  localparam int AW = $clog2(N * N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, inverse = 1'b0;
  filter_e filter = FILT_53;
  logic [2:0] levels = 3'(L);
  logic busy, done;
  logic ext_we = 1'b0;
  logic [AW-1:0] ext_waddr = '0, ext_raddr = '0;
  logic signed [DW-1:0] ext_wdata = '0, ext_rdata;

  int checks = 0, failures = 0;

  dwt #(.N(N), .LEVELS(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int img[]);
    for (int a = 0; a < N * N; a++) begin
      ext_we <= 1'b1; ext_waddr <= AW'(a); ext_wdata <= DW'(img[a]);
      @(posedge clk);
    end
    ext_we <= 1'b0;
    @(posedge clk);
  endtask

  task automatic run(input filter_e f, input logic inv, output int cycles);
    filter <= f; inverse <= inv; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
    @(posedge clk);
  endtask

  function automatic int expected_cycles(bit is97);
    int c = 0;
    for (int l = 0; l < L; l++) begin
      int m = N >> l;
      int nit = is97 ? 8 : 4;
      for (int k = 0; k < nit; k++)
        c += 1 + m * m / 2 + ((k % 2 == 0) ? m : 0) + 9;  // setup, samples, preload, drain
      if (is97) c += 1 + m * m / 2 + 9;
    end
    return c + 3;  // start, done pulse and the testbench's own count
  endfunction

  task automatic compare(input int ref_img[], input int tol, input string what);
    int bad = 0;
    for (int a = 0; a < N * N; a++) begin
      int got, diff;
      ext_raddr <= AW'(a);
      @(posedge clk);
      #1 got = int'(ext_rdata);
      diff = got - ref_img[a];
      checks++;
      if (diff > tol || diff < -tol) begin
        failures++;
        bad++;
        if (bad <= 5) $display("%s: addr %0d got %0d expected %0d", what, a, got, ref_img[a]);
      end
    end
  endtask

  initial begin
    int orig[], ref_img[];
    int cyc;
    orig = new[N * N];
    ref_img = new[N * N];
    for (int a = 0; a < N * N; a++) orig[a] = int'($urandom_range(255)) - 128;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    foreach (orig[a]) ref_img[a] = orig[a];
    dwt_forward(ref_img, N, L, 1'b0);
    load(orig);
    run(FILT_53, 1'b0, cyc);
    compare(ref_img, 0, "53 fwd");
    checks++;
    if (cyc != expected_cycles(1'b0)) begin
      failures++; $display("53 fwd cycles %0d expected %0d", cyc, expected_cycles(1'b0));
    end
    run(FILT_53, 1'b1, cyc);
    compare(orig, 0, "53 inv");

    foreach (orig[a]) ref_img[a] = orig[a];
    dwt_forward(ref_img, N, L, 1'b1);
    load(orig);
    run(FILT_97, 1'b0, cyc);
    compare(ref_img, 0, "97 fwd");
    checks++;
    if (cyc != expected_cycles(1'b1)) begin
      failures++; $display("97 fwd cycles %0d expected %0d", cyc, expected_cycles(1'b1));
    end
    run(FILT_97, 1'b1, cyc);
    // exact against the reference inverse, and close to the original tile
    dwt_inverse(ref_img, N, L, 1'b1);
    compare(ref_img, 0, "97 inv");
    compare(orig, 10, "97 inv vs original");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
