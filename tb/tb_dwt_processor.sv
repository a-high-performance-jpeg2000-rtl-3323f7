// tb_dwt_processor: self-checking testbench of the lifting processor.
//
// Random lifting operations are issued in bursts of one latency class
// (shifter: (5,3) predict/update factors -1/2 and 1/4; multiplier: the
// (9,7) coefficients and random 10-bit factors; scaling), with random idle
// cycles, forward (add) and inverse (subtract). The expected result is
// x_old +/- round(a * (x_left + x_right)) with a = +/-2^-sh or coef/256,
// rounded half up, and round(coef * x_old / 256) for scaling. Every result
// must come out exactly 4 (shifter) or 7 (multiplier) cycles after its
// input, with its write address. The pipeline is drained between bursts.
module tb_dwt_processor;
  import jp2k_pkg::*;

  localparam int AW = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  dwt_op_e op = OP_SHIFT;
  logic signed [CW-1:0] coef = '0;
  logic [1:0] sh = 2'd1;
  logic neg = 1'b0, sub = 1'b0;
  logic signed [DW-1:0] x_left = '0, x_right = '0, x_old = '0;
  logic [AW-1:0] addr_in = '0;
  logic out_valid;
  logic signed [DW-1:0] y;
  logic [AW-1:0] addr_out;

  dwt_processor #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  typedef struct { int y, addr, due; } exp_t;
  exp_t exp_q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output at cycle %0d", cycle);
      end else begin
        e = exp_q.pop_front();
        if (int'(y) != e.y || int'(addr_out) != e.addr || cycle != e.due) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: y %0d addr %0d, expected %0d addr %0d at cycle %0d",
                     cycle, y, addr_out, e.y, e.addr, e.due);
        end
      end
    end
  end

  function automatic int rnd_shift(int v, int s);  // round(v / 2^s), half up
    return (v + (1 << (s - 1))) >>> s;
  endfunction

  // one operation; inputs applied after the negedge, taken at the next posedge
  task automatic issue(input dwt_op_e o);
    int l, r, x, c, s, n, sb, t, res;
    exp_t e;
    l = int'($urandom_range(12000)) - 6000;
    r = int'($urandom_range(12000)) - 6000;
    x = int'($urandom_range(12000)) - 6000;
    c = int'($urandom_range(1023)) - 512;
    case ($urandom_range(4))
      0: c = C97_ALPHA;
      1: c = C97_BETA;
      2: c = C97_GAMMA;
      3: c = C97_DELTA;
      default: ;
    endcase
    s = int'($urandom_range(1, 2));
    n = int'($urandom_range(1));
    sb = int'($urandom_range(1));
    case (o)
      OP_SHIFT: t = rnd_shift(n ? -(l + r) : (l + r), s);
      OP_MULT:  t = rnd_shift(c * (l + r), CFRAC);
      default:  t = rnd_shift(c * x, CFRAC);
    endcase
    if (o == OP_SCALE) res = t;
    else res = sb ? x - t : x + t;
    e.y = res;
    e.addr = int'($urandom_range((1 << AW) - 1));
    e.due = cycle + 1 + ((o == OP_SHIFT) ? 4 : 7);
    in_valid = 1'b1; op = o; coef = CW'(c); sh = 2'(s); neg = n[0]; sub = sb[0];
    x_left = DW'(l); x_right = DW'(r); x_old = DW'(x); addr_in = AW'(e.addr);
    exp_q.push_back(e);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    dwt_op_e o;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int burst = 0; burst < 60; burst++) begin
      case (burst % 3)
        0: o = OP_SHIFT;
        1: o = OP_MULT;
        default: o = OP_SCALE;
      endcase
      for (int i = 0; i < 40; i++) begin
        if ($urandom_range(3) == 0) @(negedge clk);
        issue(o);
      end
      repeat (9) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
