// dwt_processor: the lifting processor of the DWT.
//
// Every lifting step of the (5,3) and (9,7) filters, forward and inverse,
// has the form  x_new = x_old +/- a * (x_left + x_right).  The processor
// computes it with a 16-bit adder (x_left + x_right), a shifter or a signed
// 16 x 10 multiplier for the product with a, and a second 16-bit adder that
// adds the product to x_old. The shifter shifts right by 1 or 2 (the (5,3)
// factors are 1/2 and 1/4); the multiplier is pipelined over four stages.
// Products are rounded half-way towards +infinity; with this rounding the
// (5,3) steps are exactly the integer (reversible) lifting steps of
// JPEG2000 Part 1, forward with sub=0 and inverse with sub=1.
// The (9,7) scaling step uses the multiplier alone: x_new = round(c * x_old).
//
// Timing: one new input per cycle. Latency from in_valid to out_valid is
// 4 cycles through the shifter (input register, adder, shifter, adder) and
// 7 cycles through the multiplier (input register, adder, 4 multiplier
// stages, adder), matching 2*Ta+Ts+1 and 2*Ta+Tm+1 with unit adder and
// shifter delays and a four-stage multiplier. The scaling step goes through
// the same 7 stages, with both adders passing the operand on. Operations of
// the two latencies must not be mixed without draining the pipeline in
// between (the DWT controller drains it after every iteration).
// A write address travels with every sample so that the result can be
// written back in place.
module dwt_processor
  import jp2k_pkg::*;
#(
  parameter int unsigned ADDR_W = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  dwt_op_e               op,
  input  logic signed [CW-1:0]  coef,     // OP_MULT / OP_SCALE factor, 8 fraction bits
  input  logic [1:0]            sh,       // OP_SHIFT: shift amount (1 or 2)
  input  logic                  neg,      // OP_SHIFT: factor is negative
  input  logic                  sub,      // subtract the product (inverse transform)
  input  logic signed [DW-1:0]  x_left,
  input  logic signed [DW-1:0]  x_right,
  input  logic signed [DW-1:0]  x_old,
  input  logic [ADDR_W-1:0]     addr_in,
  output logic                  out_valid,
  output logic signed [DW-1:0]  y,
  output logic [ADDR_W-1:0]     addr_out
);

  typedef struct packed {
    dwt_op_e           op;
    logic              sub;
    logic [ADDR_W-1:0] addr;
  } ctrl_t;

  // ---------------- stage 0: input registers
  logic                 s0_v;
  logic signed [DW-1:0] s0_l, s0_r, s0_o;
  logic signed [CW-1:0] s0_coef;
  logic [1:0]           s0_sh;
  logic                 s0_neg;
  ctrl_t                s0_c;

  // ---------------- stage 1: first adder
  logic                 s1_v;
  logic signed [DW-1:0] s1_sum, s1_o;
  logic signed [CW-1:0] s1_coef;
  logic [1:0]           s1_sh;
  logic                 s1_neg;
  ctrl_t                s1_c;

  // ---------------- shifter branch (1 stage)
  logic                 sh_v;
  logic signed [DW-1:0] sh_p, sh_o;
  ctrl_t                sh_c;

  // ---------------- multiplier branch (4 stages)
  localparam int unsigned PW = DW + CW;
  logic [3:0]           m_v;
  logic signed [PW-1:0] m_prod [3];
  logic signed [DW-1:0] m_p;
  logic signed [DW-1:0] m_o [4];
  ctrl_t                m_c [4];

  logic signed [DW-1:0] shift_in, shift_rnd;
  logic signed [PW-1:0] prod_full;

  always_comb begin
    shift_in  = s1_neg ? -s1_sum : s1_sum;
    shift_rnd = (s1_sh == 2'd2) ? ((shift_in + 16'sd2) >>> 2) : ((shift_in + 16'sd1) >>> 1);
    prod_full = PW'(s1_sum) * PW'(s1_coef);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_v <= 1'b0; s1_v <= 1'b0; sh_v <= 1'b0; m_v <= '0; out_valid <= 1'b0;
    end else begin
      s0_v      <= in_valid;
      s1_v      <= s0_v;
      sh_v      <= s1_v && (s1_c.op == OP_SHIFT);
      m_v       <= {m_v[2:0], s1_v && (s1_c.op != OP_SHIFT)};
      out_valid <= sh_v || m_v[3];
    end
  end

  always_ff @(posedge clk) begin
    // stage 0
    s0_l    <= x_left;
    s0_r    <= x_right;
    s0_o    <= x_old;
    s0_coef <= coef;
    s0_sh   <= sh;
    s0_neg  <= neg;
    s0_c    <= '{op: op, sub: sub, addr: addr_in};
    // stage 1: adder (the scaling step passes x_old as the operand)
    s1_sum  <= (s0_c.op == OP_SCALE) ? s0_o : s0_l + s0_r;
    s1_o    <= s0_o;
    s1_coef <= s0_coef;
    s1_sh   <= s0_sh;
    s1_neg  <= s0_neg;
    s1_c    <= s0_c;
    // shifter
    sh_p    <= shift_rnd;
    sh_o    <= s1_o;
    sh_c    <= s1_c;
    // multiplier pipeline, rounding in the last stage
    m_prod[0] <= prod_full;
    m_prod[1] <= m_prod[0];
    m_prod[2] <= m_prod[1];
    m_p       <= DW'((m_prod[2] + PW'(1 << (CFRAC - 1))) >>> CFRAC);
    m_o[0] <= s1_o;  m_o[1] <= m_o[0];  m_o[2] <= m_o[1];  m_o[3] <= m_o[2];
    m_c[0] <= s1_c;  m_c[1] <= m_c[0];  m_c[2] <= m_c[1];  m_c[3] <= m_c[2];
    // second adder
    if (sh_v) begin
      y        <= sh_c.sub ? sh_o - sh_p : sh_o + sh_p;
      addr_out <= sh_c.addr;
    end else begin
      y        <= (m_c[3].op == OP_SCALE) ? m_p : (m_c[3].sub ? m_o[3] - m_p : m_o[3] + m_p);
      addr_out <= m_c[3].addr;
    end
  end

  // The two branches must never deliver a result in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(sh_v && m_v[3]));

endmodule
