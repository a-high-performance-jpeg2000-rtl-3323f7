// dwt_controller: counter, signal generator and address generator of the DWT.
//
// The transform is done level by level, in column-row order (all columns of
// the current LL band, then all rows), in place in an N x N memory. At level
// l the current band is M = N >> l samples on a side and its samples sit at
// every 2^l-th row and column of the memory, so the address generator only
// shifts the row and column counters left by l.
//
// One "iteration" applies one lifting step to every column (or row) of the
// band: (5,3) needs four iterations per level, (9,7) eight plus one scaling
// step. For a lifting step the target samples are the odd ones (predict) or
// the even ones (update). For each target the controller reads the right
// neighbour on port A and the old value on port B; the left neighbour is the
// previous target's right neighbour, held in a register of the DWT data
// path. At the band edges symmetric extension is used: the missing neighbour
// is the mirrored one (flags mirror_l / mirror_r). A predict step needs the
// first even sample of a line before its first target, fetched in one extra
// "preload" cycle per line. The scaling step of the (9,7) filter is done once
// per level on the LL samples (factor 1/K^2) and the HH samples (factor K^2)
// only, as row and column scaling of LH and HL cancel.
//
// Signal generator: six states (IDLE, SETUP, PRELOAD, RUN, DRAIN, DONE). The
// pipeline is drained after every iteration (the next iteration reads what
// this one writes), so one iteration of a predict step takes
// M*M/2 + M + drain cycles, an update step M*M/2 + drain cycles.
// Read addresses are issued in the cycle of the request; the matching data
// path controls (d_*) are registered so that they line up with the read data
// one cycle later. The inverse transform runs the levels and steps in
// reverse order with the products subtracted.
module dwt_controller
  import jp2k_pkg::*;
#(
  parameter int unsigned N      = 128,
  parameter int unsigned LEVELS = 5,
  parameter int unsigned ADDR_W = $clog2(N * N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  filter_e              filter,
  input  logic                 inverse,
  input  logic [2:0]           levels,     // 1..LEVELS
  output logic                 busy,
  output logic                 done,       // one-cycle pulse
  // memory read addresses (issue cycle)
  output logic [ADDR_W-1:0]    ra_addr,
  output logic [ADDR_W-1:0]    rb_addr,
  // data path controls, one cycle after the issue
  output logic                 d_valid,    // present a sample to the processor
  output logic                 d_preload,  // port A data is the first left neighbour
  output logic                 d_mirror_l, // left neighbour = port A data
  output logic                 d_mirror_r, // right neighbour = held left neighbour
  output logic [ADDR_W-1:0]    d_addr,     // write-back address
  output dwt_op_e              d_op,
  output logic signed [CW-1:0] d_coef,
  output logic [1:0]           d_sh,
  output logic                 d_neg,
  output logic                 d_sub
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned IW   = LOGN + 1;

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_PRELOAD, S_RUN, S_DRAIN, S_DONE} state_e;

  typedef struct packed {
    logic                 rowpass;  // 0: along columns, 1: along rows
    logic                 parity;   // 1: odd targets (predict), 0: even (update)
    logic                 scale;    // scaling step
    dwt_op_e              op;
    logic signed [CW-1:0] coef;
    logic [1:0]           sh;
    logic                 neg;
  } step_t;

  state_e        state;
  filter_e       filt_q;
  logic          inv_q;
  logic [2:0]    nlev_q;
  logic [2:0]    lvl;
  logic [3:0]    step;
  logic [IW-1:0] i_cnt, j_cnt;
  logic [3:0]    drain_cnt;
  step_t         st;
  logic [IW-1:0] m_size;
  logic [3:0]    nsteps;

  // Lifting step of the forward transform, k = 0..3 along one dimension
  function automatic step_t lift_step(filter_e f, logic [1:0] k);
    step_t s;
    s = '0;
    s.parity = ~k[0];
    if (f == FILT_53) begin
      s.op  = OP_SHIFT;
      s.sh  = k[0] ? 2'd2 : 2'd1;   // update: 1/4, predict: -1/2
      s.neg = ~k[0];
    end else begin
      s.op = OP_MULT;
      case (k)
        2'd0: s.coef = C97_ALPHA;
        2'd1: s.coef = C97_BETA;
        2'd2: s.coef = C97_GAMMA;
        default: s.coef = C97_DELTA;
      endcase
    end
    return s;
  endfunction

  // Step descriptor for iteration n of a level
  function automatic step_t step_desc(filter_e f, logic inv, logic [3:0] n);
    step_t s;
    logic [3:0] lps;      // lifting steps per dimension
    logic [3:0] fwd_n;    // index in forward order
    lps = (f == FILT_53) ? 4'd2 : 4'd4;
    s = '0;
    if (f == FILT_97 && ((!inv && n == 4'd8) || (inv && n == 4'd0))) begin
      s.scale = 1'b1;
      s.op    = OP_SCALE;
    end else begin
      if (!inv) fwd_n = n;
      else      fwd_n = (f == FILT_53) ? 4'd3 - n : 4'd8 - n;
      s = lift_step(f, 2'(fwd_n % lps));
      s.rowpass = (fwd_n >= lps);
    end
    return s;
  endfunction

  always_comb begin
    st     = step_desc(filt_q, inv_q, step);
    m_size = IW'(N >> lvl);
    nsteps = (filt_q == FILT_53) ? 4'd4 : 4'd9;
  end

  // ---------------- address generator
  function automatic logic [ADDR_W-1:0] mk_addr(logic rowpass, logic [IW-1:0] along,
                                                logic [IW-1:0] line, logic [2:0] l);
    logic [LOGN-1:0] r, c;
    if (rowpass) begin r = LOGN'(line << l);  c = LOGN'(along << l); end
    else         begin r = LOGN'(along << l); c = LOGN'(line << l);  end
    return ADDR_W'({r, c});
  endfunction

  logic [IW-1:0] i_right;
  logic          mirror_l, mirror_r;
  logic          last_in_line, last_line;
  logic          issue, preload;

  always_comb begin
    mirror_l     = (i_cnt == '0);
    mirror_r     = (i_cnt + 1'b1 >= m_size);
    i_right      = mirror_r ? i_cnt - 1'b1 : i_cnt + 1'b1;
    last_in_line = (i_cnt + IW'(2) >= m_size);
    last_line    = (j_cnt + 1'b1 == m_size);
    issue        = (state == S_RUN);
    preload      = (state == S_PRELOAD);
    if (st.scale) begin
      ra_addr = mk_addr(1'b1, i_cnt, j_cnt, lvl);
      rb_addr = mk_addr(1'b1, i_cnt, j_cnt, lvl);
    end else if (preload) begin
      ra_addr = mk_addr(st.rowpass, '0, j_cnt, lvl);
      rb_addr = ra_addr;
    end else begin
      ra_addr = mk_addr(st.rowpass, i_right, j_cnt, lvl);
      rb_addr = mk_addr(st.rowpass, i_cnt, j_cnt, lvl);
    end
  end

  // ---------------- signal generator and counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      filt_q <= FILT_53; inv_q <= 1'b0; nlev_q <= 3'd1;
      lvl <= '0; step <= '0; i_cnt <= '0; j_cnt <= '0; drain_cnt <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          filt_q <= filter;
          inv_q  <= inverse;
          nlev_q <= levels;
          lvl    <= inverse ? levels - 3'd1 : 3'd0;
          step   <= '0;
          state  <= S_SETUP;
        end
        S_SETUP: begin
          j_cnt <= '0;
          i_cnt <= st.scale ? '0 : IW'(st.parity);
          state <= (!st.scale && st.parity) ? S_PRELOAD : S_RUN;
        end
        S_PRELOAD: state <= S_RUN;
        S_RUN: begin
          if (last_in_line) begin
            if (last_line) begin
              drain_cnt <= '0;
              state     <= S_DRAIN;
            end else begin
              j_cnt <= j_cnt + 1'b1;
              if (st.scale) i_cnt <= j_cnt[0] ? IW'(0) : IW'(1);
              else          i_cnt <= IW'(st.parity);
              state <= (!st.scale && st.parity) ? S_PRELOAD : S_RUN;
            end
          end else begin
            i_cnt <= i_cnt + IW'(2);
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 4'd8) begin
            if (step + 1'b1 == nsteps) begin
              step <= '0;
              if (inv_q ? (lvl == 3'd0) : (lvl + 1'b1 == nlev_q)) state <= S_DONE;
              else begin
                lvl   <= inv_q ? lvl - 1'b1 : lvl + 1'b1;
                state <= S_SETUP;
              end
            end else begin
              step  <= step + 1'b1;
              state <= S_SETUP;
            end
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The number of levels must fit the tile and the LEVELS the design is built for.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && state == S_IDLE) |-> (levels >= 3'd1 && 32'(levels) <= LEVELS));

  // ---------------- data path controls, aligned with the read data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0; d_preload <= 1'b0;
    end else begin
      d_valid   <= issue;
      d_preload <= preload;
    end
  end

  always_ff @(posedge clk) begin
    d_mirror_l <= mirror_l && !st.scale;
    d_mirror_r <= mirror_r && !st.scale;
    d_addr     <= rb_addr;
    d_op       <= st.op;
    d_sh       <= st.sh;
    d_neg      <= st.neg;
    d_sub      <= inv_q;
    if (st.scale)
      // LL (even row) and HH (odd row) samples
      d_coef <= (j_cnt[0] ^ inv_q) ? C97_K2 : C97_INVK2;
    else
      d_coef <= st.coef;
  end

endmodule
