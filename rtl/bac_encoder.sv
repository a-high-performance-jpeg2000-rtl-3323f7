// bac_encoder: MQ binary arithmetic encoder with bypass (raw) mode.
//
// The coder reads context/data pairs from its CXD buffer and writes code
// bytes. For a context the Info table (NCTX = 19 entries of 7 bits: 6-bit
// Q-index and MPS) gives the state, the Q table gives the LPS probability
// estimate Qe. The interval register A (16 bits) and the code register C
// (32 bits) are updated as
//   MPS: A = A - Qe, C = C + Qe      LPS: A = Qe   (with conditional exchange)
// and renormalised by single-bit left shifts of A and C until A[15] = 1.
// The counter CT (started at 12) counts shifts; at zero the byte in B is
// output and the next byte is taken from C, with the carry resolved from
// C[27] and a stuffed bit after every 0xFF byte (CT reloads to 7 or 8).
// The update logic computes the next Q-index and MPS (NMPS / NLPS / SWITCH
// of JPEG2000 Part 1) and writes them back to the Info table on a
// renormalisation. C + Qe is done by a 16-bit adder in two steps: the low
// half first, the high half only when the low half carries.
//
// Bypass: a pair with context CX_RAW carries a bit that is not arithmetic
// coded. On the first raw bit after arithmetic-coded symbols the MQ code
// word is terminated (FLUSH of JPEG2000 Part 1); raw bits are then packed
// MSB first into bytes, with only 7 bits in the byte after a 0xFF. On the
// first arithmetic-coded symbol after raw bits, a partly filled raw byte is
// padded with zeros and written, and the MQ registers are re-initialised
// (A = 0x8000, C = 0, CT = 12) while the Info table keeps its states. The
// pair CX_END ends the code block: the open segment is terminated the same
// way, cb_done pulses and the Info table is re-initialised for the next
// block (contexts 0, 17, 18 start at Q-index 4, 3, 46, all others at 0).
//
// Interface: in_valid / in_ready handshake towards the CXD buffer;
// out_valid pulses for one cycle with each output byte (no backpressure;
// the bytes go to external memory). init restarts the coder (Info table,
// registers) and is also applied after every CX_END. Timing: an MPS
// without renormalisation takes 5 cycles (wait, Info read, Q read,
// arithmetic, C addition), plus one cycle for a carry into C[31:16] and one
// per renormalisation shift and byte output.
module bac_encoder
  import jp2k_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       in_valid,
  output logic       in_ready,
  input  cxd_t       in_data,
  output logic       out_valid,
  output logic [7:0] out_byte,
  output logic       cb_done,
  output logic       busy
);

  typedef enum logic [4:0] {
    S_INIT, S_WAIT, S_LOOK, S_QLOOK, S_ARITH, S_CADD_LO, S_CADD_HI,
    S_RENORM, S_BYTEOUT, S_FL_SET, S_FL_SH1, S_FL_SH2, S_FL_LAST,
    S_RAWBIT, S_RAWPAD, S_DONE
  } state_e;

  typedef enum logic [1:0] {RET_RENORM, RET_FL1, RET_FL2} ret_e;

  typedef struct packed {
    logic       mps;
    logic [5:0] idx;
  } info_t;

  state_e         state;
  ret_e           ret;
  info_t          info [NCTX];
  logic [4:0]     init_cnt;

  logic [15:0]    a_reg, q_reg;
  logic [31:0]    c_reg;
  logic [7:0]     b_reg;
  logic [3:0]     ct;
  logic [CXW-1:0] cx_reg;
  logic           sym_reg;
  logic [5:0]     qidx;
  logic           mps;
  logic           first;      // B holds the dummy byte in front of the segment
  logic           mq_dirty;   // symbols coded since the last (re)initialisation
  logic           raw_mode;
  logic [7:0]     raw_acc;
  logic [3:0]     raw_cnt, raw_lim;
  logic           renorm_q;
  logic           pend_end;

  // adder results
  logic [15:0]    a_sub;
  logic [16:0]    c_lo_sum;
  logic [31:0]    tempc, c_set;

  always_comb begin
    a_sub    = a_reg - q_reg;
    c_lo_sum = {1'b0, c_reg[15:0]} + {1'b0, q_reg};
    tempc    = c_reg + {16'd0, a_reg};
    c_set    = c_reg | 32'h0000_FFFF;
    if (c_set >= tempc) c_set = c_set - 32'h0000_8000;
  end

  assign in_ready = (state == S_WAIT);
  assign busy     = (state != S_WAIT) || in_valid;

  // byte output procedure (BYTEOUT), as a function of B and C
  typedef struct packed {
    logic        emit;
    logic [7:0]  ebyte;
    logic [7:0]  b;
    logic [31:0] c;
    logic [3:0]  ct;
  } bo_t;

  function automatic bo_t byteout(logic [7:0] b, logic [31:0] c);
    bo_t r;
    logic [7:0] binc;
    r.emit = 1'b1;
    if (b == 8'hFF) begin
      r.ebyte = b; r.b = c[27:20]; r.c = c & 32'h000F_FFFF; r.ct = 4'd7;
    end else if (!c[27]) begin
      r.ebyte = b; r.b = c[26:19]; r.c = c & 32'h0007_FFFF; r.ct = 4'd8;
    end else begin
      binc = b + 8'd1;
      if (binc == 8'hFF) begin
        r.ebyte = binc; r.b = c[27:20] & 8'h7F; r.c = c & 32'h000F_FFFF; r.ct = 4'd7;
      end else begin
        r.ebyte = binc; r.b = c[26:19]; r.c = c & 32'h0007_FFFF; r.ct = 4'd8;
      end
    end
    return r;
  endfunction

  bo_t bo;
  assign bo = byteout(b_reg, c_reg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; init_cnt <= '0; ret <= RET_RENORM;
      a_reg <= 16'h8000; c_reg <= '0; b_reg <= '0; ct <= 4'd12; q_reg <= '0;
      cx_reg <= '0; sym_reg <= 1'b0; qidx <= '0; mps <= 1'b0;
      first <= 1'b1; mq_dirty <= 1'b0; raw_mode <= 1'b0;
      raw_acc <= '0; raw_cnt <= '0; raw_lim <= 4'd8; renorm_q <= 1'b0;
      pend_end <= 1'b0;
      out_valid <= 1'b0; out_byte <= '0; cb_done <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      cb_done   <= 1'b0;
      if (init) begin
        state <= S_INIT; init_cnt <= '0;
      end else begin
        case (state)
          // ------------------------------------------------ initialisation
          S_INIT: begin
            info[init_cnt] <= '{mps: 1'b0, idx: mq_init_idx(init_cnt)};
            init_cnt <= init_cnt + 1'b1;
            a_reg <= 16'h8000; c_reg <= '0; b_reg <= '0; ct <= 4'd12;
            first <= 1'b1; mq_dirty <= 1'b0; raw_mode <= 1'b0;
            raw_cnt <= '0; raw_lim <= 4'd8; pend_end <= 1'b0;
            if (init_cnt == 5'(NCTX - 1)) state <= S_WAIT;
          end
          // ------------------------------------------------ next pair
          S_WAIT: if (in_valid) begin
            cx_reg  <= in_data.cx;
            sym_reg <= in_data.d;
            if (in_data.cx == CX_END) begin
              pend_end <= 1'b1;
              if (raw_mode)      state <= S_RAWPAD;
              else if (mq_dirty) state <= S_FL_SET;
              else               state <= S_DONE;
            end else if (in_data.cx == CX_RAW) begin
              if (!raw_mode && mq_dirty) begin
                state    <= S_FL_SET;
              end else begin
                state <= S_RAWBIT;
              end
            end else begin
              if (raw_mode) state <= S_RAWPAD;
              else          state <= S_LOOK;
            end
          end
          // ------------------------------------------------ arithmetic coding
          S_LOOK: begin
            qidx     <= info[cx_reg].idx;
            mps      <= info[cx_reg].mps;
            mq_dirty <= 1'b1;
            state    <= S_QLOOK;
          end
          S_QLOOK: begin
            q_reg <= mq_qe(qidx);
            state <= S_ARITH;
          end
          S_ARITH: begin
            logic add_c, ren;
            add_c = 1'b0;
            ren   = 1'b1;
            if (sym_reg == mps) begin
              if (a_sub[15]) begin
                a_reg <= a_sub; add_c = 1'b1; ren = 1'b0;
              end else begin
                if (a_sub < q_reg) a_reg <= q_reg;
                else begin a_reg <= a_sub; add_c = 1'b1; end
                info[cx_reg] <= '{mps: mps, idx: mq_nmps(qidx)};
              end
            end else begin
              if (a_sub < q_reg) begin a_reg <= a_sub; add_c = 1'b1; end
              else a_reg <= q_reg;
              info[cx_reg] <= '{mps: mq_switch(qidx) ? ~mps : mps, idx: mq_nlps(qidx)};
            end
            renorm_q <= ren;
            if (add_c)    state <= S_CADD_LO;
            else if (ren) state <= S_RENORM;
            else          state <= S_WAIT;
          end
          S_CADD_LO: begin
            c_reg[15:0] <= c_lo_sum[15:0];
            if (c_lo_sum[16]) state <= S_CADD_HI;
            else              state <= renorm_q ? S_RENORM : S_WAIT;
          end
          S_CADD_HI: begin
            c_reg[31:16] <= c_reg[31:16] + 16'd1;
            state <= renorm_q ? S_RENORM : S_WAIT;
          end
          S_RENORM: begin
            a_reg <= {a_reg[14:0], 1'b0};
            c_reg <= {c_reg[30:0], 1'b0};
            ct    <= ct - 4'd1;
            if (ct == 4'd1) begin
              ret   <= RET_RENORM;
              state <= S_BYTEOUT;
            end else if (a_reg[14]) begin
              state <= S_WAIT;
            end
          end
          S_BYTEOUT: begin
            if (!first) begin
              out_valid <= 1'b1;
              out_byte  <= bo.ebyte;
            end
            first <= 1'b0;
            b_reg <= bo.b;
            c_reg <= bo.c;
            ct    <= bo.ct;
            case (ret)
              RET_RENORM: state <= a_reg[15] ? S_WAIT : S_RENORM;
              RET_FL1:    state <= S_FL_SH2;
              default:    state <= S_FL_LAST;
            endcase
          end
          // ------------------------------------------------ termination (FLUSH)
          S_FL_SET: begin
            c_reg <= c_set;
            state <= S_FL_SH1;
          end
          S_FL_SH1: begin
            c_reg <= c_reg << ct;
            ret   <= RET_FL1;
            state <= S_BYTEOUT;
          end
          S_FL_SH2: begin
            c_reg <= c_reg << ct;
            ret   <= RET_FL2;
            state <= S_BYTEOUT;
          end
          S_FL_LAST: begin
            if (b_reg != 8'hFF && !first) begin
              out_valid <= 1'b1;
              out_byte  <= b_reg;
            end
            mq_dirty <= 1'b0;
            if (pend_end) state <= S_DONE;
            else begin
              // enter raw mode with the pending bit
              state    <= S_RAWBIT;
            end
          end
          // ------------------------------------------------ raw (bypass) bits
          S_RAWBIT: begin
            logic [7:0] nacc;
            nacc = {raw_acc[6:0], sym_reg} & ((raw_lim == 4'd7) ? 8'h7F : 8'hFF);
            raw_mode <= 1'b1;
            if (raw_cnt + 4'd1 == raw_lim) begin
              out_valid <= 1'b1;
              out_byte  <= nacc;
              raw_cnt   <= '0;
              raw_lim   <= (nacc == 8'hFF) ? 4'd7 : 4'd8;
            end else begin
              raw_cnt <= raw_cnt + 4'd1;
            end
            raw_acc <= nacc;
            state   <= S_WAIT;
          end
          S_RAWPAD: begin
            if (raw_cnt != '0) begin
              out_valid <= 1'b1;
              out_byte  <= (raw_acc << (raw_lim - raw_cnt)) & ((raw_lim == 4'd7) ? 8'h7F : 8'hFF);
            end
            raw_mode <= 1'b0;
            raw_cnt  <= '0;
            raw_lim  <= 4'd8;
            // restart the arithmetic coder
            a_reg <= 16'h8000; c_reg <= '0; b_reg <= '0; ct <= 4'd12;
            first <= 1'b1;
            state <= pend_end ? S_DONE : S_LOOK;
          end
          S_DONE: begin
            cb_done  <= 1'b1;
            init_cnt <= '0;
            state    <= S_INIT;
          end
          default: state <= S_INIT;
        endcase
      end
    end
  end

endmodule
