// bac_decoder: MQ binary arithmetic decoder (arithmetic-coded segments).
//
// The inverse of bac_encoder for the arithmetic-coded part of a code-block
// stream. The bit-plane decoder presents one context at a time (cx_valid /
// cx_ready; in the decoder no FIFO is possible, since the next context
// depends on the decision) and receives the decision on d_valid / d. The
// registers are the encoder's: A (interval, 16 bits), C (32 bits; the
// comparison and subtraction use C[31:16]), the byte register B plus a
// one-byte look-ahead, the counter CT, Q-index and MPS from the Info table
// and Qe from the Q table. The decoding follows JPEG2000 Part 1:
//   A = A - Qe; if C[31:16] < Qe: LPS path (conditional exchange),
//   else C[31:16] -= Qe and, when A < 0x8000, MPS path (exchange);
//   renormalisation doubles A and C, reading a byte when CT reaches zero.
// Byte input: after a 0xFF byte only 7 bits are taken (bit stuffing); a
// 0xFF followed by a byte above 0x8F is a marker and is not consumed, the
// decoder then shifts in ones. The host delivers the code-block bytes and
// then keeps supplying 0xFF (in_valid / in_ready / in_byte).
//
// init restarts the decoder for a new code block: the Info table is
// re-initialised (19 cycles, contexts 0, 17 and 18 at Q-index 4, 3 and 46),
// the first two bytes are read and C, A and CT are set up (INITDEC).
// Raw (bypass) segments are not decoded: their positions in the byte
// stream are needed and the encoder does not report them.
//
// Timing: a decision without renormalisation takes 4 cycles after the
// context is taken (Info read, Qe read, arithmetic, decision); each
// renormalisation shift and byte read adds one cycle.
module bac_decoder
  import jp2k_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  // context from the bit-plane decoder
  input  logic           cx_valid,
  output logic           cx_ready,
  input  logic [CXW-1:0] cx,
  output logic           d_valid,
  output logic           d,
  // code bytes
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [7:0]     in_byte,
  output logic           busy
);

  typedef enum logic [3:0] {
    S_TINIT, S_LOAD0, S_LOAD1, S_INIT_SH, S_WAIT, S_LOOK, S_QLOOK,
    S_DEC, S_RENORM, S_BYTEIN, S_OUT
  } state_e;

  typedef struct packed {
    logic       mps;
    logic [5:0] idx;
  } info_t;

  state_e         state;
  info_t          info [NCTX];
  logic [4:0]     init_cnt;
  logic [15:0]    a_reg, q_reg;
  logic [31:0]    c_reg;
  logic [7:0]     b_cur, b_next;
  logic [3:0]     ct;
  logic [CXW-1:0] cx_reg;
  logic [5:0]     qidx;
  logic           mps, dec;
  logic           after_init;  // BYTEIN issued by INITDEC

  assign cx_ready = (state == S_WAIT);
  assign busy     = (state != S_WAIT);

  // byte-in decision
  logic marker, consume;
  assign marker  = (b_cur == 8'hFF) && (b_next > 8'h8F);
  assign consume = !marker;
  assign in_ready = (state == S_LOAD0) || (state == S_LOAD1) || (state == S_BYTEIN && consume);

  logic [15:0] a_sub;
  assign a_sub = a_reg - q_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_TINIT; init_cnt <= '0; d_valid <= 1'b0; d <= 1'b0;
      a_reg <= '0; q_reg <= '0; c_reg <= '0; b_cur <= '0; b_next <= '0; ct <= '0;
      cx_reg <= '0; qidx <= '0; mps <= 1'b0; dec <= 1'b0; after_init <= 1'b0;
    end else begin
      d_valid <= 1'b0;
      if (init) begin
        state <= S_TINIT; init_cnt <= '0;
      end else begin
        case (state)
          S_TINIT: begin
            info[init_cnt] <= '{mps: 1'b0, idx: mq_init_idx(init_cnt)};
            init_cnt <= init_cnt + 1'b1;
            if (init_cnt == 5'(NCTX - 1)) state <= S_LOAD0;
          end
          S_LOAD0: if (in_valid) begin b_cur <= in_byte; state <= S_LOAD1; end
          S_LOAD1: if (in_valid) begin
            b_next <= in_byte;
            c_reg  <= {8'h00, b_cur, 16'h0000};
            after_init <= 1'b1;
            state  <= S_BYTEIN;
          end
          S_INIT_SH: begin
            c_reg <= c_reg << 7;
            ct    <= ct - 4'd7;
            a_reg <= 16'h8000;
            after_init <= 1'b0;
            state <= S_WAIT;
          end
          // ------------------------------------------------ one decision
          S_WAIT: if (cx_valid) begin
            cx_reg <= cx;
            state  <= S_LOOK;
          end
          S_LOOK: begin
            qidx  <= info[cx_reg].idx;
            mps   <= info[cx_reg].mps;
            state <= S_QLOOK;
          end
          S_QLOOK: begin
            q_reg <= mq_qe(qidx);
            state <= S_DEC;
          end
          S_DEC: begin
            if (c_reg[31:16] < q_reg) begin
              // LPS sub-interval (with conditional exchange)
              a_reg <= q_reg;
              if (a_sub < q_reg) begin
                dec <= mps;
                info[cx_reg] <= '{mps: mps, idx: mq_nmps(qidx)};
              end else begin
                dec <= ~mps;
                info[cx_reg] <= '{mps: mq_switch(qidx) ? ~mps : mps, idx: mq_nlps(qidx)};
              end
              state <= S_RENORM;
            end else begin
              c_reg[31:16] <= c_reg[31:16] - q_reg;
              a_reg <= a_sub;
              if (!a_sub[15]) begin
                if (a_sub < q_reg) begin
                  dec <= ~mps;
                  info[cx_reg] <= '{mps: mq_switch(qidx) ? ~mps : mps, idx: mq_nlps(qidx)};
                end else begin
                  dec <= mps;
                  info[cx_reg] <= '{mps: mps, idx: mq_nmps(qidx)};
                end
                state <= S_RENORM;
              end else begin
                dec   <= mps;
                state <= S_OUT;
              end
            end
          end
          S_RENORM: begin
            if (ct == 4'd0) state <= S_BYTEIN;
            else begin
              a_reg <= a_reg << 1;
              c_reg <= c_reg << 1;
              ct    <= ct - 4'd1;
              if (a_reg[14]) state <= S_OUT;   // A[15] after the shift
            end
          end
          S_BYTEIN: begin
            if (marker) begin
              c_reg <= c_reg + 32'h0000_FF00;
              ct    <= 4'd8;
              state <= after_init ? S_INIT_SH : S_RENORM;
            end else if (in_valid) begin
              if (b_cur == 8'hFF) begin
                c_reg <= c_reg + {15'd0, b_next, 9'd0};
                ct    <= 4'd7;
              end else begin
                c_reg <= c_reg + {16'd0, b_next, 8'd0};
                ct    <= 4'd8;
              end
              b_cur  <= b_next;
              b_next <= in_byte;
              state  <= after_init ? S_INIT_SH : S_RENORM;
            end
          end
          S_OUT: begin
            d_valid <= 1'b1;
            d       <= dec;
            state   <= S_WAIT;
          end
          default: state <= S_WAIT;
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (cx_valid && cx_ready) |-> (cx < CXW'(NCTX)));

endmodule
