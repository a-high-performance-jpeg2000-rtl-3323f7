// global_controller: sequencing of the JPEG2000 encoder.
//
// After start the controller
//   1. runs the forward DWT of the tile held in the DWT memory to `levels`
//      levels;
//   2. for every level from the first (finest) to the last, and for every
//      code block of that level, copies the code block of each of the three
//      high-pass sub-bands HL, LH and HH from the DWT memory through data
//      formatter 1, 2, 3 into sub-band memory 1, 2, 3, then starts the three
//      bit-plane coders and waits until all three coder pairs have finished
//      the block (BPC done and BAC cb_done);
//   3. after the last level codes the remaining LL band with pair 1 (the HL
//      pair, index 0 here) in the same way, block by block.
// Sub-bands larger than CB x CB samples are split into CB x CB code blocks
// (for a 128 x 128 tile and CB = 32: four blocks per sub-band at level 1,
// one block at the other levels).
//
// The copy reads one coefficient per cycle from the DWT memory, taking the
// three sub-bands in turn (staggered access), so one read port suffices.
// The DWT memory returns the word one cycle after the address; the
// formatter adds one more cycle. Coefficient (i, j) of a sub-band of level
// l (1-based, s = 2^(l-1)) is read from row 2i*s (+s for LH, HH) and column
// 2j*s (+s for HL, HH); the final LL from row i*2^L, column j*2^L.
//
// Per code block the controller pulses cb_start (clears the formatters'
// plane detectors and the CXD buffers) and, when the coders start,
// cb_valid[k] with the block's position for the host that assembles the
// code stream. Timing: start is taken when busy is low; done pulses once.
module global_controller
  import jp2k_pkg::*;
#(
  parameter int unsigned N      = 128,
  parameter int unsigned LEVELS = 5,
  parameter int unsigned CB     = 32,
  parameter int unsigned ADDR_W = $clog2(N * N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [2:0]               levels,
  output logic                     busy,
  output logic                     done,
  // DWT
  output logic                     dwt_start,
  input  logic                     dwt_done,
  output logic [ADDR_W-1:0]        dwt_raddr,
  // data formatters / sub-band memories
  output logic                     cb_start,
  output logic [2:0]               df_valid,     // aligned with the DWT read data
  output logic [$clog2(CB)-1:0]    df_row,
  output logic [$clog2(CB)-1:0]    df_col,
  // coder pairs
  output logic [2:0]               bpc_start,
  output band_e                    bpc_band [3],
  output logic [$clog2(CB):0]      cb_size,
  input  logic [2:0]               bpc_done,
  input  logic [2:0]               bac_done,
  // code-block information for the host
  output logic [2:0]               cb_valid,
  output logic [2:0]               cb_level,
  output logic [$clog2(N/CB):0]    cb_by,
  output logic [$clog2(N/CB):0]    cb_bx
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned LOGCB = $clog2(CB);
  localparam int unsigned BW = $clog2(N / CB) + 1;

  typedef enum logic [2:0] {S_IDLE, S_DWT, S_CB, S_XFER, S_XWAIT, S_CODE, S_DONE} state_e;

  state_e       state;
  logic [2:0]   nlev_q, lvl;          // lvl: 1-based level being coded
  logic         ll_phase;             // coding the final LL band
  logic [BW-1:0] by, bx, nblk;
  logic [LOGCB:0] size;               // code-block side
  logic [LOGCB-1:0] ci, cj;           // sample inside the block
  logic [1:0]   bsel;                 // 0 HL, 1 LH, 2 HH
  logic [2:0]   xwait;
  logic [2:0]   pend_bpc, pend_bac;

  // sub-band side at level lvl
  logic [LOGN:0] sb_size;
  assign sb_size = (LOGN + 1)'(N >> lvl);

  // DWT memory address of the current sample
  always_comb begin
    int gi, gj, s, r, c;
    gi = int'(by) * int'(size) + int'(ci);
    gj = int'(bx) * int'(size) + int'(cj);
    s  = 1 << (int'(lvl) - 1);
    if (ll_phase) begin
      r = gi << int'(lvl);
      c = gj << int'(lvl);
    end else begin
      r = 2 * gi * s + ((bsel != 2'd0) ? s : 0);
      c = 2 * gj * s + ((bsel != 2'd1) ? s : 0);
    end
    dwt_raddr = ADDR_W'((r << LOGN) + c);
  end

  assign busy    = (state != S_IDLE);
  assign cb_size = size;

  always_comb begin
    bpc_band[0] = ll_phase ? BAND_LL : BAND_HL;
    bpc_band[1] = BAND_LH;
    bpc_band[2] = BAND_HH;
  end

  logic last_sample;
  assign last_sample = ((LOGCB + 1)'(ci) + 1'b1 == size) && ((LOGCB + 1)'(cj) + 1'b1 == size) &&
                       (ll_phase || bsel == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; dwt_start <= 1'b0; cb_start <= 1'b0;
      df_valid <= '0; df_row <= '0; df_col <= '0; bpc_start <= '0; cb_valid <= '0;
      nlev_q <= 3'd1; lvl <= 3'd1; ll_phase <= 1'b0; by <= '0; bx <= '0; nblk <= '0;
      size <= '0; ci <= '0; cj <= '0; bsel <= '0; xwait <= '0;
      pend_bpc <= '0; pend_bac <= '0;
      cb_level <= '0; cb_by <= '0; cb_bx <= '0;
    end else begin
      done      <= 1'b0;
      dwt_start <= 1'b0;
      cb_start  <= 1'b0;
      bpc_start <= '0;
      cb_valid  <= '0;
      df_valid  <= '0;
      case (state)
        S_IDLE: if (start) begin
          nlev_q    <= levels;
          dwt_start <= 1'b1;
          state     <= S_DWT;
        end
        S_DWT: if (dwt_done) begin
          lvl      <= 3'd1;
          ll_phase <= 1'b0;
          by <= '0; bx <= '0;
          state    <= S_CB;
        end
        // set up a code block of the current level
        S_CB: begin
          if (sb_size > (LOGN + 1)'(CB)) begin
            size <= (LOGCB + 1)'(CB);
            nblk <= BW'(sb_size >> LOGCB);
          end else begin
            size <= (LOGCB + 1)'(sb_size);
            nblk <= BW'(1);
          end
          ci <= '0; cj <= '0; bsel <= '0;
          cb_start <= 1'b1;
          state    <= S_XFER;
        end
        // copy: one coefficient per cycle, the three sub-bands in turn
        S_XFER: begin
          df_valid <= ll_phase ? 3'b001 : (3'b001 << bsel);
          df_row   <= ci;
          df_col   <= cj;
          if (last_sample) begin
            xwait <= '0;
            state <= S_XWAIT;
          end
          if (!ll_phase && bsel != 2'd2) bsel <= bsel + 2'd1;
          else begin
            bsel <= '0;
            if ((LOGCB + 1)'(cj) + 1'b1 == size) begin
              cj <= '0;
              ci <= ci + 1'b1;
            end else cj <= cj + 1'b1;
          end
        end
        S_XWAIT: begin
          xwait <= xwait + 3'd1;
          if (xwait == 3'd3) begin
            pend_bpc  <= ll_phase ? 3'b001 : 3'b111;
            pend_bac  <= ll_phase ? 3'b001 : 3'b111;
            bpc_start <= ll_phase ? 3'b001 : 3'b111;
            cb_valid  <= ll_phase ? 3'b001 : 3'b111;
            cb_level  <= lvl;
            cb_by     <= by;
            cb_bx     <= bx;
            state     <= S_CODE;
          end
        end
        S_CODE: begin
          pend_bpc <= pend_bpc & ~bpc_done;
          pend_bac <= pend_bac & ~bac_done;
          if (((pend_bpc & ~bpc_done) == '0) && ((pend_bac & ~bac_done) == '0)) begin
            // next code block / level
            if (bx + 1'b1 != nblk) begin
              bx <= bx + 1'b1; state <= S_CB;
            end else if (by + 1'b1 != nblk) begin
              bx <= '0; by <= by + 1'b1; state <= S_CB;
            end else begin
              bx <= '0; by <= '0;
              if (ll_phase) state <= S_DONE;
              else if (lvl == nlev_q) begin
                ll_phase <= 1'b1;
                state    <= S_CB;
              end else begin
                lvl   <= lvl + 3'd1;
                state <= S_CB;
              end
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

  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && state == S_IDLE) |-> (levels >= 3'd1 && 32'(levels) <= LEVELS));

endmodule
