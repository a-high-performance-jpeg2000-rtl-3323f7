// bpc_decoder: EBCOT bit-plane decoder (regular mode, no bypass).
//
// The decoding counterpart of bpc_encoder. It walks a code block of up to
// R x C samples (height a multiple of 4) in exactly the encoder's order -
// plane numbps-1 with the clean-up pass only, then SP, MRP and CP for every
// lower plane, strip by strip, column by column, top to bottom - and for
// every bit that the encoder coded it forms the same context from the same
// state bits (sigma, eta, sigma', chi in R x C arrays, vertically causal
// mode) and asks the MQ decoder for the decision. The decisions rebuild the
// magnitude bits and signs of the block in a word array (the v and chi
// memories of the decoder), which is read out as sign-magnitude words
// through a synchronous read port (for the data formatter in decode mode).
//
// Per sample: ZC (contexts 0-8) gives the magnitude bit in SP and CP; a one
// is followed by SC (9-13), whose decision XOR the table's XOR bit is the
// sign; MRC (14-16) gives the bit of a significant sample in MRP; RLC gives
// context 17 ("one of the four samples is significant") and then the zero
// index with context 18, MSB first, one bit at a time.
//
// Interface: cx_valid / cx_ready / cx hand a context to the MQ decoder; the
// decoder answers with d_valid / d. The coder waits for each decision
// before it forms the next context. start loads band, numbps and the block
// size and clears the state and the words; done pulses at the end. The
// word port (rd_en, rd_row, rd_col -> rd_data one cycle later) may be used
// while the decoder is idle.
module bpc_decoder
  import jp2k_pkg::*;
#(
  parameter int unsigned R = 32,
  parameter int unsigned C = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  band_e                  band,
  input  logic [3:0]             numbps,     // number of magnitude planes coded
  input  logic [$clog2(R):0]     cb_h,       // rows, multiple of 4, <= R
  input  logic [$clog2(C):0]     cb_w,       // columns, <= C
  output logic                   busy,
  output logic                   done,
  // MQ decoder
  output logic                   cx_valid,
  input  logic                   cx_ready,
  output logic [CXW-1:0]         cx,
  input  logic                   d_valid,
  input  logic                   d,
  // decoded words
  input  logic                   rd_en,
  input  logic [$clog2(R)-1:0]   rd_row,
  input  logic [$clog2(C)-1:0]   rd_col,
  output logic [15:0]            rd_data     // {sign, magnitude[14:0]}
);

  localparam int unsigned RW = $clog2(R);
  localparam int unsigned CWD = $clog2(C);
  localparam int unsigned SW = $clog2(R / 4);

  typedef enum logic [1:0] {P_SP, P_MRP, P_CP} pass_e;
  typedef enum logic [3:0] {
    S_IDLE, S_PASS, S_COL, S_ROW, S_SC,
    S_RLC, S_RLC_Z1, S_RLC_Z0, S_NEXTCOL, S_DONE
  } state_e;

  state_e       state;
  pass_e        pass;
  band_e        band_q;
  logic [3:0]   plane;
  logic [RW:0]  h_q;
  logic [CWD:0] w_q;
  logic [SW-1:0]  strip;
  logic [CWD-1:0] col;
  logic [1:0]   row;
  logic         zi1;
  logic         wait_q;      // context handed over, decision pending

  logic sig  [R][C];
  logic vis  [R][C];
  logic refd [R][C];
  logic chi  [R][C];
  logic [14:0] mag [R][C];

  // ---------------------------------------------------------------- neighbourhood
  logic [RW-1:0] r_cur;
  assign r_cur = RW'({strip, row});

  function automatic logic sig_at(int rr, int cc, int hh, int ww);
    if (rr < 0 || cc < 0 || rr >= hh || cc >= ww) return 1'b0;
    return sig[rr][cc];
  endfunction
  function automatic logic neg_at(int rr, int cc, int hh, int ww);
    if (rr < 0 || cc < 0 || rr >= hh || cc >= ww) return 1'b0;
    return chi[rr][cc];
  endfunction

  logic nh0, nh1, nv0, nv1, nd0, nd1, nd2, nd3;
  logic xh0, xh1, xv0, xv1;
  logic [1:0] hcnt, vcnt;
  logic [2:0] dcnt;
  logic nhood0, vc_edge;
  logic [CXW-1:0] zc_cx, mr_cx, sc_cx;
  logic sc_xor;
  logic rlc_ok;
  logic cur_sig, cur_vis, row_valid;

  always_comb begin
    int r, c, hh, ww;
    r  = int'(r_cur);
    c  = int'(col);
    hh = int'(h_q);
    ww = int'(w_q);
    vc_edge = (row == 2'd3);
    nh0 = sig_at(r, c - 1, hh, ww);
    nh1 = sig_at(r, c + 1, hh, ww);
    nv0 = sig_at(r - 1, c, hh, ww);
    nv1 = vc_edge ? 1'b0 : sig_at(r + 1, c, hh, ww);
    nd0 = sig_at(r - 1, c - 1, hh, ww);
    nd1 = sig_at(r - 1, c + 1, hh, ww);
    nd2 = vc_edge ? 1'b0 : sig_at(r + 1, c + 1, hh, ww);
    nd3 = vc_edge ? 1'b0 : sig_at(r + 1, c - 1, hh, ww);
    xh0 = neg_at(r, c - 1, hh, ww);
    xh1 = neg_at(r, c + 1, hh, ww);
    xv0 = neg_at(r - 1, c, hh, ww);
    xv1 = vc_edge ? 1'b0 : neg_at(r + 1, c, hh, ww);
    hcnt = 2'(nh0) + 2'(nh1);
    vcnt = 2'(nv0) + 2'(nv1);
    dcnt = 3'(nd0) + 3'(nd1) + 3'(nd2) + 3'(nd3);
    nhood0 = !(nh0 | nh1 | nv0 | nv1 | nd0 | nd1 | nd2 | nd3);
    zc_cx = zc_context(band_q, hcnt, vcnt, dcnt);
    mr_cx = mr_context(refd[r][c], nhood0);
    {sc_cx, sc_xor} = sc_context(nh0, xh0, nh1, xh1, nv0, xv0, nv1, xv1);

    cur_sig = sig[r][c];
    cur_vis = vis[r][c];
    row_valid = (r < hh);

    // run-length condition of the strip column (as in the encoder)
    rlc_ok = 1'b1;
    for (int dr = -1; dr < 4; dr++)
      for (int dc = -1; dc <= 1; dc++)
        if (sig_at(int'(strip) * 4 + dr, c + dc, hh, ww)) rlc_ok = 1'b0;
    for (int dr = 0; dr < 4; dr++)
      if (vis[int'(strip) * 4 + dr][c]) rlc_ok = 1'b0;
  end

  // ---------------------------------------------------------------- context request
  logic need;          // the current state codes a symbol
  logic [CXW-1:0] need_cx;
  always_comb begin
    need    = 1'b0;
    need_cx = '0;
    case (state)
      S_ROW: if (row_valid) begin
        case (pass)
          P_SP:    begin need = !cur_sig && !nhood0; need_cx = zc_cx; end
          P_MRP:   begin need = cur_sig && !cur_vis; need_cx = mr_cx; end
          default: begin need = !cur_sig && !cur_vis; need_cx = zc_cx; end
        endcase
      end
      S_SC:     begin need = 1'b1; need_cx = sc_cx; end
      S_RLC:    begin need = 1'b1; need_cx = CX_RUN; end
      S_RLC_Z1,
      S_RLC_Z0: begin need = 1'b1; need_cx = CX_UNI; end
      default: ;
    endcase
  end

  assign cx_valid = need && !wait_q;
  assign cx       = need_cx;

  // a state advances when it needs no symbol, or when its decision arrives
  logic adv;
  assign adv = need ? (wait_q && d_valid) : 1'b1;

  assign busy = (state != S_IDLE);

  // ---------------------------------------------------------------- controller
  logic last_col, last_strip;
  assign last_col   = (CWD + 1)'(col) + 1'b1 >= w_q;
  assign last_strip = (RW + 1)'({strip, 2'b11}) + 1'b1 >= h_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pass <= P_CP; done <= 1'b0; wait_q <= 1'b0;
      band_q <= BAND_LL; plane <= '0;
      h_q <= '0; w_q <= '0; strip <= '0; col <= '0; row <= '0; zi1 <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cx_valid && cx_ready) wait_q <= 1'b1;
      else if (d_valid)         wait_q <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          band_q <= band;
          h_q <= cb_h; w_q <= cb_w;
          plane <= numbps - 4'd1;
          pass  <= P_CP;
          state <= (numbps == '0) ? S_DONE : S_PASS;
        end
        S_PASS: begin
          strip <= '0; col <= '0;
          state <= S_COL;
        end
        S_COL: begin
          row   <= '0;
          state <= (pass == P_CP && rlc_ok) ? S_RLC : S_ROW;
        end
        S_RLC: if (adv) state <= d ? S_RLC_Z1 : S_NEXTCOL;
        S_RLC_Z1: if (adv) begin
          zi1   <= d;
          state <= S_RLC_Z0;
        end
        S_RLC_Z0: if (adv) begin
          row   <= {zi1, d};
          state <= S_SC;
        end
        S_ROW: if (adv) begin
          if (need && pass != P_MRP && d) state <= S_SC;
          else if (row == 2'd3) state <= S_NEXTCOL;
          else row <= row + 2'd1;
        end
        S_SC: if (adv) begin
          if (row == 2'd3) state <= S_NEXTCOL;
          else begin
            row   <= row + 2'd1;
            state <= S_ROW;
          end
        end
        S_NEXTCOL: begin
          if (!last_col) begin
            col   <= col + 1'b1;
            state <= S_COL;
          end else if (!last_strip) begin
            col   <= '0;
            strip <= strip + 1'b1;
            state <= S_COL;
          end else begin
            case (pass)
              P_SP:  begin pass <= P_MRP; state <= S_PASS; end
              P_MRP: begin pass <= P_CP;  state <= S_PASS; end
              default: begin
                if (plane == '0) state <= S_DONE;
                else begin
                  plane <= plane - 4'd1;
                  pass  <= P_SP;
                  state <= S_PASS;
                end
              end
            endcase
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

  // ---------------------------------------------------------------- state bits and words
  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      for (int i = 0; i < R; i++)
        for (int j = 0; j < C; j++) begin
          sig[i][j] <= 1'b0; vis[i][j] <= 1'b0; refd[i][j] <= 1'b0; chi[i][j] <= 1'b0;
          mag[i][j] <= '0;
        end
    end else if (state == S_NEXTCOL && last_col && last_strip && pass == P_CP) begin
      for (int i = 0; i < R; i++)
        for (int j = 0; j < C; j++) vis[i][j] <= 1'b0;
    end else if (adv) begin
      if (state == S_ROW && need) begin
        if (pass == P_MRP) refd[r_cur][col] <= 1'b1;
        vis[r_cur][col] <= 1'b1;
        if (d) mag[r_cur][col][plane] <= 1'b1;
      end
      if (state == S_RLC_Z0) mag[RW'({strip, zi1, d})][col][plane] <= 1'b1;
      if (state == S_SC) begin
        sig[r_cur][col] <= 1'b1;
        chi[r_cur][col] <= d ^ sc_xor;
      end
    end
  end

  always_ff @(posedge clk)
    if (rd_en) rd_data <= {chi[rd_row][rd_col] && (mag[rd_row][rd_col] != '0), mag[rd_row][rd_col]};

  // A decision arrives only while one is pending.
  assert property (@(posedge clk) disable iff (!rst_n) d_valid |-> wait_q);

endmodule
