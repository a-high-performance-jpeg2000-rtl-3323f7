// bpc_encoder: EBCOT bit-plane coder (encoder side).
//
// Codes one code block (up to R x C samples, height a multiple of 4) held in
// a subband_memory, from its most significant bit plane (numbps - 1) down
// to plane 0. The first plane is coded with the clean-up pass only; every
// later plane with the significance propagation pass (SP), the magnitude
// refinement pass (MRP) and the clean-up pass (CP). Samples are visited
// strip by strip (four rows), column by column inside a strip and top to
// bottom inside a column. Per sample the coder keeps the state bits
//   sigma  (significant),  eta (coded in this bit plane, cleared after each
//   plane),  sigma' (refined at least once),  chi (sign, kept when the
//   sample becomes significant),
// and reads the magnitude bit v and the sign from the sub-band memory, one
// strip column (4 samples) per read.
//
// Primitives and contexts (numbering shared with the BAC):
//   ZC  contexts 0-8 from the significance of the 8 neighbours (table per
//       sub-band orientation), data v;
//   SC  contexts 9-13 from the horizontal and vertical sign contributions,
//       data sign XOR the table's XOR bit;
//   MRC contexts 14-16 (first refinement without / with significant
//       neighbours, later refinements), data v;
//   RLC context 17 for "one of the four samples becomes significant", then
//       the 2-bit zero index (MSB first) with context 18, then SC.
// Vertically causal mode: the row below a strip is treated as
// insignificant. Neighbours outside the code block are insignificant.
//
// Bypass: with bypass_en, the SP and MRP of the fifth and later coded bit
// planes emit their bits (magnitude and sign) with context CX_RAW instead of
// an arithmetic-coding context. After the last plane the coder emits
// CX_END. An all-zero block (numbps = 0) emits CX_END only.
//
// The state bits are held in R x C bit arrays written one sample at a time;
// the neighbourhood is read from them combinationally. This replaces the
// shift-register/32x4-memory organisation with the same information.
//
// Timing: one cycle per sample visited in a pass, plus one cycle per
// emitted pair beyond the first of a sample, plus two cycles per strip
// column for the memory read. Output pairs use a valid/ready handshake
// (towards the CXD buffer); the coder stalls while out_ready is low.
module bpc_encoder
  import jp2k_pkg::*;
#(
  parameter int unsigned R = 32,
  parameter int unsigned C = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  band_e                  band,
  input  logic [3:0]             numbps,     // number of magnitude planes to code
  input  logic                   bypass_en,
  input  logic [$clog2(R):0]     cb_h,       // rows, multiple of 4, <= R
  input  logic [$clog2(C):0]     cb_w,       // columns, <= C
  output logic                   busy,
  output logic                   done,       // one-cycle pulse after CX_END was taken
  // sub-band memory read port
  output logic                   sm_rd_en,
  output logic [$clog2(R/4)-1:0] sm_strip,
  output logic [$clog2(C)-1:0]   sm_col,
  output logic [3:0]             sm_plane,
  input  logic [3:0]             sm_bits,
  input  logic [3:0]             sm_signs,
  // context/data output
  output logic                   out_valid,
  input  logic                   out_ready,
  output cxd_t                   out_data
);

  localparam int unsigned RW = $clog2(R);
  localparam int unsigned CWD = $clog2(C);
  localparam int unsigned SW = $clog2(R / 4);

  typedef enum logic [1:0] {P_SP, P_MRP, P_CP} pass_e;
  typedef enum logic [3:0] {
    S_IDLE, S_PASS, S_FETCH, S_FETCH_W, S_ROW, S_SC,
    S_RLC, S_RLC_Z1, S_RLC_Z0, S_NEXTCOL, S_END, S_DONE
  } state_e;

  state_e       state;
  pass_e        pass;
  band_e        band_q;
  logic         byp_q;
  logic [3:0]   nbp_q, plane;
  logic [RW:0]  h_q;
  logic [CWD:0] w_q;
  logic [SW-1:0]  strip;
  logic [CWD-1:0] col;
  logic [1:0]   row;
  logic [3:0]   v4, s4;
  logic [1:0]   zi;

  logic sig  [R][C];
  logic vis  [R][C];
  logic refd [R][C];
  logic chi  [R][C];

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
  logic cur_sig, cur_vis, cur_v, cur_s, row_valid;
  logic raw_pass;

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
    cur_v   = v4[row];
    cur_s   = s4[row];
    row_valid = (r < hh);

    // run-length condition for the strip column: the four samples and the
    // 3 x 5 window around them (row above, VC: no row below) insignificant,
    // and none of the four coded in this plane yet
    rlc_ok = 1'b1;
    for (int dr = -1; dr < 4; dr++)
      for (int dc = -1; dc <= 1; dc++)
        if (sig_at(int'(strip) * 4 + dr, c + dc, hh, ww)) rlc_ok = 1'b0;
    for (int dr = 0; dr < 4; dr++)
      if (vis[int'(strip) * 4 + dr][c]) rlc_ok = 1'b0;

    raw_pass = byp_q && (pass != P_CP) && ((nbp_q - 4'd1 - plane) >= 4'd4);
  end

  // ---------------------------------------------------------------- output
  // the pair offered in the current state
  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    case (state)
      S_ROW: if (row_valid) begin
        case (pass)
          P_SP:  if (!cur_sig && !nhood0) begin
                   out_valid = 1'b1;
                   out_data  = '{cx: raw_pass ? CX_RAW : zc_cx, d: cur_v};
                 end
          P_MRP: if (cur_sig && !cur_vis) begin
                   out_valid = 1'b1;
                   out_data  = '{cx: raw_pass ? CX_RAW : mr_cx, d: cur_v};
                 end
          default: if (!cur_sig && !cur_vis) begin
                   out_valid = 1'b1;
                   out_data  = '{cx: zc_cx, d: cur_v};
                 end
        endcase
      end
      S_SC: begin
        out_valid = 1'b1;
        out_data  = raw_pass ? '{cx: CX_RAW, d: cur_s} : '{cx: sc_cx, d: cur_s ^ sc_xor};
      end
      S_RLC:    begin out_valid = 1'b1; out_data = '{cx: CX_RUN, d: |v4}; end
      S_RLC_Z1: begin out_valid = 1'b1; out_data = '{cx: CX_UNI, d: zi[1]}; end
      S_RLC_Z0: begin out_valid = 1'b1; out_data = '{cx: CX_UNI, d: zi[0]}; end
      S_END:    begin out_valid = 1'b1; out_data = '{cx: CX_END, d: 1'b0}; end
      default: ;
    endcase
  end

  logic stall;
  assign stall = out_valid && !out_ready;

  // memory read request
  always_comb begin
    sm_rd_en = (state == S_FETCH);
    sm_strip = strip;
    sm_col   = col;
    sm_plane = plane;
  end

  assign busy = (state != S_IDLE);

  // ---------------------------------------------------------------- controller
  logic last_col, last_strip;
  assign last_col   = (CWD + 1)'(col) + 1'b1 >= w_q;
  assign last_strip = (RW + 1)'({strip, 2'b11}) + 1'b1 >= h_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pass <= P_CP; done <= 1'b0;
      band_q <= BAND_LL; byp_q <= 1'b0; nbp_q <= '0; plane <= '0;
      h_q <= '0; w_q <= '0; strip <= '0; col <= '0; row <= '0;
      v4 <= '0; s4 <= '0; zi <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          band_q <= band; byp_q <= bypass_en; nbp_q <= numbps;
          h_q <= cb_h; w_q <= cb_w;
          plane <= numbps - 4'd1;
          pass  <= P_CP;
          state <= (numbps == '0) ? S_END : S_PASS;
        end
        S_PASS: begin
          strip <= '0; col <= '0;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_FETCH_W;
        S_FETCH_W: begin
          v4  <= sm_bits;
          s4  <= sm_signs;
          row <= '0;
          state <= (pass == P_CP && rlc_ok) ? S_RLC : S_ROW;
        end
        S_RLC: if (!stall) begin
          if (v4 == '0) state <= S_NEXTCOL;
          else begin
            zi    <= v4[0] ? 2'd0 : v4[1] ? 2'd1 : v4[2] ? 2'd2 : 2'd3;
            state <= S_RLC_Z1;
          end
        end
        S_RLC_Z1: if (!stall) state <= S_RLC_Z0;
        S_RLC_Z0: if (!stall) begin
          row   <= zi;
          state <= S_SC;
        end
        S_ROW: if (!stall) begin
          if (out_valid && pass != P_MRP && cur_v) state <= S_SC;
          else if (row == 2'd3) state <= S_NEXTCOL;
          else row <= row + 2'd1;
        end
        S_SC: if (!stall) begin
          if (row == 2'd3) state <= S_NEXTCOL;
          else begin
            row   <= row + 2'd1;
            state <= S_ROW;
          end
        end
        S_NEXTCOL: begin
          if (!last_col) begin
            col   <= col + 1'b1;
            state <= S_FETCH;
          end else if (!last_strip) begin
            col   <= '0;
            strip <= strip + 1'b1;
            state <= S_FETCH;
          end else begin
            // end of pass
            case (pass)
              P_SP:  begin pass <= P_MRP; state <= S_PASS; end
              P_MRP: begin pass <= P_CP;  state <= S_PASS; end
              default: begin
                if (plane == '0) state <= S_END;
                else begin
                  plane <= plane - 4'd1;
                  pass  <= P_SP;
                  state <= S_PASS;
                end
              end
            endcase
          end
        end
        S_END: if (!stall) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- state bits
  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      for (int i = 0; i < R; i++)
        for (int j = 0; j < C; j++) begin
          sig[i][j] <= 1'b0; vis[i][j] <= 1'b0; refd[i][j] <= 1'b0; chi[i][j] <= 1'b0;
        end
    end else if (state == S_NEXTCOL && last_col && last_strip && pass == P_CP) begin
      for (int i = 0; i < R; i++)
        for (int j = 0; j < C; j++) vis[i][j] <= 1'b0;
    end else if (!stall) begin
      if (state == S_ROW && out_valid) begin
        if (pass == P_MRP) refd[r_cur][col] <= 1'b1;
        vis[r_cur][col] <= 1'b1;
      end
      if (state == S_SC) begin
        sig[r_cur][col] <= 1'b1;
        chi[r_cur][col] <= cur_s;
      end
    end
  end

  // A CP sample coded by ZC must not have been coded earlier in the plane.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_ROW && pass == P_CP && out_valid) |-> !cur_vis);

endmodule
