// jp2k_pkg: types, constants and table functions shared by the JPEG2000
// encoder blocks.
//
// Contents:
//  * the lifting coefficients of the (5,3) and (9,7) filters as the DWT
//    processor uses them (shift amounts for (5,3); 10-bit signed fixed
//    point with 8 fraction bits for (9,7)),
//  * the context numbering used between the bit-plane coder (BPC) and the
//    binary arithmetic coder (BAC): contexts 0-8 zero coding, 9-13 sign
//    coding, 14-16 magnitude refinement, 17 run length, 18 uniform (zero
//    index bits). Two codes beyond the 19 contexts are this design's own:
//    CX_RAW marks a bypassed (raw) bit, CX_END marks the end of a code block,
//  * the MQ coder probability table (Qe values and the next-index / switch
//    logic of the update logic), as fixed by JPEG2000 Part 1,
//  * the context-formation functions of the EBCOT primitives (ZC, SC, MRC).
package jp2k_pkg;

  // ---------------------------------------------------------------- DWT
  localparam int unsigned DW = 16;            // data path width
  localparam int unsigned CW = 10;            // multiplier coefficient width
  localparam int unsigned CFRAC = 8;          // coefficient fraction bits

  typedef enum logic [0:0] {FILT_53 = 1'b0, FILT_97 = 1'b1} filter_e;

  // Operation performed by the DWT processor in one iteration.
  typedef enum logic [1:0] {
    OP_SHIFT = 2'd0,   // x_old + round(+-sum >> sh)          ((5,3) lifting)
    OP_MULT  = 2'd1,   // x_old + round(coef * sum)           ((9,7) lifting)
    OP_SCALE = 2'd2    // round(coef * x_old)                 ((9,7) scaling)
  } dwt_op_e;

  // (9,7) lifting coefficients, round(c * 256)
  localparam logic signed [CW-1:0] C97_ALPHA = -10'sd406;  // -1.586134342
  localparam logic signed [CW-1:0] C97_BETA  = -10'sd14;   // -0.052980118
  localparam logic signed [CW-1:0] C97_GAMMA =  10'sd226;  //  0.882911076
  localparam logic signed [CW-1:0] C97_DELTA =  10'sd114;  //  0.443506852
  // Combined row+column scaling: LL by 1/K^2, HH by K^2, K = 1.230174105
  localparam logic signed [CW-1:0] C97_INVK2 =  10'sd169;  //  0.660801
  localparam logic signed [CW-1:0] C97_K2    =  10'sd387;  //  1.513328

  // ---------------------------------------------------------------- CXD
  localparam int unsigned CXW = 5;            // context field width
  localparam logic [CXW-1:0] CX_RUN  = 5'd17;
  localparam logic [CXW-1:0] CX_UNI  = 5'd18;
  localparam logic [CXW-1:0] CX_RAW  = 5'd19; // bypassed bit, sent raw
  localparam logic [CXW-1:0] CX_END  = 5'd31; // end of code block
  localparam int unsigned NCTX = 19;

  typedef struct packed {
    logic [CXW-1:0] cx;
    logic           d;
  } cxd_t;

  // Sub-band orientation (selects the zero-coding table)
  typedef enum logic [1:0] {BAND_LL = 2'd0, BAND_HL = 2'd1, BAND_LH = 2'd2, BAND_HH = 2'd3} band_e;

  // ---------------------------------------------------------------- MQ table
  function automatic logic [15:0] mq_qe(input logic [5:0] idx);
    case (idx)
      6'd0: mq_qe = 16'h5601;  6'd1: mq_qe = 16'h3401;  6'd2: mq_qe = 16'h1801;
      6'd3: mq_qe = 16'h0AC1;  6'd4: mq_qe = 16'h0521;  6'd5: mq_qe = 16'h0221;
      6'd6: mq_qe = 16'h5601;  6'd7: mq_qe = 16'h5401;  6'd8: mq_qe = 16'h4801;
      6'd9: mq_qe = 16'h3801;  6'd10: mq_qe = 16'h3001; 6'd11: mq_qe = 16'h2401;
      6'd12: mq_qe = 16'h1C01; 6'd13: mq_qe = 16'h1601; 6'd14: mq_qe = 16'h5601;
      6'd15: mq_qe = 16'h5401; 6'd16: mq_qe = 16'h5101; 6'd17: mq_qe = 16'h4801;
      6'd18: mq_qe = 16'h3801; 6'd19: mq_qe = 16'h3401; 6'd20: mq_qe = 16'h3001;
      6'd21: mq_qe = 16'h2801; 6'd22: mq_qe = 16'h2401; 6'd23: mq_qe = 16'h2201;
      6'd24: mq_qe = 16'h1C01; 6'd25: mq_qe = 16'h1801; 6'd26: mq_qe = 16'h1601;
      6'd27: mq_qe = 16'h1401; 6'd28: mq_qe = 16'h1201; 6'd29: mq_qe = 16'h1101;
      6'd30: mq_qe = 16'h0AC1; 6'd31: mq_qe = 16'h09C1; 6'd32: mq_qe = 16'h08A1;
      6'd33: mq_qe = 16'h0521; 6'd34: mq_qe = 16'h0441; 6'd35: mq_qe = 16'h02A1;
      6'd36: mq_qe = 16'h0221; 6'd37: mq_qe = 16'h0141; 6'd38: mq_qe = 16'h0111;
      6'd39: mq_qe = 16'h0085; 6'd40: mq_qe = 16'h0049; 6'd41: mq_qe = 16'h0025;
      6'd42: mq_qe = 16'h0015; 6'd43: mq_qe = 16'h0009; 6'd44: mq_qe = 16'h0005;
      6'd45: mq_qe = 16'h0001; 6'd46: mq_qe = 16'h5601;
      default: mq_qe = 16'h5601;
    endcase
  endfunction

  // Next index after an MPS
  function automatic logic [5:0] mq_nmps(input logic [5:0] idx);
    case (idx)
      6'd5:  mq_nmps = 6'd38;
      6'd13: mq_nmps = 6'd29;
      6'd45: mq_nmps = 6'd45;
      6'd46: mq_nmps = 6'd46;
      default: mq_nmps = idx + 6'd1;
    endcase
  endfunction

  // Next index after an LPS
  function automatic logic [5:0] mq_nlps(input logic [5:0] idx);
    case (idx)
      6'd0: mq_nlps = 6'd1;   6'd1: mq_nlps = 6'd6;   6'd2: mq_nlps = 6'd9;
      6'd3: mq_nlps = 6'd12;  6'd4: mq_nlps = 6'd29;  6'd5: mq_nlps = 6'd33;
      6'd6: mq_nlps = 6'd6;   6'd7: mq_nlps = 6'd14;  6'd8: mq_nlps = 6'd14;
      6'd9: mq_nlps = 6'd14;  6'd10: mq_nlps = 6'd17; 6'd11: mq_nlps = 6'd18;
      6'd12: mq_nlps = 6'd20; 6'd13: mq_nlps = 6'd21; 6'd14: mq_nlps = 6'd14;
      6'd15: mq_nlps = 6'd14; 6'd16: mq_nlps = 6'd15; 6'd17: mq_nlps = 6'd16;
      6'd18: mq_nlps = 6'd17; 6'd19: mq_nlps = 6'd18; 6'd20: mq_nlps = 6'd19;
      6'd21: mq_nlps = 6'd19; 6'd46: mq_nlps = 6'd46;
      default: mq_nlps = idx - 6'd2;   // indices 22..45
    endcase
  endfunction

  function automatic logic mq_switch(input logic [5:0] idx);
    mq_switch = (idx == 6'd0) || (idx == 6'd6) || (idx == 6'd14);
  endfunction

  // Initial Info-table index of a context
  function automatic logic [5:0] mq_init_idx(input logic [CXW-1:0] cx);
    case (cx)
      5'd0:    mq_init_idx = 6'd4;
      5'd17:   mq_init_idx = 6'd3;
      5'd18:   mq_init_idx = 6'd46;
      default: mq_init_idx = 6'd0;
    endcase
  endfunction

  // ---------------------------------------------------------------- EBCOT
  // Zero-coding context from the significance of the 8 neighbours.
  // h, v, d are the counts of significant horizontal, vertical and
  // diagonal neighbours.
  function automatic logic [CXW-1:0] zc_context(input band_e band,
                                                input logic [1:0] h_in,
                                                input logic [1:0] v_in,
                                                input logic [2:0] d);
    logic [1:0] h, v;
    logic [2:0] hv;
    if (band == BAND_HL) begin h = v_in; v = h_in; end
    else                 begin h = h_in; v = v_in; end
    hv = {1'b0, h} + {1'b0, v};
    if (band == BAND_HH) begin
      if (d >= 3)                 zc_context = 5'd8;
      else if (d == 2)            zc_context = (hv >= 1) ? 5'd7 : 5'd6;
      else if (d == 1)            zc_context = (hv >= 2) ? 5'd5 : (hv == 1) ? 5'd4 : 5'd3;
      else                        zc_context = (hv >= 2) ? 5'd2 : (hv == 1) ? 5'd1 : 5'd0;
    end else begin
      if (h == 2)                 zc_context = 5'd8;
      else if (h == 1)            zc_context = (v >= 1) ? 5'd7 : (d >= 1) ? 5'd6 : 5'd5;
      else if (v == 2)            zc_context = 5'd4;
      else if (v == 1)            zc_context = 5'd3;
      else                        zc_context = (d >= 2) ? 5'd2 : (d == 1) ? 5'd1 : 5'd0;
    end
  endfunction

  // Sign-coding context and XOR bit. Each neighbour pair gives a
  // contribution in {-1,0,+1}: encoded as {neg, pos}.
  function automatic logic [CXW:0] sc_context(input logic sig_h0, input logic neg_h0,
                                              input logic sig_h1, input logic neg_h1,
                                              input logic sig_v0, input logic neg_v0,
                                              input logic sig_v1, input logic neg_v1);
    int hc, vc;
    logic [CXW-1:0] cx;
    logic           xb;
    hc = (sig_h0 ? (neg_h0 ? -1 : 1) : 0) + (sig_h1 ? (neg_h1 ? -1 : 1) : 0);
    vc = (sig_v0 ? (neg_v0 ? -1 : 1) : 0) + (sig_v1 ? (neg_v1 ? -1 : 1) : 0);
    if (hc > 1) hc = 1;
    if (hc < -1) hc = -1;
    if (vc > 1) vc = 1;
    if (vc < -1) vc = -1;
    xb = 1'b0;
    if (hc < 0 || (hc == 0 && vc < 0)) begin
      xb = 1'b1;
      hc = -hc;
      vc = -vc;
    end
    // now hc in {0,1}; (0,0)->9 (0,1)->10 (1,-1)->11 (1,0)->12 (1,1)->13
    if (hc == 0) cx = (vc == 0) ? 5'd9 : 5'd10;
    else         cx = 5'(12 + vc);
    sc_context = {cx, xb};
  endfunction

  // Magnitude-refinement context
  function automatic logic [CXW-1:0] mr_context(input logic refined, input logic nhood0);
    if (refined)     mr_context = 5'd16;
    else if (nhood0) mr_context = 5'd14;
    else             mr_context = 5'd15;
  endfunction

endpackage
