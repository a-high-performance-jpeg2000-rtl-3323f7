// jp2k_top: JPEG2000 (Part I) tile encoder - DWT, three data formatters,
// three sub-band memories, three bit-plane coders (BPC), three CXD buffers,
// three binary arithmetic coders (BAC) and the global controller.
//
// Data flow: the host writes an N x N tile of 8-bit pixels into the DWT
// memory (pix_we/pix_addr/pix_data; the top subtracts 128, the JPEG2000 DC
// level shift) and pulses start. The DWT transforms the tile in place to
// `levels` levels with the (5,3) or (9,7) filter. The global controller
// then moves every code block of the HL, LH and HH sub-bands through data
// formatter k into sub-band memory k (k = 0, 1, 2 for HL, LH, HH), and the
// three coder pairs code the three blocks in parallel: BPC k writes
// context/decision pairs into CXD buffer k, from which BAC k makes the
// code-block byte stream on cs_valid[k]/cs_byte[k]. cs_end[k] pulses after
// the last byte of a block. The final LL band is coded by pair 0.
//
// For every code block that starts, cb_valid[k] pulses with the block's
// level, position (cb_by, cb_bx in units of code blocks), band and number of
// coded bit planes (cb_numbps[k], the plane count that a JPEG2000 packet
// header carries). Rate control and bit-stream (packet) formation are left
// to the host, which receives one byte stream per code block.
//
// qen/qscale select dead-zone quantization in the formatters (scale = step
// reciprocal, 8 fraction bits); qscale[k] applies to the sub-band of pair k
// at every level (the LL band uses qscale[0]). bypass_en enables the
// selective arithmetic-coding bypass in the BPCs.
//
// Code-block decoder: a bit-plane decoder and an MQ decoder (without
// bypass) turn one code-block byte stream back into sign-magnitude words:
// the host pulses dec_start with the block's band, plane count and size,
// then offers the bytes on dec_in_* (followed by 0xFF fill) until dec_done.
// The words are then read with dec_rd_* and come out one cycle later
// through a fourth data formatter in decode mode as two's complement
// values (dec_out_*). It is independent of the encoder and may run at the
// same time.
//
// Timing: one tile per start; done pulses when the last code block has been
// coded. The DWT and the entropy coding run one after the other; inside the
// entropy coding the three pairs run concurrently and the CXD buffers
// decouple each BPC from its BAC.
module jp2k_top
  import jp2k_pkg::*;
#(
  parameter int unsigned N         = 128,
  parameter int unsigned LEVELS    = 5,
  parameter int unsigned CB        = 32,
  parameter int unsigned CXD_DEPTH = 128,
  localparam int unsigned ADDR_W   = $clog2(N * N),
  localparam int unsigned LOGCB    = $clog2(CB)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration (held stable during a tile)
  input  filter_e               filter,
  input  logic [2:0]            levels,
  input  logic                  bypass_en,
  input  logic                  qen,
  input  logic [15:0]           qscale [3],
  // tile load
  input  logic                  pix_we,
  input  logic [ADDR_W-1:0]     pix_addr,
  input  logic [7:0]            pix_data,
  // control
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // code-block information
  output logic [2:0]            cb_valid,
  output logic [2:0]            cb_level,
  output logic [$clog2(N/CB):0] cb_by,
  output logic [$clog2(N/CB):0] cb_bx,
  output band_e                 cb_band [3],
  output logic [3:0]            cb_numbps [3],
  // code streams
  output logic [2:0]            cs_valid,
  output logic [7:0]            cs_byte [3],
  output logic [2:0]            cs_end,
  // code-block decoder
  input  logic                  dec_start,
  input  band_e                 dec_band,
  input  logic [3:0]            dec_numbps,
  input  logic [LOGCB:0]        dec_size,
  output logic                  dec_busy,
  output logic                  dec_done,
  input  logic                  dec_in_valid,
  output logic                  dec_in_ready,
  input  logic [7:0]            dec_in_byte,
  input  logic                  dec_rd_en,
  input  logic [LOGCB-1:0]      dec_rd_row,
  input  logic [LOGCB-1:0]      dec_rd_col,
  output logic                  dec_out_valid,
  output logic [15:0]           dec_out_data
);

  // ---------------------------------------------------------------- DWT
  logic                 dwt_start, dwt_done;
  logic [ADDR_W-1:0]    dwt_raddr;
  logic signed [DW-1:0] dwt_rdata;

  dwt #(.N(N), .LEVELS(LEVELS)) u_dwt (
    .clk, .rst_n,
    .start     (dwt_start),
    .filter,
    .inverse   (1'b0),
    .levels,
    .busy      (),
    .done      (dwt_done),
    .ext_we    (pix_we),
    .ext_waddr (pix_addr),
    .ext_wdata (DW'(signed'({1'b0, pix_data})) - DW'(128)),
    .ext_raddr (dwt_raddr),
    .ext_rdata (dwt_rdata)
  );

  // ---------------------------------------------------- global controller
  logic             cb_start;
  logic [2:0]       df_valid, bpc_start, bpc_done, bac_done;
  logic [LOGCB-1:0] df_row, df_col;
  band_e            bpc_band [3];
  logic [LOGCB:0]   cb_size;

  global_controller #(.N(N), .LEVELS(LEVELS), .CB(CB)) u_gc (
    .clk, .rst_n, .start, .levels, .busy, .done,
    .dwt_start, .dwt_done, .dwt_raddr,
    .cb_start, .df_valid, .df_row, .df_col,
    .bpc_start, .bpc_band, .cb_size, .bpc_done, .bac_done,
    .cb_valid, .cb_level, .cb_by, .cb_bx
  );

  // ------------------------------------------------------- coder pairs
  for (genvar k = 0; k < 3; k++) begin : g_pair
    logic                  sm_we;
    logic [15:0]           sm_wdata;
    logic [2*LOGCB-1:0]    sm_waddr;
    logic                  sm_rd_en;
    logic [$clog2(CB/4)-1:0] sm_strip;
    logic [LOGCB-1:0]      sm_col;
    logic [3:0]            sm_plane, sm_bits, sm_signs, numbps;
    logic                  bpc_valid, bpc_ready, bac_valid, bac_ready;
    cxd_t                  bpc_data, bac_data;

    data_formatter #(.ADDR_W(2 * LOGCB)) u_df (
      .clk, .rst_n,
      .decode   (1'b0),
      .qen,
      .qscale   (qscale[k]),
      .cb_start,
      .in_valid (df_valid[k]),
      .in_data  (dwt_rdata),
      .in_addr  ({df_row, df_col}),
      .out_valid(sm_we),
      .out_data (sm_wdata),
      .out_addr (sm_waddr),
      .numbps
    );

    subband_memory #(.R(CB), .C(CB)) u_sm (
      .clk,
      .wr_en    (sm_we),
      .wr_row   (sm_waddr[2*LOGCB-1:LOGCB]),
      .wr_col   (sm_waddr[LOGCB-1:0]),
      .wr_data  (sm_wdata),
      .rd_en    (sm_rd_en),
      .rd_strip (sm_strip),
      .rd_col   (sm_col),
      .rd_plane (sm_plane),
      .rd_row   (),
      .rd_bits  (sm_bits),
      .rd_signs (sm_signs)
    );

    bpc_encoder #(.R(CB), .C(CB)) u_bpc (
      .clk, .rst_n,
      .start    (bpc_start[k]),
      .band     (bpc_band[k]),
      .numbps,
      .bypass_en,
      .cb_h     (cb_size),
      .cb_w     (cb_size),
      .busy     (),
      .done     (bpc_done[k]),
      .sm_rd_en, .sm_strip, .sm_col, .sm_plane, .sm_bits, .sm_signs,
      .out_valid(bpc_valid),
      .out_ready(bpc_ready),
      .out_data (bpc_data)
    );

    cxd_buffer #(.DEPTH(CXD_DEPTH)) u_cxd (
      .clk, .rst_n,
      .clear    (cb_start),
      .wr_valid (bpc_valid),
      .wr_ready (bpc_ready),
      .wr_data  (bpc_data),
      .rd_valid (bac_valid),
      .rd_ready (bac_ready),
      .rd_data  (bac_data),
      .level    ()
    );

    bac_encoder u_bac (
      .clk, .rst_n,
      .init     (cb_start),
      .in_valid (bac_valid),
      .in_ready (bac_ready),
      .in_data  (bac_data),
      .out_valid(cs_valid[k]),
      .out_byte (cs_byte[k]),
      .cb_done  (bac_done[k]),
      .busy     ()
    );

    assign cb_band[k]   = bpc_band[k];
    assign cb_numbps[k] = numbps;
  end

  assign cs_end = bac_done;

  // ------------------------------------------------------ code-block decoder
  logic           dd_cx_valid, dd_cx_ready, dd_d_valid, dd_d, dd_rd_en, bpcd_busy;
  logic [CXW-1:0] dd_cx;
  logic [15:0]    dd_word;
  logic [2*LOGCB-1:0] dd_addr;

  bac_decoder u_bacd (
    .clk, .rst_n,
    .init     (dec_start),
    .cx_valid (dd_cx_valid),
    .cx_ready (dd_cx_ready),
    .cx       (dd_cx),
    .d_valid  (dd_d_valid),
    .d        (dd_d),
    .in_valid (dec_in_valid),
    .in_ready (dec_in_ready),
    .in_byte  (dec_in_byte),
    .busy     ()
  );

  bpc_decoder #(.R(CB), .C(CB)) u_bpcd (
    .clk, .rst_n,
    .start    (dec_start),
    .band     (dec_band),
    .numbps   (dec_numbps),
    .cb_h     (dec_size),
    .cb_w     (dec_size),
    .busy     (bpcd_busy),
    .done     (dec_done),
    .cx_valid (dd_cx_valid),
    .cx_ready (dd_cx_ready),
    .cx       (dd_cx),
    .d_valid  (dd_d_valid),
    .d        (dd_d),
    .rd_en    (dec_rd_en),
    .rd_row   (dec_rd_row),
    .rd_col   (dec_rd_col),
    .rd_data  (dd_word)
  );

  // word read-out through a formatter in decode mode (sign-magnitude to
  // two's complement, inverse quantization with qscale[0] as step size)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dd_rd_en <= 1'b0;
    else        dd_rd_en <= dec_rd_en;
  end
  always_ff @(posedge clk) dd_addr <= {dec_rd_row, dec_rd_col};

  data_formatter #(.ADDR_W(2 * LOGCB)) u_dfd (
    .clk, .rst_n,
    .decode   (1'b1),
    .qen,
    .qscale   (qscale[0]),
    .cb_start (dec_start),
    .in_valid (dd_rd_en),
    .in_data  (dd_word),
    .in_addr  (dd_addr),
    .out_valid(dec_out_valid),
    .out_data (dec_out_data),
    .out_addr (),
    .numbps   ()
  );

  assign dec_busy = bpcd_busy;

endmodule
