// dwt: lifting-based 2-D discrete wavelet transform, (5,3) and (9,7),
// forward and inverse.
//
// The module joins the three parts of the DWT: the tile memory
// (dwt_memory, N x N x 16 bits), the lifting processor (dwt_processor) and
// the controller (dwt_controller). The processor reads from the memory and
// writes its results back in place, so after a forward transform of L levels
// the memory holds all sub-bands interleaved: at level l (1-based, stride
// s = 2^(l-1)) sample (i, j) of HL is at row 2i*s, column (2j+1)*s, LH at
// ((2i+1)*s, 2j*s), HH at ((2i+1)*s, (2j+1)*s); the final LL band sits at
// every 2^L-th row and column.
//
// The data path glue here holds the left neighbour of the current target
// sample: it is loaded with the right neighbour of each target (or with the
// preloaded first sample of a line) and mirrored at the band edges.
//
// External access while the transform is idle: a write port (ext_we,
// ext_waddr, ext_wdata) loads the tile, and a read port (ext_raddr ->
// ext_rdata, one cycle later) reads coefficients out, e.g. to the data
// formatters. Samples are 16-bit two's complement; the caller supplies
// level-shifted pixels (pixel - 128 for 8-bit data).
//
// Timing: start is taken when busy is low; done pulses for one cycle at the
// end. External ports are ignored while busy.
module dwt
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
  input  logic [2:0]           levels,
  output logic                 busy,
  output logic                 done,
  input  logic                 ext_we,
  input  logic [ADDR_W-1:0]    ext_waddr,
  input  logic signed [DW-1:0] ext_wdata,
  input  logic [ADDR_W-1:0]    ext_raddr,
  output logic signed [DW-1:0] ext_rdata
);

  logic [ADDR_W-1:0]    c_ra, c_rb, d_addr;
  logic                 d_valid, d_preload, d_mirror_l, d_mirror_r;
  dwt_op_e              d_op;
  logic signed [CW-1:0] d_coef;
  logic [1:0]           d_sh;
  logic                 d_neg, d_sub;

  dwt_controller #(.N(N), .LEVELS(LEVELS), .ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n, .start, .filter, .inverse, .levels, .busy, .done,
    .ra_addr(c_ra), .rb_addr(c_rb),
    .d_valid, .d_preload, .d_mirror_l, .d_mirror_r, .d_addr,
    .d_op, .d_coef, .d_sh, .d_neg, .d_sub
  );

  logic [ADDR_W-1:0]    ra_addr, wa_addr;
  logic [DW-1:0]        ra_data, rb_data, wa_data;
  logic                 we;
  logic                 p_valid;
  logic signed [DW-1:0] p_y;
  logic [ADDR_W-1:0]    p_addr;

  always_comb begin
    ra_addr = busy ? c_ra : ext_raddr;
    we      = busy ? p_valid : ext_we;
    wa_addr = busy ? p_addr : ext_waddr;
    wa_data = busy ? p_y : ext_wdata;
  end

  dwt_memory #(.N(N), .DATA_W(DW), .ADDR_W(ADDR_W)) u_mem (
    .clk,
    .ra_addr, .ra_data,
    .rb_addr(c_rb), .rb_data,
    .we, .wa_addr, .wa_data
  );

  assign ext_rdata = ra_data;

  // left-neighbour register
  logic signed [DW-1:0] left_q, x_left, x_right;

  always_comb begin
    x_right = d_mirror_r ? left_q : ra_data;
    x_left  = d_mirror_l ? ra_data : left_q;
  end

  always_ff @(posedge clk) begin
    if (d_preload)    left_q <= ra_data;
    else if (d_valid) left_q <= x_right;
  end

  dwt_processor #(.ADDR_W(ADDR_W)) u_proc (
    .clk, .rst_n,
    .in_valid(d_valid), .op(d_op), .coef(d_coef), .sh(d_sh), .neg(d_neg), .sub(d_sub),
    .x_left, .x_right, .x_old(rb_data), .addr_in(d_addr),
    .out_valid(p_valid), .y(p_y), .addr_out(p_addr)
  );

endmodule
