// subband_memory: word-in, bit-out memory that holds one code block for a
// bit-plane coder.
//
// The data formatter writes 16-bit sign-magnitude words (bit 15 = sign,
// bits 14:0 = magnitude) one at a time, addressed by row and column. The
// bit-plane coder reads along the four-row strips: one memory row holds the
// four words of one column of a strip, and the rows of a strip are
// consecutive (address = strip * C + column), so an R x C code block needs
// (R/4) * C rows of 64 bits (32 x 8 x 64 for the default 32 x 32 block).
// Inside a row the bits are grouped by bit plane: bit 4*b + r of the row is
// bit b of the word of row r of the strip. One read therefore gives the
// four magnitude bits of any bit plane and the four sign bits of a strip
// column.
//
// The four words of a row are stored in four 16-bit lanes so that one word
// can be written without a read-modify-write.
//
// Timing: synchronous read, rd_row / rd_bits / rd_signs are valid one cycle
// after rd_en.
module subband_memory #(
  parameter int unsigned R = 32,   // maximum code-block rows (multiple of 4)
  parameter int unsigned C = 32,   // maximum code-block columns
  localparam int unsigned AW = $clog2((R / 4) * C)
) (
  input  logic                   clk,
  // word write (data formatter)
  input  logic                   wr_en,
  input  logic [$clog2(R)-1:0]   wr_row,
  input  logic [$clog2(C)-1:0]   wr_col,
  input  logic [15:0]            wr_data,
  // strip read (bit-plane coder)
  input  logic                   rd_en,
  input  logic [$clog2(R/4)-1:0] rd_strip,
  input  logic [$clog2(C)-1:0]   rd_col,
  input  logic [3:0]             rd_plane,   // magnitude bit plane 0..14
  output logic [63:0]            rd_row,
  output logic [3:0]             rd_bits,    // bit r = row r of the strip
  output logic [3:0]             rd_signs
);

  logic [15:0] lane [4][(R / 4) * C];
  logic [15:0] q [4];
  logic [3:0]  plane_q;

  logic [AW-1:0] waddr, raddr;
  assign waddr = AW'(wr_row >> 2) * AW'(C) + AW'(wr_col);
  assign raddr = AW'(rd_strip) * AW'(C) + AW'(rd_col);

  for (genvar r = 0; r < 4; r++) begin : g_lane
    always_ff @(posedge clk) begin
      if (wr_en && wr_row[1:0] == 2'(r)) lane[r][waddr] <= wr_data;
      if (rd_en) q[r] <= lane[r][raddr];
    end
  end

  always_ff @(posedge clk)
    if (rd_en) plane_q <= rd_plane;

  always_comb begin
    for (int b = 0; b < 16; b++)
      for (int r = 0; r < 4; r++)
        rd_row[4*b + r] = q[r][b];
    rd_bits  = rd_row[4*plane_q +: 4];
    rd_signs = rd_row[63:60];
  end

endmodule
