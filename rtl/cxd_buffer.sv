// cxd_buffer: FIFO of context/data pairs between a bit-plane coder and its
// arithmetic coder.
//
// DEPTH entries of 6 bits (5-bit context, 1 data bit); 128 entries by
// default. The write pointer is advanced by the bit-plane coder (BPC
// pointer), the read pointer by the arithmetic coder (BAC pointer). Both
// pointers are reset by clear, which is pulsed whenever the arithmetic
// coder is (re)initialised. When the FIFO is full the bit-plane coder waits
// (wr_ready low), so with a small buffer the two coders run in lock step.
//
// Timing: first-word-fall-through. rd_data is valid whenever rd_valid is
// high; an entry is consumed in a cycle with rd_valid && rd_ready, and
// written in a cycle with wr_valid && wr_ready. A write into an empty FIFO
// is visible at the read side the next cycle.
module cxd_buffer
  import jp2k_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  // BPC side
  input  logic wr_valid,
  output logic wr_ready,
  input  cxd_t wr_data,
  // BAC side
  output logic rd_valid,
  input  logic rd_ready,
  output cxd_t rd_data,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned PW = $clog2(DEPTH);

  cxd_t          mem [DEPTH];
  logic [PW:0]   bpc_ptr, bac_ptr;   // one extra wrap bit

  assign level    = bpc_ptr - bac_ptr;
  assign wr_ready = (level != (PW + 1)'(DEPTH));
  assign rd_valid = (level != '0);
  assign rd_data  = mem[bac_ptr[PW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bpc_ptr <= '0;
      bac_ptr <= '0;
    end else if (clear) begin
      bpc_ptr <= '0;
      bac_ptr <= '0;
    end else begin
      if (wr_valid && wr_ready) bpc_ptr <= bpc_ptr + 1'b1;
      if (rd_valid && rd_ready) bac_ptr <= bac_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (wr_valid && wr_ready && !clear) mem[bpc_ptr[PW-1:0]] <= wr_data;

  // No write when full, no read when empty.
  assert property (@(posedge clk) disable iff (!rst_n) (wr_valid && !wr_ready) |=> $stable(bpc_ptr) || $past(clear));
  assert property (@(posedge clk) disable iff (!rst_n) level <= (PW + 1)'(DEPTH));

endmodule
