// data_formatter: conversion between the DWT's two's complement samples and
// the bit-plane coder's sign-magnitude words, with optional (de)quantization
// and detection of the most significant bit plane of a code block.
//
// Encoding (decode = 0): a 16-bit two's complement coefficient becomes a
// sign-magnitude word {sign, magnitude[14:0]}. With qen set, the magnitude
// is first quantized by the deadzone scalar quantizer
//   q = floor(|x| * qscale / 256)
// where qscale is the reciprocal of the step size with 8 fraction bits (the
// quantization multiplier); the result saturates at 15 bits. The formatter
// ORs all magnitudes of a code block (cleared by cb_start) and reports the
// number of magnitude bit planes that hold a one (numbps = index of the most
// significant one + 1, 0 for an all-zero block): the bit-plane coder starts
// from that plane.
//
// Decoding (decode = 1): a sign-magnitude word becomes two's complement;
// with qen set the magnitude is multiplied by qscale / 256 (here qscale is
// the step size). The planes above the most significant one are zero in the
// word already.
//
// Timing: one sample per cycle, one cycle latency (out_valid follows
// in_valid, out_addr follows in_addr). numbps includes every sample whose
// out_valid has been seen.
module data_formatter #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              decode,
  input  logic              qen,
  input  logic [15:0]       qscale,
  input  logic              cb_start,   // clears the plane detector
  input  logic              in_valid,
  input  logic [15:0]       in_data,
  input  logic [ADDR_W-1:0] in_addr,
  output logic              out_valid,
  output logic [15:0]       out_data,
  output logic [ADDR_W-1:0] out_addr,
  output logic [3:0]        numbps
);

  logic        sgn;
  logic [15:0] mag;
  logic [31:0] prod;
  logic [14:0] magq;
  logic [14:0] or_acc;

  always_comb begin
    if (!decode) begin
      sgn = in_data[15];
      mag = sgn ? 16'(-in_data) : in_data;
    end else begin
      sgn = in_data[15];
      mag = {1'b0, in_data[14:0]};
    end
    prod = 32'(mag) * 32'(qscale);
    if (qen) magq = (prod[31:8] > 24'h7FFF) ? 15'h7FFF : prod[22:8];
    else     magq = (mag > 16'h7FFF) ? 15'h7FFF : mag[14:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      or_acc    <= '0;
    end else begin
      out_valid <= in_valid;
      if (cb_start)      or_acc <= '0;
      else if (in_valid && !decode) or_acc <= or_acc | magq;
    end
  end

  always_ff @(posedge clk) begin
    out_addr <= in_addr;
    if (!decode) out_data <= {sgn && (magq != '0), magq};
    else         out_data <= sgn ? 16'(-{1'b0, magq}) : {1'b0, magq};
  end

  always_comb begin
    numbps = '0;
    for (int b = 0; b < 15; b++)
      if (or_acc[b]) numbps = 4'(b + 1);
  end

endmodule
