// dwt_memory: the tile memory of the DWT.
//
// N x N words of 16 bits (the default N = 128 gives the 256 Kbit memory of
// a 128 x 128 tile). The lifting processor reads two samples and writes one
// sample per cycle, so the memory has two synchronous read ports (data one
// cycle after the address) and one write port. The transform is computed in
// place: results overwrite the samples they replace. A read and a write to
// the same address in one cycle return the old word.
module dwt_memory #(
  parameter int unsigned N      = 128,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = $clog2(N * N)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] ra_addr,
  output logic [DATA_W-1:0] ra_data,
  input  logic [ADDR_W-1:0] rb_addr,
  output logic [DATA_W-1:0] rb_data,
  input  logic              we,
  input  logic [ADDR_W-1:0] wa_addr,
  input  logic [DATA_W-1:0] wa_data
);

  logic [DATA_W-1:0] mem [N * N];

  always_ff @(posedge clk) begin
    ra_data <= mem[ra_addr];
    rb_data <= mem[rb_addr];
    if (we) mem[wa_addr] <= wa_data;
  end

endmodule
