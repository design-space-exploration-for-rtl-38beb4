// burst_buffer: block RAM that holds one burst (up to DEPTH complex samples)
// while its frequency offset is being estimated, so that the same samples can
// then be corrected.
//
// Simple dual-port memory: one write port, one read port with a registered
// output (read data valid one cycle after rd_en), as block RAM provides.
// The document states that blocksizes up to 1024 symbols are handled and that
// block RAM is used; the buffer itself, its organisation and its read latency
// are this design's own choice.
module burst_buffer #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 16
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [$clog2(DEPTH)-1:0]  wr_addr,
  input  logic [W-1:0]              wr_data,
  input  logic                      rd_en,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,
  output logic [W-1:0]              rd_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
