// Embedded pattern memory of the Adaptive Encoding decoder.
//
// Holds one test pattern of N_BITS bits as N_BITS/M blocks of M bits, M being
// the decoder's buffer width and the number of scan chains. The decoder uses
// it in two ways: read-modify-write of one block when it applies a packet
// (read in one cycle, XOR and write in the next), and a block-per-cycle read
// when the finished pattern is unloaded into the scan chains.
//
// Interface and timing: one synchronous read port (rd_data is valid in the
// cycle after rd_en) and one synchronous write port. A read of the block that
// is written in the same cycle returns the old contents. The contents are not
// reset; the decoder clears them after reset by writing zeros.
// The 2K-bit size with 16-bit blocks is the one used for the smaller benchmark
// circuits of the document; the port structure is this design's choice.
module ae_pattern_memory #(
  parameter int unsigned N_BITS = 2048,
  parameter int unsigned M      = 16
) (
  input  logic                             clk,
  input  logic                             rd_en,
  input  logic [$clog2(N_BITS/M)-1:0]      rd_addr,
  output logic [M-1:0]                     rd_data,
  input  logic                             wr_en,
  input  logic [$clog2(N_BITS/M)-1:0]      wr_addr,
  input  logic [M-1:0]                     wr_data
);

  localparam int unsigned NB = N_BITS / M;

  logic [M-1:0] mem [NB];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
