// Random access scan cells with Test Response Abandonment.
//
// N addressable scan flip-flops that drive the circuit under test. A cell
// whose scan enable is high takes the datum din on an SCLK cycle; the others
// keep their value, so only one cell switches per write. When capture is high
// every cell loads its response bit d from the circuit (used in the first,
// segmented random phase, where each response becomes the next pattern).
// In the second phase the controller never asserts capture: the responses
// are observed by the output compactor on the d lines instead, and the cells
// keep the last pattern, which is what makes the next pattern cheap to write
// as a few bit flips.
//
// Interface and timing: all updates on the rising clock edge; capture has
// priority over a write. No reset: every cell is written before it is used.
// The cell behaviour follows the document; the priority between capture and
// write is this design's choice.
module ras_scan_cells #(
  parameter int unsigned N = 1636
) (
  input  logic         clk,
  input  logic         sclk_en,
  input  logic [N-1:0] se,
  input  logic         din,
  input  logic         capture,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < N; i++) begin
      if (capture)                q[i] <= d[i];
      else if (sclk_en && se[i])  q[i] <= din;
    end
  end

endmodule
