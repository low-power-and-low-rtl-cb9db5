// Multilayer Data Copy (MDC) decoding buffer.
//
// A row of A D flip-flops, one per scan chain, each behind a switching box.
// Shift mode loads one bit from din into q[0] and moves every bit one place
// on. Copy mode at layer lv moves every bit GS[lv] places on and leaves the
// first GS[lv] bits in place, so the group of GS[lv] bits loaded last is
// repeated once more. Layer 0 is the whole buffer (GS[0] = A): a copy there
// repeats the previous slice unchanged. The layers partition the buffer into
// groups of decreasing size (for the default 100-20-4 organisation: one group
// of 100, groups of 20, groups of 4); each group size must divide the one
// above it.
//
// Interface and timing: shift and copy are sampled on the rising clock edge
// (shift wins if both are high); q is the registered buffer and becomes the
// slice that the chains take. Reset clears the buffer, so that a layer-0
// copy in the first slice after reset repeats a known all-zero slice.
// The two operations and the layered grouping follow the document; the
// multiplexer form of the switching box and the shift direction are this
// design's choices.
module mdc_decoding_buffer #(
  parameter int unsigned L      = 3,
  parameter int unsigned GS [L] = '{100, 20, 4},
  parameter int unsigned A      = GS[0]
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift,
  input  logic                 din,
  input  logic                 copy,
  input  logic [$clog2(L)-1:0] copy_lv,
  output logic [A-1:0]         q
);

  // Switching box of every flip-flop: hold, take the neighbour, or take the
  // flip-flop one group back at the copied layer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (shift) begin
      q <= {q[A-2:0], din};
    end else if (copy) begin
      for (int unsigned lv = 0; lv < L; lv++) begin
        if (copy_lv == ($clog2(L))'(lv)) q <= (q << GS[lv]) | (q & A'((A'(1) << GS[lv]) - 1'b1));
      end
    end
  end

endmodule
