// Scan Matrix scan cell (SMR), positive or negative polarity.
//
// Besides the normal flip-flop that feeds the circuit under test (the master),
// the cell has a pre-latch that receives the scan-in datum. Shifting writes
// only the pre-latch, so the circuit inputs do not toggle during scan-in
// (toggle suppression); an update moves the pre-latch into the master.
//
// How it works: when sel (the column line) is high, the cell is the one of its
// row that takes part in shifting: in a shift cycle with its row line high the
// pre-latch stores the incoming datum, and the cell drives its master value
// onto the scan-out path. When sel is low the incoming datum passes straight
// through to so, so the scan path is formed by wires, not by a chain of
// flip-flops. A negative-polarity cell sits behind an odd number of path
// inverters: it inverts what it stores and what it drives out, so the stored
// and observed values are the true ones.
//
// Interface and timing: so is combinational from si, sel and q. The pre-latch
// is written at the clock edge of a cycle with shift, sel and row high. The
// master is loaded from the pre-latch on update, or from d on capture
// (capture wins); it holds otherwise, which stands for the gated clock.
// From the document: pre-latch, SEL bypass, update and capture cycles, the two
// polarities. This design's choices: edge-triggered storage for the latches
// and the clock gating expressed as enables.
module sm_smr #(
  parameter bit NEG = 1'b0
) (
  input  logic clk,
  input  logic sel,
  input  logic row,
  input  logic shift,
  input  logic update,
  input  logic capture,
  input  logic si,
  output logic so,
  input  logic d,
  output logic q
);

  logic pre;

  always_ff @(posedge clk) begin
    if (shift && sel && row) pre <= si ^ NEG;
  end

  always_ff @(posedge clk) begin
    if (capture)     q <= d;
    else if (update) q <= pre;
  end

  assign so = sel ? (q ^ NEG) : si;

endmodule
