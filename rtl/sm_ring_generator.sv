// Signal generator (ring) of the Scan Matrix.
//
// A circular shift register that carries a single token: exactly one of the
// LEN word lines is high. Two of them address the matrix, one for the rows
// and one for the columns, so that the scan cells are visited one after the
// other without a decoder.
//
// How it works: init (synchronous) or reset puts the token on word line 0;
// each cycle with adv high moves it to the next word line, from the last one
// back to word line 0. last is high while the token is on the last line, so a
// second ring can be advanced from it.
//
// Interface and timing: wl is registered; a change of adv or init shows in
// wl in the next cycle. init has priority over adv.
// From the document: the circular token registers and the word-line naming.
// This design's choices: the register is an ordinary flip-flop ring rather
// than the half-clock-load transistor cell of the document, and the default
// length of 41 is the row count the document gives for s38417.
module sm_ring_generator #(
  parameter int unsigned LEN = 41
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           adv,
  output logic [LEN-1:0] wl,
  output logic           last
);

  localparam logic [LEN-1:0] FIRST = LEN'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     wl <= FIRST;
    else if (init)  wl <= FIRST;
    else if (adv)   wl <= {wl[LEN-2:0], wl[LEN-1]};
  end

  assign last = wl[LEN-1];

  initial assert (LEN >= 2) else $error("sm_ring_generator: LEN must be at least 2");
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(wl));

endmodule
