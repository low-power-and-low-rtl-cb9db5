// Output compactor of the random access scan: a multiple-input signature
// register (MISR).
//
// Compacts the N response lines of the circuit under test into a W-bit
// signature. The N lines are first folded onto the W stages (line i goes to
// stage i mod W through an XOR tree); the register then shifts with feedback
// from its last stage and XORs in the folded responses.
//
// Interface and timing: clr clears the signature synchronously; en compacts
// one response vector per rising clock edge.
// The document names a MISR as the observer of the responses but gives no
// polynomial; the polynomial x^32 + x^22 + x^2 + x + 1 and the folding are this
// design's choices.
module ras_misr #(
  parameter int unsigned N    = 1636,
  parameter int unsigned W    = 32,
  parameter logic [W-1:0] POLY = W'(32'h0040_0007)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [N-1:0] d,
  output logic [W-1:0] sig
);

  logic [W-1:0] folded;

  always_comb begin
    folded = '0;
    for (int unsigned i = 0; i < N; i++) folded[i % W] ^= d[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= ({sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0)) ^ folded;
  end

endmodule
