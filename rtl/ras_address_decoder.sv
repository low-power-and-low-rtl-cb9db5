// Address decoder of the random access scan.
//
// Turns the cell address held by the address register into one scan-enable
// line per scan cell, so that exactly one cell (or none, when en is low or
// the address is beyond the last cell) takes the scan-in datum. Purely
// combinational.
// The decoder itself is the document's; it is written as a single flat
// decoder, whereas the document suggests splitting it into local decoders
// near the cells for large designs, which changes layout, not function.
module ras_address_decoder #(
  parameter int unsigned N  = 1636,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic [AW-1:0] addr,
  input  logic          en,
  output logic [N-1:0]  se
);

  always_comb begin
    se = '0;
    for (int unsigned i = 0; i < N; i++) se[i] = en && (addr == AW'(i));
  end

endmodule
