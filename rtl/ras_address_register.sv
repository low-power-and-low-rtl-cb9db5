// Modified address shift register of the Cocktail random access scan.
//
// In plain random access scan the address of the cell to be written is
// shifted in serially, one bit per address clock. For the first test phase
// (segmented random scan test, SRST) a whole seed pattern must be written to
// consecutive cells, which would cost AW+1 tester bits per cell. The register
// therefore has two modes: Mode = 1 makes it an up-counter, so a seed of N
// bits is written in N cycles, one cell after the other; Mode = 0 makes it a
// shift register that takes the address from Si, most significant bit first.
//
// Interface and timing: en is the address clock (ACLK) enable; clr clears the
// address synchronously and wins over en. All changes happen on the rising
// clock edge.
// The two modes follow the document; the binary count order, the shift
// direction and the clear input are this design's choices.
module ras_address_register #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic          mode,   // 1: count (SRST), 0: shift (RAS)
  input  logic          si,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        addr <= '0;
    else if (clr)      addr <= '0;
    else if (en) begin
      if (mode)        addr <= addr + 1'b1;
      else             addr <= {addr[AW-2:0], si};
    end
  end

endmodule
