// Cocktail Scan hardware: random access scan with a segmented random phase.
//
// Connects the scan controller, the two-mode address register, the address
// decoder, the N addressable scan cells and the output compactor (MISR). The
// circuit under test sits outside: it receives the cell outputs q and returns
// its responses d. The tester supplies one serial stream (see
// ras_scan_controller for its format): first the seed patterns of the
// segmented random phase, then, per deterministic pattern, only the addresses
// and values of the bits that differ from the pattern already in the cells.
//
// Interface and timing: one clock; the address clock and scan clock of the
// document are clock enables here. sig is the response signature, phase the
// current test phase, done the end of the test.
module cocktail_ras
  import lpt_pkg::*;
#(
  parameter int unsigned N   = 1636,
  parameter int unsigned AW  = $clog2(N),
  parameter int unsigned FCW = 12,
  parameter int unsigned W   = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [15:0]  num_seeds,
  input  logic [15:0]  test_len,
  input  logic [15:0]  num_ras,
  input  logic         si,
  input  logic         si_valid,
  output logic         si_ready,
  output logic [N-1:0] q,
  input  logic [N-1:0] d,
  output logic [W-1:0] sig,
  output ras_phase_e   phase,
  output logic         done
);

  logic          asr_clr, asr_en, asr_mode, dec_en, sclk_en, cell_din, capture;
  logic          misr_clr, misr_en;
  logic [AW-1:0] addr;
  logic [N-1:0]  se;

  ras_scan_controller #(.N(N), .AW(AW), .FCW(FCW)) u_ctrl (
    .clk, .rst_n, .start, .num_seeds, .test_len, .num_ras, .si, .si_valid, .si_ready,
    .asr_clr, .asr_en, .asr_mode, .dec_en, .sclk_en, .cell_din, .capture,
    .misr_clr, .misr_en, .phase, .done
  );

  ras_address_register #(.AW(AW)) u_asr (
    .clk, .rst_n, .clr(asr_clr), .en(asr_en), .mode(asr_mode), .si, .addr
  );

  ras_address_decoder #(.N(N), .AW(AW)) u_dec (.addr, .en(dec_en), .se);

  ras_scan_cells #(.N(N)) u_cells (
    .clk, .sclk_en, .se, .din(cell_din), .capture, .d, .q
  );

  ras_misr #(.N(N), .W(W)) u_misr (
    .clk, .rst_n, .clr(misr_clr), .en(misr_en), .d, .sig
  );

endmodule
