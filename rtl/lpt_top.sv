// Top level: the four test architectures of the document side by side.
//
// What it is: one wrapper holding
//   - the Adaptive Encoding decompressor with its pattern memory (ae_*),
//     which rebuilds each test pattern from difference packets and unloads
//     it into M scan chains;
//   - the Multilayer Data Copy decoder (mdc_*), which expands a stream of
//     control bits and raw bits into scan slices for A chains;
//   - the Cocktail random access scan (ras_*), which loads the first
//     patterns as counted seeds and then changes single cells per pattern;
//   - the Scan Matrix (sm_*), which scans a pattern into pre-latches one
//     cell per cycle and applies it with an update cycle.
// The four are independent schemes for different circuits, so they share
// only clock and reset; each keeps its own tester-side and circuit-side ports
// with the prefix of its scheme. The circuits under test, the tester and the
// compaction of the scan outputs of the multi-chain schemes are outside.
//
// Interface and timing: see the four blocks; every handshake is
// valid/ready on the tester side, sampled at the rising clock edge.
// From the document: every default size (2K-bit memory with 16 chains, 3
// layers of 100-20-4 with 67-bit chains, 1636 RAS cells, 41 x 40 matrix).
// This design's choice: placing the four in one top instead of choosing one.
module lpt_top
  import lpt_pkg::*;
#(
  parameter int unsigned AE_N_BITS   = 2048,
  parameter int unsigned AE_M        = 16,
  parameter int unsigned MDC_L       = 3,
  parameter int unsigned MDC_GS [MDC_L] = '{100, 20, 4},
  parameter int unsigned MDC_CHAIN   = 67,
  parameter int unsigned RAS_N       = 1636,
  parameter int unsigned RAS_FCW     = 12,
  parameter int unsigned RAS_W       = 32,
  parameter int unsigned SM_R        = 41,
  parameter int unsigned SM_C        = 40,
  parameter int unsigned SM_INV      = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // Adaptive Encoding
  input  logic                      ae_si,
  input  logic                      ae_si_valid,
  output logic                      ae_si_ready,
  input  logic                      ae_random_mode,
  output logic [AE_M-1:0]           ae_scan_out,
  output logic                      ae_scan_en,
  output logic                      ae_capture,
  // Multilayer Data Copy
  input  logic                      mdc_in_bit,
  input  logic                      mdc_in_valid,
  output logic                      mdc_in_ready,
  output logic [MDC_GS[0]-1:0]      mdc_slice,
  output logic                      mdc_scan_en,
  output logic                      mdc_capture,
  output logic                      mdc_copy_done,
  output logic [$clog2(MDC_L)-1:0]  mdc_copy_layer,
  // Cocktail random access scan
  input  logic                      ras_start,
  input  logic [15:0]               ras_num_seeds,
  input  logic [15:0]               ras_test_len,
  input  logic [15:0]               ras_num_ras,
  input  logic                      ras_si,
  input  logic                      ras_si_valid,
  output logic                      ras_si_ready,
  output logic [RAS_N-1:0]          ras_q,
  input  logic [RAS_N-1:0]          ras_d,
  output logic [RAS_W-1:0]          ras_sig,
  output ras_phase_e                ras_phase,
  output logic                      ras_done,
  // Scan Matrix
  input  logic                      sm_start,
  output logic                      sm_ready,
  input  logic                      sm_si,
  output logic                      sm_so,
  output logic                      sm_shift,
  output logic                      sm_update,
  output logic                      sm_capture,
  output logic                      sm_done,
  input  logic [SM_R*SM_C-1:0]      sm_d,
  output logic [SM_R*SM_C-1:0]      sm_q
);

  ae_system #(.N_BITS(AE_N_BITS), .M(AE_M)) u_ae (
    .clk, .rst_n, .si(ae_si), .si_valid(ae_si_valid), .si_ready(ae_si_ready),
    .random_mode(ae_random_mode), .scan_out(ae_scan_out), .scan_en(ae_scan_en),
    .capture(ae_capture));

  mdc_decoder #(.L(MDC_L), .GS(MDC_GS), .CHAIN_LEN(MDC_CHAIN)) u_mdc (
    .clk, .rst_n, .in_bit(mdc_in_bit), .in_valid(mdc_in_valid), .in_ready(mdc_in_ready),
    .slice(mdc_slice), .scan_en(mdc_scan_en), .capture(mdc_capture),
    .copy_done(mdc_copy_done), .copy_layer(mdc_copy_layer));

  cocktail_ras #(.N(RAS_N), .FCW(RAS_FCW), .W(RAS_W)) u_ras (
    .clk, .rst_n, .start(ras_start), .num_seeds(ras_num_seeds), .test_len(ras_test_len),
    .num_ras(ras_num_ras), .si(ras_si), .si_valid(ras_si_valid), .si_ready(ras_si_ready),
    .q(ras_q), .d(ras_d), .sig(ras_sig), .phase(ras_phase), .done(ras_done));

  sm_scan_matrix #(.R(SM_R), .C(SM_C), .INV_EVERY(SM_INV)) u_sm (
    .clk, .rst_n, .start(sm_start), .ready(sm_ready), .si(sm_si), .so(sm_so),
    .shift(sm_shift), .update(sm_update), .capture(sm_capture), .done(sm_done),
    .d(sm_d), .q(sm_q));

endmodule
