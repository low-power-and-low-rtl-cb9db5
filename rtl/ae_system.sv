// Adaptive Encoding test architecture: decoder machine plus embedded memory.
//
// The whole decompressor seen from outside: a single tester pin in, M scan
// chain inputs out. The tester streams headers and packets (see ae_decoder);
// the memory keeps the previous test pattern so that only its differences to
// the next pattern travel over the pin. In the document the memory is an
// embedded memory that the SoC already has; here it is a dedicated array of
// the same organisation (N_BITS/M blocks of M bits).
//
// Timing: one system clock. A tester bit moves when si_valid and si_ready are
// both high; scan_en marks the cycles in which the chains shift, capture the
// cycle after the last shift.
module ae_system #(
  parameter int unsigned N_BITS = 2048,
  parameter int unsigned M      = 16,
  parameter int unsigned NPKT_W = 8,
  parameter int unsigned HDR_W  = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         si,
  input  logic         si_valid,
  output logic         si_ready,
  input  logic         random_mode,
  output logic [M-1:0] scan_out,
  output logic         scan_en,
  output logic         capture
);

  localparam int unsigned BW = $clog2(N_BITS / M);

  logic          rd_en, wr_en;
  logic [BW-1:0] rd_addr, wr_addr;
  logic [M-1:0]  rd_data, wr_data;

  ae_decoder #(.N_BITS(N_BITS), .M(M), .NPKT_W(NPKT_W), .HDR_W(HDR_W)) u_dec (
    .clk, .rst_n, .si, .si_valid, .si_ready, .random_mode,
    .scan_out, .scan_en, .capture,
    .mem_rd_en(rd_en), .mem_rd_addr(rd_addr), .mem_rd_data(rd_data),
    .mem_wr_en(wr_en), .mem_wr_addr(wr_addr), .mem_wr_data(wr_data)
  );

  ae_pattern_memory #(.N_BITS(N_BITS), .M(M)) u_mem (
    .clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data
  );

endmodule
