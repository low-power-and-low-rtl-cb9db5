// Adaptive Encoding at the memory sizes and chain counts of the evaluated
// circuits.
//
// Runs, in parallel, decompressors with a 1K memory and 16 chains, a 4K
// memory and 16 chains, an 8K memory with 16 and with 256 chains, a 16K
// memory with 256 chains, and 32K, 64K and 128K memories with 1024 chains,
// with the tester at clock ratios 2, 5 and 10 (see ae_check for what is
// compared).
module tb_ae_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 8;
  int   ck [NW];
  int   fl [NW];
  logic fin [NW];

  ae_check #(.N_BITS(1024),  .M(16),  .FLIPS(10), .RATE(2))  u_b22  (.clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  ae_check #(.N_BITS(4096),  .M(16),  .FLIPS(30), .RATE(5))  u_b18  (.clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  ae_check #(.N_BITS(8192),  .M(16),  .FLIPS(40), .RATE(2))  u_b19a (.clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  ae_check #(.N_BITS(8192),  .M(256), .FLIPS(40), .RATE(10)) u_b19b (.clk, .rst_n, .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));
  ae_check #(.N_BITS(16384), .M(256), .FLIPS(60), .RATE(5))  u_leon1 (.clk, .rst_n, .checks(ck[4]), .failures(fl[4]), .finished(fin[4]));
  ae_check #(.N_BITS(32768),  .M(1024), .FLIPS(60),  .RATE(5)) u_rca   (.clk, .rst_n, .checks(ck[5]), .failures(fl[5]), .finished(fin[5]));
  ae_check #(.N_BITS(65536),  .M(1024), .FLIPS(80),  .RATE(5)) u_leon2 (.clk, .rst_n, .checks(ck[6]), .failures(fl[6]), .finished(fin[6]));
  ae_check #(.N_BITS(131072), .M(1024), .FLIPS(120), .RATE(5)) u_fft   (.clk, .rst_n, .checks(ck[7]), .failures(fl[7]), .finished(fin[7]));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NW; i++) wait (fin[i]);
    for (int i = 0; i < NW; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
