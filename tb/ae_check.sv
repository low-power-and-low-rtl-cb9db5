// Checker used by the Adaptive Encoding workload testbench: drives one
// decompressor (decoder plus pattern memory) of the given size.
//
// Runs one random-mode pattern, then deterministic patterns coded as
// difference packets by the reference encoder: one fed at a tester bit every
// RATE cycles (it must never stall when RATE >= 2) and one fed at the full
// clock rate (block updates must stall it). Every unloaded pattern is
// compared bit by bit, and the unload must take N_BITS/M shift cycles.
module ae_check #(
  parameter int unsigned N_BITS = 2048,
  parameter int unsigned M      = 16,
  parameter int unsigned FLIPS  = 20,
  parameter int unsigned RATE   = 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned NB = N_BITS / M;

  logic         si, si_valid, si_ready, random_mode, scan_en, capture;
  logic [M-1:0] scan_out;

  ae_system #(.N_BITS(N_BITS), .M(M)) dut (
    .clk, .rst_n, .si, .si_valid, .si_ready, .random_mode, .scan_out, .scan_en, .capture);

  bit got [N_BITS];
  int rows = 0, stalls = 0;
  bit cur[], nxt[];
  bit q[$];

  always @(posedge clk) begin
    if (rst_n && scan_en) begin
      for (int j = 0; j < int'(M); j++) got[rows * M + j] = scan_out[j];
      rows = rows + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d bits, %0d chains: %s", N_BITS, M, what);
    end
  endtask

  task automatic send(input int rate);
    int idx = 0;
    while (q.size() > 0) begin
      @(negedge clk);
      si = q.pop_front();
      si_valid = 1'b1;
      while (!si_ready) begin
        if (idx > 0) stalls++;
        @(negedge clk);
      end
      idx++;
      @(posedge clk);
      for (int k = 1; k < rate; k++) begin
        @(negedge clk);
        si_valid = 1'b0;
      end
    end
    @(negedge clk);
    si_valid = 1'b0;
  endtask

  task automatic wait_capture();
    int guard = 0;
    while (capture !== 1'b1 && guard < 1000000) begin
      @(posedge clk);
      guard++;
    end
    @(negedge clk);
  endtask

  task automatic det_pattern(input int rate, input bit expect_stall);
    int np, bad = 0;
    nxt = new[N_BITS];
    foreach (nxt[i]) nxt[i] = cur[i];
    for (int f = 0; f < int'(FLIPS); f++) begin
      int unsigned p = $urandom_range(N_BITS - 1);
      int unsigned l = $urandom_range(48, 1);
      for (int unsigned b = 0; b < l && p + b < N_BITS; b++) nxt[p + b] = 1'($urandom_range(1));
    end
    q.delete();
    np = ae_tb_pkg::encode(cur, nxt, 8, 8, 4, q);
    check(np < 256, "pattern needs too many packets");
    rows = 0;
    stalls = 0;
    send(rate);
    wait_capture();
    check(rows == int'(NB), $sformatf("unload took %0d shift cycles", rows));
    for (int i = 0; i < int'(N_BITS); i++) if (got[i] != nxt[i]) bad++;
    check(bad == 0, $sformatf("%0d bits wrong", bad));
    if (expect_stall) check(stalls > 0, "no stall at full rate");
    else check(stalls == 0, $sformatf("%0d stalls at one bit every %0d cycles", stalls, rate));
    foreach (cur[i]) cur[i] = nxt[i];
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    si = 1'b0; si_valid = 1'b0; random_mode = 1'b0;
    cur = new[N_BITS];
    foreach (cur[i]) cur[i] = 1'b0;
    wait (rst_n);
    begin
      bit [M-1:0] seed;
      int bad = 0;
      for (int j = 0; j < int'(M); j++) seed[j] = 1'($urandom_range(1));
      q.delete();
      for (int j = 0; j < int'(M); j++) q.push_back(seed[j]);
      rows = 0;
      random_mode = 1'b1;
      send(int'(RATE));
      @(negedge clk);
      random_mode = 1'b0;
      wait_capture();
      check(rows == int'(NB), $sformatf("random pattern took %0d shift cycles", rows));
      for (int i = 0; i < int'(N_BITS); i++) if (got[i] != seed[i % M]) bad++;
      check(bad == 0, $sformatf("random pattern wrong in %0d bits", bad));
    end
    det_pattern(int'(RATE), RATE < 2);
    det_pattern(1, 1'b1);
    finished = 1'b1;
  end
endmodule
