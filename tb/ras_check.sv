// Checker used by the Cocktail Scan workload testbench: runs one complete test
// on a cocktail_ras instance of N cells.
//
// A small combinational function stands in for the circuit under test. The
// checker streams SEEDS seed patterns with TL capture cycles each, then NPAT
// deterministic patterns coded as up to MAXF bit flips, and keeps its own
// model of the cells and of the response signature. It checks the cells
// after the segmented random phase, the cells and signature at the end,
// that no cycle of the random-access phase changes more than one cell, and
// the cycle count (N + TL per seed, FCW + 1 per pattern, AW + 2 per flip).
module ras_check #(
  parameter int unsigned N     = 74,
  parameter int unsigned SEEDS = 1,
  parameter int unsigned TL    = 4,
  parameter int unsigned NPAT  = 4,
  parameter int unsigned MAXF  = 7
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import lpt_pkg::*;

  localparam int unsigned AW  = $clog2(N);
  localparam int unsigned FCW = 12;
  localparam int unsigned W   = 32;
  localparam logic [W-1:0] POLY = 32'h0040_0007;

  logic         start, si, si_valid, si_ready, done;
  logic [15:0]  num_seeds, test_len, num_ras;
  logic [N-1:0] q, d;
  logic [W-1:0] sig;
  ras_phase_e   phase;

  cocktail_ras #(.N(N)) dut (
    .clk, .rst_n, .start, .num_seeds, .test_len, .num_ras, .si, .si_valid, .si_ready,
    .q, .d, .sig, .phase, .done);

  function automatic logic [N-1:0] cut(input logic [N-1:0] v);
    logic [N-1:0] r;
    for (int i = 0; i < int'(N); i++)
      r[i] = v[i] ^ (v[(i + 1) % N] & ~v[(i + 2) % N]) ^ (i % 3 == 0);
    return r;
  endfunction

  function automatic logic [W-1:0] misr(input logic [W-1:0] s, input logic [N-1:0] v);
    logic [W-1:0] f = '0;
    for (int i = 0; i < int'(N); i++) f[i % W] ^= v[i];
    return ({s[W-2:0], 1'b0} ^ (s[W-1] ? POLY : '0)) ^ f;
  endfunction

  assign d = cut(q);

  int cyc = 0, multi_change = 0, ras_cycles = 0;
  logic [N-1:0] q_prev;
  ras_phase_e   phase_prev;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    q_prev <= q;
    phase_prev <= phase;
    if (rst_n && phase == PH_RAS && phase_prev == PH_RAS) begin
      ras_cycles++;
      if ($countones(q ^ q_prev) > 1) multi_change++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d cells: %s", N, what);
    end
  endtask

  bit stream[$];
  task automatic push(input int unsigned v, input int unsigned w);
    for (int i = int'(w) - 1; i >= 0; i--) stream.push_back(bit'((v >> i) & 1));
  endtask

  logic [N-1:0] model, after_srst;
  logic [W-1:0] msig;
  int expect_cycles;

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    start = 1'b0; si = 1'b0; si_valid = 1'b0;
    num_seeds = 16'(SEEDS); test_len = 16'(TL); num_ras = 16'(NPAT);
    model = '0; msig = '0; expect_cycles = 0;
    for (int s = 0; s < int'(SEEDS); s++) begin
      for (int i = 0; i < int'(N); i++) begin
        model[i] = 1'($urandom_range(1));
        stream.push_back(model[i]);   // cell 0 first
      end
      for (int t = 0; t < int'(TL); t++) begin
        msig = misr(msig, cut(model));
        model = cut(model);
      end
      expect_cycles += N + TL;
    end
    after_srst = model;
    for (int p = 0; p < int'(NPAT); p++) begin
      int nf = $urandom_range(MAXF, 1);
      push(nf, FCW);
      for (int f = 0; f < nf; f++) begin
        int unsigned a = $urandom_range(N - 1);
        bit v = 1'($urandom_range(1));
        push(a, AW);
        stream.push_back(v);
        model[a] = v;
      end
      msig = misr(msig, cut(model));
      expect_cycles += FCW + nf * (AW + 2) + 1;
    end

    wait (rst_n);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    begin
      automatic int c0 = cyc;
      automatic bit seen_ras = 1'b0;
      while (!done && cyc - c0 < expect_cycles + 100) begin
        si = stream.size() > 0 ? stream[0] : 1'b0;
        si_valid = stream.size() > 0;
        @(posedge clk);
        if (si_valid && si_ready) void'(stream.pop_front());
        if (!seen_ras && phase == PH_RAS) begin
          seen_ras = 1'b1;
          check(q == after_srst, "cells after the segmented random phase");
        end
        @(negedge clk);
      end
      check(done, "test did not finish");
      check(seen_ras, "never entered the random-access phase");
      check(stream.size() == 0, $sformatf("%0d stream bits left", stream.size()));
      check(cyc - c0 == expect_cycles,
            $sformatf("test took %0d cycles, expected %0d", cyc - c0, expect_cycles));
    end
    check(q == model, "final cells");
    check(sig == msig, $sformatf("signature %h, expected %h", sig, msig));
    check(multi_change == 0, $sformatf("%0d cycles changed several cells", multi_change));
    check(ras_cycles > 0, "no random-access cycles");
    finished = 1'b1;
  end
endmodule
