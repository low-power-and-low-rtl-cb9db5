// Self-checking testbench for the Cocktail Scan hardware (reduced to 20 cells).
//
// A small combinational function stands in for the circuit under test. The
// testbench streams three seeds with four capture cycles each, then random
// deterministic patterns coded as bit flips, and keeps its own model of the
// cells and of the response signature. It checks: the cells after the
// segmented random phase (seed followed by its chain of responses), the cells
// and signature at the end, that in the random-access phase never more than
// one cell changes per cycle, and the cycle count of the whole test
// (N + test_len per seed, FCW + 1 per pattern, AW + 2 per flip).
module tb_cocktail_ras;
  import lpt_pkg::*;

  localparam int unsigned N   = 20;
  localparam int unsigned AW  = 5;
  localparam int unsigned FCW = 4;
  localparam int unsigned W   = 32;
  localparam logic [W-1:0] POLY = 32'h0040_0007;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, si, si_valid, si_ready, done;
  logic [15:0]  num_seeds, test_len, num_ras;
  logic [N-1:0] q, d;
  logic [W-1:0] sig;
  ras_phase_e   phase;

  cocktail_ras #(.N(N), .AW(AW), .FCW(FCW), .W(W)) dut (
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

  int checks = 0, failures = 0;
  int cyc = 0, multi_change = 0, ras_cycles = 0;
  logic [N-1:0] q_prev;
  ras_phase_e   phase_prev;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    q_prev <= q;
    phase_prev <= phase;
    if (rst_n && phase == PH_RAS && phase_prev == PH_RAS) begin
      ras_cycles++;
      if ($countones(q ^ q_prev) > 1) begin
        multi_change++;
        $display("multi change at cycle %0d: %h -> %h", cyc, q_prev, q);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit stream[$];
  task automatic push(input int unsigned v, input int unsigned w);
    for (int i = int'(w) - 1; i >= 0; i--) stream.push_back(bit'((v >> i) & 1));
  endtask

  localparam int NS = 3, TL = 4, NR = 6;
  logic [N-1:0] model, after_srst;
  logic [W-1:0] msig;
  int expect_cycles;

  initial begin
    start = 1'b0; si = 1'b0; si_valid = 1'b0;
    num_seeds = 16'(NS); test_len = 16'(TL); num_ras = 16'(NR);
    model = '0; msig = '0; expect_cycles = 0;
    // build the stream and the model
    for (int s = 0; s < NS; s++) begin
      logic [N-1:0] seed;
      seed = N'({$urandom, $urandom});
      for (int i = 0; i < int'(N); i++) stream.push_back(seed[i]);   // cell 0 first
      model = seed;
      for (int t = 0; t < TL; t++) begin
        msig = misr(msig, cut(model));
        model = cut(model);
      end
      expect_cycles += N + TL;
    end
    after_srst = model;
    for (int p = 0; p < NR; p++) begin
      int nf = (p == 2) ? 0 : $urandom_range(7, 1);
      push(nf, FCW);
      for (int f = 0; f < nf; f++) begin
        int unsigned a = $urandom_range(N - 1);
        bit v = 1'($urandom_range(1));
        push(a, AW);
        stream.push_back(v);
        model[a] = v;
      end
      msig = misr(msig, cut(model));   // responses observed, not captured
      expect_cycles += FCW + nf * (AW + 2) + 1;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    begin
      automatic int c0 = cyc;
      automatic bit seen_ras = 1'b0;
      while (!done && cyc - c0 < 5000) begin
        si = stream.size() > 0 ? stream[0] : 1'b0;
        si_valid = stream.size() > 0;
        @(posedge clk);
        if (si_valid && si_ready) void'(stream.pop_front());
        if (!seen_ras && phase == PH_RAS) begin
          seen_ras = 1'b1;
          check(q == after_srst, $sformatf("cells after SRST %h, expected %h", q, after_srst));
        end
        @(negedge clk);
      end
      check(done, "test did not finish");
      check(seen_ras, "never entered the random-access phase");
      check(stream.size() == 0, $sformatf("%0d stream bits left", stream.size()));
      check(cyc - c0 == expect_cycles,
            $sformatf("test took %0d cycles, expected %0d", cyc - c0, expect_cycles));
    end
    check(q == model, $sformatf("final cells %h, expected %h", q, model));
    check(sig == msig, $sformatf("signature %h, expected %h", sig, msig));
    check(multi_change == 0, $sformatf("%0d cycles changed several cells in RAS phase", multi_change));
    check(ras_cycles > 0, "no RAS cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
