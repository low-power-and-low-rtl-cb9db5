// End-to-end testbench of the top level at its full default size.
//
// Each of the four test architectures is driven by its own thread, all at
// the same time, and checked against a reference model:
//   Adaptive Encoding: random-mode patterns from 16-bit seeds, then
//     deterministic 2048-bit patterns coded as difference packets by a
//     reference encoder, fed at full rate (block updates must stall the
//     tester) and at half rate (long packets that span several blocks);
//     every unloaded pattern is compared bit by bit.
//   Multilayer Data Copy: random 6700-bit test cubes (67 slices of 100 bits)
//     coded by a reference encoder; every slice shifted out must match and
//     keep every specified bit.
//   Cocktail random access scan: 1636 cells, seeds with capture cycles, then
//     patterns coded as cell flips; cells, signature and cycle count are
//     compared, and no RAS cycle may change more than one cell.
//   Scan Matrix: 41 x 40 cells, patterns shifted one cell per cycle; the
//     scan output, the unchanged cell outputs during shift, the update and
//     the capture are compared.
// Besides the checks, the testbench counts how often each mechanism happened
// (tester stalls, random-mode unloads, packets spanning blocks, Copy at each
// layer, raw shifts, SRST and RAS cycles, matrix shift, update and capture)
// and fails if one of them never did.
module tb_lpt_top;
  import lpt_pkg::*;

  // sizes of the default top
  localparam int unsigned AE_N   = 2048;
  localparam int unsigned AE_M   = 16;
  localparam int unsigned AE_NB  = AE_N / AE_M;
  localparam int unsigned MDC_L  = 3;
  localparam int unsigned MDC_A  = 100;
  localparam int unsigned MDC_CL = 67;
  localparam int unsigned RAS_N  = 1636;
  localparam int unsigned RAS_AW = 11;
  localparam int unsigned RAS_FCW = 12;
  localparam int unsigned RAS_W  = 32;
  localparam logic [RAS_W-1:0] POLY = 32'h0040_0007;
  localparam int unsigned SM_R   = 41;
  localparam int unsigned SM_C   = 40;
  localparam int unsigned SM_N   = SM_R * SM_C;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  ae_si, ae_si_valid, ae_si_ready, ae_random_mode, ae_scan_en, ae_capture;
  logic [AE_M-1:0]       ae_scan_out;
  logic                  mdc_in_bit, mdc_in_valid, mdc_in_ready, mdc_scan_en, mdc_capture, mdc_copy_done;
  logic [MDC_A-1:0]      mdc_slice;
  logic [1:0]            mdc_copy_layer;
  logic                  ras_start, ras_si, ras_si_valid, ras_si_ready, ras_done;
  logic [15:0]           ras_num_seeds, ras_test_len, ras_num_ras;
  logic [RAS_N-1:0]      ras_q, ras_d;
  logic [RAS_W-1:0]      ras_sig;
  ras_phase_e            ras_phase;
  logic                  sm_start, sm_ready, sm_si, sm_so, sm_shift, sm_update, sm_capture, sm_done;
  logic [SM_N-1:0]       sm_d, sm_q;

  lpt_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- counters
  int ae_stalls = 0, ae_random_rows = 0, ae_det_patterns = 0, ae_long_packets = 0;
  int mdc_copies [MDC_L];
  int mdc_shifts = 0, mdc_caps = 0;
  int ras_srst_cycles = 0, ras_ras_cycles = 0, ras_multi = 0;
  int sm_shifts = 0, sm_updates = 0, sm_captures = 0;

  // ------------------------------------------------------- Adaptive Encoding
  bit ae_got [AE_N];
  int ae_rows = 0;
  bit ae_cur[], ae_nxt[];
  bit ae_q[$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ae_scan_en) begin
      for (int j = 0; j < int'(AE_M); j++) ae_got[ae_rows * AE_M + j] = ae_scan_out[j];
      ae_rows = ae_rows + 1;
    end
  end

  task automatic ae_send(input int rate);
    int idx = 0;
    while (ae_q.size() > 0) begin
      @(negedge clk);
      ae_si = ae_q.pop_front();
      ae_si_valid = 1'b1;
      while (!ae_si_ready) begin
        if (idx > 0) ae_stalls++;
        @(negedge clk);
      end
      idx++;
      @(posedge clk);
      for (int k = 1; k < rate; k++) begin
        @(negedge clk);
        ae_si_valid = 1'b0;
      end
    end
    @(negedge clk);
    ae_si_valid = 1'b0;
  endtask

  task automatic ae_wait_capture();
    int guard = 0;
    while (ae_capture !== 1'b1 && guard < 100000) begin
      @(posedge clk);
      guard++;
    end
    @(negedge clk);
  endtask

  task automatic ae_random_pattern();
    bit [AE_M-1:0] seed;
    int bad = 0;
    seed = AE_M'($urandom);
    ae_q.delete();
    for (int j = 0; j < int'(AE_M); j++) ae_q.push_back(seed[j]);
    ae_rows = 0;
    ae_random_mode = 1'b1;
    ae_send(1);
    @(negedge clk);
    ae_random_mode = 1'b0;
    ae_wait_capture();
    check(ae_rows == int'(AE_NB), $sformatf("AE random pattern shifted %0d rows", ae_rows));
    for (int i = 0; i < int'(AE_N); i++) if (ae_got[i] != seed[i % AE_M]) bad++;
    check(bad == 0, $sformatf("AE random pattern wrong in %0d bits", bad));
    if (ae_rows == int'(AE_NB) && bad == 0) ae_random_rows += ae_rows;
  endtask

  // flips: number of changed runs; runlen: their maximum length
  task automatic ae_det_pattern(input int flips, input int runlen, input int gap, input int rate);
    int np, bad = 0;
    ae_nxt = new[AE_N];
    foreach (ae_nxt[i]) ae_nxt[i] = ae_cur[i];
    for (int f = 0; f < flips; f++) begin
      int unsigned p = $urandom_range(AE_N - 1);
      int unsigned l = $urandom_range(runlen, 1);
      for (int unsigned b = 0; b < l && p + b < AE_N; b++) ae_nxt[p + b] = ~ae_cur[p + b];
      // a run over a block boundary gives a packet that updates several blocks
      if (l > 1 && (p / AE_M) != ((p + l - 1) / AE_M) && p + l <= AE_N) ae_long_packets++;
    end
    ae_q.delete();
    np = ae_tb_pkg::encode(ae_cur, ae_nxt, gap, 8, 4, ae_q);
    check(np < 256, "AE test pattern needs too many packets");
    ae_rows = 0;
    ae_random_mode = 1'b0;
    ae_send(rate);
    ae_wait_capture();
    check(ae_rows == int'(AE_NB), $sformatf("AE pattern shifted %0d rows", ae_rows));
    for (int i = 0; i < int'(AE_N); i++) if (ae_got[i] != ae_nxt[i]) bad++;
    check(bad == 0, $sformatf("AE pattern wrong in %0d bits (%0d packets)", bad, np));
    if (bad == 0) ae_det_patterns++;
    foreach (ae_cur[i]) ae_cur[i] = ae_nxt[i];
  endtask

  task automatic run_ae();
    ae_si = 1'b0; ae_si_valid = 1'b0; ae_random_mode = 1'b0;
    ae_cur = new[AE_N];
    foreach (ae_cur[i]) ae_cur[i] = 1'b0;
    wait (rst_n);
    repeat (2) ae_random_pattern();
    ae_det_pattern(40, 4, 1, 1);              // full rate: tester stalls on block updates
    ae_det_pattern(6, 60, 0, 2);              // long runs over several blocks
    ae_det_pattern(100, 3, 2, 1);
  endtask

  // ---------------------------------------------------- Multilayer Data Copy
  bit mdc_got[$];
  bit mdc_q[$];
  bit mdc_prev[], mdc_filled[];
  int mdc_cp[], mdc_gs[];

  always @(posedge clk) begin
    if (!rst_n) begin end
    else if (mdc_scan_en) for (int j = int'(MDC_A) - 1; j >= 0; j--) mdc_got.push_back(mdc_slice[j]);
    if (rst_n && mdc_capture) mdc_caps++;
    if (rst_n && mdc_copy_done) mdc_copies[mdc_copy_layer]++;
  end

  task automatic mdc_pattern(input int pct);
    int cube[];
    int n0, bad = 0, bad_spec = 0;
    cube = new[MDC_A * MDC_CL];
    foreach (cube[i]) cube[i] = ($urandom_range(99) < pct) ? $urandom_range(1) : 2;
    mdc_q.delete();
    mdc_tb_pkg::encode(cube, MDC_A, mdc_gs, mdc_prev, mdc_q, mdc_filled, mdc_cp);
    n0 = mdc_got.size();
    while (mdc_q.size() > 0) begin
      @(negedge clk);
      mdc_in_bit = mdc_q.pop_front();
      mdc_in_valid = 1'b1;
      while (!mdc_in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    mdc_in_valid = 1'b0;
    repeat (3) @(posedge clk);
    check(mdc_got.size() - n0 == mdc_filled.size(),
          $sformatf("MDC shifted %0d bits, expected %0d", mdc_got.size() - n0, mdc_filled.size()));
    for (int i = 0; i < mdc_filled.size() && n0 + i < mdc_got.size(); i++) begin
      if (mdc_got[n0 + i] != mdc_filled[i]) bad++;
      if (cube[i] != 2 && bit'(cube[i]) != mdc_got[n0 + i]) bad_spec++;
    end
    check(bad == 0, $sformatf("MDC slices wrong in %0d bits", bad));
    check(bad_spec == 0, $sformatf("MDC broke %0d specified bits", bad_spec));
  endtask

  task automatic run_mdc();
    mdc_in_bit = 1'b0; mdc_in_valid = 1'b0;
    mdc_prev = new[MDC_A];
    foreach (mdc_prev[i]) mdc_prev[i] = 1'b0;
    mdc_cp = new[MDC_L];
    mdc_gs = '{100, 20, 4};
    wait (rst_n);
    mdc_pattern(3);
    mdc_pattern(20);
    mdc_pattern(60);
    // groups of the smallest size not produced by a Copy were shifted in raw
    mdc_shifts = 3 * int'(MDC_CL) * (int'(MDC_A) / 4)
               - (mdc_copies[0] * 25 + mdc_copies[1] * 5 + mdc_copies[2]);
  endtask

  // -------------------------------------------- Cocktail random access scan
  function automatic logic [RAS_N-1:0] cut(input logic [RAS_N-1:0] v);
    logic [RAS_N-1:0] r;
    for (int i = 0; i < int'(RAS_N); i++)
      r[i] = v[i] ^ (v[(i + 1) % RAS_N] & ~v[(i + 7) % RAS_N]) ^ (i % 5 == 0);
    return r;
  endfunction

  function automatic logic [RAS_W-1:0] misr(input logic [RAS_W-1:0] s, input logic [RAS_N-1:0] v);
    logic [RAS_W-1:0] f = '0;
    for (int i = 0; i < int'(RAS_N); i++) f[i % RAS_W] ^= v[i];
    return ({s[RAS_W-2:0], 1'b0} ^ (s[RAS_W-1] ? POLY : '0)) ^ f;
  endfunction

  assign ras_d = cut(ras_q);

  logic [RAS_N-1:0] ras_q_prev;
  ras_phase_e       ras_phase_prev;
  always @(posedge clk) begin
    ras_q_prev <= ras_q;
    ras_phase_prev <= ras_phase;
    if (rst_n && ras_phase == PH_SRST) ras_srst_cycles++;
    if (rst_n && ras_phase == PH_RAS && ras_phase_prev == PH_RAS) begin
      ras_ras_cycles++;
      if ($countones(ras_q ^ ras_q_prev) > 1) ras_multi++;
    end
  end

  bit ras_stream[$];
  task automatic ras_push(input int unsigned v, input int unsigned w);
    for (int i = int'(w) - 1; i >= 0; i--) ras_stream.push_back(bit'((v >> i) & 1));
  endtask

  task automatic run_ras();
    localparam int NS = 2, TL = 3, NR = 5;
    logic [RAS_N-1:0] model, after_srst;
    logic [RAS_W-1:0] msig;
    int expect_cycles, c0;
    bit seen_ras;
    ras_start = 1'b0; ras_si = 1'b0; ras_si_valid = 1'b0;
    ras_num_seeds = 16'(NS); ras_test_len = 16'(TL); ras_num_ras = 16'(NR);
    model = '0; msig = '0; expect_cycles = 0; seen_ras = 1'b0;
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < int'(RAS_N); i++) begin
        model[i] = 1'($urandom_range(1));
        ras_stream.push_back(model[i]);
      end
      for (int t = 0; t < TL; t++) begin
        msig = misr(msig, cut(model));
        model = cut(model);
      end
      expect_cycles += RAS_N + TL;
    end
    after_srst = model;
    for (int p = 0; p < NR; p++) begin
      int nf = (p == 1) ? 0 : $urandom_range(40, 1);
      ras_push(nf, RAS_FCW);
      for (int f = 0; f < nf; f++) begin
        int unsigned a = $urandom_range(RAS_N - 1);
        bit v = 1'($urandom_range(1));
        ras_push(a, RAS_AW);
        ras_stream.push_back(v);
        model[a] = v;
      end
      msig = misr(msig, cut(model));
      expect_cycles += RAS_FCW + nf * (RAS_AW + 2) + 1;
    end
    wait (rst_n);
    @(negedge clk);
    ras_start = 1'b1;
    @(negedge clk);
    ras_start = 1'b0;
    c0 = cyc;
    while (!ras_done && cyc - c0 < 100000) begin
      ras_si = ras_stream.size() > 0 ? ras_stream[0] : 1'b0;
      ras_si_valid = ras_stream.size() > 0;
      @(posedge clk);
      if (ras_si_valid && ras_si_ready) void'(ras_stream.pop_front());
      if (!seen_ras && ras_phase == PH_RAS) begin
        seen_ras = 1'b1;
        check(ras_q == after_srst, "RAS cells after the seeds differ from the model");
      end
      @(negedge clk);
    end
    ras_si_valid = 1'b0;
    check(ras_done, "RAS test did not finish");
    check(ras_stream.size() == 0, $sformatf("RAS: %0d stream bits left", ras_stream.size()));
    check(cyc - c0 == expect_cycles,
          $sformatf("RAS test took %0d cycles, expected %0d", cyc - c0, expect_cycles));
    check(ras_q == model, "RAS final cells differ from the model");
    check(ras_sig == msig, $sformatf("RAS signature %h, expected %h", ras_sig, msig));
    check(ras_multi == 0, $sformatf("%0d RAS cycles changed several cells", ras_multi));
  endtask

  // ------------------------------------------------------------- Scan Matrix
  always @(posedge clk) begin
    if (rst_n && sm_shift) sm_shifts++;
    if (rst_n && sm_update) sm_updates++;
    if (rst_n && sm_capture) sm_captures++;
  end

  task automatic run_sm();
    logic [SM_N-1:0] pat, resp, held;
    bit known = 1'b0;
    int bad_so, moved;
    sm_start = 1'b0; sm_si = 1'b0; sm_d = '0;
    wait (rst_n);
    @(posedge clk); #1;
    for (int p = 0; p < 3; p++) begin
      for (int i = 0; i < int'(SM_N); i++) begin
        pat[i] = 1'($urandom_range(1));
        resp[i] = 1'($urandom_range(1));
      end
      sm_d = resp;
      held = sm_q;
      bad_so = 0; moved = 0;
      check(sm_ready, "SM not ready");
      sm_start = 1'b1;
      @(posedge clk); #1;
      sm_start = 1'b0;
      for (int t = 0; t < int'(SM_N); t++) begin
        automatic int unsigned idx = (t % SM_R) * SM_C + t / SM_R;
        sm_si = pat[idx];
        #1;
        if (!sm_shift) bad_so++;
        if (known && sm_so != held[idx]) bad_so++;
        if (sm_q != held) moved++;
        @(posedge clk); #1;
      end
      check(bad_so == 0, $sformatf("SM scan-out wrong in %0d cycles", bad_so));
      check(moved == 0, $sformatf("SM cell outputs moved in %0d shift cycles", moved));
      check(sm_update, "SM: no update cycle");
      @(posedge clk); #1;
      check(sm_q == pat, "SM pattern not applied by the update");
      check(sm_capture, "SM: no capture cycle");
      @(posedge clk); #1;
      check(sm_q == resp, "SM responses not captured");
      check(sm_done, "SM: no done");
      known = 1'b1;
    end
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    foreach (mdc_copies[i]) mdc_copies[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      run_ae();
      run_mdc();
      run_ras();
      run_sm();
    join
    repeat (5) @(posedge clk);
    // every mechanism must have happened at least once
    check(ae_stalls > 0, "AE: the tester was never stalled by a block update");
    check(ae_random_rows > 0, "AE: no random-mode pattern");
    check(ae_det_patterns > 0, "AE: no deterministic pattern decoded");
    check(ae_long_packets > 0, "AE: no packet spanning several blocks");
    for (int i = 0; i < int'(MDC_L); i++)
      check(mdc_copies[i] > 0, $sformatf("MDC: no Copy at layer %0d", i + 1));
    check(mdc_shifts > 0, "MDC: no raw Shift at the last layer");
    check(mdc_caps == 3, $sformatf("MDC: %0d captures for 3 patterns", mdc_caps));
    check(ras_srst_cycles > 0, "RAS: no SRST cycle");
    check(ras_ras_cycles > 0, "RAS: no random-access cycle");
    check(sm_shifts == 3 * int'(SM_N), $sformatf("SM: %0d shift cycles", sm_shifts));
    check(sm_updates == 3 && sm_captures == 3, "SM: update or capture count wrong");
    $display("mechanisms: AE stalls=%0d random rows=%0d patterns=%0d long packets=%0d",
             ae_stalls, ae_random_rows, ae_det_patterns, ae_long_packets);
    $display("mechanisms: MDC copies=%0d/%0d/%0d raw shifts=%0d captures=%0d",
             mdc_copies[0], mdc_copies[1], mdc_copies[2], mdc_shifts, mdc_caps);
    $display("mechanisms: RAS srst cycles=%0d ras cycles=%0d",
             ras_srst_cycles, ras_ras_cycles);
    $display("mechanisms: SM shift=%0d update=%0d capture=%0d", sm_shifts, sm_updates, sm_captures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
