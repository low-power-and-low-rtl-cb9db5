// Self-checking testbench for the Adaptive Encoding decoder machine (with its memory), at a reduced size of 128 bits in blocks of 8.
//
// A reference encoder (ae_tb_pkg) turns a chain of random test patterns into
// the decoder's packet stream. Each pattern differs from the one before it in
// a random number of bits, so packets of one bit, merged packets that carry
// zeros, packets that run over a block boundary and zero-width fields all
// occur. The testbench feeds the stream at one bit per cycle (the decoder
// must stall it while a block is written back) and at one bit every second
// cycle (it must never stall), collects what the decoder shifts onto the
// M scan chains and compares it with the pattern it encoded. Random-mode
// patterns are checked to hold each seed bit on its chain for all shift
// cycles. Step 3 must take exactly N/M consecutive shift cycles.
module tb_ae_decoder;
  import ae_tb_pkg::*;

  localparam int unsigned N   = 128;
  localparam int unsigned M   = 8;
  localparam int unsigned NB  = N / M;
  localparam int unsigned NPW = 8;
  localparam int unsigned HW  = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         si, si_valid, si_ready, random_mode, scan_en, capture;
  logic [M-1:0] scan_out;

  logic                          rd_en, wr_en;
  logic [$clog2(N/M)-1:0]        rd_addr, wr_addr;
  logic [M-1:0]                  rd_data, wr_data;

  ae_decoder #(.N_BITS(N), .M(M), .NPKT_W(NPW), .HDR_W(HW)) dut (
    .clk, .rst_n, .si, .si_valid, .si_ready, .random_mode, .scan_out, .scan_en, .capture,
    .mem_rd_en(rd_en), .mem_rd_addr(rd_addr), .mem_rd_data(rd_data),
    .mem_wr_en(wr_en), .mem_wr_addr(wr_addr), .mem_wr_data(wr_data));

  ae_pattern_memory #(.N_BITS(N), .M(M)) u_mem (
    .clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  int checks = 0, failures = 0;
  int stalls = 0;
  int rows = 0, first_row_cyc = 0, last_row_cyc = 0, cyc = 0;
  bit got [N];
  bit cur[], nxt[];
  bit q[$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (scan_en) begin
      for (int j = 0; j < int'(M); j++) if (rows * M + j < N) got[rows * M + j] = scan_out[j];
      if (rows == 0) first_row_cyc = cyc;
      last_row_cyc = cyc;
      rows = rows + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Send q; a tester bit every `rate` cycles.
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
    while (capture !== 1'b1 && guard < 100000) begin
      @(posedge clk);
      guard++;
    end
    @(negedge clk);
  endtask

  task automatic det_pattern(input int flips, input int gap, input int rate, input bit expect_stall);
    int np, nbits, st0;
    nxt = new[N];
    foreach (nxt[i]) nxt[i] = cur[i];
    for (int f = 0; f < flips; f++) begin
      int unsigned p = $urandom_range(N - 1);
      int unsigned l = $urandom_range(6, 1);
      for (int unsigned b = 0; b < l && p + b < N; b++) nxt[p + b] = 1'($urandom_range(1));
    end
    q.delete();
    np = encode(cur, nxt, gap, NPW, HW, q);
    if (np >= (1 << NPW)) begin
      q.delete();
      np = encode(cur, nxt, N, NPW, HW, q);
    end
    nbits = q.size();
    rows = 0;
    stalls = 0;
    st0 = cyc;
    random_mode = 1'b0;
    send(rate);
    wait_capture();
    check(rows == int'(NB), $sformatf("step 3 shifted %0d rows, expected %0d", rows, NB));
    check(last_row_cyc - first_row_cyc == int'(NB) - 1, "step 3 rows not in consecutive cycles");
    begin
      int bad = 0;
      for (int i = 0; i < int'(N); i++) if (got[i] != nxt[i]) bad++;
      check(bad == 0, $sformatf("pattern mismatch in %0d bits (%0d packets, %0d stream bits)", bad, np, nbits));
    end
    if (expect_stall) check(stalls > 0 || np == 0, "no stall at one bit per cycle");
    else begin
      check(stalls == 0, $sformatf("%0d stalls at half rate", stalls));
      check(cyc - st0 <= rate * nbits + int'(NB) + 12,
            $sformatf("pattern took %0d cycles for %0d bits", cyc - st0, nbits));
    end
    foreach (cur[i]) cur[i] = nxt[i];
  endtask

  task automatic rnd_pattern();
    bit [M-1:0] seed;
    for (int j = 0; j < int'(M); j++) seed[j] = 1'($urandom_range(1));
    q.delete();
    for (int j = 0; j < int'(M); j++) q.push_back(seed[j]);
    rows = 0;
    random_mode = 1'b1;
    send(2);
    @(negedge clk);
    random_mode = 1'b0;
    wait_capture();
    check(rows == int'(NB), $sformatf("random pattern shifted %0d rows", rows));
    begin
      int bad = 0;
      for (int i = 0; i < int'(N); i++) if (got[i] != seed[i % M]) bad++;
      check(bad == 0, $sformatf("random pattern mismatch in %0d bits", bad));
    end
  endtask

  initial begin
    si = 1'b0;
    si_valid = 1'b0;
    random_mode = 1'b0;
    cur = new[N];
    foreach (cur[i]) cur[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // first test phase: random patterns from M-bit seeds
    repeat (2) rnd_pattern();
    // second phase: deterministic patterns coded as differences
    det_pattern(0, 0, 2, 1'b0);               // no packet at all
    det_pattern(N / 8, 0, 2, 1'b0);
    det_pattern(3, 40, 2, 1'b0);              // few long packets over block boundaries
    det_pattern(N / 16, 2, 1, 1'b1);          // full rate: block updates stall the tester
    for (int t = 0; t < 30; t++) det_pattern($urandom_range(N / 10, 1), $urandom_range(4), 2, 1'b0);
    rnd_pattern();
    det_pattern(N / 20, 1, 2, 1'b0);          // memory still holds the last deterministic pattern
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
