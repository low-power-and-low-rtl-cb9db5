// Self-checking testbench for the MDC decoder on the 8-4-2 buffer of the document's examples.
//
// The two worked examples of the document come first, on an 8-4-2 buffer:
// the 16-bit cube coded as 00001111 must give the slice 10101010 twice, and
// with 10101010 in the buffer the stream 000 00 0 10 0 1 0 01 must give the
// slice 1X010100 with X = 0 (both written from chain 0 to chain 7).
// Random test cubes with a chosen density of specified bits are
// encoded by a reference encoder (mdc_tb_pkg) and streamed at one bit per
// cycle. Every slice the decoder shifts out must equal the reference
// decoder's slice, and therefore agree with every specified bit of the cube.
// The testbench also checks that the stream is taken without a wait except
// for one cycle per pattern, that capture follows each CHAIN_LEN-th slice,
// and that Copy happened at every layer.
module tb_mdc_decoder;
  import mdc_tb_pkg::*;

  localparam int unsigned L  = 3;
  localparam int unsigned GS [L] = '{8, 4, 2};
  localparam int unsigned A  = GS[0];
  localparam int unsigned CL = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_bit, in_valid, in_ready, scan_en, capture, copy_done;
  logic [A-1:0]         slice;
  logic [$clog2(L)-1:0] copy_layer;

  mdc_decoder #(.L(L), .GS(GS), .CHAIN_LEN(CL)) dut (
    .clk, .rst_n, .in_bit, .in_valid, .in_ready, .slice, .scan_en, .capture,
    .copy_done, .copy_layer);

  int checks = 0, failures = 0;
  int nslices = 0, ncaps = 0, waits = 0, cyc = 0;
  bit got[$];
  int hw_copies [L];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (scan_en) begin
      // slice[j] drives chain j; load order is slice[A-1] ... slice[0]
      for (int j = int'(A) - 1; j >= 0; j--) got.push_back(slice[j]);
      nslices++;
    end
    if (capture) begin
      ncaps++;
      if (nslices % int'(CL) != 0) begin
        failures++;
        $display("FAIL: capture after %0d slices", nslices);
      end
    end
    if (copy_done) hw_copies[copy_layer]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit q[$];
  bit prev[];
  bit filled[];
  int copies[];
  int gsd[];

  task automatic send();
    while (q.size() > 0) begin
      @(negedge clk);
      in_bit = q.pop_front();
      in_valid = 1'b1;
      while (!in_ready) begin
        waits++;
        @(negedge clk);
      end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // Decode a raw stream and compare the slices with `expect_bits` (load order).
  task automatic run_stream(input bit expect_bits[], input string name);
    int n0 = got.size();
    int bad = 0;
    send();
    repeat (3) @(posedge clk);
    check(got.size() - n0 == expect_bits.size(),
          $sformatf("%s: %0d bits out, expected %0d", name, got.size() - n0, expect_bits.size()));
    for (int i = 0; i < expect_bits.size() && n0 + i < got.size(); i++)
      if (got[n0 + i] != expect_bits[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d wrong bits", name, bad));
  endtask

  task automatic random_pattern(input int pct);
    int cube[];
    int nb, c0, w0;
    cube = new[A * CL];
    foreach (cube[i]) cube[i] = ($urandom_range(99) < pct) ? $urandom_range(1) : 2;
    q.delete();
    encode(cube, A, gsd, prev, q, filled, copies);
    nb = q.size();
    c0 = cyc;
    w0 = waits;
    run_stream(filled, $sformatf("random cube %0d%%", pct));
    begin
      int bad = 0;
      foreach (cube[i]) if (cube[i] != 2 && bit'(cube[i]) != filled[i]) bad++;
      check(bad == 0, "reference encoder broke a specified bit");
    end
    check(waits - w0 <= 1, $sformatf("tester waited %0d cycles in one pattern", waits - w0));
    check(cyc - c0 <= nb + 6, $sformatf("pattern of %0d bits took %0d cycles", nb, cyc - c0));
  endtask

  initial begin
    in_bit = 1'b0;
    in_valid = 1'b0;
    prev = new[A];
    foreach (prev[i]) prev[i] = 1'b0;
    copies = new[L];
    gsd = new[L];
    foreach (gsd[i]) gsd[i] = int'(GS[i]);
    foreach (hw_copies[i]) hw_copies[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Example 1: 000 01 1 1 | 1  -> slices 10101010, 10101010 (chain 0 first)
    begin
      bit e[];
      e = new[16];
      for (int i = 0; i < 16; i++) e[i] = bit'(i % 2);   // load order: chain 7 .. chain 0
      q = '{0,0,0,0,1,1,1,1};
      run_stream(e, "example 00001111");
      check(q.size() == 0 && ncaps == 1, "example 1 is one pattern");
    end
    // Example 2: previous slice 10101010; 000 00 0 10 0 1 0 01 -> 1X010100, X = 0
    begin
      bit e[];
      bit s[8] = '{1,0,0,1,0,1,0,0};               // chain 0 .. chain 7
      e = new[16];
      for (int i = 0; i < 8; i++) e[i] = s[7 - i];
      for (int i = 0; i < 8; i++) e[8 + i] = s[7 - i];
      q = '{0,0,0,0,0, 0,1,0, 0,1, 0,0,1, 1};      // last 1: copy the slice at layer 1
      run_stream(e, "example 00000010010X1");
      for (int i = 0; i < 8; i++) prev[i] = s[7 - i];
    end

    for (int t = 0; t < 60; t++) random_pattern($urandom_range(30, 1));
    random_pattern(100);                      // fully specified: Shift only
    for (int i = 0; i < int'(L); i++)
      check(hw_copies[i] > 0, $sformatf("no Copy at layer %0d", i + 1));
    $display("Copies per layer: %0d %0d %0d", hw_copies[0], L > 1 ? hw_copies[1] : 0, L > 2 ? hw_copies[2] : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
