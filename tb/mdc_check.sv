// Checker used by the MDC workload testbench: drives one MDC decoder of the
// given buffer organisation through NPAT random test cubes.
//
// Each cube (CHAIN_LEN slices of GS[0] bits, DENSITY percent of them
// specified) is coded by the reference encoder and streamed at one bit per
// clock. Every bit shifted into the chains must equal the reference decoding
// and keep every specified bit of the cube; each pattern must end with one
// capture, the tester may wait at most one cycle per pattern, and the
// decoder must take no more than stream length + 6 cycles per pattern.
module mdc_check #(
  parameter int unsigned L         = 3,
  parameter int unsigned GS [L]    = '{100, 20, 4},
  parameter int unsigned CHAIN_LEN = 4,
  parameter int unsigned DENSITY   = 10,
  parameter int unsigned NPAT      = 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   copies,
  output logic finished
);
  localparam int unsigned A = GS[0];

  logic                 in_bit, in_valid, in_ready, scan_en, capture, copy_done;
  logic [A-1:0]         slice;
  logic [$clog2(L)-1:0] copy_layer;

  mdc_decoder #(.L(L), .GS(GS), .CHAIN_LEN(CHAIN_LEN)) dut (
    .clk, .rst_n, .in_bit, .in_valid, .in_ready, .slice, .scan_en, .capture,
    .copy_done, .copy_layer);

  bit got[$];
  bit q[$];
  bit prev[], filled[];
  int cp[], gsd[];
  int caps = 0, waits = 0, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && scan_en) for (int j = int'(A) - 1; j >= 0; j--) got.push_back(slice[j]);
    if (rst_n && capture) caps++;
    if (rst_n && copy_done) copies++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: buffer %0d, %0d layers: %s", A, L, what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; copies = 0; finished = 1'b0;
    in_bit = 1'b0; in_valid = 1'b0;
    prev = new[A];
    foreach (prev[i]) prev[i] = 1'b0;
    cp = new[L];
    gsd = new[L];
    foreach (gsd[i]) gsd[i] = int'(GS[i]);
    wait (rst_n);
    for (int p = 0; p < int'(NPAT); p++) begin
      automatic int cube[] = new[A * CHAIN_LEN];
      automatic int n0, c0, w0, k0, nb, bad = 0, bad_spec = 0;
      foreach (cube[i]) cube[i] = ($urandom_range(99) < int'(DENSITY)) ? $urandom_range(1) : 2;
      q.delete();
      mdc_tb_pkg::encode(cube, A, gsd, prev, q, filled, cp);
      nb = q.size();
      n0 = got.size(); c0 = cyc; w0 = waits; k0 = caps;
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
      repeat (3) @(posedge clk);
      check(got.size() - n0 == filled.size(),
            $sformatf("%0d bits shifted, expected %0d", got.size() - n0, filled.size()));
      for (int i = 0; i < filled.size() && n0 + i < got.size(); i++) begin
        if (got[n0 + i] != filled[i]) bad++;
        if (cube[i] != 2 && bit'(cube[i]) != got[n0 + i]) bad_spec++;
      end
      check(bad == 0, $sformatf("%0d bits differ from the reference decoding", bad));
      check(bad_spec == 0, $sformatf("%0d specified bits broken", bad_spec));
      check(caps - k0 == 1, "not exactly one capture");
      check(waits - w0 <= 1, $sformatf("tester waited %0d cycles", waits - w0));
      check(cyc - c0 <= nb + 6, $sformatf("%0d stream bits took %0d cycles", nb, cyc - c0));
    end
    finished = 1'b1;
  end
endmodule
