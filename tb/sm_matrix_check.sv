// Checker used by the Scan Matrix testbench: drives one matrix of the given
// size through NPAT patterns and compares it with a model.
//
// Per pattern: random stimulus bits are shifted in, one per cycle, in the
// matrix's cell order (row t mod R, column t div R). Every shift cycle checks
// that so shows the cell's previous response and that no cell output q moves
// (toggle suppression). After the update cycle q must equal the pattern, after
// the capture cycle it must equal the responses d, and done must come exactly
// R*C + 2 cycles after start.
module sm_matrix_check #(
  parameter int unsigned R = 5,
  parameter int unsigned C = 7,
  parameter int unsigned INV_EVERY = 2,
  parameter int unsigned NPAT = 6
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned N = R * C;
  logic         start, ready, si, so, shift, update, capture, done;
  logic [N-1:0] d, q, pat, resp, held;
  bit           known;

  sm_scan_matrix #(.R(R), .C(C), .INV_EVERY(INV_EVERY)) dut (
    .clk, .rst_n, .start, .ready, .si, .so, .shift, .update, .capture, .done, .d, .q);

  task automatic rand_vec(output logic [N-1:0] v);
    for (int i = 0; i < int'(N); i++) v[i] = 1'($urandom_range(1));
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %0dx%0d/%0d %s", R, C, INV_EVERY, what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    start = 0; si = 0; d = '0; known = 0;
    wait (rst_n);
    @(posedge clk); #1;
    for (int p = 0; p < int'(NPAT); p++) begin
      rand_vec(pat);
      rand_vec(resp);
      d = resp;
      held = q;
      check(ready, "not ready");
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      for (int t = 0; t < int'(N); t++) begin
        automatic int unsigned r = t % R;
        automatic int unsigned c = t / R;
        automatic int unsigned idx = r * C + c;
        check(shift, $sformatf("shift low in cycle %0d", t));
        si = pat[idx];
        #1;
        if (known) check(so == held[idx], $sformatf("so of cell %0d,%0d", r, c));
        check(q == held, "cell output moved during shift");
        @(posedge clk); #1;
      end
      check(update && !shift, "no update cycle");
      @(posedge clk); #1;
      check(q == pat, "pattern not applied by update");
      check(capture, "no capture cycle");
      @(posedge clk); #1;
      check(q == resp, "responses not captured");
      check(done && ready, "done missing after capture");
      known = 1;
    end
    finished = 1'b1;
  end
endmodule
