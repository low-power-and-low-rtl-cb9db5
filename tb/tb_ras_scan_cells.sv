// Self-checking testbench for the random access scan cells (64 cells).
//
// Random writes to single enabled cells, random captures and idle cycles are
// compared with a model: a write changes only the enabled cell, capture loads
// all response bits and wins over a write, otherwise every cell holds.
module tb_ras_scan_cells;
  localparam int unsigned N = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic         sclk_en, din, capture;
  logic [N-1:0] se, d, q, model;

  ras_scan_cells #(.N(N)) dut (.clk, .sclk_en, .se, .din, .capture, .d, .q);

  int checks = 0, failures = 0;

  initial begin
    sclk_en = 0; din = 0; capture = 1; se = '0;
    d = {$urandom, $urandom};
    model = d;
    @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL: step %0d cells %h expected %h", t, q, model);
      end
      se = '0;
      se[$urandom_range(N - 1)] = 1'b1;
      sclk_en = 1'($urandom_range(1));
      din = 1'($urandom_range(1));
      capture = ($urandom_range(7) == 0);
      d = {$urandom, $urandom};
      @(posedge clk);
      if (capture) model = d;
      else if (sclk_en) begin
        for (int i = 0; i < int'(N); i++) if (se[i]) model[i] = din;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
