// Self-checking testbench for the ring signal generator (41 word lines).
//
// After reset the token must be on word line 0; random advance and init
// cycles are compared with a model position, and last must be high exactly
// when the token is on the last line.
module tb_sm_ring_generator;
  localparam int unsigned LEN = 41;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  logic           init, adv, last;
  logic [LEN-1:0] wl;
  int             pos;

  sm_ring_generator #(.LEN(LEN)) dut (.clk, .rst_n, .init, .adv, .wl, .last);

  int checks = 0, failures = 0;

  initial begin
    init = 0; adv = 0; pos = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int t = 0; t < 1000; t++) begin
      checks++;
      if (wl != (LEN'(1) << pos) || last != (pos == int'(LEN) - 1)) begin
        failures++;
        $display("FAIL: cycle %0d word lines %h, expected token at %0d", t, wl, pos);
      end
      init = ($urandom_range(99) == 0);
      adv = ($urandom_range(7) != 0);
      @(posedge clk);
      if (init) pos = 0;
      else if (adv) pos = (pos + 1) % int'(LEN);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
