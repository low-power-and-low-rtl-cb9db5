// Self-checking testbench for the MDC decoding buffer (default 100-20-4).
//
// Drives random Shift and Copy operations at every layer and compares the
// buffer after each clock with a model kept in the testbench: a Shift puts
// the new bit in front, a Copy of group size g repeats the g bits loaded last.
// Also checks that reset clears the buffer.
module tb_mdc_decoding_buffer;
  localparam int unsigned L = 3;
  localparam int unsigned GS [L] = '{100, 20, 4};
  localparam int unsigned A = 100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         shift, din, copy;
  logic [1:0]   copy_lv;
  logic [A-1:0] q;

  mdc_decoding_buffer dut (.clk, .rst_n, .shift, .din, .copy, .copy_lv, .q);

  int checks = 0, failures = 0;
  bit model [A];
  int ops [4];

  initial begin
    shift = 1'b0; copy = 1'b0; din = 1'b0; copy_lv = '0;
    foreach (ops[i]) ops[i] = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != '0) begin
      failures++;
      $display("FAIL: buffer not cleared by reset");
    end
    rst_n = 1'b1;
    // fill with known data first
    for (int i = 0; i < int'(A); i++) begin
      @(negedge clk);
      shift = 1'b1; din = 1'($urandom_range(1));
      for (int j = int'(A) - 1; j > 0; j--) model[j] = model[j-1];
      model[0] = din;
    end
    for (int t = 0; t < 3000; t++) begin
      automatic int op = $urandom_range(4);
      @(negedge clk);
      // the previous operation has been applied at the last rising edge
      if (t > 0) begin
        automatic int bad = 0;
        for (int j = 0; j < int'(A); j++) if (q[j] != model[j]) bad++;
        checks++;
        if (bad != 0) begin
          failures++;
          $display("FAIL: step %0d, %0d bits differ", t, bad);
        end
      end
      shift = 1'b0; copy = 1'b0;
      if (op <= 1) begin
        shift = 1'b1; din = 1'($urandom_range(1));
        for (int j = int'(A) - 1; j > 0; j--) model[j] = model[j-1];
        model[0] = din;
        ops[3]++;
      end else if (op <= 3 || t % 7 == 0) begin
        automatic int lv = $urandom_range(L - 1);
        automatic int g = int'(GS[lv]);
        copy = 1'b1; copy_lv = 2'(lv);
        for (int j = int'(A) - 1; j >= g; j--) model[j] = model[j-g];
        ops[lv]++;
      end
    end
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (ops[i] == 0) begin failures++; $display("FAIL: operation %0d never ran", i); end
    end
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
