// Self-checking testbench for the response compactor (1636 inputs, 32 bits).
//
// Random response vectors are compacted and the signature compared each
// cycle with a bit-level model (fold input i onto stage i mod 32, shift with
// feedback x^32 + x^22 + x^2 + x + 1). Also checks that a single flipped
// response bit changes the signature, and that clear and hold work.
module tb_ras_misr;
  localparam int unsigned N = 1636;
  localparam int unsigned W = 32;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  logic         clr, en;
  logic [N-1:0] d;
  logic [W-1:0] sig, model;

  ras_misr #(.N(N), .W(W)) dut (.clk, .rst_n, .clr, .en, .d, .sig);

  int checks = 0, failures = 0;

  function automatic logic [W-1:0] next_sig(input logic [W-1:0] s, input logic [N-1:0] v);
    logic [W-1:0] r;
    r = {s[W-2:0], 1'b0};
    if (s[W-1]) begin
      r[0] ^= 1'b1; r[1] ^= 1'b1; r[2] ^= 1'b1; r[22] ^= 1'b1;
    end
    for (int i = 0; i < int'(N); i++) r[i % W] ^= v[i];
    return r;
  endfunction

  task automatic rand_d();
    for (int i = 0; i < int'(N); i += 32) d[i +: 32] = $urandom;
  endtask

  initial begin
    clr = 0; en = 0; d = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int t = 0; t < 500; t++) begin
      rand_d();
      en = ($urandom_range(3) != 0);
      clr = ($urandom_range(99) == 0);
      @(posedge clk);
      if (clr) model = '0;
      else if (en) model = next_sig(model, d);
      #1;
      checks++;
      if (sig != model) begin
        failures++;
        $display("FAIL: step %0d signature %h expected %h", t, sig, model);
      end
    end
    // a single-bit error in the responses must show
    begin
      automatic logic [W-1:0] s0 = sig;
      automatic logic [W-1:0] good;
      rand_d();
      good = next_sig(s0, d);
      d[$urandom_range(N - 1)] ^= 1'b1;
      clr = 0; en = 1;
      @(posedge clk);
      #1;
      checks++;
      if (sig == good) begin failures++; $display("FAIL: single-bit error not seen"); end
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
