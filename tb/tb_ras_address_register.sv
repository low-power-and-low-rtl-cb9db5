// Self-checking testbench for the two-mode address register (11 bits).
//
// Mode 1 must count up by one per enabled cycle (so consecutive cells are
// addressed while a seed streams in); mode 0 must shift the serial address in
// MSB first, so that after 11 bits the register holds exactly those bits.
// Clear must win over enable. Every cycle is compared with a model.
module tb_ras_address_register;
  localparam int unsigned AW = 11;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr, en, mode, si;
  logic [AW-1:0] addr, model;

  ras_address_register #(.AW(AW)) dut (.clk, .rst_n, .clr, .en, .mode, .si, .addr);

  int checks = 0, failures = 0;

  task automatic step(input logic c, input logic e, input logic m, input logic s);
    clr = c; en = e; mode = m; si = s;
    @(posedge clk);
    if (c) model = '0;
    else if (e) model = m ? model + 1'b1 : {model[AW-2:0], s};
    #1;
    checks++;
    if (addr != model) begin
      failures++;
      $display("FAIL: addr %0d, expected %0d", addr, model);
    end
  endtask

  initial begin
    clr = 0; en = 0; mode = 0; si = 0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int i = 0; i < 40; i++) step(1'b0, 1'b1, 1'b1, 1'($urandom_range(1)));  // count
    for (int r = 0; r < 20; r++) begin
      automatic logic [AW-1:0] a = AW'($urandom);
      for (int b = int'(AW) - 1; b >= 0; b--) step(1'b0, 1'b1, 1'b0, a[b]);
      checks++;
      if (addr != a) begin failures++; $display("FAIL: shifted %0d, got %0d", a, addr); end
      step(1'b0, 1'b0, 1'($urandom_range(1)), 1'($urandom_range(1)));           // hold
    end
    step(1'b1, 1'b1, 1'b1, 1'b1);                                               // clear
    for (int i = 0; i < 300; i++) step(1'($urandom_range(9) == 0), 1'($urandom_range(1)),
                                       1'($urandom_range(1)), 1'($urandom_range(1)));
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
