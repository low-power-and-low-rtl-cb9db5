// Self-checking testbench for the pattern memory (2K bits, 16-bit blocks).
//
// All blocks are first written with known values, then random reads and
// writes run against a model. A read returns the contents from before a
// write to the same block in that cycle, and rd_data holds when rd_en is low.
module tb_ae_pattern_memory;
  localparam int unsigned N_BITS = 2048;
  localparam int unsigned M = 16;
  localparam int unsigned NB = N_BITS / M;
  localparam int unsigned BW = $clog2(NB);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          rd_en, wr_en;
  logic [BW-1:0] rd_addr, wr_addr;
  logic [M-1:0]  rd_data, wr_data, exp_data;
  logic [M-1:0]  model [NB];

  ae_pattern_memory #(.N_BITS(N_BITS), .M(M)) dut (
    .clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  int checks = 0, failures = 0;

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0; exp_data = '0;
    for (int b = 0; b < int'(NB); b++) begin
      wr_en = 1'b1; wr_addr = BW'(b); wr_data = M'($urandom); model[b] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 1'b0;
    rd_en = 1'b1; rd_addr = '0;
    @(posedge clk); #1;
    exp_data = model[0];
    for (int t = 0; t < 3000; t++) begin
      checks++;
      if (rd_data != exp_data) begin
        failures++;
        $display("FAIL: step %0d read %h expected %h", t, rd_data, exp_data);
      end
      rd_en = 1'($urandom_range(1));
      wr_en = 1'($urandom_range(1));
      rd_addr = BW'($urandom);
      wr_addr = ($urandom_range(3) == 0) ? rd_addr : BW'($urandom);
      wr_data = M'($urandom);
      @(posedge clk);
      if (rd_en) exp_data = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
      #1;
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
