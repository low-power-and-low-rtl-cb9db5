// Self-checking testbench for the address decoder (1636 cells).
//
// For every address, in range and beyond the last cell, with the enable high
// and low, the scan enables must be one-hot at that address or all zero.
module tb_ras_address_decoder;
  localparam int unsigned N = 1636;
  localparam int unsigned AW = 11;
  logic [AW-1:0] addr;
  logic          en;
  logic [N-1:0]  se;

  ras_address_decoder #(.N(N), .AW(AW)) dut (.addr, .en, .se);

  int checks = 0, failures = 0;

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      for (int e = 0; e < 2; e++) begin
        addr = AW'(a);
        en = e[0];
        #1;
        checks++;
        if (e == 1 && a < int'(N)) begin
          if ($countones(se) != 1 || se[a] != 1'b1) begin
            failures++;
            $display("FAIL: address %0d", a);
          end
        end else if (se != '0) begin
          failures++;
          $display("FAIL: address %0d en %0d enables a cell", a, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
