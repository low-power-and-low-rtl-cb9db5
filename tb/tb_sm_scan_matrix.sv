// Self-checking testbench for the Scan Matrix.
//
// Runs three matrices in parallel: 5 x 7 with an inverter every 2 cells (odd
// number of inverters per row, so the row-end inverter matters), 3 x 9 with an
// inverter every 4 cells, and 4 x 4 without inverters inside a row.
module tb_sm_scan_matrix;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   ck [3];
  int   fl [3];
  logic fin [3];

  sm_matrix_check #(.R(5), .C(7), .INV_EVERY(2), .NPAT(6)) u_a (.clk, .rst_n,
    .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  sm_matrix_check #(.R(3), .C(9), .INV_EVERY(4), .NPAT(6)) u_b (.clk, .rst_n,
    .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  sm_matrix_check #(.R(4), .C(4), .INV_EVERY(4), .NPAT(6)) u_c (.clk, .rst_n,
    .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    checks = ck[0] + ck[1] + ck[2];
    failures = fl[0] + fl[1] + fl[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1] + ck[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end
endmodule
