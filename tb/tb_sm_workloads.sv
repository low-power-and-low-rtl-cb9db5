// Scan Matrix at the matrix sizes chosen for the evaluated circuits.
//
// Runs, in parallel, matrices of 9 x 9 (74 scan cells), 14 x 13 (179),
// 15 x 15 (211), 26 x 25 (638), 24 x 23 (534) and 42 x 42 (1728), each with an
// inverting buffer every four cells, through three patterns (see
// sm_matrix_check for what is compared).
module tb_sm_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 6;
  int   ck [NW];
  int   fl [NW];
  logic fin [NW];

  sm_matrix_check #(.R(9),  .C(9),  .INV_EVERY(4), .NPAT(3)) u_s1423  (.clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  sm_matrix_check #(.R(14), .C(13), .INV_EVERY(4), .NPAT(3)) u_s5378  (.clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  sm_matrix_check #(.R(15), .C(15), .INV_EVERY(4), .NPAT(3)) u_s9234  (.clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  sm_matrix_check #(.R(26), .C(25), .INV_EVERY(4), .NPAT(3)) u_s13207 (.clk, .rst_n, .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));
  sm_matrix_check #(.R(24), .C(23), .INV_EVERY(4), .NPAT(3)) u_s15850 (.clk, .rst_n, .checks(ck[4]), .failures(fl[4]), .finished(fin[4]));
  sm_matrix_check #(.R(42), .C(42), .INV_EVERY(4), .NPAT(3)) u_s35932 (.clk, .rst_n, .checks(ck[5]), .failures(fl[5]), .finished(fin[5]));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    for (int i = 0; i < NW; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
