// Cocktail Scan at the sizes of the evaluated benchmark circuits.
//
// One ras_check per circuit, all in parallel: the scan-cell count, the number
// of seed patterns and the test length per seed of each circuit's Cocktail
// Scan run (s1423, s5378, s9234.1, s13207.1, s15850.1, s35932, s38417 and
// s38584.1), followed by a few flip-coded deterministic patterns. The
// address width follows the cell count.
module tb_ras_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 8;
  int   ck [NW];
  int   fl [NW];
  logic fin [NW];

  ras_check #(.N(74),   .SEEDS(1),  .TL(64), .NPAT(4)) u_s1423  (.clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  ras_check #(.N(179),  .SEEDS(4),  .TL(16), .NPAT(4)) u_s5378  (.clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  ras_check #(.N(211),  .SEEDS(8),  .TL(16), .NPAT(4)) u_s9234  (.clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  ras_check #(.N(638),  .SEEDS(4),  .TL(16), .NPAT(4)) u_s13207 (.clk, .rst_n, .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));
  ras_check #(.N(534),  .SEEDS(8),  .TL(16), .NPAT(4)) u_s15850 (.clk, .rst_n, .checks(ck[4]), .failures(fl[4]), .finished(fin[4]));
  ras_check #(.N(1728), .SEEDS(4),  .TL(16), .NPAT(4)) u_s35932 (.clk, .rst_n, .checks(ck[5]), .failures(fl[5]), .finished(fin[5]));
  ras_check #(.N(1636), .SEEDS(16), .TL(32), .NPAT(4)) u_s38417 (.clk, .rst_n, .checks(ck[6]), .failures(fl[6]), .finished(fin[6]));
  ras_check #(.N(1426), .SEEDS(20), .TL(32), .NPAT(4)) u_s38584 (.clk, .rst_n, .checks(ck[7]), .failures(fl[7]), .finished(fin[7]));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NW; i++) wait (fin[i]);
    for (int i = 0; i < NW; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
