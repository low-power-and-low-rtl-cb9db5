// MDC decoder on the buffer organisations of the evaluated circuits.
//
// Runs, in parallel, decoders with the buffers used for the larger designs
// (250-50-5 with 199 slices for a 49,510-cell design, 600-60-6 with 127
// slices for a 75,757-cell design) and for the ISCAS'89 test sets (64-16-4,
// 36-9-3 and 50-10-5, with chain lengths covering 1464, 611, 1664 and 700
// cells). Each gets random test cubes of a low and a moderate care-bit
// density and must decode them exactly (see mdc_check).
module tb_mdc_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 6;
  int   ck [NW];
  int   fl [NW];
  int   cp [NW];
  logic fin [NW];

  mdc_check #(.L(3), .GS('{250, 50, 5}), .CHAIN_LEN(199), .DENSITY(3), .NPAT(2)) u_leon2 (
    .clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .copies(cp[0]), .finished(fin[0]));
  mdc_check #(.L(3), .GS('{600, 60, 6}), .CHAIN_LEN(127), .DENSITY(2), .NPAT(2)) u_fft (
    .clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .copies(cp[1]), .finished(fin[1]));
  mdc_check #(.L(3), .GS('{64, 16, 4}), .CHAIN_LEN(23), .DENSITY(15), .NPAT(4)) u_s38584 (
    .clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .copies(cp[2]), .finished(fin[2]));
  mdc_check #(.L(3), .GS('{36, 9, 3}), .CHAIN_LEN(47), .DENSITY(15), .NPAT(4)) u_s38417 (
    .clk, .rst_n, .checks(ck[3]), .failures(fl[3]), .copies(cp[3]), .finished(fin[3]));
  mdc_check #(.L(3), .GS('{50, 10, 5}), .CHAIN_LEN(14), .DENSITY(30), .NPAT(6)) u_s13207 (
    .clk, .rst_n, .checks(ck[4]), .failures(fl[4]), .copies(cp[4]), .finished(fin[4]));
  mdc_check #(.L(3), .GS('{64, 16, 4}), .CHAIN_LEN(10), .DENSITY(50), .NPAT(4)) u_s15850 (
    .clk, .rst_n, .checks(ck[5]), .failures(fl[5]), .copies(cp[5]), .finished(fin[5]));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    for (int i = 0; i < NW; i++) begin
      checks += ck[i] + 1;
      failures += fl[i];
      if (cp[i] == 0) begin
        failures++;
        $display("FAIL: decoder %0d never copied", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
