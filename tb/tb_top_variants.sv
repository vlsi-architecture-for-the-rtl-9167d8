// Whole-design testbench over several configurations of
// diameter_closest_top, each driven by its own tb_top_run:
//   N = 7, D = 5, 8-bit coordinates in the L1, squared-L2 and L-infinity
//   metrics (the size of the reference data-flow example);
//   N = 2, D = 1 and N = 3, D = 3 (smallest grids: no compare_max/min
//   processors, and a single pair of each);
//   N = 16, D = 2 with 12-bit coordinates.
module tb_top_variants;
  import diam_pkg::*;

  localparam int K = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c [K], f [K];
  logic fin [K];

  tb_top_run #(.N(7),  .D(5), .CW(8),  .METRIC(METRIC_L1))   r0 (.clk, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  tb_top_run #(.N(7),  .D(5), .CW(8),  .METRIC(METRIC_L2SQ)) r1 (.clk, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  tb_top_run #(.N(7),  .D(5), .CW(8),  .METRIC(METRIC_LINF)) r2 (.clk, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  tb_top_run #(.N(2),  .D(1), .CW(8),  .METRIC(METRIC_L1))   r3 (.clk, .checks(c[3]), .failures(f[3]), .finished(fin[3]));
  tb_top_run #(.N(3),  .D(3), .CW(8),  .METRIC(METRIC_L1))   r4 (.clk, .checks(c[4]), .failures(f[4]), .finished(fin[4]));
  tb_top_run #(.N(16), .D(2), .CW(12), .METRIC(METRIC_L1))   r5 (.clk, .checks(c[5]), .failures(f[5]), .finished(fin[5]));

  int checks, failures;

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #20;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    checks = 0; failures = 0;
    for (int k = 0; k < K; k++) begin checks += c[k]; failures += f[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
