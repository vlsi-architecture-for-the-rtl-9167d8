// Testbench of compute_processor: one instance per metric (L1, squared L2,
// L-infinity) at the default word sizes (16-bit coordinates, 5 dimensions,
// 100 points). The testbench plays the controller: each time unit it
// shifts random words into the four serial inputs, LSB first, for XFER
// clocks, then gives the three ALU clocks. The words shifted out during the
// next unit must be the coordinates and label unchanged and the distance
// b + |ai - aj| (L1), b + (ai - aj)^2 (L2SQ) or max(b, |ai - aj|) (LINF).
// It also checks that the result needs exactly one unit (XFER + 3 clocks)
// and that the synchronous clear empties the pipelines.
module tb_compute_processor;
  import diam_pkg::*;

  localparam int CW   = 16;
  localparam int D    = 5;
  localparam int N    = 100;
  localparam int LW   = 2 * $clog2(N + 1);
  localparam int DW1  = CW + $clog2(D + 1);         // L1
  localparam int DW2  = 2 * CW + $clog2(D + 1);     // L2SQ
  localparam int DWI  = CW;                          // LINF
  localparam int XFER = DW2;                         // widest word of the three

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  phase_t ph;
  logic [2:0] ai_in, aj_in, b_in, c_in, ai_out, aj_out, b_out, c_out;

  compute_processor #(.CW(CW), .D(D), .N(N), .METRIC(METRIC_L1)) u_l1 (
    .clk, .rst_n, .ph, .ai_in(ai_in[0]), .ai_out(ai_out[0]), .aj_in(aj_in[0]), .aj_out(aj_out[0]),
    .b_in(b_in[0]), .b_out(b_out[0]), .c_in(c_in[0]), .c_out(c_out[0]));
  compute_processor #(.CW(CW), .D(D), .N(N), .METRIC(METRIC_L2SQ)) u_l2 (
    .clk, .rst_n, .ph, .ai_in(ai_in[1]), .ai_out(ai_out[1]), .aj_in(aj_in[1]), .aj_out(aj_out[1]),
    .b_in(b_in[1]), .b_out(b_out[1]), .c_in(c_in[1]), .c_out(c_out[1]));
  compute_processor #(.CW(CW), .D(D), .N(N), .METRIC(METRIC_LINF)) u_li (
    .clk, .rst_n, .ph, .ai_in(ai_in[2]), .ai_out(ai_out[2]), .aj_in(aj_in[2]), .aj_out(aj_out[2]),
    .b_in(b_in[2]), .b_out(b_out[2]), .c_in(c_in[2]), .c_out(c_out[2]));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // words presented / collected per instance
  logic [63:0] wai [3], waj [3], wb [3], wc [3];
  logic [63:0] oai [3], oaj [3], ob [3], oc [3];

  // One time unit: shift the w* words in and collect the o* words out.
  task automatic run_unit();
    for (int m = 0; m < 3; m++) begin oai[m] = 0; oaj[m] = 0; ob[m] = 0; oc[m] = 0; end
    for (int k = 0; k < XFER; k++) begin
      @(negedge clk);
      ph = '0; ph.xfer = 1'b1; ph.bit_idx = 8'(k);
      for (int m = 0; m < 3; m++) begin
        ai_in[m] = wai[m][k]; aj_in[m] = waj[m][k]; b_in[m] = wb[m][k]; c_in[m] = wc[m][k];
        oai[m][k] = ai_out[m]; oaj[m][k] = aj_out[m]; ob[m][k] = b_out[m]; oc[m][k] = c_out[m];
      end
    end
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      ph = '0; ph.alu = 1'b1; ph.step = 2'(s);
    end
    @(negedge clk);
    ph = '0;
  endtask

  function automatic longint absdiff(longint a, longint b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic [63:0] pai [3], paj [3], pb [3], pc [3];
  longint exp_b;

  initial begin
    ph = '0;
    ai_in = '0; aj_in = '0; b_in = '0; c_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 3; m++) begin pai[m] = 0; paj[m] = 0; pb[m] = 0; pc[m] = 0; end
    for (int u = 0; u < 60; u++) begin
      for (int m = 0; m < 3; m++) begin
        wai[m] = 64'($urandom_range(0, 65535));
        waj[m] = 64'($urandom_range(0, 65535));
        if (u % 7 == 0) begin wai[m] = 64'hFFFF; waj[m] = 0; end
        if (u % 7 == 1) begin wai[m] = 0; waj[m] = 64'hFFFF; end
        wc[m]  = 64'($urandom) & ((64'd1 << LW) - 1);
      end
      wb[0] = 64'($urandom_range(0, 4 * 65535));
      wb[1] = 64'($urandom_range(0, 32'h7fffffff)) * 2;
      wb[2] = 64'($urandom_range(0, 65535));
      run_unit();
      if (u > 0) begin
        for (int m = 0; m < 3; m++) begin
          check($sformatf("unit %0d metric %0d: ai passes", u, m), oai[m][CW-1:0] == pai[m][CW-1:0]);
          check($sformatf("unit %0d metric %0d: aj passes", u, m), oaj[m][CW-1:0] == paj[m][CW-1:0]);
          check($sformatf("unit %0d metric %0d: label passes", u, m), oc[m][LW-1:0] == pc[m][LW-1:0]);
        end
        exp_b = longint'(pb[0]) + absdiff(longint'(pai[0]), longint'(paj[0]));
        check($sformatf("unit %0d L1 distance", u), ob[0][DW1-1:0] == 64'(exp_b));
        exp_b = longint'(pb[1]) + absdiff(longint'(pai[1]), longint'(paj[1])) ** 2;
        check($sformatf("unit %0d L2SQ distance", u), ob[1][DW2-1:0] == 64'(exp_b));
        exp_b = absdiff(longint'(pai[2]), longint'(paj[2]));
        if (longint'(pb[2]) > exp_b) exp_b = longint'(pb[2]);
        check($sformatf("unit %0d LINF distance", u), ob[2][DWI-1:0] == 64'(exp_b));
      end
      for (int m = 0; m < 3; m++) begin pai[m] = wai[m]; paj[m] = waj[m]; pb[m] = wb[m]; pc[m] = wc[m]; end
    end
    // synchronous clear
    @(negedge clk);
    ph = '0; ph.clr = 1'b1;
    @(negedge clk);
    ph = '0;
    check("clear empties label", u_l1.c_q == '0 && u_l2.c_q == '0 && u_li.c_q == '0);
    check("clear empties distance", ai_out == '0 && b_out == '0 && u_l1.b_q == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
