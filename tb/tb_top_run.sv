// Parameterised test driver for diameter_closest_top, used by
// tb_top_variants. It instantiates the top with the given size and metric,
// runs RUNS random point sets (every third one with planted duplicates),
// compares the diameter and the closest pair with a direct evaluation of
// all pairs under the same metric, and checks the run length of
// (3N + D - 4) time units of (XFER + 3) clocks. It reports its check and
// failure counts and raises `finished` when done.
module tb_top_run
  import diam_pkg::*;
#(
  parameter int      N      = 7,
  parameter int      D      = 5,
  parameter int      CW     = 8,
  parameter metric_e METRIC = METRIC_L1,
  parameter int      RUNS   = 6
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int IW   = $clog2(N + 1);
  localparam int DIMW = (D > 1) ? $clog2(D) : 1;
  localparam int DW   = (METRIC == METRIC_L2SQ) ? 2 * CW + $clog2(D + 1) :
                        (METRIC == METRIC_LINF) ? CW : CW + $clog2(D + 1);
  localparam int XFER = (DW > 2 * IW) ? ((DW > CW) ? DW : CW) : ((2 * IW > CW) ? 2 * IW : CW);
  localparam int UNIT = XFER + 3;
  localparam int U_TOTAL = 3 * N + D - 4;

  logic            rst_n = 1'b0;
  logic            wr_en = 1'b0;
  logic [IW-1:0]   wr_pt = '0;
  logic [DIMW-1:0] wr_dim = '0;
  logic [CW-1:0]   wr_data = '0;
  logic            start = 1'b0;
  logic            busy, done;
  logic [15:0]     time_unit;
  logic            max_eoe, max_found, min_eoe, min_found;
  logic [DW-1:0]   max_dist, min_dist;
  logic [IW-1:0]   max_i, max_j, min_i, min_j;

  diameter_closest_top #(.N(N), .D(D), .CW(CW), .METRIC(METRIC)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint pts [N+1][D];

  function automatic longint ref_dist(int i, int j);
    longint s = 0, a;
    for (int d = 0; d < D; d++) begin
      a = (pts[i][d] > pts[j][d]) ? pts[i][d] - pts[j][d] : pts[j][d] - pts[i][d];
      case (METRIC)
        METRIC_L2SQ: s += a * a;
        METRIC_LINF: if (a > s) s = a;
        default:     s += a;
      endcase
    end
    return s;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (N=%0d D=%0d metric=%0d): %s", N, D, METRIC, what);
    end
  endtask

  initial begin
    longint emax, emin, dd;
    bit have_min;
    int t0;
    checks = 0; failures = 0; finished = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < RUNS; run++) begin
      for (int i = 1; i <= N; i++) for (int d = 0; d < D; d++) pts[i][d] = longint'($urandom_range(0, (1 << CW) - 1));
      if (run % 3 == 1) for (int d = 0; d < D; d++) pts[N][d] = pts[1][d];
      for (int i = 1; i <= N; i++)
        for (int d = 0; d < D; d++) begin
          @(negedge clk);
          wr_en = 1'b1; wr_pt = IW'(i); wr_dim = DIMW'(d); wr_data = CW'(pts[i][d]);
        end
      @(negedge clk);
      wr_en = 1'b0;
      emax = 0; emin = 0; have_min = 0;
      for (int i = 1; i <= N; i++)
        for (int j = i + 1; j <= N; j++) begin
          dd = ref_dist(i, j);
          if (dd > emax) emax = dd;
          if (dd > 0 && (!have_min || dd < emin)) begin emin = dd; have_min = 1; end
        end
      start = 1'b1;
      @(posedge clk);
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      wait (done);
      check("run length", cyc - t0 == U_TOTAL * UNIT + 1);
      check("diameter", max_found && longint'(max_dist) == emax && max_i >= 1 && max_i < max_j &&
                        int'(max_j) <= N && ref_dist(max_i, max_j) == emax);
      check("closest found", min_found == have_min);
      if (have_min)
        check("closest", longint'(min_dist) == emin && min_i >= 1 && min_i < min_j &&
                         int'(min_j) <= N && ref_dist(min_i, min_j) == emin);
    end
    finished = 1'b1;
  end

endmodule
