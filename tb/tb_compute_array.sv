// Testbench of compute_array with N = 7 points in D = 5 dimensions (the
// (N-1) x D = 6 x 5 grid of the reference data-flow example), 8-bit
// coordinates, L1 metric.
//
// The testbench injects the four streams itself, with the skew of the
// schedule: P^i at the top of column d in unit T0 + 2i + d, P^j at the
// bottom of column d in unit T0 + 2j + d - N, label (i, i+r+1) and a zero
// distance at the left of row r in unit T0 + 2i + r, with T0 = N - 4.
// Every word leaving a row on the right is collected. Each row r must
// deliver exactly the pairs (i, i + r + 1), each in unit T0 + 2i + r + D,
// with its L1 distance; every other slot must carry an empty label. All
// N(N-1)/2 pairs must appear once.
module tb_compute_array;
  import diam_pkg::*;

  localparam int N    = 7;
  localparam int D    = 5;
  localparam int CW   = 8;
  localparam int R    = N - 1;
  localparam int IW   = $clog2(N + 1);
  localparam int LW   = 2 * IW;
  localparam int DW   = CW + $clog2(D + 1);
  localparam int XFER = (DW > LW) ? DW : LW;
  localparam int T0   = N - 4;
  localparam int UNITS = 4 * N + D;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  phase_t       ph;
  logic [D-1:0] s_top, s1_bot;
  logic [R-1:0] u_left, v_left, b_right, c_right;

  compute_array #(.N(N), .D(D), .CW(CW), .METRIC(METRIC_L1)) dut (.*);

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

  int pts [N+1][D];
  int seen [N+1][N+1];

  function automatic int l1(int i, int j);
    int s = 0;
    for (int d = 0; d < D; d++) s += (pts[i][d] > pts[j][d]) ? pts[i][d] - pts[j][d] : pts[j][d] - pts[i][d];
    return s;
  endfunction

  logic [31:0] wtop [D], wbot [D], wlab [R];
  logic [31:0] ob [R], oc [R];

  task automatic run_unit();
    for (int r = 0; r < R; r++) begin ob[r] = 0; oc[r] = 0; end
    for (int k = 0; k < XFER; k++) begin
      @(negedge clk);
      ph = '0; ph.xfer = 1'b1; ph.bit_idx = 8'(k);
      for (int d = 0; d < D; d++) begin s_top[d] = wtop[d][k]; s1_bot[d] = wbot[d][k]; end
      for (int r = 0; r < R; r++) begin
        v_left[r] = wlab[r][k]; u_left[r] = 1'b0;
        ob[r][k] = b_right[r]; oc[r][k] = c_right[r];
      end
    end
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      ph = '0; ph.alu = 1'b1; ph.step = 2'(s);
    end
    @(negedge clk);
    ph = '0;
  endtask

  int t, i, j, li, lj, n_pairs;

  initial begin
    ph = '0; s_top = '0; s1_bot = '0; u_left = '0; v_left = '0;
    for (int p = 1; p <= N; p++) for (int d = 0; d < D; d++) pts[p][d] = $urandom_range(0, 255);
    for (int a = 0; a <= N; a++) for (int b = 0; b <= N; b++) seen[a][b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    ph.clr = 1'b1;
    @(negedge clk);
    ph = '0;
    n_pairs = 0;
    for (int u = 0; u < UNITS; u++) begin
      for (int d = 0; d < D; d++) begin
        wtop[d] = 0; wbot[d] = 0;
        t = u - T0 - d;
        if (t >= 2 && t % 2 == 0 && t / 2 <= N) wtop[d] = 32'(pts[t / 2][d]);
        t = u - T0 - d + N;
        if (t >= 4 && t % 2 == 0 && t / 2 <= N) wbot[d] = 32'(pts[t / 2][d]);
      end
      for (int r = 0; r < R; r++) begin
        wlab[r] = 0;
        t = u - T0 - r;
        if (t >= 2 && t % 2 == 0 && t / 2 <= N - r - 1) wlab[r] = 32'(((t / 2) << IW) | (t / 2 + r + 1));
      end
      run_unit();
      // words that left the rows during this unit
      for (int r = 0; r < R; r++) begin
        t = u - T0 - r - D;   // = 2i for a pair due now
        li = int'(oc[r][LW-1:IW]);
        lj = int'(oc[r][IW-1:0]);
        if (t >= 2 && t % 2 == 0 && t / 2 <= N - r - 1) begin
          i = t / 2; j = i + r + 1;
          check($sformatf("row %0d unit %0d label (%0d,%0d)", r, u, i, j), li == i && lj == j);
          check($sformatf("row %0d unit %0d distance of (%0d,%0d)", r, u, i, j),
                int'(ob[r][DW-1:0]) == l1(i, j));
          seen[i][j]++;
          n_pairs++;
        end else begin
          check($sformatf("row %0d unit %0d empty slot", r, u), oc[r][LW-1:0] == 0);
        end
      end
    end
    for (int a = 1; a <= N; a++)
      for (int b = a + 1; b <= N; b++)
        check($sformatf("pair (%0d,%0d) delivered once", a, b), seen[a][b] == 1);
    check("pair count", n_pairs == N * (N - 1) / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
