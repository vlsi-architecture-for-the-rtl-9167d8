// End-to-end testbench of diameter_closest_top at its default size
// (N = 100 points, D = 5 dimensions, 16-bit coordinates, L1 metric).
//
// Several point sets are written through the host port, each run is started
// and the diameter and closest pair are compared with a direct O(N^2 D)
// evaluation in the testbench. Since ties are possible, a returned pair is
// accepted when its distance equals the expected extreme and the label names
// two distinct points (i < j) whose distance is that value. The run length is
// checked against 3N + D - 4 time units of XFER + 3 clocks, and the max flag
// must rise exactly one unit before the min flag.
//
// Point sets: uniform random; random with planted duplicate points (the
// closest pair must then skip the zero distances); all points equal (no
// closest pair exists); narrow range with many ties; a 7-point set padded
// with copies of its first point.
// Mechanisms counted: compare-and-swap in the chains, hold-register updates,
// rejected zero distances, runs without any qualifying closest pair, and
// restarts of the machine with the previous results still held.
module tb_diameter_closest_top;
  import diam_pkg::*;

  localparam int N       = 100;
  localparam int D       = 5;
  localparam int CW      = 16;
  localparam int IW      = $clog2(N + 1);
  localparam int DW      = CW + $clog2(D + 1);
  localparam int XFER    = (DW > 2 * IW) ? DW : 2 * IW;
  localparam int UNIT    = XFER + 3;
  localparam int U_TOTAL = 3 * N + D - 4;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            wr_en = 1'b0;
  logic [IW-1:0]   wr_pt = '0;
  logic [$clog2(D)-1:0] wr_dim = '0;
  logic [CW-1:0]   wr_data = '0;
  logic            start = 1'b0;
  logic            busy, done;
  logic [15:0]     time_unit;
  logic            max_eoe, max_found, min_eoe, min_found;
  logic [DW-1:0]   max_dist, min_dist;
  logic [IW-1:0]   max_i, max_j, min_i, min_j;

  diameter_closest_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pts [N+1][D];

  // mechanism counters (observed inside the selection network)
  int n_swap = 0, n_hold_upd = 0, n_zero_skip = 0, n_no_min = 0, n_restart = 0;

  always @(posedge clk) begin
    if (dut.ph.alu && dut.ph.step == 2'd0 && !dut.u_sel.u_max_hold.keep) n_swap++;
    if (dut.ph.alu && dut.ph.step == 2'd1 && dut.u_sel.u_max_hold.take) n_hold_upd++;
    if (dut.ph.alu && dut.ph.step == 2'd0 && dut.u_sel.u_min_hold.b_q != 0 &&
        dut.u_sel.u_min_hold.a_q == 0) n_zero_skip++;
  end

  function automatic int ref_dist(int i, int j);
    int s = 0;
    for (int d = 0; d < D; d++) s += (pts[i][d] > pts[j][d]) ? pts[i][d] - pts[j][d] : pts[j][d] - pts[i][d];
    return s;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_points();
    for (int i = 1; i <= N; i++)
      for (int d = 0; d < D; d++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_pt = IW'(i); wr_dim = $clog2(D)'(d); wr_data = CW'(pts[i][d]);
      end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic run_and_check(string name);
    int t0, t_max, t_min, t_done;
    int emax, emin, dd;
    bit have_min;
    emax = 0; emin = 0; have_min = 0;
    for (int i = 1; i <= N; i++)
      for (int j = i + 1; j <= N; j++) begin
        dd = ref_dist(i, j);
        if (dd > emax) emax = dd;
        if (dd > 0 && (!have_min || dd < emin)) begin emin = dd; have_min = 1; end
      end
    if (done) n_restart++;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    check({name, ": busy after start"}, busy && !done && !max_eoe && !min_eoe);
    wait (max_eoe); t_max = cyc;
    wait (min_eoe); t_min = cyc;
    wait (done);    t_done = cyc;
    check({name, ": run length"}, t_done - t0 == U_TOTAL * UNIT + 1);
    check({name, ": max flag one unit before min flag"}, t_min - t_max == UNIT);
    check({name, ": diameter found"}, max_found);
    check({name, ": diameter value"}, int'(max_dist) == emax);
    check({name, ": diameter pair"}, max_i >= 1 && max_i < max_j && int'(max_j) <= N &&
                                     ref_dist(max_i, max_j) == emax);
    check({name, ": closest found flag"}, min_found == have_min);
    if (have_min) begin
      check({name, ": closest value"}, int'(min_dist) == emin);
      check({name, ": closest pair"}, min_i >= 1 && min_i < min_j && int'(min_j) <= N &&
                                      ref_dist(min_i, min_j) == emin);
    end else n_no_min++;
    $display("%s: diameter %0d (%0d,%0d) expected %0d; closest %0d (%0d,%0d) expected %0d; %0d cycles",
             name, max_dist, max_i, max_j, emax, min_dist, min_i, min_j, emin, t_done - t0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1: uniform random points
    for (int i = 1; i <= N; i++) for (int d = 0; d < D; d++) pts[i][d] = $urandom_range(0, 65535);
    load_points();
    run_and_check("random");

    // 2: random points with planted duplicates
    for (int i = 1; i <= N; i++) for (int d = 0; d < D; d++) pts[i][d] = $urandom_range(0, 65535);
    for (int d = 0; d < D; d++) begin pts[17][d] = pts[3][d]; pts[N][d] = pts[1][d]; end
    load_points();
    run_and_check("duplicates");

    // 3: every point the same
    for (int i = 1; i <= N; i++) for (int d = 0; d < D; d++) pts[i][d] = 1234 + d;
    load_points();
    run_and_check("coincident");

    // 4: narrow range, many ties, extreme corner values
    for (int i = 1; i <= N; i++) for (int d = 0; d < D; d++) pts[i][d] = $urandom_range(0, 3);
    for (int d = 0; d < D; d++) begin pts[50][d] = 0; pts[51][d] = 65535; end
    load_points();
    run_and_check("ties");

    // 5: a 7-point set (the size of the reference data-flow example) run on
    //    the 100-point machine by repeating point 1 in the unused places
    for (int i = 1; i <= 7; i++) for (int d = 0; d < D; d++) pts[i][d] = $urandom_range(0, 65535);
    for (int i = 8; i <= N; i++) for (int d = 0; d < D; d++) pts[i][d] = pts[1][d];
    load_points();
    run_and_check("7 points, padded");
    begin
      int m7 = 0, n7 = 0;
      for (int i = 1; i <= 7; i++)
        for (int j = i + 1; j <= 7; j++) begin
          if (ref_dist(i, j) > m7) m7 = ref_dist(i, j);
          if (ref_dist(i, j) > 0 && (n7 == 0 || ref_dist(i, j) < n7)) n7 = ref_dist(i, j);
        end
      check("7 points: diameter of the 7", int'(max_dist) == m7);
      check("7 points: closest of the 7", int'(min_dist) == n7);
    end

    check("mechanism: compare-and-swap", n_swap > 0);
    check("mechanism: hold update", n_hold_upd > 0);
    check("mechanism: zero distance skipped by min", n_zero_skip > 0);
    check("mechanism: no closest pair", n_no_min > 0);
    check("mechanism: restart", n_restart > 0);
    $display("swaps=%0d hold_updates=%0d zero_skips=%0d no_min=%0d restarts=%0d",
             n_swap, n_hold_upd, n_zero_skip, n_no_min, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
