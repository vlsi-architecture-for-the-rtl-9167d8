// Testbench of selection_network with R = 6 rows (N = 7 points), 11-bit
// distances and 6-bit labels.
//
// Each time unit every row offers a random labelled distance or an empty
// slot on its serial inputs, for K units. An entry offered in row r during
// unit u reaches compare_max_hold (row 0) in unit u + r and its loser
// reaches compare_min_hold one unit later, so finish_max is pulsed in unit
// K + R - 2 and finish_min in unit K + R - 1: a network slower than that
// misses the last entries. The released maximum and minimum (> 0) must equal
// the extremes of everything offered, with a label that was offered with
// that distance. Scenarios: random entries; the unique extreme offered last
// in the bottom row (tests the latency); zero distances that the minimum must skip;
// a single valid entry (it must reach both hold processors); only empty
// slots (nothing found).
module tb_selection_network;
  import diam_pkg::*;

  localparam int R    = 6;
  localparam int DW   = 11;
  localparam int LW   = 6;
  localparam int XFER = DW;
  localparam int K    = 12;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  phase_t        ph;
  logic [R-1:0]  row_b, row_c;
  logic          finish_max, finish_min;
  logic          max_eoe, max_found, min_eoe, min_found;
  logic [DW-1:0] max_dist, min_dist;
  logic [LW-1:0] max_label, min_label;

  selection_network #(.R(R), .DW(DW), .LW(LW)) dut (.*);

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

  int wd [K][R], wl [K][R];   // offered entries

  task automatic run_unit(int u, bit fmax, bit fmin);
    for (int k = 0; k < XFER; k++) begin
      @(negedge clk);
      ph = '0; ph.xfer = 1'b1; ph.bit_idx = 8'(k);
      for (int r = 0; r < R; r++) begin
        row_b[r] = (u < K) ? wd[u][r][k] : 1'b0;
        row_c[r] = (u < K && k < LW) ? wl[u][r][k] : 1'b0;
      end
    end
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      ph = '0; ph.alu = 1'b1; ph.step = 2'(s);
      finish_max = fmax && s == 2;
      finish_min = fmin && s == 2;
    end
    @(negedge clk);
    ph = '0; finish_max = 1'b0; finish_min = 1'b0;
  endtask

  task automatic run_scenario(string name);
    int emax, emin;
    bit have_max, have_min, lab_max_ok, lab_min_ok;
    have_max = 0; have_min = 0; emax = 0; emin = 0;
    for (int u = 0; u < K; u++)
      for (int r = 0; r < R; r++)
        if (wl[u][r] != 0) begin
          if (!have_max || wd[u][r] > emax) emax = wd[u][r];
          have_max = 1;
          if (wd[u][r] != 0 && (!have_min || wd[u][r] < emin)) begin emin = wd[u][r]; have_min = 1; end
        end
    @(negedge clk);
    ph = '0; ph.clr = 1'b1;
    @(negedge clk);
    ph = '0;
    for (int u = 0; u < K + R; u++) begin
      run_unit(u, u == K + R - 2, u == K + R - 1);
      if (u == K + R - 2) check({name, ": max released first"}, max_eoe && !min_eoe);
    end
    check({name, ": flags"}, max_eoe && min_eoe);
    check({name, ": max found"}, max_found == have_max);
    check({name, ": min found"}, min_found == have_min);
    lab_max_ok = 0; lab_min_ok = 0;
    for (int u = 0; u < K; u++)
      for (int r = 0; r < R; r++) begin
        if (wl[u][r] == int'(max_label) && wd[u][r] == emax) lab_max_ok = 1;
        if (wl[u][r] == int'(min_label) && wd[u][r] == emin) lab_min_ok = 1;
      end
    if (have_max) begin
      check({name, ": max value"}, int'(max_dist) == emax);
      check({name, ": max label"}, lab_max_ok);
    end
    if (have_min) begin
      check({name, ": min value"}, int'(min_dist) == emin);
      check({name, ": min label"}, lab_min_ok);
    end
    $display("%s: max %0d/%0d (exp %0d)  min %0d/%0d (exp %0d)", name, max_dist, max_label, emax,
             min_dist, min_label, emin);
  endtask

  initial begin
    ph = '0; row_b = '0; row_c = '0; finish_max = 1'b0; finish_min = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int rep = 0; rep < 5; rep++) begin
      for (int u = 0; u < K; u++)
        for (int r = 0; r < R; r++) begin
          wd[u][r] = $urandom_range(1, 2000);
          wl[u][r] = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 63);
        end
      run_scenario($sformatf("random %0d", rep));
    end

    // unique extremes offered last, in the bottom row (farthest from the hold)
    for (int u = 0; u < K; u++)
      for (int r = 0; r < R; r++) begin wd[u][r] = $urandom_range(100, 1000); wl[u][r] = $urandom_range(1, 63); end
    wd[K-1][R-1] = 2047; wl[K-1][R-1] = 5;
    wd[K-2][R-1] = 1;    wl[K-2][R-1] = 9;
    run_scenario("late extremes");

    // zero distances must not be the minimum
    for (int u = 0; u < K; u++)
      for (int r = 0; r < R; r++) begin wd[u][r] = (r % 2 == 0) ? 0 : $urandom_range(10, 90); wl[u][r] = $urandom_range(1, 63); end
    run_scenario("zero distances");

    // a single valid entry, which is both the maximum and the minimum
    for (int u = 0; u < K; u++)
      for (int r = 0; r < R; r++) begin wd[u][r] = $urandom_range(1, 90); wl[u][r] = 0; end
    wl[K-1][R-1] = 33;
    run_scenario("single entry, bottom row");
    wl[K-1][R-1] = 0; wl[3][0] = 17;
    run_scenario("single entry, top row");

    // only empty slots
    for (int u = 0; u < K; u++)
      for (int r = 0; r < R; r++) begin wd[u][r] = $urandom_range(1, 90); wl[u][r] = 0; end
    run_scenario("empty");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
