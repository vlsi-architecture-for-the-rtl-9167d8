// Testbench of stream_controller with N = 7, D = 5, 8-bit coordinates
// (XFER = 11 clocks, unit = 14 clocks, 3N + D - 4 = 22 units).
//
// The testbench answers the memory read ports with a known function of the
// point index, deserialises every injected word, LSB first, and checks per
// time unit: the phase sequence (XFER transfer clocks with bit index
// 0..XFER-1, then ALU steps 0, 1, 2), the S word of each column (point i in
// unit T0 + 2i + d), the S1 word (point j in unit T0 + 2j + d - N), the
// label of each row ((i, i+r+1) in unit T0 + 2i + r), the zero U words,
// finish_max on the last clock of unit 3N + D - 6, finish_min on the last
// clock of the final unit, and done/busy. A start pulse while busy must be
// ignored; the clear pulse must come with an accepted start only.
module tb_stream_controller;
  import diam_pkg::*;

  localparam int N    = 7;
  localparam int D    = 5;
  localparam int CW   = 8;
  localparam int R    = N - 1;
  localparam int IW   = $clog2(N + 1);
  localparam int LW   = 2 * IW;
  localparam int DW   = CW + $clog2(D + 1);
  localparam int XFER = (DW > LW) ? DW : LW;
  localparam int UNIT = XFER + 3;
  localparam int U_TOTAL = 3 * N + D - 4;
  localparam int T0   = N - 4;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 start = 1'b0;
  logic                 busy, done, finish_max, finish_min;
  phase_t               ph;
  logic [15:0]          unit;
  logic [D-1:0][IW-1:0] top_idx, bot_idx;
  logic [D-1:0][CW-1:0] top_data, bot_data;
  logic [D-1:0]         s_top, s1_bot;
  logic [R-1:0]         u_left, v_left;

  stream_controller #(.N(N), .D(D), .CW(CW), .METRIC(METRIC_L1)) dut (.*);

  // memory model: coordinate d of point p is 16 * p + d + 1, point 0 reads 0
  always_comb
    for (int d = 0; d < D; d++) begin
      top_data[d] = (top_idx[d] == 0) ? '0 : CW'(16 * int'(top_idx[d]) + d + 1);
      bot_data[d] = (bot_idx[d] == 0) ? '0 : CW'(16 * int'(bot_idx[d]) + d + 1);
    end

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

  function automatic int coord(int p, int d);
    return (p == 0) ? 0 : 16 * p + d + 1;
  endfunction

  logic [31:0] ws [D], ws1 [D], wv [R], wu [R];
  int t, ei, ej, n_fmax, n_fmin, n_s, n_s1, n_v;
  bit phase_ok;

  initial begin
    n_fmax = 0; n_fmin = 0; n_s = 0; n_s1 = 0; n_v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle", !busy && !done && !ph.xfer && !ph.alu && !ph.clr);
    start = 1'b1;
    #1 check("clear with start", ph.clr);
    @(negedge clk);
    start = 1'b0;
    for (int u = 0; u < U_TOTAL; u++) begin
      phase_ok = 1;
      for (int m = 0; m < D; m++) begin ws[m] = 0; ws1[m] = 0; end
      for (int r = 0; r < R; r++) begin wv[r] = 0; wu[r] = 0; end
      for (int k = 0; k < UNIT; k++) begin
        if (u == 3 && k == 0) start = 1'b1;   // must be ignored while busy
        #1;
        if (ph.clr || !busy || int'(unit) != u) phase_ok = 0;
        if (k < XFER) begin
          if (!ph.xfer || ph.alu || int'(ph.bit_idx) != k) phase_ok = 0;
          for (int d = 0; d < D; d++) begin ws[d][k] = s_top[d]; ws1[d][k] = s1_bot[d]; end
          for (int r = 0; r < R; r++) begin wv[r][k] = v_left[r]; wu[r][k] = u_left[r]; end
        end else begin
          if (ph.xfer || !ph.alu || int'(ph.step) != k - XFER) phase_ok = 0;
        end
        if (finish_max) begin
          n_fmax++;
          check("finish_max unit/clock", u == U_TOTAL - 2 && k == UNIT - 1);
        end
        if (finish_min) begin
          n_fmin++;
          check("finish_min unit/clock", u == U_TOTAL - 1 && k == UNIT - 1);
        end
        @(negedge clk);
        start = 1'b0;
      end
      check($sformatf("unit %0d phase sequence", u), phase_ok);
      for (int d = 0; d < D; d++) begin
        // S: point i enters column d in unit T0 + 2i + d
        ei = 0;
        for (int i = 1; i <= N; i++) if (u == T0 + 2 * i + d) ei = i;
        if (ei != 0) n_s++;
        check($sformatf("unit %0d S word col %0d", u, d), int'(ws[d]) == coord(ei, d));
        // S1: point j (2..N) enters column d from the bottom in unit T0 + 2j + d - N
        ej = 0;
        for (int j = 2; j <= N; j++) if (u == T0 + 2 * j + d - N) ej = j;
        if (ej != 0) n_s1++;
        check($sformatf("unit %0d S1 word col %0d", u, d), int'(ws1[d]) == coord(ej, d));
      end
      for (int r = 0; r < R; r++) begin
        ei = 0;
        for (int i = 1; i + r + 1 <= N; i++) if (u == T0 + 2 * i + r) ei = i;
        if (ei != 0) n_v++;
        check($sformatf("unit %0d label row %0d", u, r),
              int'(wv[r]) == ((ei == 0) ? 0 : (ei * (1 << IW) + ei + r + 1)));
        check($sformatf("unit %0d U row %0d", u, r), wu[r] == 0);
      end
    end
    #1;
    check("done after the last unit", done && !busy);
    check("one finish_max, one finish_min", n_fmax == 1 && n_fmin == 1);
    check("all S words", n_s == N * D);
    check("all S1 words", n_s1 == (N - 1) * D);
    check("all labels", n_v == N * (N - 1) / 2);
    repeat (5) @(negedge clk);
    check("done holds", done && !busy && !ph.xfer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
