// Stream controller: the system clock discipline of the systolic array and
// the skewed injection of its four data streams.
//
// Timing. A time unit lasts XFER + 3 clocks: XFER clocks of serial transfer
// (XFER = widest word: coordinate, distance or label) and three ALU clocks.
// The controller broadcasts the phase (diam_pkg::phase_t) to every processor.
// `start` (accepted when not busy) clears every pipeline and hold register
// and runs U_TOTAL = 3N + D - 4 units; `done` rises on the clock after the
// last unit and stays high until the next start.
//
// Schedule (u = time unit, T0 = N - 4, column d, row r):
//   top of column d     S word P^i (coordinate d) at u = T0 + 2i + d, i = 1..N
//   bottom of column d  S1 word P^j (coordinate d) at u = T0 + 2j + d - N, j = 2..N
//   left of row r       label (i, i+r+1) at u = T0 + 2i + r, i = 1..N-r-1,
//                       initial distance 0 in every unit
// Other slots carry zeros (label 0 = empty). With this skew P^i and P^j
// meet in row r = j - i - 1, column d, at unit T0 + 2i + r + d, together
// with the partial distance of their pair. Row r emits its last distance r
// units before row 0 and the compare chains climb one row per unit, so the
// last distances of all rows reach the compare_max_hold processor (row 0) in
// unit U_MAX = 3N + D - 6 and the last loser reaches compare_min_hold one
// unit later; the finish_max / finish_min pulses
// (end-of-execution flags) are given on the last clock of those units.
//
// The stream directions, the skew and the (n + 3)-clock unit follow the
// architecture; the exact injection times and the count of units are
// derived by this design.
module stream_controller
  import diam_pkg::*;
#(
  parameter int unsigned N      = 100,
  parameter int unsigned D      = 5,
  parameter int unsigned CW     = 16,
  parameter metric_e     METRIC = METRIC_L1,
  parameter int unsigned IW     = index_width(N),
  parameter int unsigned DW     = dist_width(CW, D, METRIC),
  parameter int unsigned LW     = 2 * IW,
  parameter int unsigned R      = N - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output phase_t               ph,
  output logic [15:0]          unit,        // current time unit
  output logic                 finish_max,
  output logic                 finish_min,
  // point memory read ports
  output logic [D-1:0][IW-1:0] top_idx,
  input  logic [D-1:0][CW-1:0] top_data,
  output logic [D-1:0][IW-1:0] bot_idx,
  input  logic [D-1:0][CW-1:0] bot_data,
  // serial stream injection
  output logic [D-1:0]         s_top,
  output logic [D-1:0]         s1_bot,
  output logic [R-1:0]         u_left,
  output logic [R-1:0]         v_left
);

  localparam int unsigned XFER    = xfer_cycles(CW, DW, LW);
  localparam int unsigned UNIT    = XFER + ALU_STEPS;
  localparam int unsigned U_TOTAL = 3 * N + D - 4;
  localparam int unsigned U_MAX   = U_TOTAL - 2;
  localparam int unsigned U_MIN   = U_TOTAL - 1;
  localparam int          T0      = int'(N) - 4;

  logic        run_q, done_q;
  logic [7:0]  k_q;
  logic [15:0] u_q;
  logic        last_clk;

  assign last_clk = run_q && (k_q == 8'(UNIT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      done_q <= 1'b0;
      k_q    <= '0;
      u_q    <= '0;
    end else if (!run_q) begin
      if (start) begin
        run_q  <= 1'b1;
        done_q <= 1'b0;
        k_q    <= '0;
        u_q    <= '0;
      end
    end else if (last_clk) begin
      k_q <= '0;
      if (u_q == 16'(U_TOTAL - 1)) begin
        run_q  <= 1'b0;
        done_q <= 1'b1;
      end else begin
        u_q <= u_q + 16'd1;
      end
    end else begin
      k_q <= k_q + 8'd1;
    end
  end

  always_comb begin
    ph         = '0;
    ph.clr     = !run_q && start;
    ph.xfer    = run_q && (k_q < 8'(XFER));
    ph.alu     = run_q && (k_q >= 8'(XFER));
    ph.bit_idx = ph.xfer ? k_q : 8'd0;
    ph.step    = ph.alu ? 2'(k_q - 8'(XFER)) : 2'd0;
  end

  assign busy       = run_q;
  assign done       = done_q;
  assign unit       = u_q;
  assign finish_max = last_clk && (u_q == 16'(U_MAX));
  assign finish_min = last_clk && (u_q == 16'(U_MIN));

  // Words entering the array in the current unit.
  logic [R-1:0][LW-1:0] label_w;

  always_comb begin
    int t, i;
    for (int d = 0; d < D; d++) begin
      top_idx[d] = '0;
      bot_idx[d] = '0;
      // S: u = T0 + 2i + d
      t = int'(u_q) - T0 - d;
      if (t >= 2 && t % 2 == 0 && t / 2 <= int'(N)) top_idx[d] = IW'(t / 2);
      // S1: u = T0 + 2j + d - N
      t = int'(u_q) - T0 - d + int'(N);
      if (t >= 4 && t % 2 == 0 && t / 2 <= int'(N)) bot_idx[d] = IW'(t / 2);
    end
    for (int r = 0; r < R; r++) begin
      label_w[r] = '0;
      // V: u = T0 + 2i + r, pair (i, i + r + 1)
      t = int'(u_q) - T0 - r;
      i = t / 2;
      if (t >= 2 && t % 2 == 0 && i <= int'(N) - r - 1)
        label_w[r] = {IW'(i), IW'(i + r + 1)};
    end
  end

  // Serialisation, LSB first.
  always_comb begin
    for (int d = 0; d < D; d++) begin
      s_top[d]  = ph.xfer && (int'(k_q) < CW) && 1'(top_data[d] >> k_q);
      s1_bot[d] = ph.xfer && (int'(k_q) < CW) && 1'(bot_data[d] >> k_q);
    end
    for (int r = 0; r < R; r++) begin
      v_left[r] = ph.xfer && (int'(k_q) < LW) && 1'(label_w[r] >> k_q);
    end
    u_left = '0;   // U stream: every distance starts at 0
  end

  initial begin
    assert (N >= 2 && D >= 1) else $error("stream_controller: need N >= 2, D >= 1");
    assert (UNIT <= 256 && U_TOTAL < 65536) else $error("stream_controller: counters too narrow");
  end

endmodule
