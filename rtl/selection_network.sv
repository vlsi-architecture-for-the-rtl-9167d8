// Selection network: the compare chains at the right edge of the grid.
//
// Row r of the compute array delivers one labelled distance per time unit
// (or an empty slot). Two chains run up the right edge, from the bottom row
// (r = R-1) to the top row (r = 0):
//   max chain  compare_max processor at rows R-1..1, compare_max_hold at 0.
//              Each takes its row's entry on (a,b) and the running maximum
//              from the row below on (c,d); the larger goes up on (e,f).
//   min chain  compare_min processor at rows R-1..1, compare_min_hold at 0.
//              Each takes on (a,b) the smaller entry (g,h) that its row's
//              compare_max rejected, and on (c,d) the running minimum from
//              the row below; the smaller goes up on (e,f).
// An entry leaving row r in unit u reaches compare_max_hold in unit u + r.
// Row r finishes its pairs r units earlier than row 0 (see stream_controller),
// so the last entries of all rows reach the hold processor in the same unit
// and the chain adds no drain time to a run.
//
// Feeding the min chain with the max chain's losers is exact. Take one
// wavefront of entries climbing the chains together: at every row, the
// running max and the running min (one unit behind) between them still
// hold the smallest entry of the wavefront that counts for a minimum,
// because the loser output of a compare_max carries the smaller of its two
// inputs that counts for a minimum (non-zero distance), even when that entry
// also won (see compare_processor). With R = N-1 rows there are N-2 compare_max
// and N-2 compare_min processors plus the two hold processors. The hold
// processors release their results when the controller pulses finish_max /
// finish_min.
//
// The processor counts and the hold processors follow the architecture; the
// chain wiring (who feeds whom, and the upward direction) is this design's
// choice.
module selection_network
  import diam_pkg::*;
#(
  parameter int unsigned R  = 99,   // rows of the compute array (N - 1)
  parameter int unsigned DW = 19,
  parameter int unsigned LW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  phase_t        ph,
  input  logic [R-1:0]  row_b,      // serial distance from each row
  input  logic [R-1:0]  row_c,      // serial label from each row
  input  logic          finish_max,
  input  logic          finish_min,
  output logic          max_eoe,
  output logic          max_found,
  output logic [DW-1:0] max_dist,
  output logic [LW-1:0] max_label,
  output logic          min_eoe,
  output logic          min_found,
  output logic [DW-1:0] min_dist,
  output logic [LW-1:0] min_label
);

  // Chain links into row r from row r+1: running max (mx_*) and min (mn_*).
  logic [R-1:0] mx_d, mx_l, mn_d, mn_l;
  // Loser of row r's compare_max, into row r's compare_min.
  logic [R-1:0] lo_d, lo_l;
  // Larger entries rejected by the compare_min processors leave the array;
  // nothing reads them (lint reports them as unused).
  logic [R-1:0] drop_d, drop_l;

  assign mx_d[R-1] = 1'b0;   // empty slot (label 0) below the last row
  assign mx_l[R-1] = 1'b0;
  assign mn_d[R-1] = 1'b0;
  assign mn_l[R-1] = 1'b0;

  for (genvar r = 1; r < R; r++) begin : g_chain
    compare_processor #(.IS_MAX(1'b1), .DW(DW), .LW(LW)) u_max (
      .clk(clk), .rst_n(rst_n), .ph(ph),
      .a_in(row_b[r]), .b_in(row_c[r]), .c_in(mx_d[r]), .d_in(mx_l[r]),
      .e_out(mx_d[r-1]), .f_out(mx_l[r-1]), .g_out(lo_d[r]), .h_out(lo_l[r])
    );
    compare_processor #(.IS_MAX(1'b0), .DW(DW), .LW(LW)) u_min (
      .clk(clk), .rst_n(rst_n), .ph(ph),
      .a_in(lo_d[r]), .b_in(lo_l[r]), .c_in(mn_d[r]), .d_in(mn_l[r]),
      .e_out(mn_d[r-1]), .f_out(mn_l[r-1]), .g_out(drop_d[r]), .h_out(drop_l[r])
    );
  end

  compare_hold_processor #(.IS_MAX(1'b1), .DW(DW), .LW(LW)) u_max_hold (
    .clk(clk), .rst_n(rst_n), .ph(ph),
    .a_in(row_b[0]), .b_in(row_c[0]), .c_in(mx_d[0]), .d_in(mx_l[0]),
    .g_out(lo_d[0]), .h_out(lo_l[0]),
    .finish(finish_max), .eoe(max_eoe), .found(max_found),
    .hold_dist(max_dist), .hold_label(max_label)
  );

  compare_hold_processor #(.IS_MAX(1'b0), .DW(DW), .LW(LW)) u_min_hold (
    .clk(clk), .rst_n(rst_n), .ph(ph),
    .a_in(lo_d[0]), .b_in(lo_l[0]), .c_in(mn_d[0]), .d_in(mn_l[0]),
    .g_out(drop_d[0]), .h_out(drop_l[0]),
    .finish(finish_min), .eoe(min_eoe), .found(min_found),
    .hold_dist(min_dist), .hold_label(min_label)
  );

endmodule
