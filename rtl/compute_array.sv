// Compute array: the (N-1) x D grid of compute processors.
//
// Row r (0 = top) and column d (0 = left, one column per dimension). The
// serial links are wired so that
//   stream S  (points P^1..P^N)  enters each column at the top and moves down,
//   stream S1 (points P^2..P^N)  enters each column at the bottom and moves up,
//   stream U  (partial distances) and V (labels) enter each row on the left
//             and move right, one column per time unit.
// Because S and S1 move in opposite directions, a word of S meets every word
// of S1 that it passes; with the injection schedule of stream_controller,
// pair (i, j = i + r + 1) meets in row r, so row r produces the r-th
// off-diagonal of the distance matrix T and the symmetric half of T is never
// computed. Completed distances and their labels leave each row on the right
// after D units. Columns of S and S1 words that fall off the far edge are
// discarded.
//
// The grid shape and the four stream directions follow the architecture;
// the row/pair assignment is the consequence of this design's schedule.
module compute_array
  import diam_pkg::*;
#(
  parameter int unsigned N      = 100,
  parameter int unsigned D      = 5,
  parameter int unsigned CW     = 16,
  parameter metric_e     METRIC = METRIC_L1,
  parameter int unsigned R      = N - 1   // rows
) (
  input  logic         clk,
  input  logic         rst_n,
  input  phase_t       ph,
  input  logic [D-1:0] s_top,    // serial S words, one per column
  input  logic [D-1:0] s1_bot,   // serial S1 words, one per column
  input  logic [R-1:0] u_left,   // serial initial distances, one per row
  input  logic [R-1:0] v_left,   // serial labels, one per row
  output logic [R-1:0] b_right,  // serial completed distances
  output logic [R-1:0] c_right   // serial labels of the completed distances
);

  // Vertical links: dn[r][d] is the S input of cell (r,d), up[r][d] the S1
  // input of cell (r,d). Horizontal links: hb[r][d] / hc[r][d] are the U / V
  // inputs of cell (r,d).
  logic [D-1:0] dn [R+1];
  logic [D-1:0] up [R+1];
  logic [D:0]   hb [R];
  logic [D:0]   hc [R];

  assign dn[0] = s_top;
  assign up[R] = s1_bot;

  for (genvar r = 0; r < R; r++) begin : g_row
    assign hb[r][0] = u_left[r];
    assign hc[r][0] = v_left[r];
    for (genvar d = 0; d < D; d++) begin : g_col
      compute_processor #(
        .CW(CW), .D(D), .METRIC(METRIC), .N(N)
      ) u_pe (
        .clk   (clk),
        .rst_n (rst_n),
        .ph    (ph),
        .ai_in (dn[r][d]),
        .ai_out(dn[r+1][d]),
        .aj_in (up[r+1][d]),
        .aj_out(up[r][d]),
        .b_in  (hb[r][d]),
        .b_out (hb[r][d+1]),
        .c_in  (hc[r][d]),
        .c_out (hc[r][d+1])
      );
    end
    assign b_right[r] = hb[r][D];
    assign c_right[r] = hc[r][D];
  end

endmodule
