// Diameter and closest pair of a set of N points in D dimensions.
//
// A bit-serial systolic machine evaluates all N(N-1)/2 pairwise distances
// (L1 metric by default) and selects, in the same pass, the largest one (the
// diameter of the set) and the smallest non-zero one (the closest pair),
// each with the indices of its two points.
//
//   point_memory       N x D coordinates, written by the host
//   stream_controller  time units of XFER + 3 clocks, skewed injection of the
//                      streams S (down), S1 (up), U and V (right), end flags
//   compute_array      (N-1) x D compute processors; row r yields the
//                      distances of the pairs (i, i + r + 1)
//   selection_network  N-2 compare_max + N-2 compare_min processors and the
//                      compare_max_hold / compare_min_hold processors, in two
//                      chains climbing the right edge to row 0
//
// Use: write every coordinate (wr_en, wr_pt = 1..N, wr_dim = 0..D-1), pulse
// `start`, wait for `done` (3N + D - 4 time units later, plus one clock).
// max_* and min_* hold the results until the next start. A label is
// {i, j} with i < j (1-based). max_found / min_found are low if no pair
// qualified (min: every pair of points coincides).
module diameter_closest_top
  import diam_pkg::*;
#(
  parameter int unsigned N      = 100,
  parameter int unsigned D      = 5,
  parameter int unsigned CW     = 16,
  parameter metric_e     METRIC = METRIC_L1,
  parameter int unsigned IW     = index_width(N),
  parameter int unsigned DIMW   = (D > 1) ? $clog2(D) : 1,
  parameter int unsigned DW     = dist_width(CW, D, METRIC)
) (
  input  logic            clk,
  input  logic            rst_n,
  // host write port of the point memory
  input  logic            wr_en,
  input  logic [IW-1:0]   wr_pt,
  input  logic [DIMW-1:0] wr_dim,
  input  logic [CW-1:0]   wr_data,
  // control
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic [15:0]     time_unit,   // time unit being executed
  // diameter
  output logic            max_eoe,
  output logic            max_found,
  output logic [DW-1:0]   max_dist,
  output logic [IW-1:0]   max_i,
  output logic [IW-1:0]   max_j,
  // closest pair
  output logic            min_eoe,
  output logic            min_found,
  output logic [DW-1:0]   min_dist,
  output logic [IW-1:0]   min_i,
  output logic [IW-1:0]   min_j
);

  localparam int unsigned R  = N - 1;
  localparam int unsigned LW = 2 * IW;

  phase_t               ph;
  logic                 finish_max, finish_min;
  logic [D-1:0][IW-1:0] top_idx, bot_idx;
  logic [D-1:0][CW-1:0] top_data, bot_data;
  logic [D-1:0]         s_top, s1_bot;
  logic [R-1:0]         u_left, v_left, b_right, c_right;
  logic [LW-1:0]        max_label, min_label;

  point_memory #(.N(N), .D(D), .CW(CW)) u_mem (
    .clk     (clk),
    .wr_en   (wr_en),
    .wr_pt   (wr_pt),
    .wr_dim  (wr_dim),
    .wr_data (wr_data),
    .top_idx (top_idx),
    .top_data(top_data),
    .bot_idx (bot_idx),
    .bot_data(bot_data)
  );

  stream_controller #(.N(N), .D(D), .CW(CW), .METRIC(METRIC)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .busy      (busy),
    .done      (done),
    .ph        (ph),
    .unit      (time_unit),
    .finish_max(finish_max),
    .finish_min(finish_min),
    .top_idx   (top_idx),
    .top_data  (top_data),
    .bot_idx   (bot_idx),
    .bot_data  (bot_data),
    .s_top     (s_top),
    .s1_bot    (s1_bot),
    .u_left    (u_left),
    .v_left    (v_left)
  );

  compute_array #(.N(N), .D(D), .CW(CW), .METRIC(METRIC)) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .ph     (ph),
    .s_top  (s_top),
    .s1_bot (s1_bot),
    .u_left (u_left),
    .v_left (v_left),
    .b_right(b_right),
    .c_right(c_right)
  );

  selection_network #(.R(R), .DW(DW), .LW(LW)) u_sel (
    .clk       (clk),
    .rst_n     (rst_n),
    .ph        (ph),
    .row_b     (b_right),
    .row_c     (c_right),
    .finish_max(finish_max),
    .finish_min(finish_min),
    .max_eoe   (max_eoe),
    .max_found (max_found),
    .max_dist  (max_dist),
    .max_label (max_label),
    .min_eoe   (min_eoe),
    .min_found (min_found),
    .min_dist  (min_dist),
    .min_label (min_label)
  );

  assign {max_i, max_j} = max_label;
  assign {min_i, min_j} = min_label;

endmodule
