// Point memory: the coordinates of the N points of the set, N x D words of
// CW bits.
//
// The host writes one coordinate per clock (wr_pt is the 1-based point
// index, wr_dim the dimension). The array reads two words per column and
// time unit: column d reads coordinate d of the point entering at the top
// (stream S) and of the point entering at the bottom (stream S1). Reads are
// combinational; index 0 (or beyond N) returns 0, which the controller uses
// for the empty slots of the streams.
//
// The architecture only says that data come "from memory"; the organisation,
// port count and write port are this design's choices.
module point_memory
  import diam_pkg::*;
#(
  parameter int unsigned N  = 100,
  parameter int unsigned D  = 5,
  parameter int unsigned CW = 16,
  parameter int unsigned IW = index_width(N),
  parameter int unsigned DIMW = (D > 1) ? $clog2(D) : 1
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [IW-1:0]        wr_pt,
  input  logic [DIMW-1:0]      wr_dim,
  input  logic [CW-1:0]        wr_data,
  input  logic [D-1:0][IW-1:0] top_idx,
  output logic [D-1:0][CW-1:0] top_data,
  input  logic [D-1:0][IW-1:0] bot_idx,
  output logic [D-1:0][CW-1:0] bot_data
);

  logic [CW-1:0] mem [N][D];

  always_ff @(posedge clk) begin
    if (wr_en && wr_pt != '0 && int'(wr_pt) <= N && int'(wr_dim) < D)
      mem[wr_pt - 1'b1][wr_dim] <= wr_data;
  end

  always_comb begin
    for (int d = 0; d < D; d++) begin
      top_data[d] = '0;
      bot_data[d] = '0;
      if (top_idx[d] != '0 && int'(top_idx[d]) <= N) top_data[d] = mem[top_idx[d] - 1'b1][d];
      if (bot_idx[d] != '0 && int'(bot_idx[d]) <= N) bot_data[d] = mem[bot_idx[d] - 1'b1][d];
    end
  end

endmodule
