// Compute processor: one cell of the (N-1) x D distance grid.
//
// The cell holds four serial pipelines and a buffer register Bu:
//   ai  coordinate of point P^i (stream S), enters at the top, leaves at the bottom
//   aj  coordinate of point P^j (stream S1), enters at the bottom, leaves at the top
//   b   partial distance (stream U), enters on the left, leaves on the right
//   c   pair label (stream V), enters on the left, leaves on the right
// During the transfer phase of a time unit every pipeline shifts its word
// one bit per clock, LSB first, so after the phase each register holds the
// word its upstream neighbour had. The ALU then runs three micro-steps:
//   step 0  Bu := ai - aj
//   step 1  Bu := |Bu|            (L2SQ: Bu := Bu * Bu)
//   step 2  b  := b + Bu          (LINF: b := max(b, Bu))
// which is the recurrence b(d+1) = b(d) + |a_d^i - a_d^j|^p for p = 1. The
// labels pass through unchanged. The cell computes in every unit; whether the
// result means anything is carried by the label (0 = empty slot).
//
// The recurrence, the four pipelines, the buffer register and the
// "transfer serially, then three ALU cycles" timing follow the architecture;
// the assignment of the micro-steps, unsigned coordinates and the L2SQ/LINF
// variants are this design's choices.
module compute_processor
  import diam_pkg::*;
#(
  parameter int unsigned CW     = 16,                          // coordinate bits
  parameter int unsigned D      = 5,                           // dimensions (sizes b)
  parameter metric_e     METRIC = METRIC_L1,
  parameter int unsigned N      = 100,                         // points (sizes c)
  parameter int unsigned DW     = dist_width(CW, D, METRIC),   // distance bits
  parameter int unsigned LW     = 2 * index_width(N)           // label bits
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  logic   ai_in,
  output logic   ai_out,
  input  logic   aj_in,
  output logic   aj_out,
  input  logic   b_in,
  output logic   b_out,
  input  logic   c_in,
  output logic   c_out
);

  localparam int unsigned BW = (METRIC == METRIC_L2SQ) ? 2 * CW + 2 : CW + 1;

  logic [CW-1:0]        ai_q, aj_q;
  logic [DW-1:0]        b_q;
  logic [LW-1:0]        c_q;
  logic signed [BW-1:0] bu_q;

  logic signed [CW:0]   diff;
  logic [BW-1:0]        bu_mag;
  logic [DW-1:0]        b_next;

  assign diff = signed'({1'b0, ai_q}) - signed'({1'b0, aj_q});

  always_comb begin
    if (METRIC == METRIC_L2SQ) bu_mag = BW'(bu_q * bu_q);
    else                       bu_mag = (bu_q < 0) ? BW'(-bu_q) : BW'(bu_q);
  end

  always_comb begin
    if (METRIC == METRIC_LINF) b_next = (DW'(bu_q) > b_q) ? DW'(bu_q) : b_q;
    else                       b_next = b_q + DW'(bu_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ai_q <= '0;
      aj_q <= '0;
      b_q  <= '0;
      c_q  <= '0;
      bu_q <= '0;
    end else if (ph.clr) begin
      ai_q <= '0;
      aj_q <= '0;
      b_q  <= '0;
      c_q  <= '0;
      bu_q <= '0;
    end else if (ph.xfer) begin
      if (int'(ph.bit_idx) < CW) begin
        ai_q <= {ai_in, ai_q[CW-1:1]};
        aj_q <= {aj_in, aj_q[CW-1:1]};
      end
      if (int'(ph.bit_idx) < DW) b_q <= {b_in, b_q[DW-1:1]};
      if (int'(ph.bit_idx) < LW) c_q <= {c_in, c_q[LW-1:1]};
    end else if (ph.alu) begin
      case (ph.step)
        2'd0:    bu_q <= BW'(diff);
        2'd1:    bu_q <= signed'(bu_mag);
        2'd2:    b_q  <= b_next;
        default: ;
      endcase
    end
  end

  assign ai_out = ai_q[0];
  assign aj_out = aj_q[0];
  assign b_out  = b_q[0];
  assign c_out  = c_q[0];

endmodule
