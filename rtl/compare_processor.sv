// Compare processor (compare_max when IS_MAX = 1, compare_min when 0).
//
// Four serial pipelines: a (distance) and b (its label) come in from the
// left, c (distance) and d (its label) from the previous compare processor.
// After the transfer phase the ALU compares in its first step:
//   if a wins over c then e := a; f := b; g := c; h := d
//   else                  e := c; f := d; g := a; h := b
// where "wins" is a >= c for compare_max and a <= c for compare_min. The
// processor does this in place: the (a,b) registers take the winner, sent
// out on e/f, and the (c,d) registers the loser, sent out on g/h, during the
// next transfer phase.
//
// Empty slots: an entry with label 0 never wins, and for compare_min
// neither does a zero distance (the closest pair is the smallest distance
// above 0). The loser output is defined as the entry that the opposite
// comparison would pick (c on a tie). For two valid, non-zero entries this
// is the plain loser above; when only one entry is valid for the opposite
// comparison, that entry leaves on (g,h) even if it also won on (e,f). So
// the g/h output of a compare_max always carries the smaller of its two
// inputs that counts for a minimum; the compare_min chain, fed from the
// compare_max losers, relies on this.
//
// The comparison rule is the architecture's; the empty-slot handling and
// the generalised loser are this design's (see diam_pkg::entry_ok and
// diam_pkg::a_wins). The single-cycle compare-and-swap is this design's
// choice; the processor idles for the remaining ALU cycles of the unit.
module compare_processor
  import diam_pkg::*;
#(
  parameter bit          IS_MAX = 1'b1,
  parameter int unsigned DW     = 19,   // distance bits
  parameter int unsigned LW     = 14    // label bits
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  logic   a_in,    // distance from the left
  input  logic   b_in,    // label from the left
  input  logic   c_in,    // distance from the previous compare processor
  input  logic   d_in,    // label from the previous compare processor
  output logic   e_out,   // winning distance
  output logic   f_out,   // winning label
  output logic   g_out,   // losing distance
  output logic   h_out    // losing label
);

  logic [DW-1:0] a_q, c_q;
  logic [LW-1:0] b_q, d_q;
  logic          other;
  logic          keep;

  // the entry the opposite comparison would pick (c on a tie): the loser
  assign other = a_wins(!IS_MAX, 64'(c_q), 64'(d_q), 64'(a_q), 64'(b_q));
  assign keep = a_wins(IS_MAX, 64'(a_q), 64'(b_q), 64'(c_q), 64'(d_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      c_q <= '0;
      d_q <= '0;
    end else if (ph.clr) begin
      a_q <= '0;
      b_q <= '0;
      c_q <= '0;
      d_q <= '0;
    end else if (ph.xfer) begin
      if (int'(ph.bit_idx) < DW) begin
        a_q <= {a_in, a_q[DW-1:1]};
        c_q <= {c_in, c_q[DW-1:1]};
      end
      if (int'(ph.bit_idx) < LW) begin
        b_q <= {b_in, b_q[LW-1:1]};
        d_q <= {d_in, d_q[LW-1:1]};
      end
    end else if (ph.alu && ph.step == 2'd0) begin
      a_q <= keep ? a_q : c_q;
      b_q <= keep ? b_q : d_q;
      c_q <= other ? c_q : a_q;
      d_q <= other ? d_q : b_q;
    end
  end

  assign e_out = a_q[0];
  assign f_out = b_q[0];
  assign g_out = c_q[0];
  assign h_out = d_q[0];

  initial begin
    assert (DW <= 64 && LW <= 64) else $error("compare_processor: word wider than 64 bits");
  end

endmodule
