// Compare-and-hold processor (compare_max_hold when IS_MAX = 1,
// compare_min_hold when 0): the last processor of a compare chain.
//
// It is a compare processor with two hold registers (distance and label)
// added. Each time unit, after the transfer phase:
//   step 0  compare (a,b) with (c,d) so that (a,b) holds the winner and
//           (c,d) the loser, exactly as in compare_processor (the loser is
//           the entry the opposite comparison would pick)
//   step 1  if the winner beats the held entry, copy it into the hold registers
// The loser leaves serially on g/h (the max-hold feeds its loser to the
// min-hold). When the controller pulses `finish`, the processor sets its
// end-of-execution flag `eoe` and releases the held distance and label on
// the parallel result ports; they stay valid until the next clear.
// `found` tells whether any valid entry was ever held.
//
// Holding the extreme and releasing it under an end-of-execution flag is the
// architecture's; the two-step ALU use and the parallel result ports are this
// design's choices.
module compare_hold_processor
  import diam_pkg::*;
#(
  parameter bit          IS_MAX = 1'b1,
  parameter int unsigned DW     = 19,
  parameter int unsigned LW     = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  phase_t        ph,
  input  logic          a_in,
  input  logic          b_in,
  input  logic          c_in,
  input  logic          d_in,
  output logic          g_out,
  output logic          h_out,
  input  logic          finish,
  output logic          eoe,
  output logic          found,
  output logic [DW-1:0] hold_dist,
  output logic [LW-1:0] hold_label
);

  logic [DW-1:0] a_q, c_q, hd_q;
  logic [LW-1:0] b_q, d_q, hl_q;
  logic          eoe_q;
  logic          other;
  logic          keep, take;

  // the entry the opposite comparison would pick (c on a tie): the loser
  assign other = a_wins(!IS_MAX, 64'(c_q), 64'(d_q), 64'(a_q), 64'(b_q));
  assign keep = a_wins(IS_MAX, 64'(a_q), 64'(b_q), 64'(c_q), 64'(d_q));
  assign take = !a_wins(IS_MAX, 64'(hd_q), 64'(hl_q), 64'(a_q), 64'(b_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      d_q   <= '0;
      hd_q  <= '0;
      hl_q  <= '0;
      eoe_q <= 1'b0;
    end else if (ph.clr) begin
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      d_q   <= '0;
      hd_q  <= '0;
      hl_q  <= '0;
      eoe_q <= 1'b0;
    end else begin
      if (finish) eoe_q <= 1'b1;
      if (ph.xfer) begin
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
      end else if (ph.alu && ph.step == 2'd1 && take) begin
        hd_q <= a_q;
        hl_q <= b_q;
      end
    end
  end

  assign g_out = c_q[0];
  assign h_out = d_q[0];
  assign eoe   = eoe_q;
  assign found = eoe_q && (hl_q != '0);
  assign hold_dist  = eoe_q ? hd_q : '0;
  assign hold_label = eoe_q ? hl_q : '0;

  initial begin
    assert (DW <= 64 && LW <= 64) else $error("compare_hold_processor: word wider than 64 bits");
  end

endmodule
