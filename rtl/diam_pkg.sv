// Shared types and sizing functions of the diameter / closest-pair systolic
// architecture.
//
// All processors of the array are bit-serial and run in lock step. One time
// unit of the array is a transfer phase, in which every pipeline register
// shifts its word one bit per clock (LSB first) into its neighbour, followed
// by a three-cycle ALU phase in which each processor computes on the words it
// has just received. The controller broadcasts the current phase to every
// processor as a phase_t.
//
// Pair labels are packed as {i, j} with 1-based point indices; i == 0 marks an
// empty slot of the label stream, which never wins a comparison.
package diam_pkg;

  // Distance metric of the compute processor. L1 is the main configuration
  // (p = 1). L2SQ accumulates squared differences (the root is monotonic and
  // is not needed for selecting the extremes); LINF keeps the largest
  // coordinate difference.
  typedef enum logic [1:0] {
    METRIC_L1   = 2'd0,
    METRIC_L2SQ = 2'd1,
    METRIC_LINF = 2'd2
  } metric_e;

  // Number of ALU cycles that follow each transfer phase.
  localparam int unsigned ALU_STEPS = 3;

  // Phase broadcast by the controller.
  typedef struct packed {
    logic       clr;      // synchronous clear of every pipeline register
    logic       xfer;     // transfer phase: serial shift of the words
    logic [7:0] bit_idx;  // bit being transferred (0 = LSB)
    logic       alu;      // ALU phase
    logic [1:0] step;     // ALU micro-step 0..2
  } phase_t;

  // Bits of an accumulated distance for CW-bit coordinates in D dimensions.
  function automatic int unsigned dist_width(int unsigned cw, int unsigned d,
                                             metric_e m);
    case (m)
      METRIC_L2SQ: return 2 * cw + $clog2(d + 1);
      METRIC_LINF: return cw;
      default:     return cw + $clog2(d + 1);
    endcase
  endfunction

  // Bits of one point index (1..n, 0 reserved for "empty").
  function automatic int unsigned index_width(int unsigned n);
    return $clog2(n + 1);
  endfunction

  // Clock cycles of the transfer phase: the widest serial word.
  function automatic int unsigned xfer_cycles(int unsigned cw, int unsigned dw,
                                              int unsigned lw);
    int unsigned m;
    m = cw;
    if (dw > m) m = dw;
    if (lw > m) m = lw;
    return m;
  endfunction

  // Whether an entry takes part in a compare_max (is_max = 1) or compare_min
  // comparison: its label is not empty and, for the minimum, its distance is
  // not zero.
  function automatic logic entry_ok(logic is_max, logic [63:0] v, logic [63:0] l);
    return (l != 0) && (is_max || v != 0);
  endfunction

  // Decides whether entry A (distance a, label la) beats entry C in a
  // compare_max (is_max = 1) or compare_min (is_max = 0) processor.
  // An entry with an empty label never wins; the minimum also ignores zero
  // distances. Ties go to A ("if a >= c then e := a").
  function automatic logic a_wins(logic is_max, logic [63:0] a, logic [63:0] la,
                                  logic [63:0] c, logic [63:0] lc);
    logic a_ok, c_ok;
    a_ok = entry_ok(is_max, a, la);
    c_ok = entry_ok(is_max, c, lc);
    if (!c_ok) return 1'b1;
    if (!a_ok) return 1'b0;
    return is_max ? (a >= c) : (a <= c);
  endfunction

endpackage
