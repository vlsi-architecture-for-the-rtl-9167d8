// Testbench of compare_processor: a compare_max and a compare_min instance
// at the default word sizes (19-bit distances, 14-bit labels). Each time
// unit the testbench shifts random labelled distances (a,b) and (c,d) into
// both, LSB first, gives the three ALU clocks, and checks on the next unit
// that (e,f) is the winner and (g,h) the loser:
//   max: a >= c keeps a; min: a <= c keeps a (ties stay with a);
//   an entry with label 0 (empty slot) never wins; for the minimum a zero
//   distance does not count either; the loser output carries the entry
//   the opposite comparison picks (c on a tie), so a lone valid entry can
//   leave on both outputs.
// Equal distances, empty slots and zero distances are forced regularly.
module tb_compare_processor;
  import diam_pkg::*;

  localparam int DW   = 19;
  localparam int LW   = 14;
  localparam int XFER = DW;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  phase_t ph;
  logic [1:0] a_in, b_in, c_in, d_in, e_out, f_out, g_out, h_out;

  compare_processor #(.IS_MAX(1'b1), .DW(DW), .LW(LW)) u_max (
    .clk, .rst_n, .ph, .a_in(a_in[0]), .b_in(b_in[0]), .c_in(c_in[0]), .d_in(d_in[0]),
    .e_out(e_out[0]), .f_out(f_out[0]), .g_out(g_out[0]), .h_out(h_out[0]));
  compare_processor #(.IS_MAX(1'b0), .DW(DW), .LW(LW)) u_min (
    .clk, .rst_n, .ph, .a_in(a_in[1]), .b_in(b_in[1]), .c_in(c_in[1]), .d_in(d_in[1]),
    .e_out(e_out[1]), .f_out(f_out[1]), .g_out(g_out[1]), .h_out(h_out[1]));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_swap = 0, n_keep = 0;

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

  logic [DW-1:0] wa, wc, oe [2], og [2];
  logic [LW-1:0] wb, wd, of [2], oh [2];

  task automatic run_unit();
    for (int m = 0; m < 2; m++) begin oe[m] = 0; og[m] = 0; of[m] = 0; oh[m] = 0; end
    for (int k = 0; k < XFER; k++) begin
      @(negedge clk);
      ph = '0; ph.xfer = 1'b1; ph.bit_idx = 8'(k);
      for (int m = 0; m < 2; m++) begin
        a_in[m] = wa[k]; c_in[m] = wc[k];
        b_in[m] = (k < LW) ? wb[k] : 1'b0;
        d_in[m] = (k < LW) ? wd[k] : 1'b0;
        oe[m][k] = e_out[m]; og[m][k] = g_out[m];
        if (k < LW) begin of[m][k] = f_out[m]; oh[m][k] = h_out[m]; end
      end
    end
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      ph = '0; ph.alu = 1'b1; ph.step = 2'(s);
    end
    @(negedge clk);
    ph = '0;
  endtask

  // reference: does the first entry win?
  function automatic bit first_wins(bit is_max, int a, int la, int c, int lc);
    bit a_ok, c_ok;
    a_ok = la != 0 && (is_max || a != 0);
    c_ok = lc != 0 && (is_max || c != 0);
    if (!a_ok && !c_ok) return 1;
    if (!a_ok) return 0;
    if (!c_ok) return 1;
    if (is_max) return a >= c;
    return a <= c;
  endfunction

  int pa, pb, pc, pd;
  int ev, el, gv, gl;
  bit keep;

  initial begin
    ph = '0;
    a_in = '0; b_in = '0; c_in = '0; d_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < 200; u++) begin
      wa = DW'($urandom_range(0, 1000));
      wc = DW'($urandom_range(0, 1000));
      wb = LW'($urandom_range(1, 16383));
      wd = LW'($urandom_range(1, 16383));
      case (u % 8)
        1: wc = wa;
        2: wb = '0;
        3: wd = '0;
        4: wa = '0;
        5: wc = '0;
        6: begin wa = '1; wc = '1; end
        default: ;
      endcase
      run_unit();
      if (u > 0) begin
        for (int m = 0; m < 2; m++) begin
          keep = first_wins(m == 0, pa, pb, pc, pd);
          if (keep) n_keep++; else n_swap++;
          ev = keep ? pa : pc; el = keep ? pb : pd;
          // loser: what the opposite comparison picks, c on a tie
          if (first_wins(m != 0, pc, pd, pa, pb)) begin gv = pc; gl = pd; end
          else begin gv = pa; gl = pb; end
          check($sformatf("unit %0d %s: winner", u, m == 0 ? "max" : "min"),
                int'(oe[m]) == ev && int'(of[m]) == el);
          check($sformatf("unit %0d %s: loser", u, m == 0 ? "max" : "min"),
                int'(og[m]) == gv && int'(oh[m]) == gl);
        end
      end
      pa = int'(wa); pb = int'(wb); pc = int'(wc); pd = int'(wd);
    end
    check("both outcomes seen", n_keep > 0 && n_swap > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
