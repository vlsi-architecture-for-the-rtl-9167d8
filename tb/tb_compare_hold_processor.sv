// Testbench of compare_hold_processor: a compare_max_hold and a
// compare_min_hold instance at the default word sizes. A stream of random
// labelled distances, with empty slots, zero distances and ties mixed in,
// is shifted into (a,b) and (c,d) over many time units. The testbench keeps
// its own running extreme (an earlier entry keeps the hold on a tie) and
// checks the loser leaving on (g,h) every unit (the entry the opposite
// comparison picks, so a lone valid entry leaves on both sides). After a `finish` pulse the
// end-of-execution flag, the found flag and the released distance and label
// must match; before it the result ports stay at zero. A clear then empties
// the hold registers, and a run with only empty slots releases found = 0.
module tb_compare_hold_processor;
  import diam_pkg::*;

  localparam int DW   = 19;
  localparam int LW   = 14;
  localparam int XFER = DW;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  phase_t ph;
  logic   a_in, b_in, c_in, d_in, finish;
  logic [1:0] g_out, h_out, eoe, found;
  logic [DW-1:0] hold_dist [2];
  logic [LW-1:0] hold_label [2];

  compare_hold_processor #(.IS_MAX(1'b1), .DW(DW), .LW(LW)) u_max (
    .clk, .rst_n, .ph, .a_in, .b_in, .c_in, .d_in, .g_out(g_out[0]), .h_out(h_out[0]),
    .finish, .eoe(eoe[0]), .found(found[0]), .hold_dist(hold_dist[0]), .hold_label(hold_label[0]));
  compare_hold_processor #(.IS_MAX(1'b0), .DW(DW), .LW(LW)) u_min (
    .clk, .rst_n, .ph, .a_in, .b_in, .c_in, .d_in, .g_out(g_out[1]), .h_out(h_out[1]),
    .finish, .eoe(eoe[1]), .found(found[1]), .hold_dist(hold_dist[1]), .hold_label(hold_label[1]));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

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

  logic [DW-1:0] wa, wc, og [2];
  logic [LW-1:0] wb, wd, oh [2];

  task automatic run_unit(bit fin);
    for (int m = 0; m < 2; m++) begin og[m] = 0; oh[m] = 0; end
    for (int k = 0; k < XFER; k++) begin
      @(negedge clk);
      ph = '0; ph.xfer = 1'b1; ph.bit_idx = 8'(k);
      a_in = wa[k]; c_in = wc[k];
      b_in = (k < LW) ? wb[k] : 1'b0;
      d_in = (k < LW) ? wd[k] : 1'b0;
      for (int m = 0; m < 2; m++) begin
        og[m][k] = g_out[m];
        if (k < LW) oh[m][k] = h_out[m];
      end
    end
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      ph = '0; ph.alu = 1'b1; ph.step = 2'(s);
      finish = fin && s == 2;
    end
    @(negedge clk);
    ph = '0;
    finish = 1'b0;
  endtask

  function automatic bit ok(bit is_max, int v, int l);
    return l != 0 && (is_max || v != 0);
  endfunction

  // reference: does (v1,l1) win over (v2,l2)? ties go to the first
  function automatic bit first_wins(bit is_max, int v1, int l1, int v2, int l2);
    if (!ok(is_max, v2, l2)) return 1;
    if (!ok(is_max, v1, l1)) return 0;
    return is_max ? v1 >= v2 : v1 <= v2;
  endfunction

  int pa, pb, pc, pd;
  int hv [2], hl [2];
  int lose_v [2], lose_l [2];
  int n_upd = 0;
  bit keep;

  task automatic clear_regs();
    @(negedge clk);
    ph = '0; ph.clr = 1'b1;
    @(negedge clk);
    ph = '0;
    for (int m = 0; m < 2; m++) begin hv[m] = 0; hl[m] = 0; end
  endtask

  task automatic step_ref();
    int wv, wl;
    for (int m = 0; m < 2; m++) begin
      keep = first_wins(m == 0, pa, pb, pc, pd);
      wv = keep ? pa : pc; wl = keep ? pb : pd;
      // loser: what the opposite comparison picks, c on a tie
      if (first_wins(m != 0, pc, pd, pa, pb)) begin lose_v[m] = pc; lose_l[m] = pd; end
      else begin lose_v[m] = pa; lose_l[m] = pb; end
      if (!first_wins(m == 0, hv[m], hl[m], wv, wl)) begin hv[m] = wv; hl[m] = wl; n_upd++; end
    end
  endtask

  initial begin
    ph = '0;
    {a_in, b_in, c_in, d_in, finish} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    clear_regs();
    pa = 0; pb = 0; pc = 0; pd = 0;
    for (int u = 0; u < 120; u++) begin
      wa = DW'($urandom_range(1, 5000));
      wc = DW'($urandom_range(1, 5000));
      wb = LW'($urandom_range(1, 16383));
      wd = LW'($urandom_range(1, 16383));
      case (u % 6)
        1: wb = '0;
        2: wa = '0;
        3: wc = wa;
        4: wd = '0;
        default: ;
      endcase
      run_unit(u == 119);
      if (u > 0) begin
        for (int m = 0; m < 2; m++)
          check($sformatf("unit %0d loser %0d", u, m),
                int'(og[m]) == lose_v[m] && int'(oh[m]) == lose_l[m]);
      end
      pa = int'(wa); pb = int'(wb); pc = int'(wc); pd = int'(wd);
      // reference hold after the ALU of unit u
      step_ref();
      if (u < 119) check("no release before finish", eoe == 2'b00 && hold_dist[0] == 0 && hold_label[1] == 0);
    end
    for (int m = 0; m < 2; m++) begin
      check($sformatf("eoe %0d", m), eoe[m]);
      check($sformatf("found %0d", m), found[m] == (hl[m] != 0));
      check($sformatf("held distance %0d", m), int'(hold_dist[m]) == hv[m]);
      check($sformatf("held label %0d", m), int'(hold_label[m]) == hl[m]);
    end
    check("hold updated more than once", n_upd > 2);
    $display("max %0d/%0d  min %0d/%0d", hold_dist[0], hold_label[0], hold_dist[1], hold_label[1]);

    // clear, then a run of empty slots only
    clear_regs();
    check("clear drops the flag", eoe == 2'b00);
    wa = 7; wb = 0; wc = 0; wd = 0;
    run_unit(1'b0);
    run_unit(1'b1);
    check("empty run: flags", eoe == 2'b11 && found == 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
