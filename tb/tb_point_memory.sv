// Testbench of point_memory at its default size (100 points, 5 dimensions,
// 16-bit coordinates). It writes a random value to every coordinate, plus
// writes that must be ignored (point 0, point beyond N, dimension beyond D),
// then reads back through both port groups with a different point on every
// column, including index 0 and out-of-range indices, which must read 0.
module tb_point_memory;

  localparam int N  = 100;
  localparam int D  = 5;
  localparam int CW = 16;
  localparam int IW = $clog2(N + 1);
  localparam int DIMW = $clog2(D);

  logic                 clk = 1'b0;
  logic                 wr_en = 1'b0;
  logic [IW-1:0]        wr_pt = '0;
  logic [DIMW-1:0]      wr_dim = '0;
  logic [CW-1:0]        wr_data = '0;
  logic [D-1:0][IW-1:0] top_idx, bot_idx;
  logic [D-1:0][CW-1:0] top_data, bot_data;

  point_memory #(.N(N), .D(D), .CW(CW)) dut (.*);

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

  int ref_mem [N+1][D];

  task automatic write(int p, int d, int v);
    @(negedge clk);
    wr_en = 1'b1; wr_pt = IW'(p); wr_dim = DIMW'(d); wr_data = CW'(v);
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  int ti, bi;

  initial begin
    top_idx = '0; bot_idx = '0;
    for (int p = 1; p <= N; p++)
      for (int d = 0; d < D; d++) begin
        ref_mem[p][d] = $urandom_range(0, 65535);
        write(p, d, ref_mem[p][d]);
      end
    // ignored writes
    write(0, 0, 16'hDEAD);
    write(N + 1, 1, 16'hBEEF);
    write(3, 5, 16'hCAFE);
    write(3, 7, 16'hCAFE);
    for (int rep = 0; rep < 300; rep++) begin
      for (int d = 0; d < D; d++) begin
        top_idx[d] = IW'($urandom_range(0, N + 3));
        bot_idx[d] = IW'($urandom_range(0, N + 3));
      end
      #1;
      for (int d = 0; d < D; d++) begin
        ti = int'(top_idx[d]); bi = int'(bot_idx[d]);
        check($sformatf("top read p%0d d%0d", ti, d),
              int'(top_data[d]) == ((ti >= 1 && ti <= N) ? ref_mem[ti][d] : 0));
        check($sformatf("bottom read p%0d d%0d", bi, d),
              int'(bot_data[d]) == ((bi >= 1 && bi <= N) ? ref_mem[bi][d] : 0));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
