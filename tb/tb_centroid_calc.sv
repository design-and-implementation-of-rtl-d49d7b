// Self-checking test of the centroid calculator: random point sets of random
// size (including none and one point) are accumulated one per cycle, then
// divided; x_c and y_c must equal the truncated means computed here, the
// point count must match, and the result must be ready SUM_W + 1 cycles
// after the divide request.
module tb_centroid_calc;
  localparam int IDX_W = 8, CNT_W = 12, SUM_W = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic             clear = 0, acc = 0, div = 0, valid;
  logic [IDX_W-1:0] row = 0, col = 0, xc, yc;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;

  centroid_calc #(.IDX_W(IDX_W), .CNT_W(CNT_W), .SUM_W(SUM_W)) dut (
    .sysclk(clk), .reset(rst), .i_clear(clear), .i_acc(acc), .i_row(row), .i_col(col),
    .i_div(div), .o_xc(xc), .o_yc(yc), .o_valid(valid), .o_count(count));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 60; t++) begin
      int n, rs, cs, lat;
      rs = 0; cs = 0; lat = 0;
      n = (t == 0) ? 0 : (t == 1) ? 1 : (t == 2) ? 2048 : 1 + ($urandom % 700);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int i = 0; i < n; i++) begin
        acc = 1;
        row = IDX_W'((t == 2) ? 31 : $urandom % 32);
        col = IDX_W'((t == 2) ? 63 : $urandom % 64);
        rs += row;
        cs += col;
        @(negedge clk);
      end
      acc = 0;
      div = 1;
      @(negedge clk);
      div = 0;
      while (!valid && lat < 100) begin @(negedge clk); lat++; end
      check(count == CNT_W'(n), "point count");
      check(xc == IDX_W'(n == 0 ? 0 : rs / n), $sformatf("xc %0d expected %0d", xc, n == 0 ? 0 : rs / n));
      check(yc == IDX_W'(n == 0 ? 0 : cs / n), $sformatf("yc %0d expected %0d", yc, n == 0 ? 0 : cs / n));
      check(lat == SUM_W + 1, $sformatf("divide latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
