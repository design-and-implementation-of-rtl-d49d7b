// Self-checking test of the squared centroid distance unit: random points
// and centroids, one per cycle, against (x-xc)^2 + (y-yc)^2 computed with
// integers here; also checks the one-cycle latency of the valid flag.
module tb_ccd_sqdist;
  localparam int IDX_W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic             vin = 0, vout;
  logic [IDX_W-1:0] r = 0, c = 0, xc = 0, yc = 0;
  logic [31:0]      sq;
  int exp_q [$];
  int checks = 0, failures = 0;

  ccd_sqdist #(.IDX_W(IDX_W)) dut (
    .sysclk(clk), .reset(rst), .i_valid(vin), .i_row(r), .i_col(c), .i_xc(xc), .i_yc(yc),
    .o_valid(vout), .o_sqdist(sq));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    if (vout) begin
      checks++;
      if (exp_q.size() == 0 || sq != 32'(exp_q[0])) begin
        failures++;
        $display("FAIL: %0d expected %0d", sq, exp_q.size() ? exp_q[0] : -1);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      #1;
      vin = ($urandom % 4) != 0;
      r  = IDX_W'((i < 2) ? (i == 0 ? 255 : 0) : $urandom);
      c  = IDX_W'((i < 2) ? (i == 0 ? 0 : 255) : $urandom);
      xc = IDX_W'((i < 2) ? (i == 0 ? 0 : 255) : $urandom);
      yc = IDX_W'((i < 2) ? (i == 0 ? 255 : 0) : $urandom);
      if (vin) exp_q.push_back((int'(r) - int'(xc)) ** 2 + (int'(c) - int'(yc)) ** 2);
    end
    @(posedge clk);
    #1 vin = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
