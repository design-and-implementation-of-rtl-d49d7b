// Self-checking test of the pipelined integer square root: edge values
// (0, 1, perfect squares and their neighbours, 2^32-1) and random 32-bit
// inputs, one per cycle with gaps. Each result must satisfy
// root^2 <= x < (root+1)^2, arrive exactly IN_W/2 cycles after its input and
// carry the input's tag.
module tb_isqrt_pipe;
  localparam int IN_W = 32, OUT_W = 17, TAG_W = 7, LAT = IN_W / 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic             vin = 0, vout;
  logic [IN_W-1:0]  x = 0;
  logic [TAG_W-1:0] tin = 0, tout;
  logic [OUT_W-1:0] root;
  longint in_q [$];
  int     tag_q [$], time_q [$];
  int checks = 0, failures = 0, cycle = 0;

  isqrt_pipe #(.IN_W(IN_W), .OUT_W(OUT_W), .TAG_W(TAG_W)) dut (
    .sysclk(clk), .reset(rst), .i_valid(vin), .i_radicand(x), .i_tag(tin),
    .o_valid(vout), .o_root(root), .o_tag(tout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (!rst && vout) begin
    longint v, r;
    checks++;
    v = in_q.pop_front();
    r = longint'(root);
    if (!(r * r <= v && (r + 1) * (r + 1) > v) || tout != TAG_W'(tag_q.pop_front())
        || cycle - time_q.pop_front() != LAT) begin
      failures++;
      $display("FAIL: sqrt(%0d) gave %0d", v, r);
    end
  end

  initial begin
    longint edges [$] = '{0, 1, 2, 3, 4, 15, 16, 17, 4930, 65535, 65536, 1073741824,
                          32'hFFFE0001, 32'hFFFE0000, 32'hFFFFFFFF};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      #1;
      vin = (i < edges.size()) || (($urandom % 5) != 0);
      x   = (i < edges.size()) ? IN_W'(edges[i]) : (i % 2) ? IN_W'($urandom % 5000) : IN_W'($urandom);
      tin = TAG_W'(i);
      if (vin) begin
        in_q.push_back(longint'(x));
        tag_q.push_back(i % (1 << TAG_W));
        time_q.push_back(cycle);
      end
    end
    @(posedge clk);
    #1 vin = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (in_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
