// Self-checking test of the boundary scan state machine at the full
// 32 x 64 image size. A behavioural one-cycle-latency image memory holds a
// random sparse image in which some words are 1 (object pixels) and some hold
// other non-zero values (which must be ignored). The test checks the list of
// {row, col} words written to BRAM2, in raster order, the point count, that
// the memory is never written, the number of cycles spent scanning
// (ROWS*COLS + 2H + 2, or one less when the last pixel is a hit) and that a
// start in DONE runs the next frame through IDLE. It runs three images, one of them empty and one
// whose last pixel is set.
module tb_boundary_scan;
  import shape_pkg::*;
  localparam int ROWS = 32, COLS = 64, NPIX = ROWS * COLS;

  logic clk = 0, rst = 1, start = 0;
  always #5 clk = ~clk;

  logic [31:0] b1_addr, b1_data;
  logic        b1_en, b2_en, b2_we, done;
  logic [3:0]  b1_we;
  logic [10:0] b2_addr;
  logic [15:0] b2_data;
  logic [1:0]  st;
  logic [11:0] count;

  logic [31:0] img [NPIX];
  logic [15:0] expected [$];
  logic [15:0] got [$];
  int checks = 0, failures = 0;
  int scan_cycles, cycle = 0;

  boundary_scan #(.ROWS(ROWS), .COLS(COLS), .B2_ADDR_W(11)) dut (
    .sysclk(clk), .reset(rst), .i_start(start),
    .o_bram1Addr(b1_addr), .i_bram1Data(b1_data), .o_bram1En(b1_en), .o_bram1WEn(b1_we),
    .o_bram2Addr(b2_addr), .o_bram2ColIndex(b2_data), .o_bram2En(b2_en), .o_bram2WEn(b2_we),
    .o_stateCheck(st), .o_count(count), .o_done(done));

  // image memory: one-cycle read, output held while disabled
  always_ff @(posedge clk) if (b1_en) b1_data <= img[b1_addr[31:2]];

  // BRAM2 write monitor and state-cycle counter
  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (b2_en && b2_we) got.push_back(b2_data);
    if (st == ST_RD_BRAM1 || st == ST_WR_BRAM2) scan_cycles <= scan_cycles + 1;
    if (b1_en && b1_we != 0) failures <= failures + 1;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_image(int density, bit last_set);
    int hits = 0;
    expected.delete();
    got.delete();
    for (int p = 0; p < NPIX; p++) begin
      int r = $urandom % 100;
      if (r < density)           img[p] = 32'd1;
      else if (r < 2 * density)  img[p] = 32'd2 + ($urandom % 7);
      else                       img[p] = 32'd0;
    end
    if (last_set) img[NPIX-1] = 32'd1;
    for (int p = 0; p < NPIX; p++)
      if (img[p] == 32'd1) begin
        expected.push_back({8'(p / COLS), 8'(p % COLS)});
        hits++;
      end
    @(negedge clk);
    check(st == ST_IDLE || st == ST_DONE, "idle or done before start");
    scan_cycles = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    // from DONE a single start passes through IDLE into the scan
    if (st == ST_IDLE) begin
      @(negedge clk);
      check(st == ST_RD_BRAM1, "IDLE -> RD_BRAM1 without a second start");
    end
    wait (done);
    @(negedge clk);
    check(count == 12'(hits), $sformatf("count %0d expected %0d", count, hits));
    check(got.size() == expected.size(), "number of BRAM2 writes");
    for (int i = 0; i < expected.size() && i < got.size(); i++)
      check(got[i] == expected[i], $sformatf("point %0d: %h expected %h", i, got[i], expected[i]));
    check(scan_cycles == NPIX + 2 * hits + (img[NPIX-1] == 32'd1 ? 1 : 2),
          $sformatf("scan took %0d cycles, expected %0d", scan_cycles, NPIX + 2 * hits + 2));
    check(st == ST_DONE, "DONE after the scan");
    repeat (5) @(negedge clk);
    check(st == ST_DONE, "DONE held until the next start");
  endtask

  initial begin
    b1_data = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run_image(3, 0);
    run_image(0, 0);
    run_image(10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
