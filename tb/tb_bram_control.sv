// Self-checking test of the controller (boundary scan, centroid, distance and
// square root) with both block RAMs attached, at the full 32 x 64 image size.
// The image memory is loaded through its port A; after i_start the CCD
// samples are compared, value by value, with the reference model, together
// with their running index, the o_last flag on the final (padded) sample, the
// state output and the exact number of cycles from start to the last sample. Images: a rectangle outline
// with non-object clutter, a circle outline, a random sparse image and an
// empty image.
module tb_bram_control;
  import tb_ref_pkg::*;
  localparam int ROWS = 32, COLS = 64, NPIX = ROWS * COLS;

  logic clk = 0, rst = 1, start = 0;
  always #5 clk = ~clk;

  logic        a_en = 0;
  logic [3:0]  a_we = 0;
  logic [10:0] a_addr = 0;
  logic [31:0] a_din = 0, a_dout;
  logic [31:0] b1_addr, b1_data;
  logic        b1_en;
  logic [3:0]  b1_we;
  logic [10:0] b2_addr, b2b_addr;
  logic [15:0] b2_din, b2b_data, b2_douta;
  logic        b2_en, b2_we, b2b_en, b2b_we;
  logic [1:0]  st;
  logic [15:0] ccd;
  logic        ccd_en, ccd_last;
  logic [6:0]  ccd_idx;

  logic [31:0] img [];
  int sig [$];
  int got [$], got_idx [$], got_last [$];
  int checks = 0, failures = 0, cycle = 0;

  bram_tdp #(.DATA_W(32), .ADDR_W(11), .WE_W(4)) u_bram1 (
    .clka(clk), .ena(a_en), .wea(a_we), .addra(a_addr), .dina(a_din), .douta(a_dout),
    .clkb(clk), .enb(b1_en), .web(b1_we), .addrb(b1_addr[12:2]), .dinb('0), .doutb(b1_data));

  bram_control #(.ROWS(ROWS), .COLS(COLS), .FFT_LEN(16)) dut (
    .sysclk(clk), .reset(rst), .i_start(start),
    .o_bram1Addr(b1_addr), .i_bram1Data(b1_data), .o_bram1En(b1_en), .o_bram1WEn(b1_we),
    .o_bram2Addr(b2_addr), .o_bram2ColIndex(b2_din), .o_bram2En(b2_en), .o_bram2WEn(b2_we),
    .o_bram2PortBAddr(b2b_addr), .i_bram2PortBData(b2b_data), .o_bram2PortBEn(b2b_en),
    .o_bram2PortBWEn(b2b_we), .o_stateCheck(st), .o_totalDistanceSqrt(ccd), .outEnSqrt(ccd_en),
    .o_indexCount(ccd_idx), .o_last(ccd_last));

  bram_tdp #(.DATA_W(16), .ADDR_W(11), .WE_W(1)) u_bram2 (
    .clka(clk), .ena(b2_en), .wea(b2_we), .addra(b2_addr), .dina(b2_din), .douta(b2_douta),
    .clkb(clk), .enb(b2b_en), .web(b2b_we), .addrb(b2b_addr), .dinb('0), .doutb(b2b_data));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (ccd_en) begin
      got.push_back(int'(ccd));
      got_idx.push_back(int'(ccd_idx));
      got_last.push_back(int'(ccd_last));
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic load_image();
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk);
      a_en = 1; a_we = 4'hF; a_addr = 11'(p); a_din = img[p];
    end
    @(negedge clk);
    a_en = 0; a_we = 0;
  endtask

  task automatic run(string name);
    int npts, xc, yc, t0, cycles, bound;
    bit from_done;
    ccd_signature(img, COLS, sig, npts, xc, yc);
    load_image();
    got.delete(); got_idx.delete(); got_last.delete();
    @(negedge clk);
    from_done = (st == 2'd3);
    start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    if (npts == 0) begin
      repeat (NPIX + 100) @(negedge clk);
    end else begin
      wait (got_last.size() > 0 && got_last[got_last.size() - 1] == 1);
    end
    cycles = cycle - t0;
    @(negedge clk);
    check(got.size() == sig.size(), $sformatf("%s: %0d samples, expected %0d", name, got.size(), sig.size()));
    for (int i = 0; i < sig.size() && i < got.size(); i++) begin
      check(got[i] == sig[i], $sformatf("%s: sample %0d = %0d expected %0d", name, i, got[i], sig[i]));
      check(got_idx[i] == i % 128, $sformatf("%s: index %0d", name, got_idx[i]));
      check(got_last[i] == (i == sig.size() - 1), $sformatf("%s: last flag at %0d", name, i));
    end
    check(st == 2'd3, $sformatf("%s: scan state DONE", name));
    // cycle count from the controller's description
    bound = NPIX + 3 * npts + sig.size() + 46 + (sig.size() > npts ? 1 : 0) + (from_done ? 1 : 0);
    if (npts > 0)
      check(cycles == bound, $sformatf("%s: %0d cycles, expected %0d", name, cycles, bound));
    $display("%s: %0d points, centroid (%0d,%0d), %0d samples, %0d cycles", name, npts, xc, yc, sig.size(), cycles);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    img = new[NPIX];
    repeat (3) @(negedge clk);
    rst = 0;
    draw_rect(img, COLS, 5, 10, 12, 30, 1);
    run("rectangle");
    draw_circle(img, ROWS, COLS, 15.3, 30.7, 11.0);
    run("circle");
    for (int p = 0; p < NPIX; p++) img[p] = ($urandom % 50 == 0) ? 32'd1 : 32'd0;
    run("random");
    for (int p = 0; p < NPIX; p++) img[p] = 0;
    run("empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
