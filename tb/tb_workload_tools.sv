// Workload test: hand-tool silhouettes at the default 32 x 64 image size.
// Eight tool classes (two hammers, three pliers, three screwdrivers) are
// drawn as filled shapes whose outline (filled pixels with a 4-neighbour
// outside the shape) is written to BRAM1; each class is processed at five
// positions in the image, 40 images in all. Every coefficient is compared
// with the reference model, every translated copy must give exactly the
// coefficients of the first position (translation invariance), and the ten
// lowest-order descriptor magnitudes of the eight classes must differ
// pairwise. The shapes are synthetic stand-ins for camera images.
module tb_workload_tools;
  import tb_ref_pkg::*;
  localparam int ROWS = 32, COLS = 64, NPIX = ROWS * COLS;
  localparam int CLASSES = 8, POSITIONS = 5, NDESC = 10;

  logic clk = 0, rst = 1, start = 0;
  always #5 clk = ~clk;

  logic        a_en = 0;
  logic [3:0]  a_we = 0;
  logic [31:0] a_addr = 0, a_din = 0, a_dout;
  logic [15:0] re, im, re_tmp, im_tmp;
  logic [3:0]  usr;
  logic        valid, fdone;
  logic [1:0]  st;

  logic [31:0] img [];
  bit          fill [ROWS][COLS];
  int   sig [$];
  real  exp_re [$], exp_im [$];
  int   got_re [$], got_im [$], got_done [$];
  int   first_re [$], first_im [$];
  real  desc [CLASSES][NDESC];
  int   checks = 0, failures = 0;

  shape_feature_top dut (
    .sysclk(clk), .reset(rst), .i_start(start),
    .i_bram1a_en(a_en), .i_bram1a_we(a_we), .i_bram1a_addr(a_addr), .i_bram1a_din(a_din),
    .o_bram1a_dout(a_dout),
    .o_tdata_re(re), .o_tdata_im(im), .o_tdata_re_tmp(re_tmp), .o_tdata_im_tmp(im_tmp),
    .o_tdata_usrink_tmp(usr), .o_tdata_valid(valid), .o_frame_done(fdone), .o_stateCheck(st));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (valid) begin
    got_re.push_back(int'($signed(re_tmp)));
    got_im.push_back(int'($signed(im_tmp)));
    got_done.push_back(int'(fdone));
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic bit near(real a, real b, real tol);
    return (a - b) <= tol && (b - a) <= tol;
  endfunction

  function automatic void box(int r0, int c0, int h, int w);
    for (int r = r0; r < r0 + h; r++)
      for (int c = c0; c < c0 + w; c++)
        if (r >= 0 && r < ROWS && c >= 0 && c < COLS) fill[r][c] = 1;
  endfunction

  // slanted bar from (r0,c0) going right, rising or falling by 'slope' rows per 8 columns
  function automatic void bar(int r0, int c0, int len, int thick, int slope);
    for (int i = 0; i < len; i++) box(r0 + (i * slope) / 8, c0 + i, thick, 1);
  endfunction

  // tool shape of a class, placed with offset (dr, dc)
  function automatic void draw_tool(int cls, int dr, int dc);
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) fill[r][c] = 0;
    case (cls)
      0: begin box(dr + 6, dc + 4, 3, 26); box(dr + 2, dc + 30, 11, 5); end     // claw hammer
      1: begin box(dr + 6, dc + 4, 2, 22); box(dr + 3, dc + 26, 8, 8); end      // mallet
      2: begin bar(dr + 2, dc + 4, 18, 2, 4); bar(dr + 11, dc + 4, 18, 2, -4);  // long-nose plier
               box(dr + 5, dc + 22, 4, 12); end
      3: begin bar(dr + 1, dc + 4, 14, 3, 6); bar(dr + 12, dc + 4, 14, 3, -6);  // combination plier
               box(dr + 5, dc + 18, 5, 8); end
      4: begin bar(dr + 3, dc + 4, 20, 2, 2); bar(dr + 9, dc + 4, 20, 2, -2);   // slip-joint plier
               box(dr + 5, dc + 24, 3, 6); end
      5: begin box(dr + 4, dc + 4, 6, 10); box(dr + 6, dc + 14, 2, 20); end     // flat screwdriver
      6: begin box(dr + 3, dc + 4, 8, 12); box(dr + 6, dc + 16, 2, 14); end     // stubby screwdriver
      default: begin box(dr + 5, dc + 4, 4, 8); box(dr + 6, dc + 12, 2, 24);   // precision screwdriver
               box(dr + 6, dc + 36, 1, 2); end
    endcase
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        bit edge_px;
        edge_px = fill[r][c] && (r == 0 || c == 0 || r == ROWS - 1 || c == COLS - 1 ||
                                 !fill[r-1][c] || !fill[r+1][c] || !fill[r][c-1] || !fill[r][c+1]);
        img[r * COLS + c] = edge_px ? 32'd1 : 32'd0;
      end
  endfunction

  task automatic run_image(int cls, int pos);
    int npts, xc, yc;
    ccd_signature(img, COLS, sig, npts, xc, yc);
    dft_frames(sig, exp_re, exp_im);
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk);
      a_en = 1; a_we = 4'hF; a_addr = 32'(p * 4); a_din = img[p];
    end
    @(negedge clk);
    a_en = 0; a_we = 0;
    got_re.delete(); got_im.delete(); got_done.delete();
    start = 1;
    @(negedge clk);
    start = 0;
    wait (got_done.size() > 0 && got_done[got_done.size() - 1] == 1);
    @(negedge clk);
    check(got_re.size() == exp_re.size(), $sformatf("class %0d pos %0d: %0d coefficients, expected %0d",
                                                   cls, pos, got_re.size(), exp_re.size()));
    for (int i = 0; i < exp_re.size() && i < got_re.size(); i++) begin
      check(near(real'(got_re[i]), exp_re[i], 1.0), $sformatf("class %0d: re[%0d]", cls, i));
      check(near(real'(got_im[i]), exp_im[i], 1.0), $sformatf("class %0d: im[%0d]", cls, i));
    end
    if (pos == 0) begin
      first_re = got_re;
      first_im = got_im;
      for (int k = 0; k < NDESC; k++)
        desc[cls][k] = $sqrt(real'(got_re[k]) ** 2 + real'(got_im[k]) ** 2);
      $display("class %0d: %0d boundary points, %0d coefficients, |X[0..3]| = %0.1f %0.1f %0.1f %0.1f",
               cls, npts, got_re.size(), desc[cls][0], desc[cls][1], desc[cls][2], desc[cls][3]);
    end else begin
      check(got_re == first_re && got_im == first_im,
            $sformatf("class %0d: coefficients change with position %0d", cls, pos));
    end
  endtask

  initial begin
    int offs_r [POSITIONS] = '{0, 10, 17, 3, 12};
    int offs_c [POSITIONS] = '{0, 20, 5, 25, 13};
    img = new[NPIX];
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cls = 0; cls < CLASSES; cls++)
      for (int pos = 0; pos < POSITIONS; pos++) begin
        draw_tool(cls, offs_r[pos], offs_c[pos]);
        run_image(cls, pos);
      end
    // the classes must be told apart by their first ten descriptors
    for (int a = 0; a < CLASSES; a++)
      for (int b = a + 1; b < CLASSES; b++) begin
        real d = 0;
        for (int k = 0; k < NDESC; k++) d += (desc[a][k] - desc[b][k]) ** 2;
        check(d > 1.0, $sformatf("classes %0d and %0d have the same descriptors", a, b));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
