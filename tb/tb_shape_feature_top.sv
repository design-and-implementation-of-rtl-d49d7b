// End-to-end test of the shape feature extractor at its default size
// (32 x 64 image, 16-point transform). For each image the test writes BRAM1
// through the processor-side port, reads a word back, pulses i_start and
// collects the Fourier coefficients. Every coefficient is compared with the
// reference model (raster-order boundary points, truncated centroid,
// floor square root, zero padding, double-precision DFT); the index, the
// 1/M-scaled outputs and o_frame_done are checked too.
// Images: a rectangle outline with non-object clutter, the same rectangle
// translated (its coefficients must be identical: translation invariance),
// a circle outline, a random sparse image and an empty image.
// Mechanisms counted and required at least once: boundary-pixel writes
// (WR_BRAM2), ignored non-object values, padding of the signature,
// signatures of several transform frames, back-to-back transform frames,
// restart from DONE for a new frame, and an image without object pixels.
module tb_shape_feature_top;
  import tb_ref_pkg::*;
  localparam int ROWS = 32, COLS = 64, NPIX = ROWS * COLS;

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
  int   sig [$];
  real  exp_re [$], exp_im [$];
  int   got_re [$], got_im [$], got_usr [$], got_sre [$], got_sim [$], got_done [$];
  int   prev_re [$], prev_im [$];
  int   checks = 0, failures = 0, cycle = 0;
  int   n_wr = 0, n_clutter = 0, n_pad = 0, n_multi = 0, n_b2b = 0, n_restart = 0, n_empty = 0;
  int   n_ccd = 0, last_frame_end = -100;

  shape_feature_top dut (
    .sysclk(clk), .reset(rst), .i_start(start),
    .i_bram1a_en(a_en), .i_bram1a_we(a_we), .i_bram1a_addr(a_addr), .i_bram1a_din(a_din),
    .o_bram1a_dout(a_dout),
    .o_tdata_re(re), .o_tdata_im(im), .o_tdata_re_tmp(re_tmp), .o_tdata_im_tmp(im_tmp),
    .o_tdata_usrink_tmp(usr), .o_tdata_valid(valid), .o_frame_done(fdone), .o_stateCheck(st));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (st == 2'd2) n_wr <= n_wr + 1;
    if (dut.bramControl_0.outEnSqrt) n_ccd <= n_ccd + 1;
    if (valid) begin
      got_re.push_back(int'($signed(re_tmp)));
      got_im.push_back(int'($signed(im_tmp)));
      got_sre.push_back(int'($signed(re)));
      got_sim.push_back(int'($signed(im)));
      got_usr.push_back(int'(usr));
      got_done.push_back(int'(fdone));
      // a frame whose first bin directly follows the previous frame's last
      if (usr == 4'd0 && last_frame_end == cycle - 1) n_b2b <= n_b2b + 1;
      if (usr == 4'd15) last_frame_end <= cycle;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic bit near(real a, real b, real tol);
    return (a - b) <= tol && (b - a) <= tol;
  endfunction

  task automatic load_image();
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk);
      a_en = 1; a_we = 4'hF; a_addr = 32'(p * 4); a_din = img[p];
    end
    // read one word back through the processor port
    @(negedge clk);
    a_we = 0; a_addr = 32'((NPIX / 2) * 4);
    @(negedge clk);
    a_en = 0;
    check(a_dout == img[NPIX / 2], "BRAM1 read-back");
  endtask

  task automatic run(string name, bit compare_prev);
    int npts, xc, yc, ccd0;
    ccd_signature(img, COLS, sig, npts, xc, yc);
    dft_frames(sig, exp_re, exp_im);
    foreach (img[p]) if (img[p] != 0 && img[p] != 1) n_clutter++;
    load_image();
    got_re.delete(); got_im.delete(); got_sre.delete(); got_sim.delete(); got_usr.delete(); got_done.delete();
    ccd0 = n_ccd;
    if (st == 2'd3) n_restart++;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    if (npts == 0) begin
      repeat (NPIX + 200) @(negedge clk);
      check(got_re.size() == 0 && st == 2'd3, $sformatf("%s: no coefficients, scan DONE", name));
      n_empty++;
    end else begin
      wait (got_done.size() > 0 && got_done[got_done.size() - 1] == 1);
      @(negedge clk);
      if (sig.size() > npts) n_pad++;
      if (sig.size() >= 2 * FFT_N) n_multi++;
      check(n_ccd - ccd0 == sig.size(), $sformatf("%s: %0d CCD samples", name, n_ccd - ccd0));
      check(got_re.size() == exp_re.size(), $sformatf("%s: %0d coefficients, expected %0d", name, got_re.size(), exp_re.size()));
      for (int i = 0; i < exp_re.size() && i < got_re.size(); i++) begin
        check(got_usr[i] == i % FFT_N, $sformatf("%s: index %0d at %0d", name, got_usr[i], i));
        check(near(real'(got_re[i]), exp_re[i], 1.0), $sformatf("%s: re[%0d] %0d expected %f", name, i, got_re[i], exp_re[i]));
        check(near(real'(got_im[i]), exp_im[i], 1.0), $sformatf("%s: im[%0d] %0d expected %f", name, i, got_im[i], exp_im[i]));
        check(near(real'(got_sre[i]), exp_re[i] / FFT_N, 1.1), $sformatf("%s: re/M[%0d]", name, i));
        check(near(real'(got_sim[i]), exp_im[i] / FFT_N, 1.1), $sformatf("%s: im/M[%0d]", name, i));
        check(got_done[i] == (i == exp_re.size() - 1), $sformatf("%s: frame done at %0d", name, i));
      end
      if (compare_prev) begin
        check(prev_re.size() == got_re.size(), $sformatf("%s: same number of coefficients", name));
        for (int i = 0; i < prev_re.size() && i < got_re.size(); i++)
          check(prev_re[i] == got_re[i] && prev_im[i] == got_im[i], $sformatf("%s: coefficient %0d differs after translation", name, i));
      end
      prev_re = got_re;
      prev_im = got_im;
      $display("%s: %0d boundary points, centroid (%0d,%0d), %0d coefficients; X[0..3] re = %0d %0d %0d %0d",
               name, npts, xc, yc, got_re.size(), got_re[0], got_re[1], got_re[2], got_re[3]);
    end
  endtask

  initial begin
    img = new[NPIX];
    repeat (3) @(negedge clk);
    rst = 0;
    draw_rect(img, COLS, 4, 8, 14, 24, 1);
    run("rectangle", 0);
    draw_rect(img, COLS, 15, 35, 14, 24, 0);
    run("rectangle translated", 1);
    draw_circle(img, ROWS, COLS, 15.4, 31.6, 12.0);
    run("circle", 0);
    for (int p = 0; p < NPIX; p++) img[p] = ($urandom % 40 == 0) ? 32'd1 : 32'd0;
    run("random", 0);
    for (int p = 0; p < NPIX; p++) img[p] = 0;
    run("empty", 0);
    $display("mechanisms: boundary writes %0d, clutter words %0d, padded %0d, multi-frame %0d, back-to-back frames %0d, restarts %0d, empty %0d",
             n_wr, n_clutter, n_pad, n_multi, n_b2b, n_restart, n_empty);
    check(n_wr > 0, "boundary writes happened");
    check(n_clutter > 0, "non-object values present");
    check(n_pad > 0, "signature padding happened");
    check(n_multi > 0, "multi-frame signature happened");
    check(n_b2b > 0, "back-to-back transform frames happened");
    check(n_restart > 0, "restart from DONE happened");
    check(n_empty > 0, "empty image handled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
