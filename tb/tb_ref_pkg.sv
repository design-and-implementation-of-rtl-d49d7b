// Reference model for the testbenches of the whole chain, written
// independently of the RTL: object pixels of a binary image in raster order,
// their centroid (truncated means), the centroid distance signature
// floor(sqrt(dx^2 + dy^2)) padded with zeros to a multiple of 16 samples, and
// the 16-point DFT of each frame in double precision.
package tb_ref_pkg;
  localparam int FFT_N = 16;
  localparam real PI = 3.14159265358979;

  // CCD signature of an image of rows x cols words (object pixel = word 1)
  function automatic void ccd_signature(input logic [31:0] img [], input int cols,
                                        ref int sig [$], output int npts,
                                        output int xc, output int yc);
    int rs = 0, cs = 0;
    int pr [$], pc [$];
    sig.delete();
    for (int p = 0; p < img.size(); p++)
      if (img[p] == 32'd1) begin
        pr.push_back(p / cols);
        pc.push_back(p % cols);
        rs += p / cols;
        cs += p % cols;
      end
    npts = pr.size();
    xc = (npts == 0) ? 0 : rs / npts;
    yc = (npts == 0) ? 0 : cs / npts;
    for (int i = 0; i < npts; i++) begin
      int d2 = (pr[i] - xc) * (pr[i] - xc) + (pc[i] - yc) * (pc[i] - yc);
      int r = int'($floor($sqrt(real'(d2))));
      while (r * r > d2) r--;
      while ((r + 1) * (r + 1) <= d2) r++;
      sig.push_back(r);
    end
    while (sig.size() % FFT_N != 0) sig.push_back(0);
  endfunction

  // DFT of every 16-sample frame of a signature, unscaled
  function automatic void dft_frames(input int sig [$], ref real re [$], ref real im [$]);
    re.delete();
    im.delete();
    for (int f = 0; f < sig.size() / FFT_N; f++)
      for (int k = 0; k < FFT_N; k++) begin
        real a = 0.0, b = 0.0;
        for (int n = 0; n < FFT_N; n++) begin
          a += sig[f * FFT_N + n] * $cos(2.0 * PI * k * n / FFT_N);
          b -= sig[f * FFT_N + n] * $sin(2.0 * PI * k * n / FFT_N);
        end
        re.push_back(a);
        im.push_back(b);
      end
  endfunction

  // outline of an axis-aligned rectangle, optionally with other non-zero
  // (non-object) values scattered inside
  function automatic void draw_rect(ref logic [31:0] img [], input int cols,
                                    input int r0, input int c0, input int h, input int w,
                                    input bit clutter);
    for (int p = 0; p < img.size(); p++) img[p] = '0;
    for (int r = r0; r < r0 + h; r++)
      for (int c = c0; c < c0 + w; c++)
        if (r == r0 || r == r0 + h - 1 || c == c0 || c == c0 + w - 1)
          img[r * cols + c] = 32'd1;
        else if (clutter && ((r + c) % 5 == 0))
          img[r * cols + c] = 32'd200;
  endfunction

  // outline of a circle (pixels whose distance to the centre is within half a
  // pixel of the radius)
  function automatic void draw_circle(ref logic [31:0] img [], input int rows, input int cols,
                                      input real cr, input real cc, input real rad);
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        real d = $sqrt((r - cr) * (r - cr) + (c - cc) * (c - cc));
        img[r * cols + c] = (d > rad - 0.5 && d <= rad + 0.5) ? 32'd1 : 32'd0;
      end
  endfunction
endpackage
