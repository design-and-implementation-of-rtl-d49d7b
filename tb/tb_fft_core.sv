// Self-checking test of the streaming 16-point transform. Frames of random
// real samples (small and full-scale) are sent back to back at one sample per
// cycle and with random gaps. Every output bin is compared with a
// double-precision DFT, X[k] = sum x[n] exp(-j 2 pi k n / 16), within
// 1 + sum(x)/2^17 (the rounding and the Q1.14 twiddles); the test also checks bin order, tlast, the
// sign extension of both 21-bit fields in the 48-bit word, that every frame
// produces 16 bins, that the input is held off while the core flushes, and
// that the first bin follows the last sample by 21 cycles whenever the next
// frame follows without a gap or the core flushes (later otherwise).
module tb_fft_core;
  localparam int N = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        s_valid = 0, s_last = 0, s_ready, m_valid, m_last;
  logic [15:0] s_data = 0;
  logic [47:0] m_data;
  logic [3:0]  m_user;
  real    exp_re [$], exp_im [$], tol_q [$];
  int     last_in_cycle [$];
  bit     lat_exact [$];         // next frame back to back, or final frame
  int     flush_cycles = 0;
  int     checks = 0, failures = 0, cycle = 0, bin_no = 0, frames_out = 0;
  const real PI = 3.14159265358979;

  fft_core #(.FFT_LEN(N), .IN_W(16), .OUT_W(21)) dut (
    .sysclk(clk), .reset(rst),
    .s_axis_data_tvalid(s_valid), .s_axis_data_tready(s_ready), .s_axis_data_tdata(s_data), .s_axis_data_tlast(s_last),
    .m_axis_data_tvalid(m_valid), .m_axis_data_tdata(m_data), .m_axis_data_tuser(m_user),
    .m_axis_data_tlast(m_last));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (!rst && !s_ready) flush_cycles++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (!rst && m_valid) begin
    logic signed [20:0] re, im;
    real er, ei, tol;
    re = m_data[20:0];
    im = m_data[44:24];
    er = exp_re.pop_front();
    ei = exp_im.pop_front();
    tol = tol_q.pop_front();
    check(m_user == 4'(bin_no), $sformatf("bin index %0d expected %0d", m_user, bin_no));
    check(m_last == (bin_no == N - 1), "tlast");
    check(m_data[23:21] == {3{m_data[20]}} && m_data[47:45] == {3{m_data[44]}}, "sign extension");
    check((real'(re) - er) <= tol && (er - real'(re)) <= tol, $sformatf("re %0d expected %f", re, er));
    check((real'(im) - ei) <= tol && (ei - real'(im)) <= tol, $sformatf("im %0d expected %f", im, ei));
    if (bin_no == 0) begin
      int lat;
      lat = cycle - last_in_cycle.pop_front();
      if (lat_exact.pop_front()) check(lat == 21, $sformatf("first-bin latency %0d", lat));
      else                       check(lat >= 21, $sformatf("first-bin latency %0d", lat));
    end
    bin_no = (bin_no + 1) % N;
    if (bin_no == 0) frames_out++;
  end

  task automatic send_frame(bit full_scale, bit gaps, bit exact);
    int x [N];
    real sum = 0;
    for (int n = 0; n < N; n++) begin
      x[n] = full_scale ? ($urandom % 65536) : ($urandom % 72);
      sum += x[n];
    end
    for (int k = 0; k < N; k++) begin
      real re = 0, im = 0;
      for (int n = 0; n < N; n++) begin
        re += x[n] * $cos(2.0 * PI * k * n / N);
        im -= x[n] * $sin(2.0 * PI * k * n / N);
      end
      exp_re.push_back(re);
      exp_im.push_back(im);
      tol_q.push_back(1.0 + sum / 131072.0);
    end
    for (int n = 0; n < N; n++) begin
      if (gaps) while ($urandom % 3 == 0) begin
        @(posedge clk); #1 s_valid = 0;
      end
      @(posedge clk);
      #1;
      while (!s_ready) begin
        s_valid = 0;
        @(posedge clk);
        #1;
      end
      s_valid = 1;
      s_data  = 16'(x[n]);
      s_last  = (n == N - 1);
      if (n == N - 1) begin
        last_in_cycle.push_back(cycle);
        lat_exact.push_back(exact);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 40; f++) send_frame(f % 4 == 3, f >= 20, f < 19 || f == 39);
    @(posedge clk);
    #1 s_valid = 0; s_last = 0;
    repeat (40) @(posedge clk);
    check(frames_out == 40, $sformatf("%0d frames out", frames_out));
    check(exp_re.size() == 0, "all bins produced");
    check(flush_cycles > 0, "a flush happened between frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
