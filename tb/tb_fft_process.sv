// Self-checking test of the FFT stage wrapper. A signature of random CCD
// samples (up to 71, as in a 32 x 64 image) is streamed with its running
// index; its length is a multiple of 16 and the final sample carries i_last.
// For every output coefficient the test checks the index, the real and
// imaginary descriptor fields against a double-precision DFT, the 1/M scaled
// outputs, and that o_done marks exactly the last coefficient of the last
// frame. Two signatures are sent, the second right behind the first.
module tb_fft_process;
  localparam int N = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] ccd = 0;
  logic        en = 0, last = 0, valid, done;
  logic [6:0]  idx = 0;
  logic [15:0] re, im, re_tmp, im_tmp;
  logic [3:0]  usr;
  real exp_re [$], exp_im [$];
  int  checks = 0, failures = 0, outs = 0, total_out = 0, dones = 0;
  const real PI = 3.14159265358979;

  fft_process #(.FFT_LEN(N)) dut (
    .sysclk(clk), .reset(rst), .i_totalDistanceSqrt(ccd), .i_SqrtEn(en), .i_indexCount(idx),
    .i_last(last), .o_tdata_re(re), .o_tdata_im(im), .o_tdata_re_tmp(re_tmp),
    .o_tdata_im_tmp(im_tmp), .o_tdata_usrink_tmp(usr), .o_valid(valid), .o_done(done));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic bit near(real a, real b, real tol);
    return (a - b) <= tol && (b - a) <= tol;
  endfunction

  always @(negedge clk) if (!rst && valid) begin
    real er, ei;
    er = exp_re.pop_front();
    ei = exp_im.pop_front();
    check(usr == 4'(outs % N), "coefficient index");
    check(near(real'($signed(re_tmp)), er, 1.0), $sformatf("re_tmp %0d expected %f", $signed(re_tmp), er));
    check(near(real'($signed(im_tmp)), ei, 1.0), $sformatf("im_tmp %0d expected %f", $signed(im_tmp), ei));
    check(near(real'($signed(re)), er / N, 1.1), $sformatf("re %0d expected %f", $signed(re), er / N));
    check(near(real'($signed(im)), ei / N, 1.1), $sformatf("im %0d expected %f", $signed(im), ei / N));
    outs++;
    total_out++;
    if (done) dones++;
    check(done == (outs == exp_sig_len), "o_done on the last coefficient only");
    if (outs == exp_sig_len) outs = 0;
  end

  int exp_sig_len;
  int sig_lens [2] = '{48, 32};

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    exp_sig_len = sig_lens[0];
    for (int s = 0; s < 2; s++) begin
      int len;
      int x [];
      len = sig_lens[s];
      x = new[len];
      for (int i = 0; i < len; i++) x[i] = (i >= len - 5) ? 0 : ($urandom % 72);
      for (int f = 0; f < len / N; f++)
        for (int k = 0; k < N; k++) begin
          real a, b;
          a = 0;
          b = 0;
          for (int n = 0; n < N; n++) begin
            a += x[f * N + n] * $cos(2.0 * PI * k * n / N);
            b -= x[f * N + n] * $sin(2.0 * PI * k * n / N);
          end
          exp_re.push_back(a);
          exp_im.push_back(b);
        end
      for (int i = 0; i < len; i++) begin
        @(posedge clk);
        #1;
        en   = 1;
        ccd = 16'(x[i]);
        idx  = 7'(i);
        last = (i == len - 1);
      end
      @(posedge clk);
      #1 en = 0; last = 0;
      if (s == 0) begin
        // the second signature must wait until the first has been counted out
        wait (outs == 0 && total_out == sig_lens[0]);
        exp_sig_len = sig_lens[1];
      end
    end
    repeat (40) @(posedge clk);
    check(total_out == sig_lens[0] + sig_lens[1], $sformatf("%0d coefficients out", total_out));
    check(dones == 2, $sformatf("%0d done pulses", dones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
