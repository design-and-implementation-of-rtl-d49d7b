// Streaming 16-point FFT of a real sample stream, pipelined radix-2
// single-path delay feedback (R2SDF), decimation in frequency.
//
// Samples arrive on s_axis_data_* (valid/ready); every FFT_LEN samples form a
// frame, s_axis_data_tlast marking the last one. Four butterfly stages follow
// each other, stage s holding a feedback shift register of 8 >> s complex
// words. A stage spends the first half of each group of 2D samples filling
// its register (and passing out the twiddled differences of the previous
// group), and the second half adding and subtracting the stored and the
// incoming samples. Stages 0 to 2 multiply the differences by
// W^(n * 2^s) = exp(-j 2 pi n 2^s / 16), twiddles in Q1.14, rounded. All
// stages work on one 26-bit width with 4 fractional guard bits, so nothing
// overflows and the result, rounded back to an integer, is the unscaled
// transform within one unit for inputs below 100 and within two units for
// full-scale 16-bit input.
//
// The pipeline moves one step per accepted input sample. When the input goes
// idle at a frame boundary while a frame is still inside, the core feeds
// whole frames of zeros (s_axis_data_tready low meanwhile) to push it out;
// these produce no output. The bins leave the last stage in bit-reversed
// order; a ping-pong reorder buffer sends them out in natural order, one per
// cycle: the real part in [20:0] and the imaginary part in [44:24] of the
// 48-bit word, each 21 bits, sign-extended to 24, the bin index on
// m_axis_data_tuser and m_axis_data_tlast on bin FFT_LEN-1. When the input
// continues (or the core flushes), the first bin of a frame leaves
// FIRST_BIN_LAT = 21 cycles after its last sample was accepted; gaps in the
// input that follows delay it. There is no output back-pressure.
//
// The output word layout, the 4-bit bin index, the unscaled output and the
// pipelined streaming architecture follow the FFT core the document
// configures; the R2SDF structure, the guard bits, the rounding and the zero
// flush are this design's choice. Only FFT_LEN = 16 is supported (the
// twiddle table is written for it).
module fft_core #(
  parameter int unsigned FFT_LEN = 16,
  parameter int unsigned IN_W    = 16,
  parameter int unsigned OUT_W   = 21
) (
  input  logic            sysclk,
  input  logic            reset,
  input  logic            s_axis_data_tvalid,
  output logic            s_axis_data_tready,
  input  logic [IN_W-1:0] s_axis_data_tdata,
  input  logic            s_axis_data_tlast,
  output logic            m_axis_data_tvalid,
  output logic [47:0]     m_axis_data_tdata,
  output logic [3:0]      m_axis_data_tuser,
  output logic            m_axis_data_tlast
);
  localparam int unsigned NST   = 4;              // log2(FFT_LEN)
  localparam int unsigned GUARD = 4;              // fractional guard bits
  localparam int unsigned W     = OUT_W + GUARD + 1;
  localparam int unsigned TW_FRAC = 14;
  // steps from a frame's first sample to its first element out of the last
  // stage: the feedback delays (8+4+2+1) plus the stage registers (3)
  localparam int unsigned SDF_LAT = FFT_LEN - 1 + NST - 1;

  if (FFT_LEN != 16) begin : g_len_check
    $error("fft_core: the twiddle table supports FFT_LEN = 16 only");
  end

  // cos(2 pi m / 16) in Q1.14
  function automatic logic signed [15:0] cos_q14(input logic [3:0] m);
    unique case (m)
      4'd0:  return 16'sd16384;
      4'd1:  return 16'sd15137;
      4'd2:  return 16'sd11585;
      4'd3:  return 16'sd6270;
      4'd4:  return 16'sd0;
      4'd5:  return -16'sd6270;
      4'd6:  return -16'sd11585;
      4'd7:  return -16'sd15137;
      4'd8:  return -16'sd16384;
      4'd9:  return -16'sd15137;
      4'd10: return -16'sd11585;
      4'd11: return -16'sd6270;
      4'd12: return 16'sd0;
      4'd13: return 16'sd6270;
      4'd14: return 16'sd11585;
      default: return 16'sd15137;
    endcase
  endfunction

  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cpx_t;

  // (a) * exp(-j 2 pi m / 16), rounded back to W bits
  function automatic cpx_t twiddle(input cpx_t a, input logic [3:0] m);
    logic signed [15:0]     c, s;
    logic signed [W+16:0]   pr, pi;
    cpx_t                   r;
    c  = cos_q14(m);
    s  = cos_q14(m - 4'd4);                // sin(x) = cos(x - pi/2)
    pr = (W+17)'(a.re) * c + (W+17)'(a.im) * s;
    pi = (W+17)'(a.im) * c - (W+17)'(a.re) * s;
    r.re = W'((pr + (W+17)'(1 << (TW_FRAC - 1))) >>> TW_FRAC);
    r.im = W'((pi + (W+17)'(1 << (TW_FRAC - 1))) >>> TW_FRAC);
    return r;
  endfunction

  // ---------------- step control and zero flush ----------------
  logic       step;             // the pipeline advances this cycle
  logic       accept;           // a real sample enters
  logic       flushing;         // a frame of zeros is being fed
  logic [3:0] in_pos;           // position of the next sample in its frame
  logic [2:0] frames_inside;    // real frames entered and not yet fully out
  logic       out_frame_done;   // the last stage finishes a real frame
  logic       out_frame_done_any;
  logic       sdf_primed;       // the first SDF_LAT steps after reset are over
  logic [3:0] out_pos;          // bit-reversed position of the element leaving
  logic       out_real;         // ... and whether its frame is a real one

  assign s_axis_data_tready = !flushing;
  assign accept             = s_axis_data_tvalid && !flushing;

  logic flush_start;
  assign flush_start = !flushing && !s_axis_data_tvalid && (in_pos == 4'd0) && (frames_inside != 0);
  assign step        = accept || flushing || flush_start;

  always_ff @(posedge sysclk) begin
    if (reset) begin
      in_pos   <= '0;
      flushing <= 1'b0;
    end else begin
      if (step) in_pos <= in_pos + 1'b1;
      if (flush_start)                          flushing <= 1'b1;
      else if (flushing && in_pos == 4'd15)     flushing <= 1'b0;
    end
  end

  // frame bookkeeping: which frames in the pipeline are real
  logic [3:0] frame_real;          // indexed by frame number modulo 4
  logic [1:0] fin, fout;

  always_ff @(posedge sysclk) begin
    if (reset) begin
      frame_real    <= '0;
      fin           <= '0;
      fout          <= '0;
      frames_inside <= '0;
    end else begin
      if (step && in_pos == 4'd0) frame_real[fin] <= accept;
      if (step && in_pos == 4'd15) fin <= fin + 1'b1;
      frames_inside <= frames_inside + 3'(accept && in_pos == 4'd0) - 3'(out_frame_done);
      if (out_frame_done_any) fout <= fout + 1'b1;
    end
  end

  // ---------------- R2SDF stages ----------------
  cpx_t stage_in  [NST+1];
  cpx_t x_in;

  always_comb begin
    x_in.re = accept ? W'({1'b0, s_axis_data_tdata} <<< GUARD) : '0;
    x_in.im = '0;
  end
  assign stage_in[0] = x_in;

  for (genvar s = 0; s < NST; s++) begin : g_stage
    localparam int unsigned D    = (FFT_LEN / 2) >> s;
    localparam int unsigned LOGD = NST - 1 - s;
    // steps by which this stage's input lags the pipeline input
    localparam int unsigned OFFS = (FFT_LEN - 2 * D) + s;

    cpx_t       fifo [D];
    logic [3:0] cnt;
    logic       second_half;
    logic [3:0] n_pos;
    cpx_t       head, sum, dif, out_d;

    assign head        = fifo[D-1];
    assign second_half = cnt[LOGD];
    assign n_pos       = cnt & 4'(D - 1);

    always_comb begin
      sum.re = head.re + stage_in[s].re;
      sum.im = head.im + stage_in[s].im;
      dif.re = head.re - stage_in[s].re;
      dif.im = head.im - stage_in[s].im;
      out_d  = second_half ? sum : twiddle(head, 4'(n_pos << s));
    end

    always_ff @(posedge sysclk) begin
      if (reset) begin
        cnt           <= 4'(-int'(OFFS));
        stage_in[s+1] <= '0;
        for (int i = 0; i < D; i++) fifo[i] <= '0;
      end else if (step) begin
        cnt           <= cnt + 1'b1;
        stage_in[s+1] <= out_d;
        for (int i = D - 1; i > 0; i--) fifo[i] <= fifo[i-1];
        fifo[0] <= second_half ? dif : stage_in[s];
      end
    end
  end

  // out_pos is the position, in bit-reversed order, of the element the last
  // stage computes in this step (it sits in stage_in[NST] after the step)
  always_ff @(posedge sysclk) begin
    if (reset) out_pos <= 4'(-int'(SDF_LAT));
    else if (step) out_pos <= out_pos + 1'b1;
  end

  // the element and its position are both registered at the step; the
  // cycle after, res_vld says whether it belongs to a real frame
  logic       res_vld;
  logic [3:0] res_pos;

  always_ff @(posedge sysclk) begin
    if (reset) begin
      res_vld <= 1'b0;
      res_pos <= '0;
    end else begin
      res_vld <= step && out_real && sdf_primed;
      res_pos <= out_pos;
    end
  end

  assign out_real           = frame_real[fout];
  assign out_frame_done_any = step && (out_pos == 4'd15) && sdf_primed;
  assign out_frame_done     = out_frame_done_any && out_real;

  logic [4:0] prime_cnt;
  always_ff @(posedge sysclk) begin
    if (reset) prime_cnt <= '0;
    else if (step && prime_cnt != 5'(SDF_LAT)) prime_cnt <= prime_cnt + 1'b1;
  end
  assign sdf_primed = (prime_cnt == 5'(SDF_LAT));

  // ---------------- bit-reversal reorder buffer ----------------
  cpx_t       rbuf [2][FFT_LEN];
  logic       wbank, rbank, reading;
  logic [3:0] rk;
  logic       bank_full;

  function automatic logic [3:0] bitrev4(input logic [3:0] v);
    return {v[0], v[1], v[2], v[3]};
  endfunction

  assign bank_full = res_vld && (res_pos == 4'd15);

  always_ff @(posedge sysclk) begin
    if (reset) begin
      wbank <= 1'b0;
    end else if (res_vld) begin
      rbuf[wbank][bitrev4(res_pos)] <= stage_in[NST];
      if (res_pos == 4'd15) wbank <= ~wbank;
    end
  end

  logic signed [W-1:0]     rd_re, rd_im;
  logic signed [OUT_W-1:0] re_o, im_o;
  assign rd_re = rbuf[rbank][rk].re;
  assign rd_im = rbuf[rbank][rk].im;
  assign re_o  = OUT_W'((rd_re + W'(1 << (GUARD - 1))) >>> GUARD);
  assign im_o  = OUT_W'((rd_im + W'(1 << (GUARD - 1))) >>> GUARD);

  always_ff @(posedge sysclk) begin
    if (reset) begin
      reading            <= 1'b0;
      rbank              <= 1'b0;
      rk                 <= '0;
      m_axis_data_tvalid <= 1'b0;
      m_axis_data_tdata  <= '0;
      m_axis_data_tuser  <= '0;
      m_axis_data_tlast  <= 1'b0;
    end else begin
      m_axis_data_tvalid <= reading;
      if (reading) begin
        m_axis_data_tdata <= {24'(im_o), 24'(re_o)};
        m_axis_data_tuser <= rk;
        m_axis_data_tlast <= (rk == 4'd15);
        rk                <= rk + 1'b1;
        if (rk == 4'd15) reading <= 1'b0;
      end
      if (bank_full) begin
        reading <= 1'b1;
        rbank   <= wbank;
        rk      <= '0;
      end
    end
  end

  // frames end where tlast says; a bank is never refilled while being read
  assert property (@(posedge sysclk) disable iff (reset)
                   accept |-> (s_axis_data_tlast == (in_pos == 4'd15)));
  assert property (@(posedge sysclk) disable iff (reset)
                   bank_full |-> (!reading || rk == 4'd15));
endmodule
