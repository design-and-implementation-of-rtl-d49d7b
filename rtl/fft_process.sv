// FFT stage of the feature extractor: turns the centroid-distance signature
// into Fourier descriptors.
//
// Each CCD sample (i_totalDistanceSqrt with i_SqrtEn) is passed to the
// transform as a real sample; a sample whose index i_indexCount ends a group
// of FFT_LEN (low bits all ones) closes a transform frame. From the 48-bit
// transform output the descriptor fields are cut exactly as the document
// describes: real part {tdata[20], tdata[14:0]}, imaginary part
// {tdata[44], tdata[38:24]}, coefficient index tuser[3:0]. o_tdata_re and
// o_tdata_im carry the same coefficients divided by the transform length M
// (the 1/M factor of the DFT definition), low 16 bits. All outputs are
// registered and valid with o_valid; o_done marks the last coefficient of the
// frame that held the sample flagged with i_last.
//
// Port names follow the block design. The 1/M meaning of o_tdata_re/im,
// i_last, o_valid and o_done are this design's additions.
module fft_process #(
  parameter int unsigned FFT_LEN = 16
) (
  input  logic        sysclk,
  input  logic        reset,
  input  logic [15:0] i_totalDistanceSqrt,
  input  logic        i_SqrtEn,
  input  logic [6:0]  i_indexCount,
  input  logic        i_last,
  output logic [15:0] o_tdata_re,
  output logic [15:0] o_tdata_im,
  output logic [15:0] o_tdata_re_tmp,
  output logic [15:0] o_tdata_im_tmp,
  output logic [3:0]  o_tdata_usrink_tmp,
  output logic        o_valid,
  output logic        o_done
);
  localparam int unsigned IDX_W = $clog2(FFT_LEN);

  logic        m_tvalid, m_tlast, s_tlast, s_tready;
  logic [47:0] m_tdata;
  logic [3:0]  m_tuser;

  assign s_tlast = (i_indexCount[IDX_W-1:0] == IDX_W'(FFT_LEN - 1));

  fft_core #(.FFT_LEN(FFT_LEN), .IN_W(16), .OUT_W(21)) u_fft (
    .sysclk             (sysclk),
    .reset              (reset),
    .s_axis_data_tvalid (i_SqrtEn),
    .s_axis_data_tready (s_tready),
    .s_axis_data_tdata  (i_totalDistanceSqrt),
    .s_axis_data_tlast  (s_tlast),
    .m_axis_data_tvalid (m_tvalid),
    .m_axis_data_tdata  (m_tdata),
    .m_axis_data_tuser  (m_tuser),
    .m_axis_data_tlast  (m_tlast)
  );

  // frame counters tell which output frame holds the final sample
  logic [3:0] frames_in, frames_out, final_frame;
  logic       final_pending;

  always_ff @(posedge sysclk) begin
    if (reset) begin
      frames_in     <= '0;
      frames_out    <= '0;
      final_frame   <= '0;
      final_pending <= 1'b0;
    end else begin
      if (i_SqrtEn && s_tlast) frames_in <= frames_in + 1'b1;
      if (i_SqrtEn && i_last) begin
        final_frame   <= frames_in;
        final_pending <= 1'b1;
      end
      if (m_tvalid && m_tlast) begin
        frames_out <= frames_out + 1'b1;
        if (final_pending && frames_out == final_frame) final_pending <= 1'b0;
      end
    end
  end

  logic signed [20:0] re21, im21;
  assign re21 = m_tdata[20:0];
  assign im21 = m_tdata[44:24];

  always_ff @(posedge sysclk) begin
    if (reset) begin
      o_tdata_re         <= '0;
      o_tdata_im         <= '0;
      o_tdata_re_tmp     <= '0;
      o_tdata_im_tmp     <= '0;
      o_tdata_usrink_tmp <= '0;
      o_valid            <= 1'b0;
      o_done             <= 1'b0;
    end else begin
      o_valid <= m_tvalid;
      o_done  <= m_tvalid && m_tlast && final_pending && (frames_out == final_frame);
      if (m_tvalid) begin
        o_tdata_re_tmp     <= {m_tdata[20], m_tdata[14:0]};
        o_tdata_im_tmp     <= {m_tdata[44], m_tdata[38:24]};
        o_tdata_usrink_tmp <= m_tuser;
        o_tdata_re         <= 16'(re21 >>> IDX_W);
        o_tdata_im         <= 16'(im21 >>> IDX_W);
      end
    end
  end

  // the signature always ends on a frame boundary, and samples never arrive
  // while the transform flushes (the source cannot be stalled)
  assert property (@(posedge sysclk) disable iff (reset) (i_SqrtEn && i_last) |-> s_tlast);
  assert property (@(posedge sysclk) disable iff (reset) i_SqrtEn |-> s_tready);
endmodule
