// Shape feature extractor: centroid contour distance + Fourier descriptors.
//
// The processor writes a binary image (one pixel per 32-bit word, object
// pixels equal to 1, ROWS x COLS = 32 x 64) into BRAM1 through port A, which
// is brought out here for a bus-to-BRAM controller. A pulse on i_start then
// runs the whole chain in the fabric:
//   1. the boundary scan copies the (row, column) of every object pixel to
//      BRAM2;
//   2. BRAM2 is read to sum the indices and divide out the centroid;
//   3. BRAM2 is read again: each point's distance to the centroid is formed
//      and its square root taken, giving the 1-D shape signature;
//   4. the signature, zero padded to whole FFT_LEN-sample frames, is
//      transformed frame by frame, and the coefficients stream out with their
//      index; o_frame_done marks the last one.
// The next i_start begins a new frame (write the new image first).
//
// The block structure and the port names of the two custom blocks follow the
// document's block design; the start/valid/done signals are this design's.
module shape_feature_top #(
  parameter int unsigned ROWS    = 32,
  parameter int unsigned COLS    = 64,
  parameter int unsigned FFT_LEN = 16
) (
  input  logic        sysclk,
  input  logic        reset,
  input  logic        i_start,
  // BRAM1 port A (processor side)
  input  logic        i_bram1a_en,
  input  logic [3:0]  i_bram1a_we,
  input  logic [31:0] i_bram1a_addr,
  input  logic [31:0] i_bram1a_din,
  output logic [31:0] o_bram1a_dout,
  // Fourier descriptors
  output logic [15:0] o_tdata_re,
  output logic [15:0] o_tdata_im,
  output logic [15:0] o_tdata_re_tmp,
  output logic [15:0] o_tdata_im_tmp,
  output logic [3:0]  o_tdata_usrink_tmp,
  output logic        o_tdata_valid,
  output logic        o_frame_done,
  // boundary scan state (IDLE, RD_BRAM1, WR_BRAM2, DONE)
  output logic [1:0]  o_stateCheck
);
  localparam int unsigned B1_ADDR_W = $clog2(ROWS * COLS);

  logic [31:0] bram1Addr, bram1Data;
  logic        bram1En;
  logic [3:0]  bram1WEn;
  logic [10:0] bram2Addr, bram2PortBAddr;
  logic [15:0] bram2ColIndex, bram2PortBData;
  logic        bram2En, bram2WEn, bram2PortBEn, bram2PortBWEn;
  logic [15:0] totalDistanceSqrt;
  logic        enSqrt, ccd_last;
  logic [6:0]  indexCount;

  bram_tdp #(.DATA_W(32), .ADDR_W(B1_ADDR_W), .WE_W(4)) BRAM1 (
    .clka (sysclk), .ena (i_bram1a_en), .wea (i_bram1a_we),
    .addra(i_bram1a_addr[B1_ADDR_W+1:2]), .dina (i_bram1a_din), .douta(o_bram1a_dout),
    .clkb (sysclk), .enb (bram1En), .web (bram1WEn),
    .addrb(bram1Addr[B1_ADDR_W+1:2]), .dinb ('0), .doutb(bram1Data)
  );

  bram_control #(.ROWS(ROWS), .COLS(COLS), .FFT_LEN(FFT_LEN)) bramControl_0 (
    .sysclk, .reset, .i_start,
    .o_bram1Addr        (bram1Addr),
    .i_bram1Data        (bram1Data),
    .o_bram1En          (bram1En),
    .o_bram1WEn         (bram1WEn),
    .o_bram2Addr        (bram2Addr),
    .o_bram2ColIndex    (bram2ColIndex),
    .o_bram2En          (bram2En),
    .o_bram2WEn         (bram2WEn),
    .o_bram2PortBAddr   (bram2PortBAddr),
    .i_bram2PortBData   (bram2PortBData),
    .o_bram2PortBEn     (bram2PortBEn),
    .o_bram2PortBWEn    (bram2PortBWEn),
    .o_stateCheck       (o_stateCheck),
    .o_totalDistanceSqrt(totalDistanceSqrt),
    .outEnSqrt          (enSqrt),
    .o_indexCount       (indexCount),
    .o_last             (ccd_last)
  );

  logic [15:0] unused_douta;

  bram_tdp #(.DATA_W(16), .ADDR_W(11), .WE_W(1)) BRAM2 (
    .clka (sysclk), .ena (bram2En), .wea (bram2WEn),
    .addra(bram2Addr), .dina (bram2ColIndex), .douta(unused_douta),
    .clkb (sysclk), .enb (bram2PortBEn), .web (bram2PortBWEn),
    .addrb(bram2PortBAddr), .dinb ('0), .doutb(bram2PortBData)
  );

  fft_process #(.FFT_LEN(FFT_LEN)) fftProcess_0 (
    .sysclk, .reset,
    .i_totalDistanceSqrt(totalDistanceSqrt),
    .i_SqrtEn           (enSqrt),
    .i_indexCount       (indexCount),
    .i_last             (ccd_last),
    .o_tdata_re, .o_tdata_im, .o_tdata_re_tmp, .o_tdata_im_tmp, .o_tdata_usrink_tmp,
    .o_valid            (o_tdata_valid),
    .o_done             (o_frame_done)
  );
endmodule
