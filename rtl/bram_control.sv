// Controller of the feature extractor: from the binary image to the
// centroid contour distance (CCD) signature.
//
// Two state machines share the work. The boundary scan (IDLE, RD_BRAM1,
// WR_BRAM2, DONE) copies the (row, column) of every object pixel of BRAM1 into
// BRAM2. When it reaches DONE, a second machine reads BRAM2 through its port B
// twice:
//   SUM   - one point per cycle into the centroid calculator, which adds the
//           row and column indices;
//   DIV   - waits while the centroid (x_c, y_c) is divided out;
//   CCD   - one point per cycle through the squared-distance unit and the
//           pipelined square root, giving r(t) = sqrt((x-x_c)^2 + (y-y_c)^2);
//   PAD   - feeds the centroid itself (distance 0) until the number of
//           samples is a whole number of FFT_LEN-sample transform frames;
//   DRAIN - waits for the last sample to leave the square root pipeline.
// Samples appear on o_totalDistanceSqrt with outEnSqrt, their running index
// (modulo 128) on o_indexCount, and o_last on the final one. For a frame
// with N boundary pixels and S = 16*ceil(N/16) samples, the last sample
// leaves ROWS*COLS + 3N + S + 46 cycles after i_start (one more when padding
// is needed, one more when the scan restarts from DONE): ROWS*COLS + 2N for the scan, N for the sums, 21 for the
// division, S for the stream and 17 for the distance and square root
// pipeline. With no object pixel no sample is produced. i_start is ignored
// while the reader is busy with the previous frame.
//
// The two machines, the BRAM port names and the order scan -> centroid ->
// distance -> square root follow the document. The states of the second
// machine, the zero padding, o_last and the start gating are this design's
// choices.
module bram_control
  import shape_pkg::*;
#(
  parameter int unsigned ROWS    = 32,
  parameter int unsigned COLS    = 64,
  parameter int unsigned FFT_LEN = 16
) (
  input  logic        sysclk,
  input  logic        reset,
  input  logic        i_start,
  // BRAM1 port B
  output logic [31:0] o_bram1Addr,
  input  logic [31:0] i_bram1Data,
  output logic        o_bram1En,
  output logic [3:0]  o_bram1WEn,
  // BRAM2 port A
  output logic [10:0] o_bram2Addr,
  output logic [15:0] o_bram2ColIndex,
  output logic        o_bram2En,
  output logic        o_bram2WEn,
  // BRAM2 port B
  output logic [10:0] o_bram2PortBAddr,
  input  logic [15:0] i_bram2PortBData,
  output logic        o_bram2PortBEn,
  output logic        o_bram2PortBWEn,
  // status and CCD output
  output logic [1:0]  o_stateCheck,
  output logic [15:0] o_totalDistanceSqrt,
  output logic        outEnSqrt,
  output logic [6:0]  o_indexCount,
  output logic        o_last
);
  localparam int unsigned CNT_W = 12;
  localparam logic [CNT_W-1:0] LEN_MASK = CNT_W'(FFT_LEN - 1);

  typedef enum logic [2:0] {R_IDLE, R_SUM, R_DIV, R_CCD, R_PAD, R_DRAIN, R_DONE} rd_state_t;

  // ---------------- boundary scan ----------------
  logic [CNT_W-1:0] scan_count;
  logic             scan_done;

  rd_state_t rstate;
  logic      scan_start;

  // a new frame may start only when the reader is not using BRAM2
  assign scan_start = i_start && (rstate == R_IDLE || rstate == R_DONE);

  boundary_scan #(.ROWS(ROWS), .COLS(COLS), .B2_ADDR_W(11)) u_scan (
    .sysclk, .reset, .i_start(scan_start),
    .o_bram1Addr, .i_bram1Data, .o_bram1En, .o_bram1WEn,
    .o_bram2Addr, .o_bram2ColIndex, .o_bram2En, .o_bram2WEn,
    .o_stateCheck, .o_count(scan_count), .o_done(scan_done)
  );

  // ---------------- BRAM2 reader ----------------
  logic [CNT_W-1:0] n_pts;       // points in BRAM2
  logic [CNT_W-1:0] total;       // samples to emit (padded)
  logic [CNT_W-1:0] rd_addr;     // next BRAM2 address to read
  logic [CNT_W-1:0] smp;         // samples fed into the distance unit
  logic             b_vld;       // i_bram2PortBData holds a requested point
  logic             issue;
  logic             last_out;
  point_t           bpt;

  assign bpt   = i_bram2PortBData;
  assign issue = (rstate == R_SUM || rstate == R_CCD) && (rd_addr < n_pts);

  logic             cen_clear, cen_div, cen_valid;
  logic [IDX_W-1:0] xc, yc;
  logic [CNT_W-1:0] cen_count;

  always_ff @(posedge sysclk) begin
    if (reset) begin
      rstate  <= R_IDLE;
      n_pts   <= '0;
      total   <= '0;
      rd_addr <= '0;
      smp     <= '0;
      b_vld   <= 1'b0;
    end else begin
      b_vld <= issue;
      if (issue) rd_addr <= rd_addr + 1'b1;
      unique case (rstate)
        R_IDLE: if (scan_done) begin
          n_pts   <= scan_count;
          total   <= (scan_count + LEN_MASK) & ~LEN_MASK;
          rd_addr <= '0;
          smp     <= '0;
          rstate  <= R_SUM;
        end
        R_SUM: if (!issue && !b_vld) rstate <= R_DIV;
        R_DIV: if (cen_valid) begin
          rd_addr <= '0;
          rstate  <= R_CCD;
        end
        R_CCD: begin
          if (b_vld) smp <= smp + 1'b1;
          if (!issue && !b_vld) rstate <= R_PAD;
        end
        R_PAD: begin
          if (smp != total) smp <= smp + 1'b1;
          else              rstate <= R_DRAIN;
        end
        R_DRAIN: if (last_out || total == '0) rstate <= R_DONE;
        R_DONE:  if (!scan_done) rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end

  assign o_bram2PortBAddr = rd_addr[10:0];
  assign o_bram2PortBEn   = issue;
  assign o_bram2PortBWEn  = 1'b0;

  // ---------------- centroid ----------------
  assign cen_clear = (rstate == R_IDLE);
  assign cen_div   = (rstate == R_SUM) && !issue && !b_vld;

  centroid_calc #(.IDX_W(IDX_W), .CNT_W(CNT_W), .SUM_W(20)) u_centroid (
    .sysclk, .reset,
    .i_clear (cen_clear),
    .i_acc   ((rstate == R_SUM) && b_vld),
    .i_row   (bpt.row),
    .i_col   (bpt.col),
    .i_div   (cen_div),
    .o_xc    (xc),
    .o_yc    (yc),
    .o_valid (cen_valid),
    .o_count (cen_count)
  );

  // ---------------- distance and square root ----------------
  logic             d_in_vld, d_out_vld, d_in_last, d_out_last;
  logic [IDX_W-1:0] d_row, d_col;
  logic [6:0]       d_in_idx, d_out_idx;
  logic [31:0]      sqdist;
  logic [16:0]      root;
  logic [7:0]       root_tag;
  logic             root_vld;

  always_comb begin
    d_in_vld = 1'b0;
    d_row    = xc;
    d_col    = yc;
    if (rstate == R_CCD && b_vld) begin
      d_in_vld = 1'b1;
      d_row    = bpt.row;
      d_col    = bpt.col;
    end else if (rstate == R_PAD && smp != total) begin
      d_in_vld = 1'b1;   // the centroid itself: distance 0
    end
  end
  assign d_in_idx  = smp[6:0];
  assign d_in_last = d_in_vld && (smp == total - 1'b1);

  ccd_sqdist #(.IDX_W(IDX_W)) u_sqdist (
    .sysclk, .reset,
    .i_valid  (d_in_vld),
    .i_row    (d_row),
    .i_col    (d_col),
    .i_xc     (xc),
    .i_yc     (yc),
    .o_valid  (d_out_vld),
    .o_sqdist (sqdist)
  );

  // sample index and last flag follow the one-cycle distance unit
  always_ff @(posedge sysclk) begin
    if (reset) begin
      d_out_idx  <= '0;
      d_out_last <= 1'b0;
    end else begin
      d_out_idx  <= d_in_idx;
      d_out_last <= d_in_last;
    end
  end

  isqrt_pipe #(.IN_W(32), .OUT_W(17), .TAG_W(8)) u_sqrt (
    .sysclk, .reset,
    .i_valid    (d_out_vld),
    .i_radicand (sqdist),
    .i_tag      ({d_out_last, d_out_idx}),
    .o_valid    (root_vld),
    .o_root     (root),
    .o_tag      (root_tag)
  );

  assign last_out            = root_vld && root_tag[7];
  assign o_totalDistanceSqrt = root[15:0];
  assign outEnSqrt           = root_vld;
  assign o_indexCount        = root_tag[6:0];
  assign o_last              = last_out;

  // the centroid unit sees every point of BRAM2
  assert property (@(posedge sysclk) disable iff (reset)
                   (rstate == R_DIV && cen_valid) |-> cen_count == n_pts);
endmodule
