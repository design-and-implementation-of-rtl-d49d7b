// Boundary scan: finds the object pixels of the binary image and records
// their (row, column) indices.
//
// A four-state machine walks the image in BRAM1 row by row with a row and a
// column counter. IDLE clears the counters and the BRAM2 write address and
// waits for i_start. RD_BRAM1 issues one pixel address per cycle (enable high,
// write enables low); the word comes back one cycle later and is checked.
// A word equal to 1 is a boundary pixel: the machine pauses in WR_BRAM2 for one
// cycle to write {row, col} to BRAM2 and advance the write address, then
// resumes reading. After the last pixel has been checked it enters DONE,
// raises o_done and holds o_count, the number of points stored, until the next
// i_start, which takes it back through IDLE (one cycle, counters cleared)
// into RD_BRAM1 for the new frame: one start pulse per frame.
//
// Timing: a frame of ROWS*COLS pixels with H boundary pixels spends
// ROWS*COLS + 2H + 2 cycles in RD_BRAM1 and WR_BRAM2 (one less when the last
// pixel is a boundary pixel): one cycle per pixel, and per boundary pixel
// one cycle to detect it and one to write it.
//
// The states, the pixel test "equal to 1" and the BRAM port names follow the
// document. The pipelined read, the byte addressing of BRAM1 (one pixel per
// 32-bit word, address = 4 * (row*COLS + col)), the {row, col} packing and the
// exit from DONE through IDLE on the next start are this design's choices.
module boundary_scan
  import shape_pkg::*;
#(
  parameter int unsigned ROWS      = 32,
  parameter int unsigned COLS      = 64,
  parameter int unsigned B2_ADDR_W = 11
) (
  input  logic                 sysclk,
  input  logic                 reset,
  input  logic                 i_start,
  // BRAM1 port B (image)
  output logic [31:0]          o_bram1Addr,
  input  logic [31:0]          i_bram1Data,
  output logic                 o_bram1En,
  output logic [3:0]           o_bram1WEn,
  // BRAM2 port A (boundary indices)
  output logic [B2_ADDR_W-1:0] o_bram2Addr,
  output logic [15:0]          o_bram2ColIndex,
  output logic                 o_bram2En,
  output logic                 o_bram2WEn,
  // status
  output logic [1:0]           o_stateCheck,
  output logic [B2_ADDR_W:0]   o_count,
  output logic                 o_done
);
  localparam int unsigned ROW_W = $clog2(ROWS);
  localparam int unsigned COL_W = $clog2(COLS);

  scan_state_t state;
  logic [ROW_W-1:0] row;          // next pixel to read
  logic [COL_W-1:0] col;
  logic             all_issued;   // every pixel address has been issued
  logic [ROW_W-1:0] chk_row;      // pixel whose word is on i_bram1Data
  logic [COL_W-1:0] chk_col;
  logic             chk_vld;
  logic [B2_ADDR_W:0] wr_cnt;
  logic             hit;
  logic             restart;      // a start arrived in DONE
  point_t           pt;

  assign hit = chk_vld && (i_bram1Data == 32'd1);

  always_ff @(posedge sysclk) begin
    if (reset) begin
      state      <= ST_IDLE;
      row        <= '0;
      col        <= '0;
      all_issued <= 1'b0;
      chk_row    <= '0;
      chk_col    <= '0;
      chk_vld    <= 1'b0;
      wr_cnt     <= '0;
      restart    <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          row        <= '0;
          col        <= '0;
          all_issued <= 1'b0;
          chk_vld    <= 1'b0;
          wr_cnt     <= '0;
          restart    <= 1'b0;
          if (i_start || restart) state <= ST_RD_BRAM1;
        end
        ST_RD_BRAM1: begin
          if (hit) begin
            // hold the read position; the hit pixel is written next cycle
            state   <= ST_WR_BRAM2;
            chk_vld <= 1'b0;
          end else if (!all_issued) begin
            chk_row <= row;
            chk_col <= col;
            chk_vld <= 1'b1;
            if (col == COL_W'(COLS - 1)) begin
              col <= '0;
              if (row == ROW_W'(ROWS - 1)) all_issued <= 1'b1;
              else                         row <= row + 1'b1;
            end else begin
              col <= col + 1'b1;
            end
          end else begin
            chk_vld <= 1'b0;
            if (!chk_vld) state <= ST_DONE;
          end
        end
        ST_WR_BRAM2: begin
          wr_cnt <= wr_cnt + 1'b1;
          state  <= ST_RD_BRAM1;
        end
        ST_DONE: begin
          if (i_start) begin
            state   <= ST_IDLE;
            restart <= 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign o_bram1Addr  = 32'((32'(row) * COLS + 32'(col)) << 2);
  assign o_bram1En    = (state == ST_RD_BRAM1) && !all_issued && !hit;
  assign o_bram1WEn   = 4'b0000;

  assign pt.row          = IDX_W'(chk_row);
  assign pt.col          = IDX_W'(chk_col);
  assign o_bram2ColIndex = pt;
  assign o_bram2Addr     = wr_cnt[B2_ADDR_W-1:0];
  assign o_bram2En       = (state == ST_WR_BRAM2);
  assign o_bram2WEn      = (state == ST_WR_BRAM2);

  assign o_stateCheck = state;
  assign o_count      = wr_cnt;
  assign o_done       = (state == ST_DONE);
endmodule
