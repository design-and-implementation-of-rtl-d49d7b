// Shared types and constants of the shape feature extractor.
//
// The image is a binary 32 x 64 frame (32 rows, 64 columns) held one pixel per
// 32-bit word. A boundary point is stored as a 16-bit word {row, column}, one
// byte each. The boundary scan state machine has the four states of the
// pixel manipulation diagram; its 2-bit encoding is this design's choice.
package shape_pkg;

  localparam int unsigned IDX_W = 8;   // width of a row or column index

  // Boundary scan states (o_stateCheck).
  typedef enum logic [1:0] {
    ST_IDLE     = 2'd0,
    ST_RD_BRAM1 = 2'd1,
    ST_WR_BRAM2 = 2'd2,
    ST_DONE     = 2'd3
  } scan_state_t;

  // One boundary point as stored in BRAM2.
  typedef struct packed {
    logic [IDX_W-1:0] row;
    logic [IDX_W-1:0] col;
  } point_t;

endpackage
