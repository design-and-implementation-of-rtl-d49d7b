// Squared centroid distance of one boundary point.
//
// o_sqdist = (x_i - x_c)^2 + (y_i - y_c)^2, the radicand of the centroid
// contour distance r(t). One point per cycle, registered output, one cycle of
// latency. The 32-bit unsigned result matches the input of the square root
// unit. The formula follows the document; latency and widths are this
// design's choice.
module ccd_sqdist #(
  parameter int unsigned IDX_W = 8
) (
  input  logic             sysclk,
  input  logic             reset,
  input  logic             i_valid,
  input  logic [IDX_W-1:0] i_row,
  input  logic [IDX_W-1:0] i_col,
  input  logic [IDX_W-1:0] i_xc,
  input  logic [IDX_W-1:0] i_yc,
  output logic             o_valid,
  output logic [31:0]      o_sqdist
);
  logic signed [IDX_W:0]     dx, dy;
  logic signed [2*IDX_W+1:0] dx_w, dy_w, dx2, dy2;
  logic        [2*IDX_W+1:0] sq_sum;

  always_comb begin
    dx     = $signed({1'b0, i_row}) - $signed({1'b0, i_xc});
    dy     = $signed({1'b0, i_col}) - $signed({1'b0, i_yc});
    dx_w   = (2*IDX_W+2)'(dx);
    dy_w   = (2*IDX_W+2)'(dy);
    dx2    = dx_w * dx_w;
    dy2    = dy_w * dy_w;
    sq_sum = unsigned'(dx2) + unsigned'(dy2);
  end

  always_ff @(posedge sysclk) begin
    if (reset) begin
      o_valid  <= 1'b0;
      o_sqdist <= '0;
    end else begin
      o_valid  <= i_valid;
      o_sqdist <= 32'(sq_sum);
    end
  end
endmodule
