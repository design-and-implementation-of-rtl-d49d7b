// Centroid calculator: the mean of the boundary coordinates.
//
// While i_acc is high the row and column index of one boundary point are
// added to the row-index sum and the column-index sum, and the point counter
// is incremented (one point per cycle). i_clear empties the sums. A pulse on
// i_div starts two sequential dividers in parallel, sum / count for the rows
// and for the columns; SUM_W + 1 cycles after the i_div clock edge o_valid
// rises and the truncated
// quotients stay on o_xc (row, x_c) and o_yc (column, y_c) until the next
// i_clear. With no points the centroid is (0, 0).
//
// The separate row and column sums and the averaging follow the document;
// the restoring dividers, truncation and the widths are this design's choice.
module centroid_calc #(
  parameter int unsigned IDX_W = 8,
  parameter int unsigned CNT_W = 12,
  parameter int unsigned SUM_W = 20
) (
  input  logic             sysclk,
  input  logic             reset,
  input  logic             i_clear,
  input  logic             i_acc,
  input  logic [IDX_W-1:0] i_row,
  input  logic [IDX_W-1:0] i_col,
  input  logic             i_div,
  output logic [IDX_W-1:0] o_xc,
  output logic [IDX_W-1:0] o_yc,
  output logic             o_valid,
  output logic [CNT_W-1:0] o_count
);
  logic [SUM_W-1:0] row_sum, col_sum;
  logic [CNT_W-1:0] cnt;
  logic             row_done, col_done, row_busy, col_busy;
  logic [SUM_W-1:0] row_q, col_q;

  always_ff @(posedge sysclk) begin
    if (reset || i_clear) begin
      row_sum <= '0;
      col_sum <= '0;
      cnt     <= '0;
    end else if (i_acc) begin
      row_sum <= row_sum + SUM_W'(i_row);
      col_sum <= col_sum + SUM_W'(i_col);
      cnt     <= cnt + 1'b1;
    end
  end

  seq_divider #(.N_W(SUM_W), .D_W(CNT_W)) u_div_row (
    .clk(sysclk), .rst(reset), .i_start(i_div), .i_dividend(row_sum), .i_divisor(cnt),
    .o_busy(row_busy), .o_done(row_done), .o_quotient(row_q)
  );
  seq_divider #(.N_W(SUM_W), .D_W(CNT_W)) u_div_col (
    .clk(sysclk), .rst(reset), .i_start(i_div), .i_dividend(col_sum), .i_divisor(cnt),
    .o_busy(col_busy), .o_done(col_done), .o_quotient(col_q)
  );

  always_ff @(posedge sysclk) begin
    if (reset || i_clear || i_div) begin
      o_valid <= 1'b0;
      o_xc    <= '0;
      o_yc    <= '0;
    end else if (row_done && col_done) begin
      o_valid <= 1'b1;
      o_xc    <= IDX_W'(row_q);
      o_yc    <= IDX_W'(col_q);
    end
  end

  assign o_count = cnt;

  // Both dividers start together and take the same number of cycles.
  assert property (@(posedge sysclk) disable iff (reset) row_busy == col_busy);
endmodule
