// Sequential unsigned divider (restoring, one quotient bit per cycle).
//
// i_start loads dividend and divisor; o_busy stays high for N_W cycles and
// o_done pulses for one cycle with the truncated quotient on o_quotient.
// Dividing by zero gives a quotient of zero. Helper of the centroid
// calculator; the algorithm is this design's choice.
module seq_divider #(
  parameter int unsigned N_W = 20,   // dividend / quotient width
  parameter int unsigned D_W = 12    // divisor width
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           i_start,
  input  logic [N_W-1:0] i_dividend,
  input  logic [D_W-1:0] i_divisor,
  output logic           o_busy,
  output logic           o_done,
  output logic [N_W-1:0] o_quotient
);
  localparam int unsigned CNT_W = $clog2(N_W + 1);

  logic [N_W-1:0] quo;
  logic [D_W-1:0] rem;       // partial remainder, always below the divisor
  logic [D_W-1:0] dvs;
  logic [CNT_W-1:0] cnt;
  logic           zero_div;
  logic [D_W:0]   trial;

  assign trial = {rem[D_W-1:0], quo[N_W-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      quo      <= '0;
      rem      <= '0;
      dvs      <= '0;
      cnt      <= '0;
      o_busy   <= 1'b0;
      o_done   <= 1'b0;
      zero_div <= 1'b0;
    end else begin
      o_done <= 1'b0;
      if (i_start) begin
        quo      <= i_dividend;
        rem      <= '0;
        dvs      <= i_divisor;
        zero_div <= (i_divisor == '0);
        cnt      <= CNT_W'(N_W);
        o_busy   <= 1'b1;
      end else if (o_busy) begin
        // shift the next dividend bit into the remainder and try a subtraction
        if (trial >= {1'b0, dvs}) begin
          rem <= D_W'(trial - {1'b0, dvs});
          quo <= {quo[N_W-2:0], 1'b1};
        end else begin
          rem <= D_W'(trial);
          quo <= {quo[N_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          o_busy <= 1'b0;
          o_done <= 1'b1;
        end
      end
    end
  end

  assign o_quotient = zero_div ? '0 : quo;
endmodule
