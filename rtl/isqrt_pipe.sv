// Pipelined unsigned integer square root.
//
// o_root = floor(sqrt(i_radicand)) for an IN_W-bit unsigned input, one new
// input per cycle, latency IN_W/2 cycles. Each pipeline stage decides one bit
// of the root by the digit-by-digit method: with b the weight of the stage,
// if the remaining radicand is at least (partial root + b) it is reduced by
// that amount and the bit is set. The root is OUT_W bits wide, its top bit
// always zero for a 32-bit input, as in the square root configuration of the
// CORDIC core the document uses (unsigned integer, truncation, parallel
// architecture). A tag (the sample index) travels alongside the data.
// The digit-by-digit method and the latency are this design's choice: the
// document names the function, not the inside.
module isqrt_pipe #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 17,
  parameter int unsigned TAG_W = 7
) (
  input  logic             sysclk,
  input  logic             reset,
  input  logic             i_valid,
  input  logic [IN_W-1:0]  i_radicand,
  input  logic [TAG_W-1:0] i_tag,
  output logic             o_valid,
  output logic [OUT_W-1:0] o_root,
  output logic [TAG_W-1:0] o_tag
);
  localparam int unsigned STAGES = IN_W / 2;

  // stage s holds the state after s bits of the root have been decided
  logic [IN_W-1:0]  op_q  [STAGES+1];
  logic [IN_W-1:0]  res_q [STAGES+1];
  logic             vld_q [STAGES+1];
  logic [TAG_W-1:0] tag_q [STAGES+1];

  always_comb begin
    op_q[0]  = i_radicand;
    res_q[0] = '0;
    vld_q[0] = i_valid;
    tag_q[0] = i_tag;
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam logic [IN_W-1:0] BIT = IN_W'(1) << (IN_W - 2 - 2*s);
    logic [IN_W-1:0] trial;
    assign trial = res_q[s] + BIT;

    always_ff @(posedge sysclk) begin
      if (reset) begin
        op_q[s+1]  <= '0;
        res_q[s+1] <= '0;
        vld_q[s+1] <= 1'b0;
        tag_q[s+1] <= '0;
      end else begin
        vld_q[s+1] <= vld_q[s];
        tag_q[s+1] <= tag_q[s];
        if (op_q[s] >= trial) begin
          op_q[s+1]  <= op_q[s] - trial;
          res_q[s+1] <= (res_q[s] >> 1) + BIT;
        end else begin
          op_q[s+1]  <= op_q[s];
          res_q[s+1] <= res_q[s] >> 1;
        end
      end
    end
  end

  assign o_valid = vld_q[STAGES];
  assign o_root  = OUT_W'(res_q[STAGES]);
  assign o_tag   = tag_q[STAGES];
endmodule
