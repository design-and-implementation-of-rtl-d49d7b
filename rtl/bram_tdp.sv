// True dual-port block RAM with byte write enables.
//
// Two independent ports on their own clocks. A port reads when enabled: the
// word at the address appears on its output one clock later (read-first on a
// simultaneous write), and the output holds its value while the port is
// disabled. Each write-enable bit covers DATA_W/WE_W bits of the word.
// The design uses it twice: as the image memory (2048 x 32, four byte enables,
// port A for the processor's bus controller, port B for the boundary scan) and
// as the boundary index memory (2048 x 16, one write enable, port A written
// by the scan, port B read by the centroid/distance pass). The widths follow
// the block design; read latency and read-first behaviour are this design's
// choice, matching a plain FPGA block RAM.
// The array is written from two processes, one per port, as a true dual-port
// memory must be; lint tools report it as driven from two blocks. That is
// intended. Writing the same address from both ports in the same cycle is
// not defined (the design never does it: only port A of each memory writes).
module bram_tdp #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 11,
  parameter int unsigned WE_W   = 4
) (
  input  logic              clka,
  input  logic              ena,
  input  logic [WE_W-1:0]   wea,
  input  logic [ADDR_W-1:0] addra,
  input  logic [DATA_W-1:0] dina,
  output logic [DATA_W-1:0] douta,
  input  logic              clkb,
  input  logic              enb,
  input  logic [WE_W-1:0]   web,
  input  logic [ADDR_W-1:0] addrb,
  input  logic [DATA_W-1:0] dinb,
  output logic [DATA_W-1:0] doutb
);
  localparam int unsigned LANE_W = DATA_W / WE_W;
  localparam int unsigned DEPTH  = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clka) begin
    if (ena) begin
      douta <= mem[addra];
      for (int l = 0; l < WE_W; l++)
        if (wea[l]) mem[addra][l*LANE_W +: LANE_W] <= dina[l*LANE_W +: LANE_W];
    end
  end

  always_ff @(posedge clkb) begin
    if (enb) begin
      doutb <= mem[addrb];
      for (int l = 0; l < WE_W; l++)
        if (web[l]) mem[addrb][l*LANE_W +: LANE_W] <= dinb[l*LANE_W +: LANE_W];
    end
  end
endmodule
