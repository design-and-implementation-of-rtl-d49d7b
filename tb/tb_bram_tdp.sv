// Self-checking test of the true dual-port block RAM: random reads and
// writes on both ports with random byte enables, checked against a
// reference array; also checks one-cycle read latency, read-first on a
// simultaneous write and that the output holds while a port is disabled.
module tb_bram_tdp;
  localparam int DW = 32, AW = 6, WW = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          ena, enb;
  logic [WW-1:0] wea, web;
  logic [AW-1:0] addra, addrb;
  logic [DW-1:0] dina, dinb, douta, doutb;
  logic [DW-1:0] ref_mem [1<<AW];
  logic [DW-1:0] exp_a, exp_b;
  logic          chk_a, chk_b;
  int checks = 0, failures = 0;

  bram_tdp #(.DATA_W(DW), .ADDR_W(AW), .WE_W(WW)) dut (
    .clka(clk), .ena, .wea, .addra, .dina, .douta,
    .clkb(clk), .enb, .web, .addrb, .dinb, .doutb);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] merge(logic [DW-1:0] old, logic [DW-1:0] d, logic [WW-1:0] we);
    for (int l = 0; l < WW; l++) if (we[l]) old[l*8 +: 8] = d[l*8 +: 8];
    return old;
  endfunction

  initial begin
    for (int i = 0; i < (1<<AW); i++) ref_mem[i] = '0;
    ena = 0; enb = 0; wea = 0; web = 0; addra = 0; addrb = 0; dina = 0; dinb = 0;
    chk_a = 0; chk_b = 0;
    @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      ena   = ($urandom % 4) != 0;
      enb   = ($urandom % 4) != 0;
      wea   = ($urandom % 2) ? WW'($urandom) : '0;
      web   = ($urandom % 2) ? WW'($urandom) : '0;
      addra = AW'($urandom);
      addrb = AW'($urandom);
      if (addrb == addra) web = '0;   // no write collisions
      dina  = $urandom;
      dinb  = $urandom;
      @(posedge clk);
      // expected outputs: read-first, hold when disabled
      if (ena) exp_a = ref_mem[addra];
      if (enb) exp_b = ref_mem[addrb];
      if (ena) begin ref_mem[addra] = merge(ref_mem[addra], dina, wea); chk_a = 1; end
      if (enb) begin ref_mem[addrb] = merge(ref_mem[addrb], dinb, web); chk_b = 1; end
      @(negedge clk);
      if (chk_a) begin checks++; if (douta !== exp_a) begin failures++; if (failures < 10) $display("A mismatch %h %h", douta, exp_a); end end
      if (chk_b) begin checks++; if (doutb !== exp_b) begin failures++; if (failures < 10) $display("B mismatch %h %h", doutb, exp_b); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
