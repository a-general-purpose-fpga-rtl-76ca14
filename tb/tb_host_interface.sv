// tb_host_interface: writes every kind of register through the bus and checks
// the configuration outputs, the pass-through of H writes, the clear pulse,
// status reads and the one-cycle-late monitor read path.
`timescale 1ns/1ps
module tb_host_interface;
  import rts_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [19:0] addr = '0;
  logic [63:0] wdata = '0, rdata;
  logic rvalid, run, clr, h_we, busy = 0;
  logic [31:0] dt_cycles;
  logic [2:0] sw_on;
  idx_t h_row, h_col;
  fx_t h_data;
  lump_cfg_t lump_cfg [2];
  sw_cfg_t sw_cfg [3];
  tl_cfg_t tl_cfg [2];
  src_cfg_t src_cfg [2];
  fx_t adc_scale [2];
  idx_t mon_sel [2], dac_sel [2];
  fx_t dac_gain [2];
  logic [31:0] n_steps = 32'd11, last_cycles = 32'd22, max_cycles = 32'd33, n_overrun = 32'd44,
               n_stored = 32'd55, n_conv = 32'd66, n_clip = 32'd77;
  logic [0:0] mon_rd_ch;
  logic [3:0] mon_rd_addr;
  fx_t mon_rd_data;
  host_interface #(.N_LUMP(2), .N_SW(3), .N_TL(2), .N_SRC(2), .N_ADC(2), .N_MON(2),
                   .MON_DEPTH(16), .N_DAC(2), .DT_RESET(160)) dut (.*);

  // monitor memory stand-in: one-cycle read of a known pattern
  always_ff @(posedge clk) mon_rd_data <= fx_t'({48'h5A5A_0000_0000, 11'd0, mon_rd_ch, mon_rd_addr});

  int checks = 0, failures = 0, n_hwe = 0, n_clr = 0;
  always @(posedge clk) if (rst_n) begin
    if (h_we) begin
      n_hwe++;
      checks++;
      if (h_row != 8'd3 || h_col != 8'd7 || h_data != 64'sd999) begin failures++; $display("FAIL H write"); end
    end
    if (clr) n_clr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input int region, input int offs, input longint data);
    @(negedge clk);
    we = 1; addr = {region[3:0], offs[15:0]}; wdata = data;
    @(negedge clk);
    we = 0;
  endtask
  task automatic rd(input int region, input int offs, output longint data);
    @(negedge clk);
    re = 1; addr = {region[3:0], offs[15:0]};
    @(negedge clk);
    re = 0;
    if (!rvalid) begin failures++; $display("FAIL rvalid"); end
    data = rdata;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(dt_cycles == 160 && !run && sw_on == 0, "reset values");
    check(lump_cfg[1].p == IDX_NONE && tl_cfg[0].dly == 1, "reset config");
    wr(0, 1, 321);  check(dt_cycles == 321, "period");
    wr(0, 2, 5);    check(sw_on == 3'b101, "switch states");
    wr(0, 0, 3);    check(run && clr, "run and clear");
    @(negedge clk); check(!clr && n_clr == 1, "clear is a pulse");
    wr(1, (3 << 8) | 7, 999); check(n_hwe == 1, "H pass-through");
    wr(2, 16*1 + 0, 1); wr(2, 16*1 + 1, 4); wr(2, 16*1 + 2, 5); wr(2, 16*1 + 3, 64'h1_0000_0000);
    check(lump_cfg[1] == '{kind: LUMP_C, p: 8'd4, q: 8'd5, g: 64'sh1_0000_0000}, "lumped config");
    check(lump_cfg[0].p == IDX_NONE, "lumped 0 untouched");
    wr(3, 16*2 + 0, 9); wr(3, 16*2 + 1, 10); wr(3, 16*2 + 2, 77);
    check(sw_cfg[2] == '{p: 8'd9, q: 8'd10, gs: 64'sd77}, "switch config");
    for (int f = 0; f < 9; f++) wr(4, 16*1 + f, 100 + f);
    check(tl_cfg[1].vk == 100 && tl_cfg[1].vm == 101 && tl_cfg[1].bk == 102 && tl_cfg[1].bm == 103
          && tl_cfg[1].g2 == 104 && tl_cfg[1].k_far == 105 && tl_cfg[1].k_near == 106
          && tl_cfg[1].dly == 107 && tl_cfg[1].frac == 108, "line config");
    for (int f = 0; f < 5; f++) wr(5, 16*0 + f, 1 + f);
    check(src_cfg[0].b == 1 && src_cfg[0].from_adc == 0 && src_cfg[0].ch == 3
          && src_cfg[0].g == 4 && src_cfg[0].value == 5, "source config");
    wr(6, 16*1 + 0, 42); wr(6, 16*1 + 1, 6); wr(6, 16*0 + 2, 7); wr(6, 16*1 + 3, 8);
    check(adc_scale[1] == 42 && mon_sel[1] == 6 && dac_sel[0] == 7 && dac_gain[1] == 8, "io config");
    rd(0, 3, v); check(v == 11, "steps");
    rd(0, 4, v); check(v == 22, "last cycles");
    rd(0, 5, v); check(v == 33, "max cycles");
    rd(0, 6, v); check(v == 44, "overruns");
    rd(0, 7, v); check(v == 55, "stored");
    rd(0, 8, v); check(v == 66, "conversions");
    rd(0, 9, v); check(v == 77, "clipped");
    rd(0, 1, v); check(v == 321, "period read");
    rd(7, (1 << 12) | 9, v); check(v == 64'h5A5A_0000_0000_0019, "monitor read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
