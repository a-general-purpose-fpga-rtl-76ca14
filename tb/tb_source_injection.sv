// tb_source_injection: three sources, two fed from analog channels 2 and 0,
// one from a host value. After each load the currents must equal g * value.
`timescale 1ns/1ps
module tb_source_injection;
  import rts_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0;
  src_cfg_t cfg [3];
  fx_t adc_v [4];
  fx_t inj [3];
  source_injection #(.N_SRC(3), .N_ADC(4)) dut (.*);

  function automatic int rint(int span);
    int v;
    v = $urandom_range(span);
    return v;
  endfunction
  function automatic longint r2fx(real r); return longint'(r * 4294967296.0); endfunction
  function automatic real abs_r(real v); return v < 0 ? -v : v; endfunction

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g [3], av [4], hv, e [3];
    g[0] = 0.1; g[1] = 0.05; g[2] = 2.0;
    hv = 1234.5;
    cfg[0] = '{b: 8'd0, from_adc: 1'b1, ch: 4'd2, g: fx_t'(r2fx(g[0])), value: '0};
    cfg[1] = '{b: 8'd1, from_adc: 1'b1, ch: 4'd0, g: fx_t'(r2fx(g[1])), value: fx_t'(r2fx(99.0))};
    cfg[2] = '{b: 8'd2, from_adc: 1'b0, ch: 4'd1, g: fx_t'(r2fx(g[2])), value: fx_t'(r2fx(hv))};
    for (int c = 0; c < 4; c++) adc_v[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int c = 0; c < 4; c++) begin
        av[c] = (rint(400000) - 200000) / 2.0;
        adc_v[c] = fx_t'(r2fx(av[c]));
      end
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      e[0] = g[0] * av[2]; e[1] = g[1] * av[0]; e[2] = g[2] * hv;
      for (int s = 0; s < 3; s++) begin
        checks++;
        if (abs_r(real'(inj[s]) / 4294967296.0 - e[s]) > 1e-5 + 1e-8 * abs_r(e[s])) begin
          failures++; $display("FAIL src %0d: %f vs %f", s, real'(inj[s]) / 4294967296.0, e[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
