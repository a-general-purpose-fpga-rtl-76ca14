// tb_adc_interface: conversions arrive every 40 cycles; time steps sample
// every 160 cycles, once exactly on a conversion cycle. Each sampled value
// must be the newest code before the sample times the channel scale, the
// fresh flag must tell whether a conversion came in since the last step, and
// the conversion count must match.
`timescale 1ns/1ps
module tb_adc_interface;
  import rts_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic adc_valid = 0, sample = 0, fresh;
  logic signed [15:0] adc_code [2];
  fx_t scale [2];
  fx_t value [2];
  logic [31:0] n_conv;
  adc_interface #(.N_ADC(2)) dut (.*);

  int checks = 0, failures = 0;
  int last [2], nconv = 0;
  bit seen_new = 0;
  real sc [2];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sc[0] = 0.5; sc[1] = 12.25;
    scale[0] = fx_t'(longint'(sc[0] * 4294967296.0));
    scale[1] = fx_t'(longint'(sc[1] * 4294967296.0));
    adc_code[0] = '0; adc_code[1] = '0;
    last[0] = 0; last[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 1; cyc <= 4000; cyc++) begin
      bit v, s;
      v = (cyc % 40) == 0;
      s = (cyc % 160) == 0 || cyc == 1000 || cyc == 1010 || cyc == 1020;   // 1000 falls on a conversion, 1020 sees none
      adc_valid = v;
      sample = s;
      if (v) begin
        adc_code[0] = 16'($urandom);
        adc_code[1] = 16'($urandom);
      end
      @(negedge clk);
      if (s) begin
        for (int c = 0; c < 2; c++) begin
          checks++;
          if (real'(value[c]) / 4294967296.0 != last[c] * sc[c]) begin
            failures++; $display("FAIL ch %0d at %0d: %f vs %f", c, cyc, real'(value[c]) / 4294967296.0, last[c] * sc[c]);
          end
        end
        checks++;
        if (fresh != seen_new) begin failures++; $display("FAIL fresh at %0d", cyc); end
        seen_new = v;
      end else if (v) seen_new = 1;
      if (v) begin last[0] = adc_code[0]; last[1] = adc_code[1]; nconv++; end
    end
    adc_valid = 0; sample = 0;
    checks++;
    if (n_conv != nconv) begin failures++; $display("FAIL count %0d vs %0d", n_conv, nconv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
