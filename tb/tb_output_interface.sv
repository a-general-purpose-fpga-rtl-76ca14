// tb_output_interface: two output channels with different gains on random
// variables, some of them beyond full scale. Each code must be
// floor(x * gain) limited to the 16-bit range; clipped codes are counted,
// and the strobe follows each store.
`timescale 1ns/1ps
module tb_output_interface;
  import rts_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic store = 0, strobe;
  idx_t sel [2];
  fx_t  gain [2];
  fx_t  x [N];
  logic signed [15:0] code [2];
  logic [31:0] n_clip;
  output_interface #(.N_X(N), .N_DAC(2)) dut (.*);

  function automatic int rint(int span);
    int v;
    v = $urandom_range(span);
    return v;
  endfunction

  int checks = 0, failures = 0, nclip = 0;
  real g [2];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xv [N];
    g[0] = 0.25; g[1] = 4.0;
    sel[0] = 8'd2; sel[1] = 8'd1;
    gain[0] = fx_t'(longint'(g[0] * 4294967296.0));
    gain[1] = fx_t'(longint'(g[1] * 4294967296.0));
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < N; i++) begin
        xv[i] = (rint(80000) - 40000) + rint(255) / 256.0;
        x[i] = fx_t'(longint'(xv[i] * 4294967296.0));
      end
      store = 1; @(negedge clk); store = 0;
      for (int c = 0; c < 2; c++) begin
        real e;
        e = $floor(xv[c == 0 ? 2 : 1] * g[c]);
        if (e > 32767.0) begin e = 32767.0; nclip++; end
        if (e < -32768.0) begin e = -32768.0; nclip++; end
        checks++;
        if (code[c] != int'(e)) begin failures++; $display("FAIL ch %0d: %0d vs %f", c, code[c], e); end
      end
      checks++;
      if (!strobe) begin failures++; $display("FAIL strobe"); end
      @(negedge clk);
    end
    checks += 2;
    if (n_clip != nclip) begin failures++; $display("FAIL clip count %0d vs %0d", n_clip, nclip); end
    if (nclip == 0) begin failures++; $display("FAIL: nothing clipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
