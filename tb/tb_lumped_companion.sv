// tb_lumped_companion: history sources of an inductor (between nodes 1 and 2)
// and a capacitor (node 3 to ground) over 40 steps of random node voltages,
// compared with the backward-Euler recursions in floating point; then clear.
`timescale 1ns/1ps
module tb_lumped_companion;
  import rts_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, upd = 0;
  fx_t  x [N];
  lump_cfg_t cfg_l, cfg_c;
  fx_t  inj_l, inj_c;
  lumped_companion #(.N_X(N)) dut_l (.clk, .rst_n, .clr, .upd, .cfg(cfg_l), .x, .inj(inj_l));
  lumped_companion #(.N_X(N)) dut_c (.clk, .rst_n, .clr, .upd, .cfg(cfg_c), .x, .inj(inj_c));

  function automatic int rint(int span);
    int v;
    v = $urandom_range(span);
    return v;
  endfunction

  int checks = 0, failures = 0;
  real gl = 0.02, gcp = 0.5, ihl = 0.0, ihc = 0.0;

  function automatic real abs_r(real v); return v < 0 ? -v : v; endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xv [N];
    cfg_l = '{kind: LUMP_L, p: 8'd1, q: 8'd2, g: fx_t'(longint'(gl * 4294967296.0))};
    cfg_c = '{kind: LUMP_C, p: 8'd3, q: IDX_NONE, g: fx_t'(longint'(gcp * 4294967296.0))};
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < N; i++) begin
        xv[i] = (rint((20000)) - 10000) / 16.0;
        x[i] = fx_t'(longint'(xv[i] * 4294967296.0));
      end
      @(negedge clk);
      upd = 1;
      @(negedge clk);
      upd = 0;
      ihl = gl * (xv[1] - xv[2]) + ihl;
      ihc = -gcp * xv[3];
      checks += 2;
      if (abs_r(real'(inj_l) / 4294967296.0 + ihl) > 1e-6) begin
        failures++; $display("FAIL L step %0d: %f vs %f", n, real'(inj_l) / 4294967296.0, -ihl);
      end
      if (abs_r(real'(inj_c) / 4294967296.0 + ihc) > 1e-6) begin
        failures++; $display("FAIL C step %0d: %f vs %f", n, real'(inj_c) / 4294967296.0, -ihc);
      end
    end
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    checks++;
    if (inj_l != 0 || inj_c != 0) begin failures++; $display("FAIL: clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
