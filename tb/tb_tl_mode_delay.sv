// tb_tl_mode_delay: one lossy line mode with a travel time of 3.25 steps in a
// 16-entry delay memory, run for 60 steps (the memory wraps several times)
// with random modal voltages. The history sources of both ends are compared
// each step with a floating-point Bergeron model that keeps the whole wave
// history and interpolates linearly; samples before the start read as zero.
// The done pulse must come 4 cycles after upd.
`timescale 1ns/1ps
module tb_tl_mode_delay;
  import rts_pkg::*;
  localparam int N = 4, D = 16, NS = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, upd = 0, done;
  fx_t  x [N];
  tl_cfg_t cfg;
  fx_t  inj_k, inj_m;
  tl_mode_delay #(.N_X(N), .DEPTH(D)) dut (.*);

  function automatic int rint(int span);
    int v;
    v = $urandom_range(span);
    return v;
  endfunction
  function automatic longint r2fx(real r); return longint'(r * 4294967296.0); endfunction
  function automatic real abs_r(real v); return v < 0 ? -v : v; endfunction

  int checks = 0, failures = 0;
  real g2 = 2.0/400.0, kf = 0.875, kn = 0.125, fr = 0.25;
  int  dl = 3;
  real sk [NS], sm [NS];
  real ik = 0.0, im = 0.0;

  function automatic real at(int n, bit k);
    if (n < 0) return 0.0;
    return k ? sk[n] : sm[n];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '{vk: 8'd1, vm: 8'd3, bk: 8'd0, bm: 8'd1, g2: fx_t'(r2fx(g2)),
            k_far: fx_t'(r2fx(kf)), k_near: fx_t'(r2fx(kn)), dly: DLYW'(dl), frac: fx_t'(r2fx(fr))};
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      real vk, vm, a1, a2, b1, b2, s_k, s_m;
      int lat;
      vk = (rint(200000) - 100000) / 4.0;
      vm = (rint(200000) - 100000) / 4.0;
      x[1] = fx_t'(r2fx(vk)); x[3] = fx_t'(r2fx(vm));
      x[0] = fx_t'(r2fx(123.0)); x[2] = fx_t'(r2fx(-77.0));
      @(negedge clk);
      upd = 1;
      @(negedge clk);
      upd = 0;
      lat = 1;
      while (!done && lat < 20) begin @(negedge clk); lat++; end
      sk[n] = g2 * vk + ik;
      sm[n] = g2 * vm + im;
      a1 = at(n + 1 - dl, 1); a2 = at(n - dl, 1);
      b1 = at(n + 1 - dl, 0); b2 = at(n - dl, 0);
      s_k = a1 + fr * (a2 - a1);
      s_m = b1 + fr * (b2 - b1);
      ik = -(kf * s_m + kn * s_k);
      im = -(kf * s_k + kn * s_m);
      checks += 3;
      if (lat != 4) begin failures++; $display("FAIL: latency %0d", lat); end
      if (abs_r(real'(inj_k) / 4294967296.0 - ik) > 1e-5) begin
        failures++; $display("FAIL k step %0d: %f vs %f", n, real'(inj_k) / 4294967296.0, ik);
      end
      if (abs_r(real'(inj_m) / 4294967296.0 - im) > 1e-5) begin
        failures++; $display("FAIL m step %0d: %f vs %f", n, real'(inj_m) / 4294967296.0, im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
