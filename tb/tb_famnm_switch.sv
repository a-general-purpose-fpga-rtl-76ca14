// tb_famnm_switch: a switch between nodes 2 and 0 driven through on and off
// periods with random node voltages. Each step its current source is compared
// with J(n+1) = -i_s(n) (on) or gs*v_s(n) (off), i_s = gs*v_s - J, and the
// toggle flag with the state changes.
`timescale 1ns/1ps
module tb_famnm_switch;
  import rts_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, upd = 0, on = 0, toggled;
  fx_t  x [N];
  sw_cfg_t cfg;
  fx_t  inj;
  famnm_switch #(.N_X(N)) dut (.*);

  function automatic int rint(int span);
    int v;
    v = $urandom_range(span);
    return v;
  endfunction

  int checks = 0, failures = 0, n_tog = 0;
  real gs = 0.125, j = 0.0;
  bit  prev = 0;

  function automatic real abs_r(real v); return v < 0 ? -v : v; endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xv [N];
    cfg = '{p: 8'd2, q: 8'd0, gs: fx_t'(longint'(gs * 4294967296.0))};
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      bit st;
      real is;
      st = (n >= 10 && n < 30) || (n >= 45);
      for (int i = 0; i < N; i++) begin
        xv[i] = (rint((20000)) - 10000) / 8.0;
        x[i] = fx_t'(longint'(xv[i] * 4294967296.0));
      end
      @(negedge clk);
      on = st; upd = 1;
      @(negedge clk);
      upd = 0;
      is = gs * (xv[2] - xv[0]) - j;
      j = st ? -is : gs * (xv[2] - xv[0]);
      checks += 2;
      if (abs_r(real'(inj) / 4294967296.0 - j) > 1e-6) begin
        failures++; $display("FAIL step %0d: %f vs %f", n, real'(inj) / 4294967296.0, j);
      end
      if (toggled != (st != prev)) begin failures++; $display("FAIL toggle step %0d", n); end
      if (toggled) n_tog++;
      prev = st;
    end
    checks++;
    if (n_tog != 3) begin failures++; $display("FAIL: %0d toggles", n_tog); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
