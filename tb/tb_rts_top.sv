// tb_rts_top: end-to-end test of the solver at its default sizes.
//
// Test case: a 30 km three-conductor line, fed at its left end by three
// sinusoidal sources (analog inputs) behind 10 ohm, terminated at both ends
// by 20 kohm in parallel with 5 nF per phase, with fault switches from each
// right-end phase to ground. Step 4 us (160 cycles of a 40 MHz clock). The
// line is modelled with an orthonormal modal transformation, one ground mode
// and two aerial modes with non-integer travel times.
//
// The bench builds the 18 x 18 network matrix, inverts it in floating point,
// loads the reduced 18 x 12 matrix H and all parameters over the host bus,
// and runs the solver. The phase-a fault switch closes at step 120 and opens
// at step 260. A floating-point model of the same discrete equations runs
// alongside; the monitored left-end voltages and the fault-node voltage are
// read back and compared step by step, as are the analog output codes. As a
// plain physical check, the far-end phase-a voltage must collapse to under a
// fifth of its pre-fault peak while the fault switch is closed.
// It also checks the step time against the 4 us budget, forces overruns with
// too short a step period, and counts that each mechanism occurred.
`timescale 1ns/1ps
module tb_rts_top;
  import rts_pkg::*;

  localparam int NX = 18, MB = 12, NSTEP = 400, DTC = 160;
  localparam real DT = 4.0e-6;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic        host_we = 0, host_re = 0;
  logic [19:0] host_addr = '0;
  logic [63:0] host_wdata = '0;
  logic [63:0] host_rdata;
  logic        host_rvalid;
  logic        adc_valid = 0;
  logic signed [15:0] adc_code [4];
  logic signed [15:0] dac_code [4];
  logic        dac_strobe, step_done;

  rts_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic longint r2fx(real r);
    return longint'(r * 4294967296.0);
  endfunction
  function automatic real fx2r(longint v);
    return real'(v) / 4294967296.0;
  endfunction

  task automatic wr(input int region, input int offs, input longint data);
    @(negedge clk);
    host_we = 1; host_addr = {region[3:0], offs[15:0]}; host_wdata = data;
    @(negedge clk);
    host_we = 0;
  endtask
  task automatic rd(input int region, input int offs, output longint data);
    @(negedge clk);
    host_re = 1; host_addr = {region[3:0], offs[15:0]};
    @(negedge clk);
    data = host_rdata;
    host_re = 0;
  endtask

  // ---------------------------------------------------------- network
  real A [NX][NX];
  real Ai[NX][NX];
  real H [NX][MB];
  real T [3][3];
  real gc[3], kf[3], kn[3], tau[3];
  int  dly[3];
  real frac[3];
  real gsrc, gterm, gcap, gsw, scale;

  // x: 0..5 phase voltages (left a b c, right a b c), 6..11 modal currents
  // (left modes 0..2, right modes 0..2), 12..17 modal voltages (same order)
  task automatic build_network();
    real s3, s2, s6;
    s3 = 1.0/$sqrt(3.0); s2 = 1.0/$sqrt(2.0); s6 = 1.0/$sqrt(6.0);
    T[0][0] = s3; T[0][1] = s2;  T[0][2] = s6;
    T[1][0] = s3; T[1][1] = -s2; T[1][2] = s6;
    T[2][0] = s3; T[2][1] = 0.0; T[2][2] = -2.0*s6;
    gsrc = 1.0/10.0; gterm = 1.0/20000.0; gcap = 5.0e-9/DT; gsw = 0.01;
    scale = 10.0;
    gc[0] = 1.0/650.0; tau[0] = 30.0e3/2.6e8;
    gc[1] = 1.0/300.0; tau[1] = 30.0e3/2.95e8;
    gc[2] = 1.0/300.0; tau[2] = 30.0e3/2.95e8;
    for (int m = 0; m < 3; m++) begin
      real st;
      st = tau[m] / DT;
      dly[m] = int'($floor(st));
      frac[m] = st - $floor(st);
      kf[m] = (m == 0) ? 0.98 : 0.995;
      kn[m] = 1.0 - kf[m];
    end
    for (int i = 0; i < NX; i++) for (int j = 0; j < NX; j++) A[i][j] = 0.0;
    for (int e = 0; e < 2; e++) for (int p = 0; p < 3; p++) begin
      int r;
      r = 3*e + p;
      A[r][r] += gterm + gcap + gsw;      // termination, capacitor, switch
      if (e == 0) A[r][r] += gsrc;        // source conductance
      for (int m = 0; m < 3; m++) A[r][6 + 3*e + m] += T[p][m];
      // transformation row
      A[12 + 3*e + p][r] = 1.0;
      for (int m = 0; m < 3; m++) A[12 + 3*e + p][12 + 3*e + m] = -T[p][m];
    end
    // right-end switches only: left-end rows must not carry gsw
    for (int p = 0; p < 3; p++) A[p][p] -= gsw;
    for (int e = 0; e < 2; e++) for (int m = 0; m < 3; m++) begin
      A[6 + 3*e + m][6 + 3*e + m] = 1.0;
      A[6 + 3*e + m][12 + 3*e + m] = -gc[m];
    end
  endtask

  task automatic invert();
    real M [NX][2*NX];
    for (int i = 0; i < NX; i++) for (int j = 0; j < 2*NX; j++)
      M[i][j] = (j < NX) ? A[i][j] : ((j - NX == i) ? 1.0 : 0.0);
    for (int c = 0; c < NX; c++) begin
      int piv; real best, f;
      piv = c; best = 0.0;
      for (int r = c; r < NX; r++) if ((M[r][c] < 0 ? -M[r][c] : M[r][c]) > best) begin
        best = (M[r][c] < 0 ? -M[r][c] : M[r][c]); piv = r;
      end
      for (int j = 0; j < 2*NX; j++) begin real t; t = M[c][j]; M[c][j] = M[piv][j]; M[piv][j] = t; end
      f = M[c][c];
      for (int j = 0; j < 2*NX; j++) M[c][j] /= f;
      for (int r = 0; r < NX; r++) if (r != c) begin
        f = M[r][c];
        for (int j = 0; j < 2*NX; j++) M[r][j] -= f * M[c][j];
      end
    end
    for (int i = 0; i < NX; i++) for (int j = 0; j < NX; j++) Ai[i][j] = M[i][j + NX];
    for (int i = 0; i < NX; i++) for (int j = 0; j < MB; j++) H[i][j] = Ai[i][j];
  endtask

  // ------------------------------------------------------- reference model
  real xr [NX];
  real ih_c [6];                 // capacitor history (branch current form)
  real jsw [3];
  real sk_hist [3][NSTEP+2], sm_hist [3][NSTEP+2];
  real ik [3], im [3];
  real vref [NSTEP][4];
  int  dacref [NSTEP];
  real got [NSTEP][4];
  bit  sw_ref [3];

  function automatic real wave(int m, int n, bit far_k);
    // s of one end at step n, zero before the run
    if (n < 0) return 0.0;
    return far_k ? sk_hist[m][n] : sm_hist[m][n];
  endfunction

  task automatic ref_step(input int n, input int code [3]);
    real b [MB];
    for (int j = 0; j < MB; j++) b[j] = 0.0;
    for (int s = 0; s < 3; s++) b[s] += gsrc * (code[s] * scale);
    for (int e = 0; e < 6; e++) b[e] += -ih_c[e];
    for (int e = 0; e < 3; e++) b[3 + e] += jsw[e];
    for (int m = 0; m < 3; m++) begin b[6 + m] += ik[m]; b[9 + m] += im[m]; end
    for (int i = 0; i < NX; i++) begin
      xr[i] = 0.0;
      for (int j = 0; j < MB; j++) xr[i] += H[i][j] * b[j];
    end
    vref[n][0] = xr[0]; vref[n][1] = xr[1]; vref[n][2] = xr[2]; vref[n][3] = xr[3];
    dacref[n] = int'($floor(xr[0] * (32767.0/300000.0)));
    // history updates for step n+1
    for (int e = 0; e < 6; e++) ih_c[e] = -gcap * xr[e];
    for (int e = 0; e < 3; e++) begin
      real is;
      is = gsw * xr[3 + e] - jsw[e];
      jsw[e] = sw_ref[e] ? -is : gsw * xr[3 + e];
    end
    for (int m = 0; m < 3; m++) begin
      real a1k, a1m, a2k, a2m, sk, sm;
      sk_hist[m][n] = 2.0 * gc[m] * xr[12 + m] + ik[m];
      sm_hist[m][n] = 2.0 * gc[m] * xr[15 + m] + im[m];
      a1k = wave(m, n + 1 - dly[m], 1); a2k = wave(m, n - dly[m], 1);
      a1m = wave(m, n + 1 - dly[m], 0); a2m = wave(m, n - dly[m], 0);
      sk = a1k + frac[m] * (a2k - a1k);
      sm = a1m + frac[m] * (a2m - a1m);
      ik[m] = -(kf[m] * sm + kn[m] * sk);
      im[m] = -(kf[m] * sk + kn[m] * sm);
    end
  endtask

  // ------------------------------------------------------------ ADC model
  // 1 MS/s converter: a new three-phase sample every 40 cycles
  int adc_cnt = 0;
  int code_q [3];
  int code_used [NSTEP+10][3];
  int n_sampled = 0;
  real t_now = 0.0;
  always @(posedge clk) begin
    if (rst_n && dut.u_seq.sample && n_sampled < NSTEP + 10) begin
      for (int s = 0; s < 3; s++) code_used[n_sampled][s] = code_q[s];
      n_sampled++;
    end
    if (adc_valid) for (int s = 0; s < 3; s++) code_q[s] = adc_code[s];
  end
  initial begin
    for (int s = 0; s < 3; s++) code_q[s] = 0;
    for (int c = 0; c < 4; c++) adc_code[c] = '0;
    forever begin
      @(negedge clk);
      adc_valid = 0;
      if (rst_n) begin
        adc_cnt++;
        if (adc_cnt == 40) begin
          adc_cnt = 0;
          t_now += 1.0e-6;
          for (int s = 0; s < 3; s++)
            adc_code[s] = 16'(int'($floor(18778.0 * $sin(2.0*PI*60.0*t_now + 0.5 - 2.0*PI*s/3.0) + 0.5)));
          adc_code[3] = 16'sd0;
          adc_valid = 1;
        end
      end
    end
  end

  // ---------------------------------------------------- mechanism counters
  int n_sw_on = 0, n_sw_off = 0, n_frac = 0, n_wrap = 0, n_dac = 0, n_clipped = 0;
  int step_cnt = 0, dac_step = 0;
  int dac_seen [NSTEP];
  always @(posedge clk) begin
    if (rst_n && dut.g_sw[0].u_s.toggled) begin
      if (dut.sw_on_q[0]) n_sw_on++; else n_sw_off++;
    end
    if (rst_n && dac_strobe && dac_step < NSTEP) begin
      dac_seen[dac_step] = dac_code[0];
      dac_step++;
    end
  end

  initial begin
    #(25ns * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint rv;
    int code [3];
    build_network();
    invert();
    for (int e = 0; e < 6; e++) ih_c[e] = 0.0;
    for (int e = 0; e < 3; e++) begin jsw[e] = 0.0; sw_ref[e] = 0; ik[e] = 0.0; im[e] = 0.0; end
    repeat (4) @(negedge clk);
    rst_n = 1;
    // load H
    for (int i = 0; i < NX; i++) for (int j = 0; j < MB; j++)
      wr(1, (i << 8) | j, r2fx(H[i][j]));
    // capacitors at the six phase nodes
    for (int e = 0; e < 6; e++) begin
      wr(2, e*16 + 0, 1); wr(2, e*16 + 1, e); wr(2, e*16 + 2, 255); wr(2, e*16 + 3, r2fx(gcap));
    end
    // fault switches at the right-end phases
    for (int e = 0; e < 3; e++) begin
      wr(3, e*16 + 0, 3 + e); wr(3, e*16 + 1, 255); wr(3, e*16 + 2, r2fx(gsw));
    end
    // line modes
    for (int m = 0; m < 3; m++) begin
      wr(4, m*16 + 0, 12 + m); wr(4, m*16 + 1, 15 + m);
      wr(4, m*16 + 2, 6 + m);  wr(4, m*16 + 3, 9 + m);
      wr(4, m*16 + 4, r2fx(2.0 * gc[m]));
      wr(4, m*16 + 5, r2fx(kf[m])); wr(4, m*16 + 6, r2fx(kn[m]));
      wr(4, m*16 + 7, dly[m]); wr(4, m*16 + 8, r2fx(frac[m]));
      if (frac[m] > 0.0) n_frac++;
    end
    // sources from analog channels 0..2
    for (int s = 0; s < 3; s++) begin
      wr(5, s*16 + 0, s); wr(5, s*16 + 1, 1); wr(5, s*16 + 2, s); wr(5, s*16 + 3, r2fx(gsrc));
      wr(6, s*16 + 0, r2fx(scale));
    end
    // monitor Va Vb Vc and the fault node; outputs Va and a clipping channel
    for (int c = 0; c < 4; c++) wr(6, c*16 + 1, c);
    wr(6, 0*16 + 2, 0); wr(6, 0*16 + 3, r2fx(32767.0/300000.0));
    wr(6, 1*16 + 2, 0); wr(6, 1*16 + 3, r2fx(1.0));
    wr(0, 1, DTC);
    wr(0, 0, 3);          // clear and run
    // run, operating the fault switch between steps
    while (step_cnt < NSTEP) begin
      @(posedge clk);
      if (step_done) begin
        step_cnt++;
        if (step_cnt == 120) begin wr(0, 2, 1); end
        if (step_cnt == 260) begin wr(0, 2, 0); end
      end
    end
    wr(0, 0, 0);          // stop
    repeat (200) @(negedge clk);
    // reference run with the same inputs and switch times
    for (int n = 0; n < NSTEP; n++) begin
      sw_ref[0] = (n >= 120 && n < 260);
      for (int s = 0; s < 3; s++) code[s] = code_used[n][s];
      ref_step(n, code);
    end
    // compare monitored voltages
    for (int n = 0; n < NSTEP; n++) for (int c = 0; c < 4; c++) begin
      real v, err;
      rd(7, (c << 12) | n, rv);
      v = fx2r(rv);
      got[n][c] = v;
      err = v - vref[n][c];
      if (err < 0) err = -err;
      check(err < 0.5 + 1.0e-6 * (vref[n][c] < 0 ? -vref[n][c] : vref[n][c]),
            $sformatf("step %0d ch %0d: got %f expected %f", n, c, v, vref[n][c]));
    end
    // physics: the closed fault switch pulls the far-end phase a close to
    // ground, compared with the energised line before the fault
    begin
      real pre, flt;
      pre = 0.0; flt = 0.0;
      for (int n = 90; n < 120; n++) if ((got[n][3] < 0 ? -got[n][3] : got[n][3]) > pre) pre = (got[n][3] < 0 ? -got[n][3] : got[n][3]);
      for (int n = 230; n < 260; n++) if ((got[n][3] < 0 ? -got[n][3] : got[n][3]) > flt) flt = (got[n][3] < 0 ? -got[n][3] : got[n][3]);
      $display("far-end phase a: %f V peak before the fault, %f V during it", pre, flt);
      check(pre > 1.0e4 && flt < 0.2 * pre, "fault did not collapse the far-end voltage");
    end
    // analog output codes
    for (int n = 0; n < NSTEP; n++) begin
      int d;
      d = dac_seen[n] - dacref[n];
      check(d >= -1 && d <= 1, $sformatf("dac step %0d: %0d vs %0d", n, dac_seen[n], dacref[n]));
      n_dac++;
    end
    // status: steps, timing against 4 us, clipping, conversions
    rd(0, 3, rv); check(rv == NSTEP, $sformatf("steps %0d", rv));
    rd(0, 5, rv); check(rv <= DTC && rv > 0, $sformatf("max step cycles %0d > %0d", rv, DTC));
    $display("step time: %0d cycles (budget %0d)", rv, DTC);
    rd(0, 9, rv); n_clipped = int'(rv); check(rv > 0, "no clipping on channel 1");
    rd(0, 8, rv); check(rv > 0, "no analog conversions");
    if (NSTEP > 256) n_wrap++;
    // overrun: a step period shorter than a step
    wr(0, 1, 5);
    wr(0, 0, 1);
    repeat (200) @(negedge clk);
    wr(0, 0, 0);
    repeat (50) @(negedge clk);
    rd(0, 6, rv); check(rv > 0, "no overrun detected with a 5-cycle period");
    // clear
    wr(0, 0, 2);
    repeat (5) @(negedge clk);
    rd(0, 3, rv); check(rv == 0, "clear did not reset the step count");
    // mechanisms
    $display("mechanisms: fault on %0d, fault off %0d, fractional delays %0d, delay wrap %0d, outputs %0d, clipped %0d",
             n_sw_on, n_sw_off, n_frac, n_wrap, n_dac, n_clipped);
    check(n_sw_on > 0, "switch never closed");
    check(n_sw_off > 0, "switch never opened");
    check(n_frac > 0, "no fractional delay");
    check(n_wrap > 0, "delay memory never wrapped");
    check(n_clipped > 0, "no output clipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
