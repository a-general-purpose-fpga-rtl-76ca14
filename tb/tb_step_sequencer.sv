// tb_step_sequencer: a solver stand-in answers solve_start after 5 cycles and
// upd after 4. With a 40-cycle period every step must run the stages in
// order (sample, build, solve, update, done), once per period, and report a
// step time between 10 and 20 cycles (16 with these stand-ins); with an 8-cycle period ticks fall inside steps and must be counted as
// overruns; clear must zero the counters.
`timescale 1ns/1ps
module tb_step_sequencer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, run = 0, solve_done = 0, hist_done = 0;
  logic [31:0] dt_cycles = 32'd40;
  logic sample, build, solve_start, upd, step_done, busy;
  logic [31:0] n_steps, last_cycles, max_cycles, n_overrun;
  step_sequencer dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0, t_sample = -1, t_build = -1, t_solve = -1, t_upd = -1, t_done = -1, prev_sample = -1;
  int n_order_ok = 0, n_done = 0, period_err = 0;
  int sd_cnt = -1, hd_cnt = -1;

  // solver and line-unit stand-ins
  always @(posedge clk) if (rst_n) begin
    cyc++;
    solve_done <= (sd_cnt == 1);
    hist_done  <= (hd_cnt == 1);
    if (sd_cnt > 0) sd_cnt--;
    if (hd_cnt > 0) hd_cnt--;
    if (solve_start) sd_cnt = 5;
    if (upd) hd_cnt = 4;
    if (sample && rst_n) begin
      if (prev_sample >= 0 && dt_cycles == 32'd40 && cyc - prev_sample != int'(dt_cycles)) period_err++;
      prev_sample = cyc; t_sample = cyc;
    end
    if (build) t_build = cyc;
    if (solve_start) t_solve = cyc;
    if (upd) t_upd = cyc;
    if (step_done) begin
      t_done = cyc;
      n_done++;
      if (t_sample < t_build && t_build < t_solve && t_solve < t_upd && t_upd < t_done) n_order_ok++;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run = 1;
    repeat (40 * 10 + 5) @(negedge clk);
    run = 0;
    repeat (40) @(negedge clk);
    checks += 5;
    if (n_steps != 10 || n_done != 10) begin failures++; $display("FAIL steps %0d", n_steps); end
    if (n_order_ok != 10) begin failures++; $display("FAIL stage order %0d", n_order_ok); end
    if (period_err != 0) begin failures++; $display("FAIL period"); end
    if (n_overrun != 0) begin failures++; $display("FAIL overrun at 40"); end
    if (last_cycles != max_cycles || last_cycles < 10 || last_cycles > 20) begin
      failures++; $display("FAIL step cycles %0d", last_cycles);
    end
    $display("step takes %0d cycles", last_cycles);
    dt_cycles = 32'd8;
    run = 1;
    repeat (200) @(negedge clk);
    run = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (n_overrun == 0) begin failures++; $display("FAIL no overrun"); end
    clr = 1; @(negedge clk); clr = 0;
    checks++;
    if (n_steps != 0 || n_overrun != 0 || max_cycles != 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
