// rts_top: FPGA real-time solver for electromagnetic transients in power
// networks with switches and multi-conductor transmission lines.
//
// The network is written in modified nodal form A*x = b, discretised with
// backward Euler. Phase-to-mode transformations of the lines sit in A as
// rows with zero right-hand side; switches use a fixed conductance whatever
// their state. A is therefore constant for the whole run: the host inverts it
// once, drops the columns that meet the zero rows of b, and loads the
// remaining n x (n-h) matrix H. Each time step the FPGA then only does:
//   1. form b from source currents and the history sources of lumped
//      elements, switches and line modes (all in parallel),
//   2. x = H*b, one computational unit per element of x, each with MULTS
//      multipliers working in parallel,
//   3. update the history sources and write the line delay memories, record
//      the monitored variables and drive the analog outputs.
// A step is started by a timer every dt_cycles clock cycles.
//
// Interfaces: the host bus of host_interface (parameters, H, switch states,
// status and monitor read-back), the analog input strobe and codes, and the
// analog output codes with their strobe. step_done pulses at the end of each
// step. The default sizes hold the three-conductor line test case: 18
// unknowns (6 phase voltages, 6 modal voltages, 6 modal currents), 12
// non-zero rows of b, 6 terminal capacitances, 3 switches, 3 line modes and
// 3 sources. The structure is the document's; sizes beyond that test case,
// the number format and all interfaces are this design's.
module rts_top
  import rts_pkg::*;
#(
  parameter int          N_X       = 18,
  parameter int          M_B       = 12,
  parameter int          MULTS     = 4,
  parameter int          N_LUMP    = 6,
  parameter int          N_SW      = 3,
  parameter int          N_TL      = 3,
  parameter int          N_SRC     = 3,
  parameter int          N_ADC     = 4,
  parameter int          TL_DEPTH  = 256,
  parameter int          N_MON     = 4,
  parameter int          MON_DEPTH = 1024,
  parameter int          N_DAC     = 4,
  parameter int unsigned DT_RESET  = 160
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host bus
  input  logic                       host_we,
  input  logic                       host_re,
  input  logic [19:0]                host_addr,
  input  logic [63:0]                host_wdata,
  output logic [63:0]                host_rdata,
  output logic                       host_rvalid,
  // analog inputs
  input  logic                       adc_valid,
  input  logic signed [ADC_BITS-1:0] adc_code [N_ADC],
  // analog outputs
  output logic signed [DAC_BITS-1:0] dac_code [N_DAC],
  output logic                       dac_strobe,
  // step marker
  output logic                       step_done
);

  // ---------------------------------------------------------------- host
  logic        run, clr;
  logic [31:0] dt_cycles;
  logic [N_SW-1:0] sw_on, sw_on_q;
  logic        h_we;
  idx_t        h_row, h_col;
  fx_t         h_data;
  lump_cfg_t   lump_cfg [N_LUMP];
  sw_cfg_t     sw_cfg   [N_SW];
  tl_cfg_t     tl_cfg   [N_TL];
  src_cfg_t    src_cfg  [N_SRC];
  fx_t         adc_scale[N_ADC];
  idx_t        mon_sel  [N_MON];
  idx_t        dac_sel  [N_DAC];
  fx_t         dac_gain [N_DAC];
  logic        busy;
  logic [31:0] n_steps, last_cycles, max_cycles, n_overrun, n_stored, n_conv, n_clip;
  logic [$clog2(N_MON)-1:0]     mon_rd_ch;
  logic [$clog2(MON_DEPTH)-1:0] mon_rd_addr;
  fx_t         mon_rd_data;

  host_interface #(
    .N_LUMP(N_LUMP), .N_SW(N_SW), .N_TL(N_TL), .N_SRC(N_SRC), .N_ADC(N_ADC),
    .N_MON(N_MON), .MON_DEPTH(MON_DEPTH), .N_DAC(N_DAC), .DT_RESET(DT_RESET)
  ) u_host (
    .clk, .rst_n,
    .we(host_we), .re(host_re), .addr(host_addr), .wdata(host_wdata),
    .rdata(host_rdata), .rvalid(host_rvalid),
    .run, .clr, .dt_cycles, .sw_on,
    .h_we, .h_row, .h_col, .h_data,
    .lump_cfg, .sw_cfg, .tl_cfg, .src_cfg, .adc_scale, .mon_sel, .dac_sel, .dac_gain,
    .busy, .n_steps, .last_cycles, .max_cycles, .n_overrun, .n_stored, .n_conv, .n_clip,
    .mon_rd_ch, .mon_rd_addr, .mon_rd_data
  );

  // ----------------------------------------------------------- sequencer
  logic sample, build, solve_start, solve_done, upd, hist_done;

  step_sequencer u_seq (
    .clk, .rst_n, .clr, .run, .dt_cycles,
    .solve_done, .hist_done,
    .sample, .build, .solve_start, .upd, .step_done, .busy,
    .n_steps, .last_cycles, .max_cycles, .n_overrun
  );

  // switch states apply from the start of a step
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sw_on_q <= '0;
    else if (sample) sw_on_q <= sw_on;
  end

  // ------------------------------------------------------------- inputs
  fx_t  adc_v [N_ADC];

  adc_interface #(.N_ADC(N_ADC)) u_adc (
    .clk, .rst_n, .adc_valid, .adc_code, .scale(adc_scale), .sample,
    .value(adc_v), .fresh(), .n_conv
  );

  fx_t src_j [N_SRC];
  idx_t src_b [N_SRC];
  for (genvar s = 0; s < N_SRC; s++) begin : g_srcb
    assign src_b[s] = src_cfg[s].b;
  end

  // sources see the analog values of this step one cycle after sample
  logic sample_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample_d <= 1'b0;
    else        sample_d <= sample;
  end

  source_injection #(.N_SRC(N_SRC), .N_ADC(N_ADC)) u_src (
    .clk, .rst_n, .load(sample_d), .cfg(src_cfg), .adc_v, .inj(src_j)
  );

  // ------------------------------------------------------------ solution
  fx_t x [N_X];
  fx_t b [M_B];

  // ---------------------------------------------------- history sources
  fx_t  lump_j [N_LUMP];
  idx_t lump_p [N_LUMP], lump_q [N_LUMP];
  for (genvar e = 0; e < N_LUMP; e++) begin : g_lump
    lumped_companion #(.N_X(N_X)) u_l (
      .clk, .rst_n, .clr, .upd, .cfg(lump_cfg[e]), .x, .inj(lump_j[e])
    );
    assign lump_p[e] = lump_cfg[e].p;
    assign lump_q[e] = lump_cfg[e].q;
  end

  fx_t  sw_j [N_SW];
  idx_t sw_p [N_SW], sw_q [N_SW];
  logic [N_SW-1:0] sw_toggled;
  for (genvar e = 0; e < N_SW; e++) begin : g_sw
    famnm_switch #(.N_X(N_X)) u_s (
      .clk, .rst_n, .clr, .upd, .on(sw_on_q[e]), .cfg(sw_cfg[e]), .x,
      .inj(sw_j[e]), .toggled(sw_toggled[e])
    );
    assign sw_p[e] = sw_cfg[e].p;
    assign sw_q[e] = sw_cfg[e].q;
  end

  fx_t  tl_jk [N_TL], tl_jm [N_TL];
  idx_t tl_bk [N_TL], tl_bm [N_TL];
  logic [N_TL-1:0] tl_done;
  for (genvar e = 0; e < N_TL; e++) begin : g_tl
    tl_mode_delay #(.N_X(N_X), .DEPTH(TL_DEPTH)) u_t (
      .clk, .rst_n, .clr, .upd, .cfg(tl_cfg[e]), .x,
      .inj_k(tl_jk[e]), .inj_m(tl_jm[e]), .done(tl_done[e])
    );
    assign tl_bk[e] = tl_cfg[e].bk;
    assign tl_bm[e] = tl_cfg[e].bm;
  end
  assign hist_done = tl_done[0];

  // ------------------------------------------------------- b and x = H b
  // build comes one cycle after sample, together with the source load; the
  // builder therefore registers b one cycle later from src_j
  logic build_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) build_d <= 1'b0;
    else        build_d <= build;
  end

  injection_builder #(
    .M_B(M_B), .N_LUMP(N_LUMP), .N_SW(N_SW), .N_TL(N_TL), .N_SRC(N_SRC)
  ) u_inj (
    .clk, .rst_n, .build(build_d),
    .lump_p, .lump_q, .lump_j, .sw_p, .sw_q, .sw_j,
    .tl_bk, .tl_bm, .tl_jk, .tl_jm, .src_b, .src_j, .b
  );

  // the solve starts one cycle after b is registered
  logic solve_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) solve_d <= 1'b0;
    else        solve_d <= solve_start;
  end

  mvm_solver #(.N_X(N_X), .M_B(M_B), .MULTS(MULTS)) u_mvm (
    .clk, .rst_n, .h_we, .h_row, .h_col, .h_data,
    .start(solve_d), .b, .x, .done(solve_done)
  );

  // ------------------------------------------------------------- outputs
  monitor_memory #(.N_X(N_X), .N_MON(N_MON), .DEPTH(MON_DEPTH)) u_mon (
    .clk, .rst_n, .clr, .store(upd), .sel(mon_sel), .x,
    .rd_ch(mon_rd_ch), .rd_addr(mon_rd_addr), .rd_data(mon_rd_data), .n_stored
  );

  output_interface #(.N_X(N_X), .N_DAC(N_DAC)) u_dac (
    .clk, .rst_n, .store(upd), .sel(dac_sel), .gain(dac_gain), .x,
    .code(dac_code), .strobe(dac_strobe), .n_clip
  );

endmodule
