// host_interface: memory-mapped link between the real-time processor and
// the solver.
//
// The processor that builds and inverts the network matrix sends the
// simulation parameters, the switch states and the matrix H to the FPGA and
// reads results back. Here that link is a simple synchronous bus: a write
// (we, addr, wdata) takes one cycle; a read (re, addr) returns rdata with
// rvalid one cycle later. Address bits [19:16] select a region, [15:0] an
// offset within it:
//   0 control  w: 0 ctrl {bit1 clear pulse, bit0 run}, 1 step period in
//                 cycles, 2 switch states (bit e = switch e on)
//              r: 0 {busy, run}, 1 period, 2 switch states, 3 steps done,
//                 4 cycles of last step, 5 most cycles of a step,
//                 6 overruns, 7 monitored steps, 8 conversions, 9 clipped
//                 outputs
//   1 H        w: offset {row[15:8], col[7:0]}, passed to the solver
//   2 lumped   w: offset {element, field}: 0 kind, 1 p, 2 q, 3 g
//   3 switch   w: offset {element, field}: 0 p, 1 q, 2 gs
//   4 line     w: offset {mode, field}: 0 vk, 1 vm, 2 bk, 3 bm, 4 g2,
//                 5 k_far, 6 k_near, 7 dly, 8 frac
//   5 source   w: offset {source, field}: 0 b, 1 from_adc, 2 ch, 3 g, 4 value
//   6 io       w: offset {channel, field}: 0 analog input scale,
//                 1 monitor select, 2 output select, 3 output gain
//   7 monitor  r: offset {channel[15:12], step[11:0]}
// (field = offset[3:0], element = offset[15:4]). The document only says
// which data cross this link; the bus, the map and the reset values are this
// design's. Reset leaves indices at ground and coefficients at zero.
module host_interface
  import rts_pkg::*;
#(
  parameter int          N_LUMP    = 6,
  parameter int          N_SW      = 3,
  parameter int          N_TL      = 3,
  parameter int          N_SRC     = 3,
  parameter int          N_ADC     = 4,
  parameter int          N_MON     = 4,
  parameter int          MON_DEPTH = 1024,
  parameter int          N_DAC     = 4,
  parameter int unsigned DT_RESET  = 160
) (
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic        we,
  input  logic        re,
  input  logic [19:0] addr,
  input  logic [63:0] wdata,
  output logic [63:0] rdata,
  output logic        rvalid,
  // control
  output logic        run,
  output logic        clr,
  output logic [31:0] dt_cycles,
  output logic [N_SW-1:0] sw_on,
  // H loading
  output logic        h_we,
  output idx_t        h_row,
  output idx_t        h_col,
  output fx_t         h_data,
  // configuration
  output lump_cfg_t   lump_cfg [N_LUMP],
  output sw_cfg_t     sw_cfg   [N_SW],
  output tl_cfg_t     tl_cfg   [N_TL],
  output src_cfg_t    src_cfg  [N_SRC],
  output fx_t         adc_scale[N_ADC],
  output idx_t        mon_sel  [N_MON],
  output idx_t        dac_sel  [N_DAC],
  output fx_t         dac_gain [N_DAC],
  // status
  input  logic        busy,
  input  logic [31:0] n_steps,
  input  logic [31:0] last_cycles,
  input  logic [31:0] max_cycles,
  input  logic [31:0] n_overrun,
  input  logic [31:0] n_stored,
  input  logic [31:0] n_conv,
  input  logic [31:0] n_clip,
  // monitor memory read port
  output logic [$clog2(N_MON)-1:0]     mon_rd_ch,
  output logic [$clog2(MON_DEPTH)-1:0] mon_rd_addr,
  input  fx_t                          mon_rd_data
);

  // index widths of the configuration arrays
  localparam int LW = (N_LUMP > 1) ? $clog2(N_LUMP) : 1;
  localparam int SW = (N_SW   > 1) ? $clog2(N_SW)   : 1;
  localparam int TW = (N_TL   > 1) ? $clog2(N_TL)   : 1;
  localparam int QW = (N_SRC  > 1) ? $clog2(N_SRC)  : 1;
  localparam int AW = (N_ADC  > 1) ? $clog2(N_ADC)  : 1;
  localparam int MW = (N_MON  > 1) ? $clog2(N_MON)  : 1;
  localparam int DW2 = (N_DAC > 1) ? $clog2(N_DAC)  : 1;

  logic [3:0]  region;
  logic [11:0] elem;
  logic [3:0]  field;
  assign region = addr[19:16];
  assign elem   = addr[15:4];
  assign field  = addr[3:0];

  // H writes go straight through
  assign h_we   = we && region == 4'd1;
  assign h_row  = idx_t'(addr[15:8]);
  assign h_col  = idx_t'(addr[7:0]);
  assign h_data = fx_t'(wdata);

  assign mon_rd_ch   = $bits(mon_rd_ch)'(addr[15:12]);
  assign mon_rd_addr = $bits(mon_rd_addr)'(addr[11:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      clr       <= 1'b0;
      dt_cycles <= DT_RESET;
      sw_on     <= '0;
      for (int e = 0; e < N_LUMP; e++) lump_cfg[e] <= '{kind: LUMP_L, p: IDX_NONE, q: IDX_NONE, g: '0};
      for (int e = 0; e < N_SW; e++)   sw_cfg[e]   <= '{p: IDX_NONE, q: IDX_NONE, gs: '0};
      for (int e = 0; e < N_TL; e++)
        tl_cfg[e] <= '{vk: IDX_NONE, vm: IDX_NONE, bk: IDX_NONE, bm: IDX_NONE,
                       g2: '0, k_far: '0, k_near: '0, dly: DLYW'(1), frac: '0};
      for (int e = 0; e < N_SRC; e++)
        src_cfg[e] <= '{b: IDX_NONE, from_adc: 1'b0, ch: '0, g: '0, value: '0};
      for (int c = 0; c < N_ADC; c++) adc_scale[c] <= '0;
      for (int c = 0; c < N_MON; c++) mon_sel[c]   <= IDX_NONE;
      for (int c = 0; c < N_DAC; c++) begin
        dac_sel[c]  <= IDX_NONE;
        dac_gain[c] <= '0;
      end
    end else begin
      clr <= 1'b0;
      if (we) begin
        unique case (region)
          4'd0: unique case (addr[15:0])
            16'd0: begin run <= wdata[0]; clr <= wdata[1]; end
            16'd1: dt_cycles <= wdata[31:0];
            16'd2: sw_on     <= wdata[N_SW-1:0];
            default: ;
          endcase
          4'd2: if (int'(elem) < N_LUMP) unique case (field)
            4'd0: lump_cfg[LW'(elem)].kind <= lump_kind_e'(wdata[0]);
            4'd1: lump_cfg[LW'(elem)].p    <= idx_t'(wdata);
            4'd2: lump_cfg[LW'(elem)].q    <= idx_t'(wdata);
            4'd3: lump_cfg[LW'(elem)].g    <= fx_t'(wdata);
            default: ;
          endcase
          4'd3: if (int'(elem) < N_SW) unique case (field)
            4'd0: sw_cfg[SW'(elem)].p  <= idx_t'(wdata);
            4'd1: sw_cfg[SW'(elem)].q  <= idx_t'(wdata);
            4'd2: sw_cfg[SW'(elem)].gs <= fx_t'(wdata);
            default: ;
          endcase
          4'd4: if (int'(elem) < N_TL) unique case (field)
            4'd0: tl_cfg[TW'(elem)].vk     <= idx_t'(wdata);
            4'd1: tl_cfg[TW'(elem)].vm     <= idx_t'(wdata);
            4'd2: tl_cfg[TW'(elem)].bk     <= idx_t'(wdata);
            4'd3: tl_cfg[TW'(elem)].bm     <= idx_t'(wdata);
            4'd4: tl_cfg[TW'(elem)].g2     <= fx_t'(wdata);
            4'd5: tl_cfg[TW'(elem)].k_far  <= fx_t'(wdata);
            4'd6: tl_cfg[TW'(elem)].k_near <= fx_t'(wdata);
            4'd7: tl_cfg[TW'(elem)].dly    <= DLYW'(wdata);
            4'd8: tl_cfg[TW'(elem)].frac   <= fx_t'(wdata);
            default: ;
          endcase
          4'd5: if (int'(elem) < N_SRC) unique case (field)
            4'd0: src_cfg[QW'(elem)].b        <= idx_t'(wdata);
            4'd1: src_cfg[QW'(elem)].from_adc <= wdata[0];
            4'd2: src_cfg[QW'(elem)].ch       <= wdata[3:0];
            4'd3: src_cfg[QW'(elem)].g        <= fx_t'(wdata);
            4'd4: src_cfg[QW'(elem)].value    <= fx_t'(wdata);
            default: ;
          endcase
          4'd6: unique case (field)
            4'd0: if (int'(elem) < N_ADC) adc_scale[AW'(elem)] <= fx_t'(wdata);
            4'd1: if (int'(elem) < N_MON) mon_sel[MW'(elem)]   <= idx_t'(wdata);
            4'd2: if (int'(elem) < N_DAC) dac_sel[DW2'(elem)]   <= idx_t'(wdata);
            4'd3: if (int'(elem) < N_DAC) dac_gain[DW2'(elem)]  <= fx_t'(wdata);
            default: ;
          endcase
          default: ;
        endcase
      end
    end
  end

  // reads: status words are captured with the request, monitor data come
  // from the memory one cycle later
  logic        rd_mon;
  logic [63:0] stat_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rd_mon <= 1'b0;
      stat_q <= '0;
    end else begin
      rvalid <= re;
      rd_mon <= re && region == 4'd7;
      if (re) begin
        unique case (addr[15:0])
          16'd0:   stat_q <= 64'({busy, run});
          16'd1:   stat_q <= 64'(dt_cycles);
          16'd2:   stat_q <= 64'(sw_on);
          16'd3:   stat_q <= 64'(n_steps);
          16'd4:   stat_q <= 64'(last_cycles);
          16'd5:   stat_q <= 64'(max_cycles);
          16'd6:   stat_q <= 64'(n_overrun);
          16'd7:   stat_q <= 64'(n_stored);
          16'd8:   stat_q <= 64'(n_conv);
          16'd9:   stat_q <= 64'(n_clip);
          default: stat_q <= '0;
        endcase
      end
    end
  end

  assign rdata = rd_mon ? 64'(mon_rd_data) : stat_q;

endmodule
