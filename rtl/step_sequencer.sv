// step_sequencer: the per-step control flow of the solver.
//
// A step timer raises a tick every dt_cycles clock cycles while run is set;
// the tick starts one simulation step, which walks through the stages of the
// algorithm in order:
//   SAMPLE  latch the analog inputs and switch states, compute source currents
//   BUILD   form the injection vector b from all current sources
//   SOLVE   start x = H*b in all computational units and wait for solve_done
//   UPDATE  update the history terms of lumped elements and switches, write
//           the line delay memories, store the monitored variables and refresh
//           the outputs; wait for hist_done from the line units
// The order of the stages is the document's; the timer, the single-cycle
// stages and the overrun policy are this design's. A tick that arrives while
// a step is still running is an overrun: it is counted and dropped, since the
// step then cannot keep up with real time. The sequencer reports the number
// of steps, the cycles taken by the last step and the largest such count.
// clr (from the host) returns everything to the start of a run.
module step_sequencer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        run,
  input  logic [31:0] dt_cycles,
  input  logic        solve_done,
  input  logic        hist_done,
  output logic        sample,
  output logic        build,
  output logic        solve_start,
  output logic        upd,
  output logic        step_done,
  output logic        busy,
  output logic [31:0] n_steps,
  output logic [31:0] last_cycles,
  output logic [31:0] max_cycles,
  output logic [31:0] n_overrun
);

  typedef enum logic [2:0] {S_IDLE, S_SAMPLE, S_BUILD, S_SOLVE, S_WSOLVE, S_UPDATE, S_WHIST} state_e;
  state_e state;

  logic [31:0] timer, cyc;
  logic        tick;

  assign tick = run && (timer + 1 >= dt_cycles);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0;
    end else if (clr || !run || tick) begin
      timer <= '0;
    end else begin
      timer <= timer + 1;
    end
  end

  assign busy = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      sample      <= 1'b0;
      build       <= 1'b0;
      solve_start <= 1'b0;
      upd         <= 1'b0;
      step_done   <= 1'b0;
      cyc         <= '0;
      n_steps     <= '0;
      last_cycles <= '0;
      max_cycles  <= '0;
      n_overrun   <= '0;
    end else begin
      sample      <= 1'b0;
      build       <= 1'b0;
      solve_start <= 1'b0;
      upd         <= 1'b0;
      step_done   <= 1'b0;
      if (clr) begin
        state       <= S_IDLE;
        cyc         <= '0;
        n_steps     <= '0;
        last_cycles <= '0;
        max_cycles  <= '0;
        n_overrun   <= '0;
      end else begin
        if (state != S_IDLE) cyc <= cyc + 1;
        if (tick && state != S_IDLE) n_overrun <= n_overrun + 1;
        unique case (state)
          S_IDLE: if (tick) begin
            sample <= 1'b1;
            cyc    <= 32'd1;
            state  <= S_SAMPLE;
          end
          S_SAMPLE: begin
            build <= 1'b1;
            state <= S_BUILD;
          end
          S_BUILD: begin
            solve_start <= 1'b1;
            state       <= S_SOLVE;
          end
          S_SOLVE:  state <= S_WSOLVE;
          S_WSOLVE: if (solve_done) begin
            upd   <= 1'b1;
            state <= S_UPDATE;
          end
          S_UPDATE: state <= S_WHIST;
          S_WHIST: if (hist_done) begin
            step_done   <= 1'b1;
            n_steps     <= n_steps + 1;
            last_cycles <= cyc + 1;
            if (cyc + 1 > max_cycles) max_cycles <= cyc + 1;
            state       <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  a_one_stage: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0({sample, build, solve_start, upd}));

endmodule
