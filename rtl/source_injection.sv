// source_injection: injected currents of the independent sources.
//
// Each source is a voltage behind a series conductance g, entered in Norton
// form: its conductance is part of the fixed network matrix and the unit
// injects the current g * value into one row of b. The value comes either from
// an analog input channel (the real inputs of a hardware-in-the-loop test) or
// from a value written by the host. The document says that injected currents
// are formed each step and that analog inputs feed the solver; the Norton form
// and the choice per source between the two origins are this design's.
//
// Timing: on the load pulse all N_SRC currents are computed in parallel and
// held in inj from the next cycle until the next load.
module source_injection
  import rts_pkg::*;
#(
  parameter int N_SRC = 3,
  parameter int N_ADC = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  src_cfg_t cfg    [N_SRC],
  input  fx_t      adc_v  [N_ADC],
  output fx_t      inj    [N_SRC]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SRC; s++) inj[s] <= '0;
    end else if (load) begin
      for (int s = 0; s < N_SRC; s++) begin
        fx_t val;
        val = cfg[s].value;
        if (cfg[s].from_adc) begin
          val = '0;
          for (int c = 0; c < N_ADC; c++)
            if (int'(cfg[s].ch) == c) val = adc_v[c];
        end
        inj[s] <= fx_mul(cfg[s].g, val);
      end
    end
  end

endmodule
