// famnm_switch: discrete-time switch model with a fixed conductance.
//
// The switch is a conductance gs, the same in both states, in parallel with a
// current source J; its current is i_s = gs*v_s - J. Because gs never changes,
// the network matrix and H stay constant when the switch operates; only J
// does. Following the document's rule, at each step
//   J(n+1) = -i_s(n)      while the switch is on  (acts as a small inductor)
//   J(n+1) = gs * v_s(n)  while the switch is off (acts as a small capacitor)
// J is injected into row p of b and drawn from row q.
//
// Timing: upd is pulsed once per step after x(n) is valid, with on giving the
// switch state for the coming step; inj holds J(n+1) from the next cycle.
// toggled pulses on an update that follows a change of state.
module famnm_switch
  import rts_pkg::*;
#(
  parameter int N_X = 18
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    upd,
  input  logic    on,
  input  sw_cfg_t cfg,
  input  fx_t     x [N_X],
  output fx_t     inj,
  output logic    toggled
);

  fx_t  v, gv, j_src, i_s;
  logic on_q;

  branch_voltage #(.N_X(N_X)) u_v (.x(x), .p(cfg.p), .q(cfg.q), .v(v));

  assign gv  = fx_mul(cfg.gs, v);
  assign i_s = gv - j_src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j_src   <= '0;
      on_q    <= 1'b0;
      toggled <= 1'b0;
    end else begin
      toggled <= 1'b0;
      if (clr) begin
        j_src <= '0;
        on_q  <= 1'b0;
      end else if (upd) begin
        j_src   <= on ? -i_s : gv;
        on_q    <= on;
        toggled <= on != on_q;
      end
    end
  end

  assign inj = j_src;

endmodule
