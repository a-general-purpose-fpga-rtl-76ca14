// lumped_companion: history source of an inductor or capacitor.
//
// Under backward-Euler integration a lumped element between nodes p and q is
// a conductance g in parallel with a history current source; the conductance
// sits in the fixed matrix, and only the source is computed here. With branch
// current i = g*v + ih (flowing p to q):
//   inductor  (g = dt/L): ih(n+1) = g*v(n) + ih(n)   (the branch current)
//   capacitor (g = C/dt): ih(n+1) = -g*v(n)
// The unit injects inj = -ih into row p of b and +ih into row q (the
// injection builder applies the sign of q). The document names backward Euler
// and the companion model; the arrangement of this unit is this design's.
//
// Timing: upd is pulsed once per time step after x(n) is valid; inj holds the
// history source for step n+1 from the next cycle on. clr resets the history.
module lumped_companion
  import rts_pkg::*;
#(
  parameter int N_X = 18
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,
  input  logic      upd,
  input  lump_cfg_t cfg,
  input  fx_t       x [N_X],
  output fx_t       inj
);

  fx_t v, gv, ih;

  branch_voltage #(.N_X(N_X)) u_v (.x(x), .p(cfg.p), .q(cfg.q), .v(v));

  assign gv = fx_mul(cfg.g, v);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ih <= '0;
    else if (clr) ih <= '0;
    else if (upd) ih <= (cfg.kind == LUMP_L) ? gv + ih : -gv;
  end

  assign inj = -ih;

endmodule
