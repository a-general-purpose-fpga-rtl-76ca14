// injection_builder: forms the right-hand side b of x = H*b for one step.
//
// Every row of b is the sum of the current sources attached to it: history
// sources of lumped elements and switches (injected into row p, drawn from
// row q), history sources of line modes (one row per mode end) and the
// independent sources. All rows are formed in parallel by an adder per row;
// rows of the modal transformation equations have no entry in b at all,
// which is what makes H n x (n-h). A row index of IDX_NONE (ground) or one
// beyond M_B is ignored. Parallel formation of b follows the document; the
// row-index scatter is this design's.
//
// Timing: on build the sum is registered; b is valid the next cycle and held.
module injection_builder
  import rts_pkg::*;
#(
  parameter int M_B    = 12,
  parameter int N_LUMP = 6,
  parameter int N_SW   = 3,
  parameter int N_TL   = 3,
  parameter int N_SRC  = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic build,
  input  idx_t lump_p [N_LUMP],
  input  idx_t lump_q [N_LUMP],
  input  fx_t  lump_j [N_LUMP],
  input  idx_t sw_p   [N_SW],
  input  idx_t sw_q   [N_SW],
  input  fx_t  sw_j   [N_SW],
  input  idx_t tl_bk  [N_TL],
  input  idx_t tl_bm  [N_TL],
  input  fx_t  tl_jk  [N_TL],
  input  fx_t  tl_jm  [N_TL],
  input  idx_t src_b  [N_SRC],
  input  fx_t  src_j  [N_SRC],
  output fx_t  b      [M_B]
);

  fx_t b_next [M_B];

  always_comb begin
    for (int r = 0; r < M_B; r++) begin
      b_next[r] = '0;
      for (int e = 0; e < N_LUMP; e++) begin
        if (int'(lump_p[e]) == r) b_next[r] = b_next[r] + lump_j[e];
        if (int'(lump_q[e]) == r) b_next[r] = b_next[r] - lump_j[e];
      end
      for (int e = 0; e < N_SW; e++) begin
        if (int'(sw_p[e]) == r) b_next[r] = b_next[r] + sw_j[e];
        if (int'(sw_q[e]) == r) b_next[r] = b_next[r] - sw_j[e];
      end
      for (int e = 0; e < N_TL; e++) begin
        if (int'(tl_bk[e]) == r) b_next[r] = b_next[r] + tl_jk[e];
        if (int'(tl_bm[e]) == r) b_next[r] = b_next[r] + tl_jm[e];
      end
      for (int e = 0; e < N_SRC; e++)
        if (int'(src_b[e]) == r) b_next[r] = b_next[r] + src_j[e];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < M_B; r++) b[r] <= '0;
    end else if (build) begin
      for (int r = 0; r < M_B; r++) b[r] <= b_next[r];
    end
  end

endmodule
