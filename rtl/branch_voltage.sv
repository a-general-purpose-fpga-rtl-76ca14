// branch_voltage: voltage across a branch, v = x(p) - x(q).
//
// Combinational gather from the solution vector. An index equal to IDX_NONE
// or beyond the vector stands for the ground node and reads as zero. Used by
// every history unit to see the node voltages of the element it models.
module branch_voltage
  import rts_pkg::*;
#(
  parameter int N_X = 18
) (
  input  fx_t  x [N_X],
  input  idx_t p,
  input  idx_t q,
  output fx_t  v
);

  fx_t vp, vq;
  always_comb begin
    vp = '0;
    vq = '0;
    for (int i = 0; i < N_X; i++) begin
      if (int'(p) == i) vp = x[i];
      if (int'(q) == i) vq = x[i];
    end
    v = vp - vq;
  end

endmodule
