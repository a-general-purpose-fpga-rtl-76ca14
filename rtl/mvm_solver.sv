// mvm_solver: the parallel solution of x = H * b, equation (8).
//
// N_X computational units, one for each element of the solution vector x,
// work at the same time on the same injection vector b; each unit holds one
// row of H. Because all units run in lock step, the done pulse of unit 0
// stands for all of them. Loading: h_we with row h_row and column h_col writes
// one entry H(h_row, h_col). Latency from start to done is
// ceil(M_B / MULTS) + 2 clock cycles, independent of N_X.
module mvm_solver
  import rts_pkg::*;
#(
  parameter int N_X   = 18,   // length of x (n)
  parameter int M_B   = 12,   // length of b (n - h)
  parameter int MULTS = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic h_we,
  input  idx_t h_row,
  input  idx_t h_col,
  input  fx_t  h_data,
  input  logic start,
  input  fx_t  b [M_B],
  output fx_t  x [N_X],
  output logic done
);

  logic [N_X-1:0] cu_done;

  for (genvar i = 0; i < N_X; i++) begin : g_cu
    compute_unit #(.M_B(M_B), .MULTS(MULTS)) u_cu (
      .clk    (clk),
      .rst_n  (rst_n),
      .h_we   (h_we && int'(h_row) == i),
      .h_col  (h_col),
      .h_data (h_data),
      .start  (start),
      .b      (b),
      .x      (x[i]),
      .done   (cu_done[i])
    );
  end

  assign done = cu_done[0];

  // all units must finish together
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               cu_done[0] |-> &cu_done);

endmodule
