// compute_unit: one computational unit CU(i) of the network solver.
//
// It computes one element of the solution, x(i) = sum_j H(i,j) * b(j), the
// dot product of row i of the reduced inverse matrix H with the injection
// vector b. The unit holds its own row of H in MULTS memory banks, column j
// living in bank j % MULTS at address j / MULTS, so that MULTS products are
// formed in every cycle and summed by an adder tree; an accumulator adds the
// partial sums of the ceil(M_B / MULTS) passes. One unit per element of x and a
// user-chosen number of parallel multipliers per unit follow the document; the
// bank layout, the two-stage pipeline and the number format are this design's.
//
// Interface: the host writes H(i,j) through h_we/h_col/h_data at any time the
// unit is idle. A one-cycle start pulse begins a product with the b vector,
// which must stay stable until done. x is valid and done pulses
// NPASS + 2 cycles after start.
module compute_unit
  import rts_pkg::*;
#(
  parameter int M_B   = 12,   // length of b (n - h)
  parameter int MULTS = 4     // parallel multipliers in the unit
) (
  input  logic clk,
  input  logic rst_n,
  // H row loading
  input  logic h_we,
  input  idx_t h_col,
  input  fx_t  h_data,
  // product
  input  logic start,
  input  fx_t  b [M_B],
  output fx_t  x,
  output logic done
);

  localparam int NPASS = (M_B + MULTS - 1) / MULTS;
  localparam int PW    = (NPASS > 1) ? $clog2(NPASS) : 1;

  // row of H, one memory per multiplier
  fx_t hmem [MULTS][NPASS];

  logic [PW-1:0] wr_addr;
  int unsigned   wr_bank;
  assign wr_addr = PW'(int'(h_col) / MULTS);
  assign wr_bank = int'(h_col) % MULTS;

  always_ff @(posedge clk) begin
    if (h_we && int'(h_col) < M_B) hmem[wr_bank][wr_addr] <= h_data;
  end

  // pass counter
  logic          busy;
  logic [PW-1:0] pass;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      pass <= '0;
    end else if (start) begin
      busy <= 1'b1;
      pass <= '0;
    end else if (busy) begin
      if (int'(pass) == NPASS - 1) busy <= 1'b0;
      else                         pass <= pass + 1'b1;
    end
  end

  // stage 1: read H and the matching slice of b
  fx_t  h_q [MULTS];
  fx_t  b_q [MULTS];
  logic v1, first1, last1;
  always_ff @(posedge clk) begin
    for (int k = 0; k < MULTS; k++) begin
      int col;
      col = int'(pass) * MULTS + k;
      h_q[k] <= hmem[k][pass];
      b_q[k] <= (col < M_B) ? b[col] : '0;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0;
    end else begin
      v1     <= busy;
      first1 <= busy && pass == '0;
      last1  <= busy && int'(pass) == NPASS - 1;
    end
  end

  // stage 2: multipliers, adder tree, accumulator
  fx_t psum;
  always_comb begin
    psum = '0;
    for (int k = 0; k < MULTS; k++) psum = psum + fx_mul(h_q[k], b_q[k]);
  end

  fx_t acc;
  fx_t acc_next;
  assign acc_next = (first1 ? fx_t'(0) : acc) + psum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      x    <= '0;
      done <= 1'b0;
    end else begin
      done <= v1 && last1;
      if (v1) acc <= acc_next;
      if (v1 && last1) x <= acc_next;
    end
  end

endmodule
