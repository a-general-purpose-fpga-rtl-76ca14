// monitor_memory: record of chosen network variables for the user interface.
//
// After each solution the variables picked by sel (indices into x) are
// written, one memory per channel, at the address of the current step;
// the write address wraps after DEPTH steps, so the memory holds the last
// DEPTH steps. The host reads any channel and step with a one-cycle latency.
// n_stored counts the steps written since the last clear. The document says
// only that the needed variables go to memory blocks for monitoring; the
// ring layout and the depth are this design's.
module monitor_memory
  import rts_pkg::*;
#(
  parameter int N_X   = 18,
  parameter int N_MON = 4,
  parameter int DEPTH = 1024   // power of two
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     store,
  input  idx_t                     sel [N_MON],
  input  fx_t                      x   [N_X],
  input  logic [$clog2(N_MON)-1:0] rd_ch,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output fx_t                      rd_data,
  output logic [31:0]              n_stored
);

  localparam int AW = $clog2(DEPTH);

  fx_t mem [N_MON][DEPTH];
  fx_t vsel [N_MON];

  for (genvar c = 0; c < N_MON; c++) begin : g_sel
    branch_voltage #(.N_X(N_X)) u_pick (.x(x), .p(sel[c]), .q(IDX_NONE), .v(vsel[c]));
  end

  logic [AW-1:0] wptr;
  assign wptr = n_stored[AW-1:0];

  always_ff @(posedge clk) begin
    if (store && !clr)
      for (int c = 0; c < N_MON; c++) mem[c][wptr] <= vsel[c];
    rd_data <= mem[rd_ch][rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     n_stored <= '0;
    else if (clr)   n_stored <= '0;
    else if (store) n_stored <= n_stored + 1;
  end

endmodule
