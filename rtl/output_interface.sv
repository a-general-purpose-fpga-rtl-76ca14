// output_interface: analog output codes of chosen network variables.
//
// For each output channel the variable x(sel) is multiplied by a gain in
// codes per unit and rounded toward minus infinity to a signed DAC_BITS-bit
// code, saturating at full scale; the codes are updated together with a
// one-cycle strobe on each store pulse, once per step. The document counts
// sending the outputs in the step time; channel selection, gain and
// saturation are this design's.
module output_interface
  import rts_pkg::*;
#(
  parameter int N_X   = 18,
  parameter int N_DAC = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       store,
  input  idx_t                       sel  [N_DAC],
  input  fx_t                        gain [N_DAC],
  input  fx_t                        x    [N_X],
  output logic signed [DAC_BITS-1:0] code [N_DAC],
  output logic                       strobe,
  output logic [31:0]                n_clip
);

  localparam fx_t CMAX = fx_t'((64'sd1 <<< (DAC_BITS - 1)) - 1);
  localparam fx_t CMIN = -fx_t'(64'sd1 <<< (DAC_BITS - 1));

  fx_t v    [N_DAC];
  fx_t cval [N_DAC];

  for (genvar c = 0; c < N_DAC; c++) begin : g_ch
    branch_voltage #(.N_X(N_X)) u_pick (.x(x), .p(sel[c]), .q(IDX_NONE), .v(v[c]));
    assign cval[c] = fx_mul(v[c], gain[c]) >>> FW;   // whole codes
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_DAC; c++) code[c] <= '0;
      strobe <= 1'b0;
      n_clip <= '0;
    end else begin
      strobe <= store;
      if (store) begin
        logic [31:0] nc;
        nc = n_clip;
        for (int c = 0; c < N_DAC; c++) begin
          if (cval[c] > CMAX) begin
            code[c] <= DAC_BITS'(CMAX);
            nc = nc + 1;
          end else if (cval[c] < CMIN) begin
            code[c] <= DAC_BITS'(CMIN);
            nc = nc + 1;
          end else begin
            code[c] <= DAC_BITS'(cval[c]);
          end
        end
        n_clip <= nc;
      end
    end
  end

endmodule
