// adc_interface: analog inputs of the solver.
//
// The converter module delivers one signed ADC_BITS-bit code per channel
// with a one-cycle adc_valid strobe per conversion (1 MS/s in the reference
// platform). The interface keeps the newest set of codes and, on the sample
// pulse given at the start of each time step, converts them to solver
// numbers, value = code * scale, with a host-set scale per channel (for
// instance volts per code of the signal conditioning). fresh tells whether a
// new conversion arrived since the previous step; n_conv counts conversions.
// The document gives the converter and its rate; the strobe interface and the
// scaling are this design's.
module adc_interface
  import rts_pkg::*;
#(
  parameter int N_ADC = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       adc_valid,
  input  logic signed [ADC_BITS-1:0] adc_code [N_ADC],
  input  fx_t                        scale    [N_ADC],
  input  logic                       sample,
  output fx_t                        value    [N_ADC],
  output logic                       fresh,
  output logic [31:0]                n_conv
);

  logic signed [ADC_BITS-1:0] code_q [N_ADC];
  logic                       new_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_ADC; c++) begin
        code_q[c] <= '0;
        value[c]  <= '0;
      end
      new_q  <= 1'b0;
      fresh  <= 1'b0;
      n_conv <= '0;
    end else begin
      if (adc_valid) begin
        for (int c = 0; c < N_ADC; c++) code_q[c] <= adc_code[c];
        n_conv <= n_conv + 1;
      end
      if (sample) begin
        for (int c = 0; c < N_ADC; c++)
          value[c] <= fx_t'(code_q[c]) * scale[c];
        fresh <= new_q;
        new_q <= adc_valid;
      end else if (adc_valid) begin
        new_q <= 1'b1;
      end
    end
  end

endmodule
