// direct_recovery: real-time reconstruction of the high-dynamic-range signal
// from the folded ADC samples and the fold count,
//     g~[k] = y^[k] - 2*lambda * C_f[n_k - d].
//
// C_f changes at the 200 MHz controller rate while the ADC samples at 100 MHz,
// so the block keeps the last D_MAX values of C_f in a shift register clocked
// every controller cycle. When an ADC sample arrives (adc_valid_i), the count
// from d cycles earlier is picked, where d (delay_i) covers the DAC, analog and
// ADC pipeline latency between a change of C_f and its effect on the sample.
// 2*lambda is given in ADC LSBs (two_lambda_i; 50 for lambda = 100 mV with the
// ADC used here, where lambda is 25 LSBs).
//
// This design's own choices: the ADC data are taken as two's complement, the
// ADC strobe is a clock enable in the controller domain, and the result is a
// REC_W-bit signed word registered one cycle after the strobe (rec_valid_o).
module direct_recovery
  import modadc_pkg::*;
#(
  parameter int D_MAX = 32   // delay taps: d = 0 .. D_MAX-1
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic signed [CF_W-1:0]        cf_i,
  input  logic                          adc_valid_i,
  input  logic signed [ADC_BITS-1:0]    adc_data_i,
  input  logic [$clog2(D_MAX)-1:0]      delay_i,
  input  logic [TWOL_W-1:0]             two_lambda_i,
  output logic                          rec_valid_o,
  output logic signed [REC_W-1:0]       rec_o,        // g~[k]
  output logic signed [ADC_BITS-1:0]    folded_o,     // y^[k], aligned with rec_o
  output logic signed [CF_W-1:0]        cf_used_o     // C_f[n_k - d]
);

  logic signed [CF_W-1:0] hist_q [D_MAX];
  logic signed [CF_W-1:0] cf_sel;

  // hist_q[0] is C_f[n-1] relative to the current cycle's C_f[n] = cf_i.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < D_MAX; i++) hist_q[i] <= '0;
    end else begin
      hist_q[0] <= cf_i;
      for (int i = 1; i < D_MAX; i++) hist_q[i] <= hist_q[i-1];
    end
  end

  assign cf_sel = (delay_i == '0) ? cf_i : hist_q[delay_i - 1'b1];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rec_valid_o <= 1'b0;
      rec_o       <= '0;
      folded_o    <= '0;
      cf_used_o   <= '0;
    end else begin
      rec_valid_o <= adc_valid_i;
      if (adc_valid_i) begin
        rec_o     <= REC_W'(adc_data_i) - REC_W'(cf_sel) * $signed(REC_W'(two_lambda_i));
        folded_o  <= adc_data_i;
        cf_used_o <= cf_sel;
      end
    end
  end

endmodule
