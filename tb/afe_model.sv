// afe_model: behavioural model of the analog front end around the folding
// controller, for simulation only (not synthesizable). It stands for the input
// buffer, loop-control DAC with its gain stage, analog adder, bipolar
// threshold generator, window comparator and 8-bit sampling ADC.
//
//   DAC      latches dac_code on the rising clock edge; offset binary, 13
//            magnitude bits. The gain stage is assumed calibrated so that 2^q
//            codes give exactly 2*lambda at the summing node, times
//            (1 + gain_err).
//   adder    y = g + v_f, evaluated every tick_ns.
//   compare  cmp_pos = y > +lambda, cmp_neg = y < -lambda, with optional
//            hysteresis hyst_v (Schmitt trigger, +/-hyst_v/2 around each
//            threshold) and a propagation delay of cmp_delay_ns.
//   settling optional first-order settling of the DAC and gain stage with
//            time constant settle_tau_ns (0: the step is immediate).
//   mismatch optional fold-dependent error of the feedback step: at every
//            change of the fold count the step overshoots in its own
//            direction by fold_mis_v * |C_f before the change|, and the error
//            is held until the next change. This is a simple stand-in for the
//            threshold mismatch that grows with folding depth and drives the
//            C_f -> C_f - 1 -> C_f limit cycle; the fold count is taken from
//            the controller (cf_mon) only for this purpose; a jump of more
//            than one count (a reset), or fold_mis_v at 0, clears the error.
// Inside, the analog state advances on a 0.5 ns tick that is offset from
// the clock edges, so no analog update coincides with a clock edge.
//   ADC      samples y at the falling clock edge of every other cycle
//            (100 MS/s against the 200 MHz controller clock), quantises with
//            ADC_LSB_V per code (4 mV: lambda = 100 mV is 25 codes), saturates
//            to 8 bits two's complement,
//            and presents the code with adc_valid for one clock after the next
//            rising edge. g at the sampling instant is given out alongside, as
//            the reference for checking the reconstruction.
`timescale 1ns / 1ps
module afe_model #(
  parameter real ADC_LSB_V = 0.004   // ADC code size in volts
) (
  input  logic        clk,
  input  real         lambda_v,      // folding threshold, volts
  input  real         g_v,           // input signal, volts
  input  logic [13:0] dac_code,
  input  logic [3:0]  q,
  input  real         gain_err,
  input  real         hyst_v,        // comparator hysteresis, volts
  input  int          cmp_delay_ns,  // comparator delay, 0..15 ns
  input  real         settle_tau_ns, // DAC + gain-stage time constant
  input  real         fold_mis_v,    // step overshoot per unit |C_f|, volts
  input  logic signed [13:0] cf_mon, // controller fold count
  output logic        cmp_pos,
  output logic        cmp_neg,
  output logic        adc_valid,
  output logic [7:0]  adc_data,
  output real         y_v,
  output real         g_at_sample    // g at the instant of the sample now valid
);

  real vf_v = 0.0, vf_target = 0.0;
  logic pos_raw = 1'b0, neg_raw = 1'b0;
  logic [31:0] pos_hist = '0, neg_hist = '0;
  logic phase = 1'b0;
  logic [7:0] smp = '0;
  real g_smp = 0.0;
  logic smp_taken = 1'b0;

  initial begin
    adc_valid = 1'b0;
    adc_data = '0;
    g_at_sample = 0.0;
    cmp_pos = 1'b0;
    cmp_neg = 1'b0;
  end

  // DAC latch. dac_code follows cf_mon by one clock, so the mismatch term is
  // updated from the count seen one and two edges back.
  logic signed [13:0] cf_d = '0, cf_dd = '0;
  real mis_v = 0.0;
  always @(posedge clk) begin
    real mis_n;
    mis_n = mis_v;
    if (cf_d != cf_dd) mis_n = 0.0;   // a jump (reset) clears the error
    if (cf_d == cf_dd + 14'sd1) mis_n = fold_mis_v * real'((cf_dd < 0) ? -int'(cf_dd) : int'(cf_dd));
    if (cf_d == cf_dd - 14'sd1) mis_n = -fold_mis_v * real'((cf_dd < 0) ? -int'(cf_dd) : int'(cf_dd));
    if (fold_mis_v == 0.0) mis_n = 0.0;
    mis_v <= mis_n;
    cf_d  <= cf_mon;
    cf_dd <= cf_d;
    vf_target <= (real'(int'(dac_code) - 8192) * 2.0 * lambda_v / real'(1 << q)) * (1.0 + gain_err)
                 + mis_n;
  end

  // gain-stage settling and window comparator, on a 0.5 ns tick at x.25 / x.75 ns
  initial begin
    #0.25;
    forever begin
      if (settle_tau_ns <= 0.0) vf_v = vf_target;
      else vf_v = vf_v + (vf_target - vf_v) * (1.0 - $exp(-0.5 / settle_tau_ns));
      if (g_v + vf_v > lambda_v + hyst_v / 2.0)       pos_raw = 1'b1;
      else if (g_v + vf_v < lambda_v - hyst_v / 2.0)  pos_raw = 1'b0;
      if (g_v + vf_v < -lambda_v - hyst_v / 2.0)      neg_raw = 1'b1;
      else if (g_v + vf_v > -lambda_v + hyst_v / 2.0) neg_raw = 1'b0;
      pos_hist = {pos_hist[30:0], pos_raw};
      neg_hist = {neg_hist[30:0], neg_raw};
      cmp_pos  = pos_hist[2 * cmp_delay_ns];
      cmp_neg  = neg_hist[2 * cmp_delay_ns];
      #0.5;
    end
  end

  // adder
  assign y_v = g_v + vf_v;

  // ADC: sample mid-cycle on every other cycle
  always @(negedge clk) begin
    phase <= ~phase;
    smp_taken <= phase;
    if (phase) begin
      real c;
      int  ci;
      c  = y_v / ADC_LSB_V;
      ci = $rtoi((c >= 0.0) ? c + 0.5 : c - 0.5);
      if (ci > 127)  ci = 127;
      if (ci < -128) ci = -128;
      smp   <= 8'(ci);
      g_smp <= g_v;
    end
  end

  always @(posedge clk) begin
    adc_valid   <= smp_taken;
    if (smp_taken) begin
      adc_data    <= smp;
      g_at_sample <= g_smp;
    end
  end

endmodule
