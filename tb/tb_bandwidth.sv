// tb_bandwidth: the bandwidth limit of the folding loop, measured with fast
// triangular inputs at 610 kHz, lambda = 360 mV (90 ADC codes), q = 7, at the
// top's default parameters and the ideal behavioural front end.
//
// Two numbers of this design set the limit. From a threshold crossing to the
// moment the DAC moves takes about seven clocks (comparator level through the
// two synchroniser flops, the FSM decision, the count, the DAC word register
// and the DAC latch); during that time y keeps moving past the threshold. And
// the FSM makes at most one fold every wait_cycles + 3 clocks (35 ns at the
// setting of 4), so it can follow a slope of at most 2*lambda / 35 ns, about
// 20.6 V/us here. The 8-bit ADC covers +/-510 mV, only 150 mV beyond lambda.
//
//   a  amplitude 0.38 V: the peak lies just above lambda and the slope turns
//      within the loop delay, so the fold lands after the input has started
//      to fall and is undone at once (the over-folding case). The count
//      records both folds, so the reconstruction must still be exact.
//   b  amplitude 1.2 V (2.9 V/us): the overshoot past lambda stays inside the
//      ADC range: exact reconstruction, no immediate undo.
//   c  amplitude 4 V (9.8 V/us): the loop still tracks (fold depth right) but
//      the overshoot clips the ADC, so some samples must be wrong.
//   d  amplitude 12 V (29 V/us): faster than one fold per 35 ns: the loop
//      under-folds and y leaves the window by more than a fold step.
// The checks in c and d expect the failure; a and b check every
// reconstructed sample to within one code.
`timescale 1ns / 1ps
module tb_bandwidth;
  import modadc_pkg::*;

  localparam real ADC_LSB = 0.004;
  localparam real LAMBDA  = 0.36;
  localparam real F_TRI   = 610.0e3;

  logic clk = 1'b0, rst_n = 1'b0;
  real  g_v = 0.0, y_v, g_smp;
  logic cmp_pos, cmp_neg, adc_valid;
  logic [7:0] adc_data;
  logic [DAC_BITS-1:0] dac_code;
  cfg_t cfg;
  logic cap_busy, cap_done;
  logic [ADC_BITS+REC_W-1:0] cap_data;
  logic signed [CF_W-1:0] cf, cf_used;
  fold_state_t st;
  flags_t flags;
  logic b2, sat_flag, dac_clamp, rec_valid, sat;
  logic signed [REC_W-1:0] rec;
  logic signed [ADC_BITS-1:0] folded;

  int checks = 0, failures = 0;
  real amp = 0.0, gmax = 0.0, ymax = 0.0;
  bit run = 1'b0, check_rec = 1'b0, expect_exact = 1'b1;
  longint t0;
  int max_abs_cf = 0, n_bad = 0, n_clip = 0, n_undo = 0, n_runs = 0;
  int last_fold_cycle = -100, cyc = 0;
  bit last_fold_up = 1'b0;

  modulo_adc_ctrl dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cmp_pos_i(cmp_pos), .cmp_neg_i(cmp_neg), .dac_code_o(dac_code),
    .adc_valid_i(adc_valid), .adc_data_i(adc_data),
    .cfg_i(cfg), .sat_clr_i(1'b0),
    .cap_arm_i(1'b0), .cap_busy_o(cap_busy), .cap_done_o(cap_done),
    .cap_rd_addr_i(16'd0), .cap_rd_data_o(cap_data),
    .cf_o(cf), .state_o(st), .flags_o(flags), .b2_o(b2), .sat_flag_o(sat_flag),
    .dac_clamp_o(dac_clamp), .rec_valid_o(rec_valid), .rec_o(rec), .folded_o(folded),
    .cf_used_o(cf_used), .sat_o(sat)
  );

  afe_model afe (
    .clk, .lambda_v(LAMBDA), .g_v, .dac_code, .q(cfg.q), .gain_err(0.0), .hyst_v(0.0),
    .cmp_delay_ns(0), .settle_tau_ns(0.0), .fold_mis_v(0.0), .cf_mon(cf),
    .cmp_pos, .cmp_neg, .adc_valid, .adc_data, .y_v, .g_at_sample(g_smp)
  );

  always #2.5 clk = ~clk;

  // triangle starting at 0, rising, peak amp at a quarter period
  function automatic real tri_wave(input real t);
    real p;
    p = t * F_TRI - $floor(t * F_TRI);
    if (p < 0.25) return 4.0 * p;
    if (p < 0.75) return 2.0 - 4.0 * p;
    return 4.0 * p - 4.0;
  endfunction

  always #1 begin
    if (run) begin
      g_v = amp * tri_wave(real'($time - t0) * 1.0e-9);
      if (g_v > gmax) gmax = g_v;
      if (-g_v > gmax) gmax = -g_v;
      if (y_v > ymax) ymax = y_v;
      if (-y_v > ymax) ymax = -y_v;
    end else g_v = 0.0;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%t FAIL %s", $time, what);
    end
  endtask

  real g_pair = 0.0;
  always @(posedge clk) if (adc_valid) g_pair <= g_smp;

  always @(negedge clk) begin
    cyc++;
    if (rst_n && run) begin
      if (int'(cf) > max_abs_cf) max_abs_cf = int'(cf);
      if (-int'(cf) > max_abs_cf) max_abs_cf = -int'(cf);
      // a fold reversed by the next possible decision counts as an undo
      if (st == ST_INCREASE || st == ST_DECREASE) begin
        if (cyc - last_fold_cycle <= int'(cfg.wait_cycles) + 4 &&
            last_fold_up != (st == ST_INCREASE))
          n_undo++;
        last_fold_cycle = cyc;
        last_fold_up = (st == ST_INCREASE);
      end
    end
    if (rst_n && run && check_rec && rec_valid) begin
      real err;
      err = real'(rec) - g_pair / ADC_LSB;
      if (folded == 127 || folded == -128) n_clip++;
      if (err > 1.0 || err < -1.0) n_bad++;
      if (expect_exact)
        chk(err <= 1.0 && err >= -1.0, $sformatf("amp %f: rec %0d vs %f", amp, rec, g_pair / ADC_LSB));
    end
  end

  task automatic triangle(input real a, input bit exact);
    rst_n = 1'b0;
    run = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    amp = a; expect_exact = exact;
    gmax = 0.0; ymax = 0.0; max_abs_cf = 0; n_bad = 0; n_clip = 0; n_undo = 0;
    t0 = $time;
    run = 1'b1;
    repeat (10) @(negedge clk);
    check_rec = 1'b1;
    repeat (int'(4.0 / F_TRI / 5.0e-9)) @(negedge clk);    // four periods
    check_rec = 1'b0;
    run = 1'b0;
    $display("amp %5.2f V: max|C_f|=%0d (peak needs %0d)  max|y|=%5.3f V  undone folds=%0d  clipped=%0d  wrong=%0d",
             a, max_abs_cf, $rtoi((gmax + LAMBDA) / (2.0 * LAMBDA)), ymax, n_undo, n_clip, n_bad);
    n_runs++;
  endtask

  initial begin
    cfg = '{q: 4'd7, cal_en: 1'b0, dv: 12'd102, wait_cycles: 8'd4, delay_d: 5'd3,
            two_lambda: 8'd180};
    // a: slope turns within the loop delay
    triangle(0.38, 1'b1);
    chk(n_undo > 0, "a: late fold undone at once");
    chk(max_abs_cf == 1, "a: fold depth");
    // b: inside both limits
    triangle(1.2, 1'b1);
    chk(n_undo == 0, "b: no undone folds");
    chk(max_abs_cf == $rtoi((gmax + LAMBDA) / (2.0 * LAMBDA)), "b: fold depth");
    chk(ymax < LAMBDA + 0.15, "b: overshoot inside the ADC range");
    // c: tracking holds, ADC clips
    triangle(4.0, 1'b0);
    chk(max_abs_cf == $rtoi((gmax + LAMBDA) / (2.0 * LAMBDA)), "c: fold depth still right");
    chk(ymax < 3.0 * LAMBDA, "c: no under-folding");
    chk(n_clip > 0 && n_bad > 0, "c: overshoot clips the ADC");
    // d: slope beyond one fold per wait_cycles + 3 clocks
    triangle(12.0, 1'b0);
    chk(ymax > 3.0 * LAMBDA, "d: loop under-folds");
    chk(n_bad > 0, "d: reconstruction fails");
    chk(n_runs == 4, "all cases run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
