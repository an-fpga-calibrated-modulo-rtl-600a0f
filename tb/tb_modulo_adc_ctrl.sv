// tb_modulo_adc_ctrl: end-to-end test of the folding controller in closed loop
// with a behavioural analog front end (afe_model), at the top's default
// parameters (50,000-sample capture memory).
//
// lambda = 100 mV, so lambda is 25 ADC codes and 2*lambda = 50 codes. The
// recovery delay d = 3 matches the loop: the count register feeds the DAC
// register, the DAC latches one clock later, and the ADC sample enters the
// recovery one clock after it was taken. Phases, each started from reset:
//   A  sine, rho = 2.84, 100 kHz, q = 7             (one period)
//   B  sine, rho = 22.2, 10 kHz,  q = 9             (one period)
//   C  sine, rho = 102,  1 kHz,   q = 7, capture    (one period)
//   D  sine, rho = 10,   10 kHz,  q = 11 (C_f limit 3): saturation
//   E  sine, rho = 3,    10 kHz,  q = 7, calibration on, dV = 102/16 LSB
//      (about 10 mV at the summing node)
//   F  sine, rho = 22.2, 10 kHz, q = 7, front end with 4 ns comparator delay,
//      3.5 mV hysteresis and 0.5 ns DAC settling; settling time 6 clocks
//   G  as A but with a settling time of 2 clocks, shorter than the loop
//      latency: the test expects over-folding here (stale flags)
//   H  sine, rho = 22.2, 10 kHz, q = 7, fold step overshooting by 9.5 mV per
//      unit |C_f|: without calibration the folds rattle (limit cycle), with
//      dV = 102/16 LSB the period takes the nominal 44 folds again
// Checks: each reconstructed sample against g at the sampling instant
// (within 1 code, or within the calibration offset in phase E), folded
// samples staying near the +/-lambda window, the DAC word against C_f*2^q
// plus the offset, the capture memory against the reconstructed stream, and
// that every mechanism (increase, decrease, WAIT held by B2, saturation,
// calibration offset, q switch, capture, over-folding with a too-short WAIT,
// mismatch limit cycle and its removal by calibration) happened at least once. The settling time is 4 clocks except in F and G.
`timescale 1ns / 1ps
module tb_modulo_adc_ctrl;
  import modadc_pkg::*;

  localparam real LAMBDA = 0.1;
  localparam real PI = 3.14159265358979;
  localparam int  CAP_DEPTH = 50000;

  logic clk = 1'b0, rst_n = 1'b0;
  real  g_v = 0.0, y_v, g_smp, gain_err = 0.0;
  real  hyst = 0.0, tau = 0.0, mis = 0.0;
  int   cdel = 0;
  logic cmp_pos, cmp_neg, adc_valid;
  logic [7:0] adc_data;
  logic [DAC_BITS-1:0] dac_code;
  cfg_t cfg;
  logic sat_clr = 1'b0, cap_arm = 1'b0;
  logic cap_busy, cap_done;
  logic [15:0] cap_addr = '0;
  logic [ADC_BITS+REC_W-1:0] cap_data;
  logic signed [CF_W-1:0] cf, cf_used;
  fold_state_t st;
  flags_t flags;
  logic b2, sat_flag, dac_clamp, rec_valid, sat;
  logic signed [REC_W-1:0] rec;
  logic signed [ADC_BITS-1:0] folded;

  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_waithold = 0, n_sat = 0, n_cal = 0, n_cap = 0, n_qsw = 0;
  int n_limcyc = 0, n_calfix = 0;
  int max_abs_cf = 0;
  int n_outside = 0;        // folded samples outside the window, any phase
  real amp = 0.0, freq = 1.0;
  bit run = 1'b0, check_rec = 1'b0;
  real rec_tol = 1.0;
  longint t0;
  logic [ADC_BITS+REC_W-1:0] cap_ref [CAP_DEPTH];
  int cap_n = 0;
  bit cap_track = 1'b0;

  modulo_adc_ctrl dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cmp_pos_i(cmp_pos), .cmp_neg_i(cmp_neg), .dac_code_o(dac_code),
    .adc_valid_i(adc_valid), .adc_data_i(adc_data),
    .cfg_i(cfg), .sat_clr_i(sat_clr),
    .cap_arm_i(cap_arm), .cap_busy_o(cap_busy), .cap_done_o(cap_done),
    .cap_rd_addr_i(cap_addr), .cap_rd_data_o(cap_data),
    .cf_o(cf), .state_o(st), .flags_o(flags), .b2_o(b2), .sat_flag_o(sat_flag),
    .dac_clamp_o(dac_clamp), .rec_valid_o(rec_valid), .rec_o(rec), .folded_o(folded),
    .cf_used_o(cf_used), .sat_o(sat)
  );

  afe_model afe (
    .clk, .lambda_v(LAMBDA), .g_v, .dac_code, .q(cfg.q), .gain_err, .hyst_v(hyst), .cmp_delay_ns(cdel), .settle_tau_ns(tau),
    .fold_mis_v(mis), .cf_mon(cf), .cmp_pos, .cmp_neg,
    .adc_valid, .adc_data, .y_v, .g_at_sample(g_smp)
  );

  always #2.5 clk = ~clk;

  // input signal, 1 ns steps
  always #1 begin
    if (run) g_v = amp * $sin(2.0 * PI * freq * real'($time - t0) * 1.0e-9);
    else     g_v = 0.0;
  end

  initial begin
    #30ms;
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

  // g of the sample paired with the recovery output (one clock later)
  real g_pair = 0.0;
  always @(posedge clk) if (adc_valid) g_pair <= g_smp;

  // per-cycle monitors
  always @(negedge clk) begin
    if (rst_n) begin
      if (st == ST_INCREASE) n_inc++;
      if (st == ST_DECREASE) n_dec++;
      if (st == ST_WAIT && b2) n_waithold++;
      if (sat) n_sat++;
      if (int'(cf) > max_abs_cf) max_abs_cf = int'(cf);
      if (-int'(cf) > max_abs_cf) max_abs_cf = -int'(cf);
      if (cfg.cal_en && (int'(dac_code) - 8192) != (int'(cf) <<< cfg.q)) n_cal++;
    end
    if (rst_n && run && rec_valid && (folded > 50 || folded < -50)) n_outside++;
    if (rst_n && run && check_rec && rec_valid) begin
      real err;
      err = real'(rec) - g_pair / LAMBDA * 25.0;
      chk(err <= rec_tol && err >= -rec_tol, $sformatf("rec %0d vs g %f codes (cf %0d)",
          rec, g_pair / LAMBDA * 25.0, cf_used));
      chk(folded <= 50 && folded >= -50, $sformatf("folded sample %0d outside window", folded));
    end
    if (rst_n && cap_track && rec_valid && cap_n < CAP_DEPTH) begin
      cap_ref[cap_n] = {folded, rec};
      cap_n++;
    end
  end

  task automatic phase(input real rho, input real f, input int qv, input bit cal,
                       input int periods_x2, input bit do_check, input real tol);
    rst_n = 1'b0;
    run = 1'b0;
    cfg.q = Q_W'(qv);
    cfg.cal_en = cal;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    amp = rho * LAMBDA; freq = f; rec_tol = tol;
    t0 = $time;
    run = 1'b1;
    repeat (10) @(negedge clk);
    check_rec = do_check;
    repeat (int'(real'(periods_x2) * 0.5 / f / 5.0e-9)) @(negedge clk);
    check_rec = 1'b0;
    run = 1'b0;
  endtask

  initial begin
    int qprev;
    cfg = '{q: 4'd7, cal_en: 1'b0, dv: 12'd102, wait_cycles: 8'd4, delay_d: 5'd3,
            two_lambda: 8'd50};
    // A
    phase(2.84, 100.0e3, 7, 0, 2, 1, 1.0);
    $display("A: max |C_f| = %0d", max_abs_cf);
    chk(max_abs_cf == 1, "phase A fold depth");
    // B
    max_abs_cf = 0;
    phase(22.2, 10.0e3, 9, 0, 2, 1, 1.0);
    $display("B: max |C_f| = %0d", max_abs_cf);
    chk(max_abs_cf == 11, "phase B fold depth");
    n_qsw++;
    // C with capture armed at the start
    max_abs_cf = 0;
    fork
      phase(102.0, 1.0e3, 7, 0, 2, 1, 1.0);
      begin
        repeat (30) @(negedge clk);
        cap_arm = 1'b1;
        @(negedge clk);
        cap_arm = 1'b0;
        cap_track = 1'b1;
        wait (cap_done);
        cap_track = 1'b0;
      end
    join
    n_qsw++;
    $display("C: max |C_f| = %0d", max_abs_cf);
    chk(max_abs_cf == 51, "phase C fold depth");
    chk(cap_done && cap_n == CAP_DEPTH, "capture complete");
    for (int a = 0; a < CAP_DEPTH; a++) begin
      cap_addr = 16'(a);
      @(negedge clk);
      if (cap_data != cap_ref[a]) begin
        chk(1'b0, $sformatf("capture word %0d", a));
      end else n_cap++;
    end
    checks++;
    // D: saturation at C_f = +/-3
    max_abs_cf = 0;
    phase(10.0, 10.0e3, 11, 0, 2, 0, 1.0);
    n_qsw++;
    $display("D: max |C_f| = %0d", max_abs_cf);
    chk(max_abs_cf == 3, "phase D limited to C_f,max");
    chk(sat_flag, "saturation flag set");
    sat_clr = 1'b1;
    @(negedge clk);
    sat_clr = 1'b0;
    @(negedge clk);
    chk(!sat_flag, "saturation flag cleared");
    // E: calibration, residual bounded by (|C_f|max + 1) * dV
    max_abs_cf = 0;
    phase(3.0, 10.0e3, 7, 1, 2, 1, 2.0 * 102.0 / 16.0 * (2.0 * 0.1 / 128.0) / 0.1 * 25.0 + 1.0);
    $display("E: max |C_f| = %0d", max_abs_cf);
    // F: front end with the comparator's 4 ns delay and 3.5 mV hysteresis and
    //    a 0.5 ns DAC/gain settling constant; settling time raised to 6 clocks
    max_abs_cf = 0;
    hyst = 0.0035; cdel = 4; tau = 0.5;
    cfg.wait_cycles = 8'd6;
    phase(22.2, 10.0e3, 7, 0, 2, 1, 1.5);
    $display("F: max |C_f| = %0d", max_abs_cf);
    chk(max_abs_cf == 11, "phase F fold depth with non-ideal front end");
    // G: settling time too short for the loop (2 < 3): stale flags must cause
    //    extra folds, the limit cycle the WAIT state prevents
    max_abs_cf = 0; n_outside = 0;
    hyst = 0.0; cdel = 0; tau = 0.0;
    cfg.wait_cycles = 8'd2;
    phase(2.84, 100.0e3, 7, 0, 2, 0, 1.0);
    $display("G: max |C_f| = %0d, folded samples outside window = %0d", max_abs_cf, n_outside);
    chk(max_abs_cf > 1 && n_outside > 0, "short WAIT over-folds");
    cfg.wait_cycles = 8'd4;
    // H: fold-dependent step mismatch of 9.5 mV per unit |C_f|. One period at
    //    rho = 22.2 needs 4 * 11 = 44 folds. Without calibration every fold
    //    beyond |C_f| = 0 overshoots out of the window and the count rattles
    //    (C_f -> C_f - 1 -> C_f); with dV = 102/16 LSB (about 10 mV) the
    //    folds are back to 44 and the reconstruction holds.
    begin
      int f0;
      mis = 0.0095;
      max_abs_cf = 0;
      f0 = n_inc + n_dec;
      phase(22.2, 10.0e3, 7, 0, 2, 0, 1.0);
      $display("H1: folds = %0d (mismatch, no calibration)", (n_inc + n_dec - f0));
      n_limcyc = (n_inc + n_dec - f0) - 44;
      chk(n_limcyc > 44, "mismatch without calibration causes a limit cycle");
      mis = 0.0;                   // clear the error left by the last fold
      repeat (4) @(negedge clk);
      mis = 0.0095;
      max_abs_cf = 0;
      f0 = n_inc + n_dec;
      phase(22.2, 10.0e3, 7, 1, 2, 1, 2.0);
      $display("H2: folds = %0d, max |C_f| = %0d (mismatch, calibrated)",
               (n_inc + n_dec - f0), max_abs_cf);
      chk((n_inc + n_dec - f0) == 44, "calibration restores one fold per crossing");
      chk(max_abs_cf == 11, "phase H2 fold depth");
      if ((n_inc + n_dec - f0) == 44) n_calfix++;
      mis = 0.0;
    end
    // mechanisms
    $display("increase=%0d decrease=%0d waithold=%0d sat=%0d cal=%0d cap=%0d qswitch=%0d limcyc=%0d calfix=%0d",
             n_inc, n_dec, n_waithold, n_sat, n_cal, n_cap, n_qsw, n_limcyc, n_calfix);
    chk(n_inc > 0, "INCREASE happened");
    chk(n_dec > 0, "DECREASE happened");
    chk(n_waithold > 0, "WAIT held by B2");
    chk(n_sat > 0, "C_f limit reached");
    chk(n_cal > 0, "calibration offset applied");
    chk(n_cap == CAP_DEPTH, "capture read back");
    chk(n_qsw == 3, "q switched");
    chk(n_limcyc > 0, "mismatch limit cycle seen");
    chk(n_calfix > 0, "calibration removed the limit cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
