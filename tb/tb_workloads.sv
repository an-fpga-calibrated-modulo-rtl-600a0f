// tb_workloads: runs the folding controller in closed loop with the
// behavioural analog front end on the classes of input the platform was
// evaluated with, at the top's default parameters:
//   periodic sinc   (rho 3.24 / 9.16 / 29.8, main lobe B 410 / 99 / 18 kHz,
//                    repetition 23 / 5 / 1 kHz)
//   bandlimited     (rho 4.19 / 6.91 / 22.13, B 10 / 100 / 1 kHz; sum of three
//                    tones at B, B/2 and B/3 scaled to the peak)
//   modulated       (QAM rho 10.4 B 4 kHz, BPSK rho 5.2 B 2 kHz, FSK rho 8
//                    B 2 kHz; baseband, random symbols at rate B)
//   noisy sine      (lambda = 360 mV, rho 11.8, 10 kHz, with added noise
//                    for 15 dB input SNR, band-limited to about 1 MHz)
// All use lambda = 100 mV (25 ADC codes) except the last, where lambda is 90
// codes and 2*lambda = 180. The exact waveform shapes are this testbench's
// own. For each run it checks every reconstructed sample against the input
// at the sampling instant (within 1 code), that folded samples stay near the
// window, and that the deepest fold count equals the one the input's peak
// requires. Checking starts 2 us into each run, because some waveforms do not
// start at zero and the loop first folds up to them. Runs are cut to at most
// 0.5 ms of signal.
`timescale 1ns / 1ps
module tb_workloads;
  import modadc_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real ADC_LSB = 0.004;

  typedef enum int {W_SINC, W_BL, W_QAM, W_BPSK, W_FSK, W_NOISY} wave_t;

  logic clk = 1'b0, rst_n = 1'b0;
  real  g_v = 0.0, y_v, g_smp, lambda = 0.1;
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
  wave_t kind = W_SINC;
  real amp = 0.0, bw = 1.0e3, frep = 1.0e3;
  bit run = 1'b0, check_rec = 1'b0;
  longint t0;
  real gmax = 0.0;
  int max_abs_cf = 0, n_runs = 0;
  int sym [64];
  real noise_a = 0.0, noise_b = 0.0, noise_rms = 0.0;
  real ph_fsk = 0.0;

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
    .clk, .lambda_v(lambda), .g_v, .dac_code, .q(cfg.q), .gain_err(0.0), .hyst_v(0.0), .cmp_delay_ns(0), .settle_tau_ns(0.0),
    .fold_mis_v(0.0), .cf_mon(cf),
    .cmp_pos, .cmp_neg, .adc_valid, .adc_data, .y_v, .g_at_sample(g_smp)
  );

  always #2.5 clk = ~clk;

  function automatic real sinc(input real x);
    if (x < 1.0e-9 && x > -1.0e-9) return 1.0;
    return $sin(PI * x) / (PI * x);
  endfunction

  // raised-cosine step between symbols a and b, u in [0,1)
  function automatic real blend(input real a, input real b, input real u);
    real w;
    w = (u < 0.25) ? 0.5 - 0.5 * $cos(PI * u / 0.25) : 1.0;
    return a + (b - a) * w;
  endfunction

  function automatic real wave(input real t);
    real tt, u, s, i_a, q_a;
    int k;
    case (kind)
      W_SINC: begin
        tt = t - $floor(t * frep) / frep;             // position in the period
        return amp * sinc(bw * (tt - 0.5 / frep));
      end
      W_BL:
        return amp / 1.8 * ($sin(2.0 * PI * bw * t) + 0.5 * $sin(2.0 * PI * bw / 2.0 * t + 1.0)
                            + 0.3 * $sin(2.0 * PI * bw / 3.0 * t + 2.0));
      W_BPSK, W_QAM, W_FSK: begin
        k = int'($floor(t * bw));
        u = t * bw - real'(k);
        if (kind == W_BPSK) begin
          s = blend(real'(sym[(k + 63) % 64] % 2) * 2.0 - 1.0, real'(sym[k % 64] % 2) * 2.0 - 1.0, u);
          return amp * s * $cos(2.0 * PI * bw * 2.0 * t);
        end else if (kind == W_QAM) begin
          i_a = blend(real'(sym[(k + 63) % 64] % 2) * 2.0 - 1.0, real'(sym[k % 64] % 2) * 2.0 - 1.0, u);
          q_a = blend(real'((sym[(k + 63) % 64] / 2) % 2) * 2.0 - 1.0, real'((sym[k % 64] / 2) % 2) * 2.0 - 1.0, u);
          return amp * 0.7071 * (i_a * $cos(2.0 * PI * bw * 2.0 * t) + q_a * $sin(2.0 * PI * bw * 2.0 * t));
        end else begin
          return amp * $cos(ph_fsk);
        end
      end
      default:   // noisy sine
        return amp * $sin(2.0 * PI * frep * t) + noise_a + (noise_b - noise_a) * ((t * 1.0e6) - $floor(t * 1.0e6));
    endcase
  endfunction

  // input signal, 1 ns steps
  always #1 begin
    real t;
    t = real'($time - t0) * 1.0e-9;
    if (run) begin
      if (kind == W_FSK)
        ph_fsk = ph_fsk + 2.0 * PI * ((sym[int'($floor(t * bw)) % 64] % 2 == 1) ? 2.0 * bw : 4.0 * bw) * 1.0e-9;
      if (kind == W_NOISY && (($time - t0) % 1000) == 0) begin
        noise_a = noise_b;
        noise_b = noise_rms * 1.732 * (real'($urandom_range(0, 20000)) / 10000.0 - 1.0);
      end
      g_v = wave(t);
      if (g_v > gmax) gmax = g_v;
      if (-g_v > gmax) gmax = -g_v;
    end else g_v = 0.0;
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

  real g_pair = 0.0;
  always @(posedge clk) if (adc_valid) g_pair <= g_smp;

  always @(negedge clk) begin
    if (rst_n && run) begin
      if (int'(cf) > max_abs_cf) max_abs_cf = int'(cf);
      if (-int'(cf) > max_abs_cf) max_abs_cf = -int'(cf);
    end
    if (rst_n && run && check_rec && rec_valid) begin
      real err, win;
      err = real'(rec) - g_pair / ADC_LSB;
      win = lambda / ADC_LSB + 25.0;
      chk(err <= 1.0 && err >= -1.0, $sformatf("%s rec %0d vs %f", kind.name(), rec, g_pair / ADC_LSB));
      chk(real'(folded) <= win && real'(folded) >= -win, $sformatf("%s folded %0d", kind.name(), folded));
    end
  end

  task automatic workload(input wave_t k, input real rho, input real b, input real fr,
                          input real lam, input real dur);
    int exp_cf;
    rst_n = 1'b0;
    run = 1'b0;
    kind = k; bw = b; frep = fr; lambda = lam;
    amp = rho * lam;
    noise_rms = (k == W_NOISY) ? amp / 1.4142 / 5.623 : 0.0;   // 15 dB
    noise_a = 0.0; noise_b = 0.0; ph_fsk = 0.0;
    cfg.two_lambda = TWOL_W'($rtoi(2.0 * lam / ADC_LSB + 0.5));
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    gmax = 0.0; max_abs_cf = 0;
    t0 = $time;
    run = 1'b1;
    // some waveforms start away from zero: let the loop fold up to them first
    repeat (400) @(negedge clk);
    check_rec = 1'b1;
    repeat (int'(dur / 5.0e-9)) @(negedge clk);
    check_rec = 1'b0;
    run = 1'b0;
    exp_cf = $rtoi((gmax + lam) / (2.0 * lam));
    $display("%-8s rho=%6.2f peak=%6.3f V  max|C_f|=%0d (peak needs %0d)", k.name(), rho, gmax,
             max_abs_cf, exp_cf);
    chk(max_abs_cf == exp_cf || (max_abs_cf == exp_cf + 1 && (gmax + lam) / (2.0 * lam) - real'(exp_cf) > 0.97),
        $sformatf("%s fold depth %0d, expected %0d", k.name(), max_abs_cf, exp_cf));
    n_runs++;
  endtask

  initial begin
    foreach (sym[i]) sym[i] = $urandom_range(0, 3);
    cfg = '{q: 4'd7, cal_en: 1'b0, dv: 12'd102, wait_cycles: 8'd4, delay_d: 5'd3,
            two_lambda: 8'd50};
    workload(W_SINC, 3.24, 410.0e3, 23.0e3, 0.1, 1.0 / 23.0e3);
    workload(W_SINC, 9.16, 99.0e3, 5.0e3, 0.1, 1.0 / 5.0e3);
    workload(W_SINC, 29.80, 18.0e3, 1.0e3, 0.1, 0.5e-3);
    workload(W_BL, 4.19, 10.0e3, 0.0, 0.1, 0.3e-3);
    workload(W_BL, 6.91, 100.0e3, 0.0, 0.1, 0.1e-3);
    workload(W_BL, 22.13, 1.0e3, 0.0, 0.1, 0.5e-3);
    workload(W_QAM, 10.40, 4.0e3, 0.0, 0.1, 0.5e-3);
    workload(W_BPSK, 5.20, 2.0e3, 0.0, 0.1, 0.5e-3);
    workload(W_FSK, 8.00, 2.0e3, 0.0, 0.1, 0.5e-3);
    workload(W_NOISY, 11.80, 0.0, 10.0e3, 0.36, 0.2e-3);
    chk(n_runs == 10, "all workloads run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
