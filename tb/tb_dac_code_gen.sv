// tb_dac_code_gen: checks the DAC word against an integer model of
//   code = C_f * 2^q + round(-sgn(dC_f) * |C_f,before| * dV)  (if enabled),
// clamped to +/-8191 and offset by 8192. It starts with directed cases (one
// fold step for q = 7, 9 and 11, and a calibrated positive crossing with
// dV = 6.375 LSB, about 10 mV at the summing node for lambda = 100 mV and
// q = 7), then random counts, folds, q, dV and enable. Clamping must occur.
`timescale 1ns / 1ps
module tb_dac_code_gen;
  import modadc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [CF_W-1:0] cf = '0;
  logic fevt = 1'b0, fup = 1'b0, cal_en = 1'b0;
  logic [Q_W-1:0] q = 4'd7;
  logic [DV_W-1:0] dv = '0;
  logic [Q_W-1:0] q_req = 4'd7;
  logic cal_req = 1'b0;
  logic [DV_W-1:0] dv_req = '0;
  logic [DAC_BITS-1:0] code;
  logic clamp;
  int checks = 0, failures = 0;
  int m_off = 0, m_code = 8192, n_clamp = 0, n_cal = 0;
  bit m_clamp = 1'b0;

  dac_code_gen dut (.clk_i(clk), .rst_ni(rst_n), .cf_i(cf), .fold_evt_i(fevt),
                    .fold_up_i(fup), .q_i(q), .cal_en_i(cal_en), .dv_i(dv),
                    .dac_code_o(code), .dac_clamp_o(clamp));

  always #2.5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%t mismatch %s: code %0d model %0d (q %0d cf %0d off %0d en %0b dv %0d)", $time, what, code, m_code, q, cf, m_off, cal_en, dv);
    end
  endtask

  // advance the model over one clock edge with the inputs now applied
  task automatic model_edge();
    int a, sum, off_l;
    off_l = cal_en ? ((m_off + 8) >>> 4) : 0;
    sum = (int'(cf) <<< q) + off_l;
    m_clamp = 1'b0;
    if (sum > 8191)  begin sum = 8191;  m_clamp = 1'b1; end
    if (sum < -8191) begin sum = -8191; m_clamp = 1'b1; end
    m_code = sum + 8192;
    if (fevt) begin
      a = (cf < 0) ? -int'(cf) : int'(cf);
      m_off = fup ? -(a * int'(dv)) : a * int'(dv);
    end
  endtask

  task automatic drive(input int c, input bit e, input bit up);
    @(negedge clk);
    chk(int'(code) == m_code, "code");
    chk(clamp == m_clamp, "clamp");
    if (m_clamp) n_clamp++;
    cf = CF_W'(c); fevt = e; fup = up;
    q = q_req; cal_en = cal_req; dv = dv_req;
    model_edge();
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // one fold, no calibration: 2^q codes per fold
    q_req = 4'd7;  drive(1, 0, 0); drive(1, 0, 0); drive(1, 0, 0);
    chk(int'(code) == 8192 + 128, "q=7 single step");
    q_req = 4'd9;  drive(-1, 0, 0); drive(-1, 0, 0);
    chk(int'(code) == 8192 - 512, "q=9 single step");
    q_req = 4'd11; drive(3, 0, 0); drive(3, 0, 0);
    chk(int'(code) == 8192 + 6144, "q=11 three steps");
    // calibrated positive crossing at C_f = 5 -> 4, dV = 102/16 LSB
    q_req = 4'd7; cal_req = 1'b1; dv_req = 12'd102;
    drive(5, 1, 0);          // DECREASE cycle, count still 5
    drive(4, 0, 0);          // count now 4, offset latched
    drive(4, 0, 0);
    chk(int'(code) == 8192 + 4 * 128 + 32, "calibrated code");
    // random
    repeat (6000) begin
      int lim, c;
      if ($urandom_range(0, 299) == 0) q_req = Q_W'($urandom_range(0, 13));
      if ($urandom_range(0, 99) == 0)  cal_req = ~cal_req;
      if ($urandom_range(0, 49) == 0)  dv_req = DV_W'($urandom_range(0, 4095));
      lim = 8191 >> q_req;
      c = $urandom_range(0, 2 * lim) - lim;
      drive(c, ($urandom_range(0, 3) == 0), $urandom_range(0, 1));
      if (cal_en && m_off != 0) n_cal++;
    end
    chk(n_clamp > 0, "clamp reached");
    chk(n_cal > 0, "calibration offset applied");
    $display("clamps=%0d calibrated=%0d", n_clamp, n_cal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
