// tb_fold_fsm: drives the folding FSM with random comparator flags and
// settling flag, and compares state, fold count, event outputs and saturation
// with a reference model of the state diagram: KEEP -> DECREASE on 01,
// KEEP -> INCREASE on 10, 00 and 11 hold, INCREASE/DECREASE -> WAIT always,
// WAIT held on B2 = 1. A phase with q = 11 (C_f limit 3) drives the count into
// both limits. Each transition kind is counted and must occur.
`timescale 1ns / 1ps
module tb_fold_fsm;
  import modadc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  flags_t flags = '0;
  logic b2 = 1'b0;
  logic [Q_W-1:0] q = 4'd7;
  logic [Q_W-1:0] q_req = 4'd7;   // applied with the next input set
  logic sat_clr = 1'b0;
  logic signed [CF_W-1:0] cf;
  fold_state_t st;
  logic tstart, fevt, fup, sat, satf;
  int checks = 0, failures = 0;

  fold_state_t m_st = ST_KEEP;
  int m_cf = 0;
  logic m_satf = 1'b0;
  int n_inc = 0, n_dec = 0, n_waithold = 0, n_keep11 = 0, n_sat = 0;

  fold_fsm dut (.clk_i(clk), .rst_ni(rst_n), .flags_i(flags), .b2_i(b2), .q_i(q),
                .sat_clr_i(sat_clr), .cf_o(cf), .state_o(st), .timer_start_o(tstart),
                .fold_evt_o(fevt), .fold_up_o(fup), .sat_o(sat), .sat_flag_o(satf));

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
      if (failures < 20) $display("%t mismatch: %s (state %s cf %0d, model %s %0d)",
                                  $time, what, st.name(), cf, m_st.name(), m_cf);
    end
  endtask

  // one cycle: compare, drive new inputs, advance the model
  task automatic cycle(input int p_up, input int p_dn, input int p_b2);
    int r, lim;
    bit m_sat;
    fold_state_t nst;
    int ncf;
    @(negedge clk);
    chk(int'(cf) == m_cf, "cf");
    chk(st == m_st, "state");
    chk(fevt == (m_st == ST_INCREASE || m_st == ST_DECREASE), "fold_evt");
    chk(tstart == fevt, "timer_start");
    chk(fup == (m_st == ST_INCREASE), "fold_up");
    chk(satf == m_satf, "sat_flag");
    q = q_req;
    r = $urandom_range(0, 99);
    if (r < p_up)             flags = 2'b10;
    else if (r < p_up + p_dn) flags = 2'b01;
    else if (r < p_up + p_dn + 5) flags = 2'b11;
    else                      flags = 2'b00;
    b2 = ($urandom_range(0, 99) < p_b2);
    sat_clr = ($urandom_range(0, 199) == 0);
    lim = 8191 >> q;
    nst = m_st; ncf = m_cf; m_sat = 1'b0;
    case (m_st)
      ST_KEEP: begin
        if (flags == 2'b10) begin
          if (m_cf < lim) nst = ST_INCREASE; else m_sat = 1'b1;
        end else if (flags == 2'b01) begin
          if (m_cf > -lim) nst = ST_DECREASE; else m_sat = 1'b1;
        end else if (flags == 2'b11) n_keep11++;
      end
      ST_INCREASE: begin ncf = m_cf + 1; nst = ST_WAIT; n_inc++; end
      ST_DECREASE: begin ncf = m_cf - 1; nst = ST_WAIT; n_dec++; end
      ST_WAIT: if (!b2) nst = ST_KEEP; else n_waithold++;
      default: ;
    endcase
    #1;
    chk(sat == m_sat, "sat pulse");
    if (m_sat) n_sat++;
    if (m_sat) m_satf = 1'b1; else if (sat_clr) m_satf = 1'b0;
    m_st = nst; m_cf = ncf;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // q = 7: free random walk
    repeat (3000) cycle(30, 30, 50);
    // q = 11: limit 3, push to both limits
    q_req = 4'd11;
    repeat (400) cycle(70, 10, 30);
    repeat (800) cycle(10, 70, 30);
    q_req = 4'd7;
    repeat (1000) cycle(30, 30, 50);
    chk(n_inc > 0, "INCREASE reached");
    chk(n_dec > 0, "DECREASE reached");
    chk(n_waithold > 0, "WAIT held by B2");
    chk(n_keep11 > 0, "flags 11 seen in KEEP");
    chk(n_sat > 0, "limit reached");
    $display("increase=%0d decrease=%0d waithold=%0d keep11=%0d sat=%0d",
             n_inc, n_dec, n_waithold, n_keep11, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
