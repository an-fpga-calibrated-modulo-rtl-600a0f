// fold_fsm: the folding controller. It holds the signed fold-count register C_f
// and moves it by at most one step per decision, driven by the synchronised
// window-comparator flags [B1 B0] and the settling flag B2.
//
// States and transitions (the controller's state diagram):
//   KEEP      C_f held. [B1 B0] = 00 or 11 stay in KEEP; 01 (y > +lambda) goes
//             to DECREASE; 10 (y < -lambda) goes to INCREASE. B2 is ignored.
//   INCREASE  C_f <= C_f + 1 at the end of this one-cycle state, then WAIT.
//   DECREASE  C_f <= C_f - 1 at the end of this one-cycle state, then WAIT.
//   WAIT      C_f frozen while B2 = 1; back to KEEP when B2 = 0.
// Since y = g + 2*lambda*C_f, a positive over-range lowers C_f and a negative
// one raises it. The one-cycle INCREASE/DECREASE states also start the settling
// timer (timer_start_o), so WAIT lasts for the programmed settling time.
//
// This design's own choices: C_f saturates at +/-C_f,max = (2^13-1) >> q, the
// headroom of the 13 magnitude bits of the DAC. A crossing that would pass the
// limit leaves the FSM in KEEP, pulses sat_o and sets the sticky sat_flag_o
// (cleared by sat_clr_i). Reset gives KEEP with C_f = 0.
//
// Timing: flags seen in KEEP in cycle t -> INCREASE/DECREASE in t+1 -> C_f
// changes at the edge ending t+1 -> WAIT from t+2 -> the next decision in KEEP
// no earlier than cycle t+3+wait_cycles.
module fold_fsm
  import modadc_pkg::*;
(
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  flags_t                 flags_i,      // [B1 B0]
  input  logic                   b2_i,         // settling flag
  input  logic [Q_W-1:0]         q_i,          // sets the C_f limit
  input  logic                   sat_clr_i,
  output logic signed [CF_W-1:0] cf_o,         // C_f[n]
  output fold_state_t            state_o,
  output logic                   timer_start_o,
  output logic                   fold_evt_o,   // C_f changes at the end of this cycle
  output logic                   fold_up_o,    // direction of that change: 1 = +1
  output logic                   sat_o,
  output logic                   sat_flag_o
);

  fold_state_t            state_q, state_d;
  logic signed [CF_W-1:0] cf_q, cf_d;
  logic signed [CF_W-1:0] lim;
  logic                   sat;

  assign lim = $signed({1'b0, cf_limit(q_i)});

  always_comb begin
    state_d = state_q;
    cf_d    = cf_q;
    sat     = 1'b0;
    unique case (state_q)
      ST_KEEP: begin
        if (flags_i.b1 && !flags_i.b0) begin          // x10: y < -lambda
          if (cf_q < lim) state_d = ST_INCREASE;
          else            sat     = 1'b1;
        end else if (flags_i.b0 && !flags_i.b1) begin // x01: y > +lambda
          if (cf_q > -lim) state_d = ST_DECREASE;
          else             sat     = 1'b1;
        end
      end
      ST_INCREASE: begin
        cf_d    = cf_q + 1'b1;
        state_d = ST_WAIT;
      end
      ST_DECREASE: begin
        cf_d    = cf_q - 1'b1;
        state_d = ST_WAIT;
      end
      ST_WAIT: begin
        if (!b2_i) state_d = ST_KEEP;
      end
      default: state_d = ST_KEEP;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q    <= ST_KEEP;
      cf_q       <= '0;
      sat_flag_o <= 1'b0;
    end else begin
      state_q <= state_d;
      cf_q    <= cf_d;
      // The count never moves by more than one level per clock.
      a_single_step: assert ((cf_d - cf_q <= 1) && (cf_q - cf_d <= 1));
      if (sat)            sat_flag_o <= 1'b1;
      else if (sat_clr_i) sat_flag_o <= 1'b0;
    end
  end

  assign cf_o          = cf_q;
  assign state_o       = state_q;
  assign fold_evt_o    = (state_q == ST_INCREASE) || (state_q == ST_DECREASE);
  assign fold_up_o     = (state_q == ST_INCREASE);
  assign timer_start_o = fold_evt_o;
  assign sat_o         = sat;

endmodule
