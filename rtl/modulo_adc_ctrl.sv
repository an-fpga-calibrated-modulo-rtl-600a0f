// modulo_adc_ctrl: FPGA side of a modulo (folding) ADC.
//
// The analog front end adds a feedback voltage v_f = 2*lambda*C_f to the input,
// y = g + v_f, and a window comparator reports whether y is above +lambda or
// below -lambda. This module closes the loop digitally: it synchronises the two
// comparator outputs (flag_sync), steps the fold count C_f up or down by one in
// a KEEP/INCREASE/DECREASE/WAIT state machine (fold_fsm) that waits out the
// analog settling time given by a programmable timer (settle_timer, flag B2),
// and turns C_f into the loop-control DAC word with 2^q codes per fold and a
// direction-dependent under-compensation offset (dac_code_gen). The folded ADC
// samples are combined with the delayed fold count into the unfolded signal
// g~ = y^ - 2*lambda*C_f (direct_recovery), and a capture memory records folded
// and unfolded samples (capture_buffer).
//
// Clocking: one 200 MHz clock for controller and DAC. The 100 MHz ADC, clocked
// from the same PLL, is seen as a sample strobe adc_valid_i in this domain
// (this design's choice; the PLL itself is outside this RTL). Reset is
// asynchronous, active low.
//
// Interface: cmp_pos_i / cmp_neg_i come straight from the comparators;
// dac_code_o is the offset-binary DAC word; cfg_i holds the run-time settings
// (q, calibration enable and dV, settling time, recovery delay d, 2*lambda in
// ADC LSBs); cap_* control and read the capture memory; the remaining outputs
// expose the loop state for monitoring.
//
// Loop latency from a comparator edge to a new DAC word: 2 synchroniser
// stages + 1 KEEP decision + 1 INCREASE/DECREASE cycle + 1 DAC output register.
module modulo_adc_ctrl
  import modadc_pkg::*;
#(
  parameter int SYNC_STAGES = 2,
  parameter int CAP_DEPTH   = 50000,
  localparam int CAP_AW     = $clog2(CAP_DEPTH)
) (
  input  logic                         clk_i,
  input  logic                         rst_ni,
  // analog front end
  input  logic                         cmp_pos_i,     // y > +lambda
  input  logic                         cmp_neg_i,     // y < -lambda
  output logic [DAC_BITS-1:0]          dac_code_o,
  input  logic                         adc_valid_i,
  input  logic signed [ADC_BITS-1:0]   adc_data_i,
  // configuration
  input  cfg_t                         cfg_i,
  input  logic                         sat_clr_i,
  // capture memory
  input  logic                         cap_arm_i,
  output logic                         cap_busy_o,
  output logic                         cap_done_o,
  input  logic [CAP_AW-1:0]            cap_rd_addr_i,
  output logic [ADC_BITS+REC_W-1:0]    cap_rd_data_o, // {y^, g~}
  // monitoring
  output logic signed [CF_W-1:0]       cf_o,
  output fold_state_t                  state_o,
  output flags_t                       flags_o,
  output logic                         b2_o,
  output logic                         sat_flag_o,
  output logic                         dac_clamp_o,
  output logic                         rec_valid_o,
  output logic signed [REC_W-1:0]      rec_o,
  output logic signed [ADC_BITS-1:0]   folded_o,
  output logic signed [CF_W-1:0]       cf_used_o,     // C_f paired with folded_o
  output logic                         sat_o          // a fold was refused at the C_f limit
);

  flags_t                 flags;
  logic                   b2, timer_start, fold_evt, fold_up;
  logic signed [CF_W-1:0] cf;

  flag_sync #(.STAGES(SYNC_STAGES)) u_sync (
    .clk_i, .rst_ni,
    .cmp_neg_i, .cmp_pos_i,
    .flags_o (flags)
  );

  settle_timer #(.W(WAIT_W)) u_timer (
    .clk_i, .rst_ni,
    .start_i       (timer_start),
    .wait_cycles_i (cfg_i.wait_cycles),
    .b2_o          (b2)
  );

  fold_fsm u_fsm (
    .clk_i, .rst_ni,
    .flags_i       (flags),
    .b2_i          (b2),
    .q_i           (cfg_i.q),
    .sat_clr_i,
    .cf_o          (cf),
    .state_o,
    .timer_start_o (timer_start),
    .fold_evt_o    (fold_evt),
    .fold_up_o     (fold_up),
    .sat_o,
    .sat_flag_o
  );

  dac_code_gen u_dac (
    .clk_i, .rst_ni,
    .cf_i       (cf),
    .fold_evt_i (fold_evt),
    .fold_up_i  (fold_up),
    .q_i        (cfg_i.q),
    .cal_en_i   (cfg_i.cal_en),
    .dv_i       (cfg_i.dv),
    .dac_code_o,
    .dac_clamp_o
  );

  direct_recovery #(.D_MAX(1 << DELAY_W)) u_rec (
    .clk_i, .rst_ni,
    .cf_i         (cf),
    .adc_valid_i,
    .adc_data_i,
    .delay_i      (cfg_i.delay_d),
    .two_lambda_i (cfg_i.two_lambda),
    .rec_valid_o,
    .rec_o,
    .folded_o,
    .cf_used_o
  );

  capture_buffer #(.DEPTH(CAP_DEPTH), .W(ADC_BITS + REC_W)) u_cap (
    .clk_i, .rst_ni,
    .arm_i      (cap_arm_i),
    .in_valid_i (rec_valid_o),
    .in_data_i  ({folded_o, rec_o}),
    .busy_o     (cap_busy_o),
    .done_o     (cap_done_o),
    .rd_addr_i  (cap_rd_addr_i),
    .rd_data_o  (cap_rd_data_o)
  );

  assign cf_o    = cf;
  assign flags_o = flags;
  assign b2_o    = b2;

endmodule
