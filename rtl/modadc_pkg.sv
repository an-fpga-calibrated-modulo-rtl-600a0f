// modadc_pkg: types and constants shared by the modulo-ADC folding controller.
//
// The loop-control DAC is a 14-bit part with one bit used for sign, so 13 bits
// carry the magnitude of the feedback code (B_m = 13). The sampling ADC gives
// 8-bit samples. The fold count C_f is a signed value that can reach
// +/-(2^13 - 1) when one DAC code is used per fold (q = 0), so it needs 14 bits.
// The run-time settings of the loop are bundled in cfg_t; the board's embedded
// controller would write them, which is outside this RTL.
package modadc_pkg;

  localparam int DAC_BITS     = 14;               // AD9744 resolution
  localparam int DAC_MAG_BITS = DAC_BITS - 1;     // B_m: magnitude bits
  localparam int DAC_MAG_MAX  = (1 << DAC_MAG_BITS) - 1;  // 8191
  localparam int DAC_MID      = 1 << DAC_MAG_BITS;         // 8192: code for 0 V
  localparam int ADC_BITS     = 8;                // AD9288 resolution
  localparam int CF_W         = DAC_MAG_BITS + 1; // signed fold count width
  localparam int Q_W          = 4;                // q in 0..13
  localparam int DV_W         = 12;               // dV in DAC LSBs, 4 fraction bits
  localparam int DV_FRAC      = 4;
  localparam int WAIT_W       = 8;                // settling-timer width
  localparam int DELAY_W      = 5;                // recovery delay d, 0..31
  localparam int TWOL_W       = 8;                // 2*lambda in ADC LSBs
  localparam int REC_W        = 24;               // reconstructed sample width

  // Comparator status bits: B1 = y below -lambda, B0 = y above +lambda.
  typedef struct packed {
    logic b1;
    logic b0;
  } flags_t;

  typedef enum logic [1:0] {
    ST_KEEP     = 2'd0,
    ST_INCREASE = 2'd1,
    ST_DECREASE = 2'd2,
    ST_WAIT     = 2'd3
  } fold_state_t;

  // Run-time configuration of the folding loop.
  typedef struct packed {
    logic [Q_W-1:0]    q;              // DAC codes per fold = 2^q
    logic              cal_en;         // enable under-compensation
    logic [DV_W-1:0]   dv;             // dV per |C_f|, DAC LSBs, unsigned Q8.4
    logic [WAIT_W-1:0] wait_cycles;    // B2 high time after each fold
    logic [DELAY_W-1:0] delay_d;       // d of the recovery equation
    logic [TWOL_W-1:0] two_lambda;     // 2*lambda expressed in ADC LSBs
  } cfg_t;

  // Largest fold count the 13 magnitude bits allow for a step of 2^q codes.
  function automatic logic [CF_W-2:0] cf_limit(input logic [Q_W-1:0] q);
    logic [CF_W-2:0] lim;
    lim = (CF_W-1)'(DAC_MAG_MAX) >> q;
    return lim;
  endfunction

endpackage
