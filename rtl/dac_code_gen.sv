// dac_code_gen: forms the 14-bit loop-control DAC word from the fold count.
//
// Multi-bit update: each fold moves the DAC by 2^q codes, so the nominal
// feedback code is C_f * 2^q; with the analog gain set so that
// G_total * 2^q * V_LSB = 2*lambda, one fold shifts the summing node by exactly
// 2*lambda. q is a run-time setting.
//
// Under-compensation calibration: at every fold the block latches the offset
// -sgn(dC_f) * |C_f[n]| * dV, where C_f[n] is the count before the update and dV
// is a calibration constant in DAC LSBs (4 fraction bits). A positive crossing
// (C_f decreasing) thus adds +|C_f|*dV and a negative crossing subtracts it, so
// each fold is slightly under-compensated. The offset is held until the next
// fold; with cal_en_i low it is not applied.
//
// This design's own choices: the signed sum is rounded to whole LSBs, clamped
// to +/-(2^13-1) (dac_clamp_o flags a clamp) and sent as offset binary (code
// 8192 = 0 V), the input format the bipolar DAC stage is assumed to take.
//
// Timing: the offset register updates on the same edge as C_f; dac_code_o is
// registered, so it shows a new C_f one clock after the count changes.
module dac_code_gen
  import modadc_pkg::*;
(
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic signed [CF_W-1:0] cf_i,
  input  logic                   fold_evt_i,   // C_f changes at the end of this cycle
  input  logic                   fold_up_i,    // 1: C_f + 1, 0: C_f - 1
  input  logic [Q_W-1:0]         q_i,
  input  logic                   cal_en_i,
  input  logic [DV_W-1:0]        dv_i,         // unsigned, DV_FRAC fraction bits
  output logic [DAC_BITS-1:0]    dac_code_o,   // offset binary
  output logic                   dac_clamp_o
);

  localparam int SW = 32;

  logic signed [SW-1:0] off_q;       // calibration offset, DV_FRAC fraction bits
  logic signed [SW-1:0] cf_abs, off_new, step_code, off_lsb, sum, clamped;
  logic                 clamp;

  always_comb begin
    cf_abs  = (cf_i < 0) ? -SW'(cf_i) : SW'(cf_i);
    off_new = cf_abs * $signed(SW'(dv_i));
    if (fold_up_i) off_new = -off_new;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)         off_q <= '0;
    else if (fold_evt_i) off_q <= off_new;
  end

  always_comb begin
    step_code = SW'(cf_i) <<< q_i;
    off_lsb   = cal_en_i ? ((off_q + SW'(1 << (DV_FRAC-1))) >>> DV_FRAC) : 32'sd0;
    sum       = step_code + off_lsb;
    clamp     = 1'b0;
    clamped   = sum;
    if (sum > SW'(DAC_MAG_MAX)) begin
      clamped = SW'(DAC_MAG_MAX);
      clamp   = 1'b1;
    end else if (sum < -SW'(DAC_MAG_MAX)) begin
      clamped = -SW'(DAC_MAG_MAX);
      clamp   = 1'b1;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      dac_code_o  <= DAC_BITS'(DAC_MID);
      dac_clamp_o <= 1'b0;
    end else begin
      dac_code_o  <= DAC_BITS'(clamped + SW'(DAC_MID));
      dac_clamp_o <= clamp;
    end
  end

endmodule
