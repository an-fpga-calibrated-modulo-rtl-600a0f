// flag_sync: brings the two window-comparator outputs into the controller clock
// domain as the status vector [B1 B0].
//
// The comparators switch asynchronously to the 200 MHz controller clock, so each
// output passes through a chain of STAGES flip-flops clocked on the rising edge;
// the last stage is the status the folding FSM decides on. B1 means the folded
// signal is below -lambda, B0 that it is above +lambda, as the comparator wiring
// defines. The number of stages is this design's choice (two, the usual
// metastability guard); every stage adds one clock of loop latency.
//
// Interface: cmp_neg_i / cmp_pos_i asynchronous inputs, flags_o registered.
// Latency: STAGES clock edges from input to flags_o.
module flag_sync
  import modadc_pkg::*;
#(
  parameter int STAGES = 2
) (
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   cmp_neg_i,   // comparator: y < -lambda
  input  logic   cmp_pos_i,   // comparator: y > +lambda
  output flags_t flags_o
);

  logic [STAGES-1:0] neg_q, pos_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      neg_q <= '0;
      pos_q <= '0;
    end else begin
      neg_q <= {neg_q[STAGES-2:0], cmp_neg_i};
      pos_q <= {pos_q[STAGES-2:0], cmp_pos_i};
    end
  end

  assign flags_o = '{b1: neg_q[STAGES-1], b0: pos_q[STAGES-1]};

  initial assert (STAGES >= 2) else $error("flag_sync needs at least two stages");

endmodule
