// settle_timer: programmable timer that produces the settling flag B2.
//
// After each fold update the analog loop needs time for the DAC to settle and
// the amplifiers to slew. A start pulse loads the counter with wait_cycles_i;
// B2 is high while the counter is non-zero and it counts down by one per clock.
// The folding FSM stays in its WAIT state while B2 is high. The polarity follows
// the state diagram of the controller (WAIT is held on B2 = 1 and left on
// B2 = 0); the count-down form and width are this design's choices.
//
// Timing: start_i in cycle t gives b2_o = 1 in cycles t+1 .. t+wait_cycles_i,
// and b2_o = 0 from cycle t+wait_cycles_i+1. A start while counting restarts it.
module settle_timer #(
  parameter int W = 8
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic [W-1:0] wait_cycles_i,
  output logic         b2_o
);

  logic [W-1:0] cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)          cnt_q <= '0;
    else if (start_i)     cnt_q <= wait_cycles_i;
    else if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
  end

  assign b2_o = (cnt_q != '0);

endmodule
