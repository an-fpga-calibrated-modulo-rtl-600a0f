// tb_settle_timer: starts the settling timer with random lengths (including 0
// and restarts while counting) and compares B2 cycle by cycle with a counter
// model: B2 is high for exactly wait_cycles clocks after the start pulse.
`timescale 1ns / 1ps
module tb_settle_timer;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] wc = '0;
  logic b2;
  int checks = 0, failures = 0;
  int model_cnt = 0;
  int high_run = 0, last_run = -1, runs_checked = 0;

  settle_timer #(.W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start),
                             .wait_cycles_i(wc), .b2_o(b2));

  always #2.5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // directed: one start with wait 5 gives exactly 5 high cycles
  task automatic directed(input int n);
    int cnt;
    @(negedge clk);
    start = 1'b1; wc = W'(n);
    @(negedge clk);
    start = 1'b0;
    cnt = 0;
    while (b2 && cnt < 1000) begin
      cnt++;
      @(negedge clk);
    end
    checks++;
    if (cnt != n) begin failures++; $display("wait %0d gave %0d high cycles", n, cnt); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    directed(5);
    directed(0);
    directed(1);
    directed(200);
    repeat (3000) begin
      @(negedge clk);
      checks++;
      if (b2 != (model_cnt != 0)) begin
        failures++;
        $display("b2=%0b model count %0d", b2, model_cnt);
      end
      start = ($urandom_range(0, 19) == 0);
      wc    = W'($urandom_range(0, 12));
      if (start)               model_cnt = int'(wc);
      else if (model_cnt != 0) model_cnt--;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
