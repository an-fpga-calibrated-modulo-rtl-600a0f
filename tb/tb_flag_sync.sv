// tb_flag_sync: checks that each comparator output reaches the status vector
// [B1 B0] exactly STAGES clocks later and that reset clears it. Random
// comparator levels change between clock edges; a queue of past inputs is the
// reference.
`timescale 1ns / 1ps
module tb_flag_sync;
  import modadc_pkg::*;

  localparam int STAGES = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmp_neg = 1'b0, cmp_pos = 1'b0;
  flags_t flags;
  int checks = 0, failures = 0;
  logic [1:0] hist [$];

  flag_sync #(.STAGES(STAGES)) dut (.clk_i(clk), .rst_ni(rst_n), .cmp_neg_i(cmp_neg),
                                    .cmp_pos_i(cmp_pos), .flags_o(flags));

  always #2.5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (flags != 2'b00) begin failures++; $display("flags not cleared by reset"); end
    cmp_neg = 1'b1; cmp_pos = 1'b1;
    @(negedge clk);
    checks++;
    if (flags != 2'b00) begin failures++; $display("flags moved during reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < STAGES - 1; i++) hist.push_back(2'b00);
    repeat (1000) begin
      @(negedge clk);
      // the value driven before the previous edge STAGES edges ago
      checks++;
      if (flags != hist[0]) begin
        failures++;
        $display("flags %b expected %b", flags, hist[0]);
      end
      hist.pop_front();
      hist.push_back({cmp_neg, cmp_pos});
      cmp_neg = ($urandom_range(0, 3) == 0);
      cmp_pos = ($urandom_range(0, 3) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
