// tb_capture_buffer: arms a capture, offers random words with gaps, and checks
// that exactly DEPTH words are stored in order, that done rises after the last
// one, that words offered afterwards are ignored, and that a second arm
// restarts the record. The depth is reduced to keep the run short.
`timescale 1ns / 1ps
module tb_capture_buffer;
  localparam int DEPTH = 100;
  localparam int W = 32;
  localparam int AW = $clog2(DEPTH);
  logic clk = 1'b0, rst_n = 1'b0;
  logic arm = 1'b0, iv = 1'b0;
  logic [W-1:0] id = '0;
  logic busy, done;
  logic [AW-1:0] ra = '0;
  logic [W-1:0] rd;
  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  capture_buffer #(.DEPTH(DEPTH), .W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .arm_i(arm),
                                              .in_valid_i(iv), .in_data_i(id), .busy_o(busy),
                                              .done_o(done), .rd_addr_i(ra), .rd_data_o(rd));

  always #2.5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic capture(input int seed_ofs);
    int k = 0;
    @(negedge clk);
    arm = 1'b1;
    @(negedge clk);
    arm = 1'b0;
    checks++;
    if (!busy || done) begin failures++; $display("arm did not start capture"); end
    while (k < DEPTH) begin
      iv = ($urandom_range(0, 2) != 0);
      id = $urandom() ^ W'(seed_ofs);
      if (iv) begin ref_mem[k] = id; k++; end
      @(negedge clk);
      if (k < DEPTH) begin
        checks++;
        if (done) begin failures++; $display("done too early at %0d", k); end
      end
    end
    iv = 1'b1; id = 32'hdeadbeef;    // offered after the record is full
    @(negedge clk);
    iv = 1'b0;
    checks++;
    if (!done || busy) begin failures++; $display("done/busy wrong after %0d words", DEPTH); end
    for (int a = 0; a < DEPTH; a++) begin
      ra = AW'(a);
      @(negedge clk);
      checks++;
      if (rd != ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d read %h expected %h", a, rd, ref_mem[a]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("not idle after reset"); end
    rst_n = 1'b1;
    capture(0);
    capture(32'h5a5a0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
