// tb_direct_recovery: feeds a random fold-count sequence and ADC samples on
// every other clock (the ADC runs at half the controller rate) and checks
// g~ = y^ - 2*lambda*C_f[n_k - d] against a history kept by the testbench, for
// several delays d and values of 2*lambda. It also checks the one-clock output
// latency and a directed case with lambda = 25 LSB.
`timescale 1ns / 1ps
module tb_direct_recovery;
  import modadc_pkg::*;

  localparam int D_MAX = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [CF_W-1:0] cf = '0;
  logic av = 1'b0;
  logic signed [ADC_BITS-1:0] ad = '0;
  logic [$clog2(D_MAX)-1:0] dly = '0;
  logic [TWOL_W-1:0] twol = 8'd50;
  logic rv;
  logic signed [REC_W-1:0] rec;
  logic signed [ADC_BITS-1:0] fo;
  logic signed [CF_W-1:0] cfu;
  int checks = 0, failures = 0;
  int hist [$];            // hist[0] = C_f applied in the current cycle
  int exp_rec, exp_cf, exp_y;
  bit exp_v = 0;

  direct_recovery #(.D_MAX(D_MAX)) dut (.clk_i(clk), .rst_ni(rst_n), .cf_i(cf), .adc_valid_i(av),
                                        .adc_data_i(ad), .delay_i(dly), .two_lambda_i(twol),
                                        .rec_valid_o(rv), .rec_o(rec), .folded_o(fo),
                                        .cf_used_o(cfu));

  always #2.5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    for (int i = 0; i < D_MAX + 1; i++) hist.push_front(0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (8000) begin
      @(negedge clk);
      checks++;
      if (rv != exp_v) begin failures++; $display("valid mismatch"); end
      if (exp_v) begin
        checks++;
        if (int'(rec) != exp_rec || int'(cfu) != exp_cf || int'(fo) != exp_y) begin
          failures++;
          if (failures < 20) $display("%t rec %0d exp %0d (cf %0d exp %0d)", $time, rec, exp_rec, cfu, exp_cf);
        end
      end
      // new inputs
      n++;
      if (n % 1000 == 0) begin dly = $urandom_range(0, D_MAX - 1); twol = $urandom_range(1, 255); end
      if ($urandom_range(0, 3) == 0) cf = cf + (($urandom_range(0, 1) == 1) ? 1 : -1);
      if ($urandom_range(0, 499) == 0) cf = CF_W'($urandom_range(0, 16382) - 8191);
      av = (n % 2 == 0);
      ad = ADC_BITS'($urandom_range(0, 255));
      hist.push_front(int'(cf));
      void'(hist.pop_back());
      exp_v = av;
      if (av) begin
        exp_cf  = hist[dly];
        exp_y   = int'(ad);
        exp_rec = exp_y - exp_cf * int'(twol);
      end
    end
    // directed: lambda = 25 LSB, C_f = -46 (rho = 92 at the peak), d = 0
    @(negedge clk);
    dly = '0; twol = 8'd50; cf = -14'sd46; ad = 8'sd20; av = 1'b1;
    @(negedge clk);
    av = 1'b0;
    checks++;
    if (!rv || int'(rec) != 20 + 46 * 50) begin failures++; $display("directed rec %0d", rec); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
