// tb_bcoc_scaled: the convolution circuit built for the larger kernels of the
// scalability study, 5x5 and 7x7. Each instance is checked against a direct
// +1/-1 product sum. The latencies expected here are worked out by hand from
// the stage rules: 5x5 has a 13-input counter of 8 stages and a 5-bit sum, so
// 1 + 8 + 5 + 1 = 15 advance pulses; 7x7 has a 25-input counter of 10 stages
// and a 6-bit sum, so 1 + 10 + 6 + 1 = 18.
module tb_bcoc_scaled;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c5, f5, c7, f7;
  logic d5, d7;

  bcoc_scaled_run #(.N(5), .LATENCY(15), .OPS(150)) run5 (.clk, .checks(c5), .failures(f5), .done(d5));
  bcoc_scaled_run #(.N(7), .LATENCY(18), .OPS(80))  run7 (.clk, .checks(c7), .failures(f7), .done(d7));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c5 + c7, f5 + f7 + 1);
    $finish;
  end

  initial begin
    #20;
    wait (d5 && d7);
    $display("TB_RESULT checks=%0d failures=%0d", c5 + c7, f5 + f7);
    $finish;
  end

endmodule
