// tb_bcoc_out_sr: self-checking test of the output register. Each signed
// 4-bit sum must come out doubled with a 1 in the low bit (2*sum + 1, 5 bits),
// out_valid must pulse once per stored result, and the result must hold while
// no new valid sum arrives.
module tb_bcoc_out_sr;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adv = 1'b0;
  logic in_valid = 1'b0;
  logic signed [3:0] sum = '0;
  logic signed [4:0] result;
  logic out_valid, held;

  int checks = 0;
  int failures = 0;
  int last = 0;
  logic any = 1'b0;

  bcoc_out_sr #(.SW(4)) dut (.clk, .rst_n, .adv, .in_valid, .sum, .result, .out_valid, .held);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check("held after reset", int'(held), 0);
    check("valid after reset", int'(out_valid), 0);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      adv      = ($urandom_range(0, 2) != 0);
      in_valid = ($urandom_range(0, 2) == 0);
      sum      = 4'($urandom_range(0, 15));
      if (cyc < 16) begin adv = 1'b1; in_valid = 1'b1; sum = 4'(cyc); end
      @(posedge clk);
      if (adv && in_valid) begin
        last = 2 * int'(sum) + 1;
        any  = 1'b1;
      end
      #1;
      check("out_valid pulse", int'(out_valid), int'(adv && in_valid));
      check("held", int'(held), int'(any));
      if (any) check("result", int'(result), last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
