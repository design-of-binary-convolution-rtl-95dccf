// tb_bcoc_adder: self-checking test of the pipelined adder of the 3x3 design
// (3-bit Ya1, 3-bit Yb0, 4-bit signed sum). Every operand pair is applied, then
// random pairs with random gaps in the advance pulses; the sum must equal
// Ya1 - Yb0 - 1 and arrive exactly 4 advance pulses after entry.
module tb_bcoc_adder;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adv = 1'b0;
  logic in_valid = 1'b0;
  logic [2:0] ya1 = '0, yb0 = '0;
  logic signed [3:0] sum;
  logic out_valid;

  int checks = 0;
  int failures = 0;
  int advs = 0;
  int exp_sum[$], exp_at[$];

  bcoc_adder #(.WA(3), .WB(3), .SW(4)) dut (
    .clk, .rst_n, .adv, .in_valid, .ya1, .yb0, .sum, .out_valid);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      @(negedge clk);
      if (cyc < 30) begin
        // Exhaustive over the legal ranges Ya1 = 0..5, Yb0 = 0..4.
        adv = 1'b1; in_valid = 1'b1;
        ya1 = 3'(cyc / 5); yb0 = 3'(cyc % 5);
      end else begin
        adv      = (cyc >= 1480) ? 1'b1 : ($urandom_range(0, 2) != 0);
        in_valid = (cyc < 1470) && ($urandom_range(0, 3) != 0);
        ya1      = 3'($urandom_range(0, 5));
        yb0      = 3'($urandom_range(0, 4));
      end
      @(posedge clk);
      if (adv) begin
        advs++;
        if (in_valid) begin
          exp_sum.push_back(int'(ya1) - int'(yb0) - 1);
          exp_at.push_back(advs);
        end
      end
      #1;
      if (adv && out_valid) begin
        if (exp_sum.size() == 0) check("spurious sum", 1, 0);
        else begin
          check("sum", int'(sum), exp_sum.pop_front());
          check("latency", advs - exp_at.pop_front() + 1, 4);
        end
      end
    end
    check("sums left over", exp_sum.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
