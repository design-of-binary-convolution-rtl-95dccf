// tb_bcoc_pipe_counter: self-checking test of the gate-level pipeline counter
// in its two sizes of the 3x3 design, 5 inputs in 6 stages and 4 inputs in 4
// stages. Random bit vectors enter with random gaps in the advance pulses; each
// result is compared with a population count done here, and the number of
// advance pulses between entry and result must equal the stage count.
module tb_bcoc_pipe_counter;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adv = 1'b0;
  logic in_valid = 1'b0;
  logic [4:0] din = '0;

  logic [2:0] cnt5, cnt4;
  logic       v5, v4;

  int checks = 0;
  int failures = 0;
  int advs = 0;

  bcoc_pipe_counter #(.INPUTS(5)) dut5 (
    .clk, .rst_n, .adv, .in_valid, .din(din), .count(cnt5), .out_valid(v5));
  bcoc_pipe_counter #(.INPUTS(4)) dut4 (
    .clk, .rst_n, .adv, .in_valid, .din(din[3:0]), .count(cnt4), .out_valid(v4));

  always #5 clk = ~clk;

  // Expected results: count and the pulse number of entry.
  int exp5_cnt[$], exp5_at[$], exp4_cnt[$], exp4_at[$];

  function automatic int popc(logic [4:0] v, int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += int'(v[i]);
    return c;
  endfunction

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
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      adv      = (cyc >= 1980) ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_valid = (cyc < 1960) && ($urandom_range(0, 4) != 0);
      din      = 5'($urandom);
      if (cyc % 97 == 0) din = 5'b11111;
      if (cyc % 89 == 0) din = 5'b00000;
      @(posedge clk);
      if (adv) begin
        advs++;
        if (in_valid) begin
          exp5_cnt.push_back(popc(din, 5)); exp5_at.push_back(advs);
          exp4_cnt.push_back(popc(din, 4)); exp4_at.push_back(advs);
        end
      end
      #1;
      if (adv && v5) begin
        if (exp5_cnt.size() == 0) check("5-input spurious result", 1, 0);
        else begin
          check("5-input count", int'(cnt5), exp5_cnt.pop_front());
          check("5-input latency", advs - exp5_at.pop_front() + 1, 6);
        end
      end
      if (adv && v4) begin
        if (exp4_cnt.size() == 0) check("4-input spurious result", 1, 0);
        else begin
          check("4-input count", int'(cnt4), exp4_cnt.pop_front());
          check("4-input latency", advs - exp4_at.pop_front() + 1, 4);
        end
      end
    end
    check("5-input results left over", exp5_cnt.size(), 0);
    check("4-input results left over", exp4_cnt.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
