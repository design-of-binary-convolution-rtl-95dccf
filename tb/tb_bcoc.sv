// tb_bcoc: end-to-end self-checking test of the binary convolution circuit at
// its default size (3x3 kernel, 5-bit result), with no parameter overridden.
//
// The test keeps its own copy of the two input shift registers and computes
// every expected result directly as the sum of +1/-1 products of the window,
// independently of the bisection used by the circuit. It runs:
//   1. the example of the low-speed measurement: kernel 111110101 and feature
//      111110100 (element [0][0] first) must give 7 (00111), with the
//      advance pulses spread out so that the pipeline stalls between them;
//   2. the extreme windows (all pairs agree: +9, all differ: -9);
//   3. slow operations: nine write pulses, a transfer, then advance pulses
//      with random gaps;
//   4. streaming: write, transfer and advance on every cycle, so a new window
//      (the last nine bits written) enters on every pulse and a result leaves
//      on every pulse;
//   5. random mixes of all four pulses.
// Each result must arrive exactly 12 advance pulses after the pulse that takes
// its window into the product stage. The test counts how often each mechanism
// occurred and fails if one never did.
module tb_bcoc;

  localparam int LATENCY = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic data_in0 = 1'b0, data_in1 = 1'b0;
  logic insr_clk = 1'b0, sr_to_main = 1'b0, bcoc_clk = 1'b0;
  logic signed [4:0] result;
  logic out_valid, result_held;

  bcoc dut (.clk, .rst_n, .data_in0, .data_in1, .insr_clk, .sr_to_main, .bcoc_clk,
            .result, .out_valid, .result_held);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int advs = 0;

  // Reference copy of the input registers and of the window waiting to enter.
  logic [8:0] m_sr_k = '0, m_sr_f = '0, m_win_k = '0, m_win_f = '0;
  logic       m_win_v = 1'b0;
  int         exp_c[$], exp_at[$];

  // Mechanism counters.
  int n_write = 0, n_transfer = 0, n_transfer_with_write = 0, n_stall = 0;
  int n_back_to_back = 0, n_negative = 0, n_positive = 0, n_extreme = 0;
  int n_example = 0;
  logic prev_out = 1'b0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int conv(logic [8:0] k, logic [8:0] f);
    int c = 0;
    for (int i = 0; i < 9; i++) c += (k[i] == f[i]) ? 1 : -1;
    return c;
  endfunction

  // One clock cycle with the given pulses.
  task automatic step(logic sh, logic dk, logic df, logic ld, logic ad);
    @(negedge clk);
    insr_clk = sh; data_in1 = dk; data_in0 = df; sr_to_main = ld; bcoc_clk = ad;
    @(posedge clk);
    if (ad) begin
      advs++;
      if (m_win_v) begin
        exp_c.push_back(conv(m_win_k, m_win_f));
        exp_at.push_back(advs);
      end
    end
    if (!ad && exp_c.size() != 0) n_stall++;
    if (ld) begin
      m_win_k = m_sr_k; m_win_f = m_sr_f; m_win_v = 1'b1;
      n_transfer++;
      if (sh) n_transfer_with_write++;
    end else if (ad) begin
      m_win_v = 1'b0;
    end
    if (sh) begin
      m_sr_k = {dk, m_sr_k[8:1]};
      m_sr_f = {df, m_sr_f[8:1]};
      n_write++;
    end
    #1;
    if (out_valid) begin
      if (exp_c.size() == 0) check("spurious result", 1, 0);
      else begin
        int e;
        e = exp_c.pop_front();
        check("result", int'(result), e);
        check("latency in advance pulses", advs - exp_at.pop_front() + 1, LATENCY);
        if (e < 0) n_negative++; else n_positive++;
        if (e == 9 || e == -9) n_extreme++;
        if (prev_out) n_back_to_back++;
      end
    end
    prev_out = out_valid;
  endtask

  task automatic write_window(logic [8:0] k, logic [8:0] f);
    for (int i = 0; i < 9; i++) step(1'b1, k[i], f[i], 1'b0, 1'b0);
  endtask

  task automatic drain();
    for (int i = 0; i < LATENCY + 2; i++) step(1'b0, 1'b0, 1'b0, 1'b0, 1'b1);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] k, f;
    repeat (3) @(posedge clk);
    #1;
    check("no result after reset", int'(result_held), 0);
    rst_n = 1'b1;

    // 1. Measured example: printed strings are element [0][0] first.
    k = 9'b101011111;   // "111110101"
    f = 9'b001011111;   // "111110100"
    write_window(k, f);
    step(1'b0, 1'b0, 1'b0, 1'b1, 1'b0);
    for (int i = 0; i < LATENCY; i++) begin
      step(1'b0, 1'b0, 1'b0, 1'b0, 1'b1);
      repeat (3) step(1'b0, 1'b0, 1'b0, 1'b0, 1'b0);
    end
    check("example result 00111", int'(result), 7);
    check("example bits", int'(result[4:0]), int'(5'b00111));
    check("result held", int'(result_held), 1);
    if (int'(result) == 7) n_example++;

    // 2. Extremes.
    write_window(9'h1A5, 9'h1A5);
    step(1'b0, 1'b0, 1'b0, 1'b1, 1'b1);
    write_window(9'h0F0, ~9'h0F0);
    step(1'b0, 1'b0, 1'b0, 1'b1, 1'b1);
    drain();

    // 3. Slow operations.
    for (int t = 0; t < 200; t++) begin
      write_window(9'($urandom), 9'($urandom));
      step(1'b0, 1'b0, 1'b0, 1'b1, 1'b0);
      for (int i = 0; i < 4; i++) step(1'b0, 1'b0, 1'b0, 1'b0, 1'($urandom_range(0, 1)));
    end
    drain();

    // 4. Streaming: every pulse on every cycle.
    for (int t = 0; t < 600; t++)
      step(1'b1, 1'($urandom), 1'($urandom), 1'b1, 1'b1);
    drain();

    // 5. Random mixes.
    for (int t = 0; t < 3000; t++)
      step(1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom_range(0, 3) == 0),
           1'($urandom_range(0, 2) != 0));
    drain();

    check("results left over", exp_c.size(), 0);
    $display("mechanisms: write=%0d transfer=%0d transfer_with_write=%0d stall=%0d back_to_back=%0d negative=%0d positive=%0d extreme=%0d example=%0d",
             n_write, n_transfer, n_transfer_with_write, n_stall, n_back_to_back,
             n_negative, n_positive, n_extreme, n_example);
    check("serial write occurred", int'(n_write > 0), 1);
    check("transfer occurred", int'(n_transfer > 0), 1);
    check("transfer during write occurred", int'(n_transfer_with_write > 0), 1);
    check("pipeline stall occurred", int'(n_stall > 0), 1);
    check("one result per pulse occurred", int'(n_back_to_back > 500), 1);
    check("negative result occurred", int'(n_negative > 0), 1);
    check("positive result occurred", int'(n_positive > 0), 1);
    check("extreme results occurred", int'(n_extreme >= 2), 1);
    check("measured example reproduced", n_example, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
