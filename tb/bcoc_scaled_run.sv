// bcoc_scaled_run: test driver for one instance of the convolution circuit at
// kernel size N, used by tb_bcoc_scaled. It writes random windows serially,
// transfers them and advances the pipeline with random gaps and in streaming
// bursts, and compares each result with the sum of +1/-1 products computed
// here, and its latency in advance pulses with LATENCY. It raises done when
// finished and reports its counts.
module bcoc_scaled_run #(
  parameter int N       = 5,
  parameter int LATENCY = 15,
  parameter int OPS     = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int NN = N * N;
  localparam int RW = $clog2(NN + 1) + 1;

  logic rst_n = 1'b0;
  logic d0 = 1'b0, d1 = 1'b0, sh = 1'b0, ld = 1'b0, ad = 1'b0;
  logic signed [RW-1:0] result;
  logic out_valid, held;

  bcoc #(.N(N)) dut (.clk, .rst_n, .data_in0(d0), .data_in1(d1), .insr_clk(sh),
                     .sr_to_main(ld), .bcoc_clk(ad), .result, .out_valid, .result_held(held));

  logic [NN-1:0] m_sr_k = '0, m_sr_f = '0, m_win_k = '0, m_win_f = '0;
  logic          m_win_v = 1'b0;
  int            exp_c[$], exp_at[$];
  int            advs = 0;
  int            n_results = 0;

  function automatic int conv(logic [NN-1:0] k, logic [NN-1:0] f);
    int c = 0;
    for (int i = 0; i < NN; i++) c += (k[i] == f[i]) ? 1 : -1;
    return c;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL N=%0d %s: got %0d expected %0d", N, what, got, exp);
    end
  endtask

  task automatic step(logic s, logic k, logic f, logic l, logic a);
    @(negedge clk);
    sh = s; d1 = k; d0 = f; ld = l; ad = a;
    @(posedge clk);
    if (a) begin
      advs++;
      if (m_win_v) begin
        exp_c.push_back(conv(m_win_k, m_win_f));
        exp_at.push_back(advs);
      end
    end
    if (l) begin
      m_win_k = m_sr_k; m_win_f = m_sr_f; m_win_v = 1'b1;
    end else if (a) m_win_v = 1'b0;
    if (s) begin
      m_sr_k = {k, m_sr_k[NN-1:1]};
      m_sr_f = {f, m_sr_f[NN-1:1]};
    end
    #1;
    if (out_valid) begin
      if (exp_c.size() == 0) check("spurious result", 1, 0);
      else begin
        check("result", int'(result), exp_c.pop_front());
        check("latency", advs - exp_at.pop_front() + 1, LATENCY);
        n_results++;
      end
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // All pairs agree, then all differ.
    for (int i = 0; i < NN; i++) step(1'b1, 1'(i % 3 == 0), 1'(i % 3 == 0), 1'b0, 1'b0);
    step(1'b0, 1'b0, 1'b0, 1'b1, 1'b1);
    for (int i = 0; i < NN; i++) step(1'b1, 1'(i % 2), 1'(~(i % 2)), 1'b0, 1'b0);
    step(1'b0, 1'b0, 1'b0, 1'b1, 1'b1);
    for (int t = 0; t < OPS; t++) begin
      for (int i = 0; i < NN; i++) step(1'b1, 1'($urandom), 1'($urandom), 1'b0, 1'($urandom_range(0, 1)));
      step(1'b0, 1'b0, 1'b0, 1'b1, 1'($urandom_range(0, 1)));
    end
    for (int t = 0; t < 10 * OPS; t++) step(1'b1, 1'($urandom), 1'($urandom), 1'b1, 1'b1);
    for (int i = 0; i < LATENCY + 2; i++) step(1'b0, 1'b0, 1'b0, 1'b0, 1'b1);
    check("results left over", exp_c.size(), 0);
    check("results seen", int'(n_results > 10 * OPS), 1);
    done = 1'b1;
  end

endmodule
