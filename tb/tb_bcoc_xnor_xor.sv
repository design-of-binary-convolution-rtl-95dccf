// tb_bcoc_xnor_xor: self-checking test of the product stage of the 3x3 design.
// For random kernel and feature windows, part a (elements 0..4) must hold the
// XNOR of the pairs and part b (elements 5..8) their XOR, registered on an
// advance pulse and held without one.
module tb_bcoc_xnor_xor;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adv = 1'b0;
  logic in_valid = 1'b0;
  logic [8:0] k_bits = '0, f_bits = '0;
  logic [4:0] part_a;
  logic [3:0] part_b;
  logic out_valid;

  int checks = 0;
  int failures = 0;
  logic [4:0] exp_a = '0;
  logic [3:0] exp_b = '0;
  logic       exp_v = 1'b0;

  bcoc_xnor_xor #(.N(3)) dut (.clk, .rst_n, .adv, .in_valid, .k_bits, .f_bits,
                              .part_a, .part_b, .out_valid);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
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
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 800; cyc++) begin
      @(negedge clk);
      adv      = ($urandom_range(0, 3) != 0);
      in_valid = ($urandom_range(0, 1) != 0);
      k_bits   = 9'($urandom);
      f_bits   = 9'($urandom);
      @(posedge clk);
      if (adv) begin
        for (int i = 0; i < 5; i++) exp_a[i] = (k_bits[i] == f_bits[i]);
        for (int i = 0; i < 4; i++) exp_b[i] = (k_bits[5+i] != f_bits[5+i]);
        exp_v = in_valid;
      end
      #1;
      check("part a", int'(part_a), int'(exp_a));
      check("part b", int'(part_b), int'(exp_b));
      check("valid", int'(out_valid), int'(exp_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
