// tb_bcoc_sr_memory: self-checking test of the input shift-register memory of
// the 3x3 design. Random 9-bit kernel and feature windows are shifted in one
// bit per write pulse, element 0 first, then transferred; the parallel outputs
// must equal the words written. A transfer in the same cycle as a write must
// take the contents from before that write, and the valid flag must clear on
// the next advance pulse.
module tb_bcoc_sr_memory;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic shift_en = 1'b0, din_k = 1'b0, din_f = 1'b0, load = 1'b0, adv = 1'b0;
  logic [8:0] k_bits, f_bits;
  logic out_valid;

  int checks = 0;
  int failures = 0;

  bcoc_sr_memory #(.N(3)) dut (.clk, .rst_n, .shift_en, .din_k, .din_f, .load, .adv,
                               .k_bits, .f_bits, .out_valid);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic write_word(logic [8:0] k, logic [8:0] f);
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      shift_en = 1'b1; din_k = k[i]; din_f = f[i];
      // Random advance pulses while writing must not disturb anything.
      adv = ($urandom_range(0, 1) != 0);
    end
    @(negedge clk);
    shift_en = 1'b0; adv = 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] k, f, k_next, f_next;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      k = 9'($urandom); f = 9'($urandom);
      if (t == 0) begin k = 9'b101011111; f = 9'b001011111; end
      write_word(k, f);
      @(negedge clk); load = 1'b1;
      @(negedge clk); load = 1'b0;
      check("kernel word", int'(k_bits), int'(k));
      check("feature word", int'(f_bits), int'(f));
      check("valid after load", int'(out_valid), 1);
      // Transfer together with a write: old contents are taken.
      k_next = 9'($urandom); f_next = 9'($urandom);
      shift_en = 1'b1; din_k = k_next[8]; din_f = f_next[8]; load = 1'b1;
      @(negedge clk);
      shift_en = 1'b0; load = 1'b0;
      check("kernel word with write", int'(k_bits), int'(k));
      check("feature word with write", int'(f_bits), int'(f));
      check("valid held without advance", int'(out_valid), 1);
      adv = 1'b1;
      @(negedge clk);
      adv = 1'b0;
      check("valid cleared by advance", int'(out_valid), 0);
      check("word held after advance", int'(k_bits), int'(k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
