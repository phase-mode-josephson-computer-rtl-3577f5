// Self-checking testbench for the output register: each word is cleared in
// by the operation fluxoid, its data fluxoids set the bits (at times spread
// over cycles) and the control fluxoid flags it as valid one cycle later.
module tb_output_register;
  import pm_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear, done, valid;
  logic [WORD_BITS-1:0] din, value;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  output_register dut (.clk, .rst_n, .clear, .din, .done, .value, .valid);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WORD_BITS-1:0] v, part;
    clear = 0; done = 0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("reset value", value, 0);
    repeat (300) begin
      v = WORD_BITS'($urandom);
      if ($urandom_range(0, 3) == 0) v = '0;
      part = WORD_BITS'($urandom) & v;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; din = part;
      @(negedge clk); din = v & ~part; done = 1;
      @(negedge clk); din = '0; done = 0;
      check("valid", valid, 1);
      check("value", value, v);
      @(negedge clk);
      check("valid is a pulse", valid, 0);
      check("value held", value, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
