// Self-checking testbench for the ICF gate, both variants (with and without
// the C output). Directed cases walk the truth table (X Y -> A B) and the
// Re behaviour; then random pulse streams are compared with a reference that
// tracks the storage loop of each gate.
module tb_icf_gate;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x, y, re;
  logic a0, b0, c0, t0;
  logic a1, b1, c1, t1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  icf_gate #(.HAS_C(1'b0)) dut0 (.clk, .rst_n, .x, .y, .re, .a(a0), .b(b0), .c(c0), .trapped(t0));
  icf_gate #(.HAS_C(1'b1)) dut1 (.clk, .rst_n, .x, .y, .re, .a(a1), .b(b1), .c(c1), .trapped(t1));

  // Reference loop state and expected outputs (same for both gates except C).
  logic ref_loop;
  logic ea, eb, ec;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Apply one set of input pulses for one cycle and check the outputs.
  task automatic step(logic px, logic py, logic pre);
    logic loop_before;
    @(negedge clk);
    x = px; y = py; re = pre;
    loop_before = ref_loop | py;           // Y counts as arriving first
    ea = px & ~loop_before;
    eb = px & loop_before;
    ec = pre & loop_before & ~px;
    ref_loop = loop_before & ~px & ~pre;
    @(negedge clk);
    x = 0; y = 0; re = 0;
    check("A",  a0, ea);  check("B",  b0, eb);  check("C(no C)", c0, 1'b0);
    check("A'", a1, ea);  check("B'", b1, eb);  check("C", c1, ec);
    check("trapped", t0, ref_loop); check("trapped'", t1, ref_loop);
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; y = 0; re = 0; ref_loop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Truth table of the document: XY=00 -> 00, 01 -> 00, 10 -> 10, 11 -> 01.
    step(0, 0, 0);
    step(0, 1, 0);  step(1, 0, 0);       // Y trapped, then X leaves on B
    step(1, 0, 0);                       // X alone leaves on A
    step(1, 1, 0);                       // X and Y together leave on B
    step(0, 1, 0);  step(0, 0, 1);       // Re pulls the trapped fluxoid out (C)
    step(1, 0, 0);                       // loop empty again: A
    step(0, 0, 1);                       // Re with nothing trapped: nothing
    step(0, 1, 0);  step(0, 1, 0);       // second Y is lost
    step(1, 0, 0);  step(1, 0, 0);       // B, then A
    step(0, 1, 0);  step(1, 0, 1);       // X and Re together: X served first
    repeat (2000) step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)),
                       1'($urandom_range(0, 3) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
