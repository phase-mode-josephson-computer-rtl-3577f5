// End-to-end testbench for the phase-mode processor at its default size
// (6-bit words, 8 memory words). Programs are loaded through the manual W
// lines and the input bus, the machine is started with S and runs by itself
// until the stop instruction reaches the counter.
//
//   P1  1 ADD 6   2 ADD 7   3 STA 8   4 OUT 8   5 STOP   6 A   7 B
//       output A+B (mod 64), overflow fluxoid when A+B > 63
//   P2  1 INV 8   2 STI 8   3 ADD 7   4 SUB 8   5 STA 7   6 STOP   7 A   8 B
//       word 7 = A - B in 1's complement (end-around carry when A > B)
//   P3  1 OUT 7   2 STOP
//       run after P2 on the same memory: shows its result
//
// Each run is checked against arithmetic worked out here, and the number of
// instructions executed (end-of-operation fluxoids) against the program.
// Counted and required at least once: every instruction type, an overflow,
// an end-around carry, a subtraction without carry, words turned down at each
// type-I terminal, words passing the terminals to the control unit, each
// type-II terminal steering, and a restart after a stop.
module tb_phase_mode_processor;
  import pm_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start;
  logic [NWORDS-1:0] ext_w;
  word_t ext_word;
  logic [WORD_BITS-1:0] out_value;
  logic out_valid, overflow, stopped;
  int checks = 0, failures = 0;

  // Mechanism counters
  int n_op [8];
  int n_overflow = 0, n_end_around = 0, n_sub_no_carry = 0;
  int n_down_add = 0, n_down_inv = 0, n_down_out = 0, n_fetch = 0;
  int n_rd_add = 0, n_rd_inv = 0, n_stop = 0, n_restart = 0;
  int n_end_of_op = 0, n_out = 0;
  logic [WORD_BITS-1:0] last_out;

  always #5 clk = ~clk;

  phase_mode_processor dut (.clk, .rst_n, .start, .ext_w, .ext_word,
                            .out_value, .out_valid, .overflow, .stopped);

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 8; i++) if (dut.op[i]) n_op[i]++;
    if (overflow)             n_overflow++;
    if (dut.u_add.end_around) n_end_around++;
    if (dut.up_add)           n_down_add++;
    if (dut.up_inv)           n_down_inv++;
    if (dut.up_out)           n_down_out++;
    if (dut.bus_to_cu.ctrl)   n_fetch++;
    if (dut.rd_add)           n_rd_add++;
    if (dut.rd_inv)           n_rd_inv++;
    if (stopped)              n_stop++;
    if (dut.end_of_op)        n_end_of_op++;
    if (out_valid) begin n_out++; last_out = out_value; end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Manual write of one memory word: W line first, then the word on the bus.
  task automatic load(int k, logic [WORD_BITS-1:0] v);
    @(negedge clk); ext_w[k-1] = 1;
    @(negedge clk); ext_w = '0;
    @(negedge clk); ext_word = '{ctrl: 1'b1, d: v};
    @(negedge clk); ext_word = NO_WORD;
    repeat (NWORDS + 4) @(negedge clk);
  endtask

  // Start the machine and wait for the stop fluxoid; returns the number of
  // instructions completed (stop excluded) and the cycles taken.
  task automatic run(output int n_instr, output int cycles);
    int eop0, stop0;
    eop0 = n_end_of_op; stop0 = n_stop;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (n_stop == stop0 && cycles < 5000) begin @(negedge clk); cycles++; end
    repeat (20) @(negedge clk);
    check("machine stopped", n_stop - stop0, 1);
    n_instr = n_end_of_op - eop0;
  endtask

  task automatic program_p1(logic [WORD_BITS-1:0] a, logic [WORD_BITS-1:0] b);
    int n_instr, cycles, out0, ov0;
    load(1, instr(OP_ADD, 3'd5));
    load(2, instr(OP_ADD, 3'd6));
    load(3, instr(OP_STA, 3'd7));
    load(4, instr(OP_OUT, 3'd7));
    load(5, instr(OP_STOP, 3'd0));
    load(6, a);
    load(7, b);
    out0 = n_out; ov0 = n_overflow;
    run(n_instr, cycles);
    check("P1 instructions", n_instr, 4);
    check("P1 one output", n_out - out0, 1);
    check("P1 A+B", last_out, WORD_BITS'(a + b));
    check("P1 overflow", n_overflow - ov0, (int'(a) + int'(b) > 63) ? 1 : 0);
  endtask

  task automatic program_p2_p3(logic [WORD_BITS-1:0] a, logic [WORD_BITS-1:0] b);
    int n_instr, cycles, out0;
    logic [WORD_BITS:0] s;
    logic [WORD_BITS-1:0] exp;
    load(1, instr(OP_INV, 3'd7));
    load(2, instr(OP_STI, 3'd7));
    load(3, instr(OP_ADD, 3'd6));
    load(4, instr(OP_SUB, 3'd7));
    load(5, instr(OP_STA, 3'd6));
    load(6, instr(OP_STOP, 3'd0));
    load(7, a);
    load(8, b);
    run(n_instr, cycles);
    check("P2 instructions", n_instr, 5);
    s = {1'b0, a} + {1'b0, ~b};
    if (s[WORD_BITS]) exp = s[WORD_BITS-1:0] + 1'b1;
    else begin exp = s[WORD_BITS-1:0]; n_sub_no_carry++; end
    if (a > b) check("P2 exact difference", exp, a - b);
    // P3 on the same memory, a restart after a stop
    load(1, instr(OP_OUT, 3'd6));
    load(2, instr(OP_STOP, 3'd0));
    out0 = n_out;
    run(n_instr, cycles);
    n_restart++;
    check("P3 instructions", n_instr, 1);
    check("P3 one output", n_out - out0, 1);
    check("P3 A-B", last_out, exp);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_op[i]) n_op[i] = 0;
    start = 0; ext_w = '0; ext_word = NO_WORD; last_out = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    program_p1(6'd20, 6'd22);
    program_p1(6'd50, 6'd30);          // overflow
    program_p2_p3(6'd45, 6'd17);       // end-around carry
    program_p2_p3(6'd9, 6'd30);        // negative result, no carry
    repeat (6) begin
      program_p1(WORD_BITS'($urandom), WORD_BITS'($urandom));
      program_p2_p3(WORD_BITS'($urandom), WORD_BITS'($urandom));
    end
    $display("ops out=%0d add=%0d sub=%0d inv=%0d sta=%0d sti=%0d stop=%0d",
             n_op[OP_OUT], n_op[OP_ADD], n_op[OP_SUB], n_op[OP_INV], n_op[OP_STA],
             n_op[OP_STI], n_op[OP_STOP]);
    $display("overflow=%0d end_around=%0d sub_no_carry=%0d down add/inv/out=%0d/%0d/%0d fetch=%0d rd add/inv=%0d/%0d restarts=%0d",
             n_overflow, n_end_around, n_sub_no_carry, n_down_add, n_down_inv, n_down_out,
             n_fetch, n_rd_add, n_rd_inv, n_restart);
    check("OUT executed", n_op[OP_OUT] > 0, 1);
    check("ADD executed", n_op[OP_ADD] > 0, 1);
    check("SUB executed", n_op[OP_SUB] > 0, 1);
    check("INV executed", n_op[OP_INV] > 0, 1);
    check("STA executed", n_op[OP_STA] > 0, 1);
    check("STI executed", n_op[OP_STI] > 0, 1);
    check("STOP executed", n_op[OP_STOP] > 0, 1);
    check("overflow happened", n_overflow > 0, 1);
    check("end-around carry happened", n_end_around > 0, 1);
    check("subtraction without carry happened", n_sub_no_carry > 0, 1);
    check("T-I adder steered", n_down_add > 0, 1);
    check("T-I inverter steered", n_down_inv > 0, 1);
    check("T-I output steered", n_down_out > 0, 1);
    check("words passed to the control unit", n_fetch > 0, 1);
    check("T-II adder steered", n_rd_add > 0, 1);
    check("T-II inverter steered", n_rd_inv > 0, 1);
    check("restart after stop", n_restart > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
