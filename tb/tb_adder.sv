// Self-checking testbench for the adder/accumulator/subtractor. Random
// sequences of put (read out, then send a word into the empty adder),
// accumulate and subtract (subtraction fluxoid plus the inverted operand) are
// compared with an arithmetic reference: 6-bit sums, an overflow fluxoid for
// each carry out of the top stage when not subtracting, and an end-around
// carry when subtracting. Each word must settle within 14 cycles; read-out
// must return the contents with the control fluxoid and empty the adder.
module tb_adder;
  import pm_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [WORD_BITS-1:0] din, acc;
  logic sub, rd, overflow, busy;
  word_t dout;
  int checks = 0, failures = 0;
  int n_overflow = 0, n_end_around = 0, n_sub_no_carry = 0;

  logic [WORD_BITS-1:0] ref_acc;
  logic                 ref_sub;
  int                   ov_seen;

  always #5 clk = ~clk;

  adder dut (.clk, .rst_n, .din, .sub, .rd, .dout, .overflow, .acc, .busy);

  always @(posedge clk) if (rst_n && overflow) ov_seen++;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // Send one word (with or without the subtraction fluxoid) and let it settle.
  task automatic add_word(logic [WORD_BITS-1:0] v, logic with_sub);
    logic [WORD_BITS:0] s;
    int cycles;
    int exp_ov;
    if (with_sub) begin
      @(negedge clk); sub = 1;
      @(negedge clk); sub = 0;
      ref_sub = 1;
    end
    ov_seen = 0;
    s = {1'b0, ref_acc} + {1'b0, v};
    exp_ov = 0;
    if (s[WORD_BITS] && ref_sub) begin
      ref_acc = s[WORD_BITS-1:0] + 1'b1;
      ref_sub = 0;
      n_end_around++;
    end else begin
      ref_acc = s[WORD_BITS-1:0];
      if (s[WORD_BITS]) begin exp_ov = 1; n_overflow++; end
      else if (ref_sub) n_sub_no_carry++;
    end
    @(negedge clk); din = v;
    @(negedge clk); din = '0;
    cycles = 1;
    while (busy && cycles < 40) begin @(negedge clk); cycles++; end
    check("settles within 14 cycles", cycles <= 14, 1);
    @(negedge clk);
    check("acc", acc, ref_acc);
    check("overflow count", ov_seen, exp_ov);
  endtask

  task automatic read_out();
    @(negedge clk); rd = 1;
    @(negedge clk); rd = 0;
    check("dout", dout, {1'b1, ref_acc});
    @(negedge clk);
    check("emptied", acc, 0);
    check("dout pulse", dout, NO_WORD);
    ref_acc = '0;
    ref_sub = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WORD_BITS-1:0] a, b;
    din = '0; sub = 0; rd = 0; ref_acc = '0; ref_sub = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Directed: 20 - 7 = 13 with 1's complement operand, 63 + 1 overflows.
    add_word(6'd20, 0);
    add_word(~6'd7, 1);
    check("20-7", acc, 13);
    read_out();
    add_word(6'd63, 0);
    add_word(6'd1, 0);
    check("63+1 wraps", acc, 0);
    read_out();
    repeat (600) begin
      case ($urandom_range(0, 3))
        0: read_out();
        1, 2: add_word(WORD_BITS'($urandom), 0);
        default: begin
          a = ref_acc;
          b = WORD_BITS'($urandom);
          add_word(~b, 1);
          if (a > b) check("a-b", acc, a - b);
        end
      endcase
    end
    check("overflow seen", n_overflow > 0, 1);
    check("end-around carry seen", n_end_around > 0, 1);
    check("subtraction without carry seen", n_sub_no_carry > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
