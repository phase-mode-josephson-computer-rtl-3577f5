// Self-checking testbench for the control unit. Every one of the 64
// instruction codes, then random ones, is sent as a bus word; exactly one
// OPERATION line (the opcode) must pulse 3 cycles later and exactly one of
// R1..R8 / W1..W8 (R for b3 = 0, W for b3 = 1, word = address field + 1)
// 4 cycles later. An end-of-operation reset follows each instruction; without
// it the fluxoids left in the trees would misroute the next one.
module tb_control_unit;
  import pm_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  word_t bus_in;
  logic reset;
  logic [7:0] op, r, w;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_unit dut (.clk, .rst_n, .bus_in, .reset, .op, .r, .w);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic decode(logic [5:0] ins);
    logic [7:0] op_seen [8];
    logic [7:0] r_seen [8];
    logic [7:0] w_seen [8];
    logic [7:0] exp_r, exp_w;
    @(negedge clk);
    bus_in = '{ctrl: 1'b1, d: ins};
    for (int c = 1; c <= 7; c++) begin
      @(negedge clk);
      bus_in = NO_WORD;
      op_seen[c] = op; r_seen[c] = r; w_seen[c] = w;
    end
    exp_r = ins[3] ? 8'h00 : 8'(1 << ins[2:0]);
    exp_w = ins[3] ? 8'(1 << ins[2:0]) : 8'h00;
    for (int c = 1; c <= 7; c++) begin
      check($sformatf("op %02o cycle %0d", ins, c), op_seen[c], (c == 3) ? 8'(1 << ins[5:3]) : 8'h00);
      check($sformatf("r %02o cycle %0d", ins, c), r_seen[c], (c == 4) ? exp_r : 8'h00);
      check($sformatf("w %02o cycle %0d", ins, c), w_seen[c], (c == 4) ? exp_w : 8'h00);
    end
    @(negedge clk); reset = 1;
    @(negedge clk); reset = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_in = NO_WORD; reset = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) decode(6'(i));
    for (int i = 63; i >= 0; i--) decode(6'(i));
    repeat (200) decode(6'($urandom));
    decode(instr(OP_STOP, 3'd0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
