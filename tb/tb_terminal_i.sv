// Self-checking testbench for the type-I terminal. Words with random data are
// sent along the bus, with the terminal armed or not beforehand (sometimes in
// the same cycle). An armed terminal must turn the data down and the control
// fluxoid up, an unarmed one must pass the word on; a following unarmed word
// must pass untouched, which shows that the residual fluxoids of 0 bits were
// cleared.
module tb_terminal_i;
  import pm_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic set;
  word_t bus_in, bus_out;
  logic [WORD_BITS-1:0] down;
  logic ctrl_up;
  int checks = 0, failures = 0;
  int n_steered = 0, n_passed = 0;

  always #5 clk = ~clk;

  terminal_i dut (.clk, .rst_n, .set, .bus_in, .bus_out, .down, .ctrl_up);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // Send one word and check where it went one cycle later.
  task automatic send(logic [WORD_BITS-1:0] data, logic armed, logic set_now);
    @(negedge clk);
    bus_in = '{ctrl: 1'b1, d: data};
    set = set_now;
    @(negedge clk);
    bus_in = NO_WORD; set = 0;
    if (armed) begin
      n_steered++;
      check("down", down, data);
      check("ctrl_up", ctrl_up, 1);
      check("bus_out", bus_out, NO_WORD);
    end else begin
      n_passed++;
      check("down", down, 0);
      check("ctrl_up", ctrl_up, 0);
      check("bus_out", bus_out, {1'b1, data});
    end
    // quiet afterwards
    @(negedge clk);
    check("quiet down", down, 0);
    check("quiet ctrl_up", ctrl_up, 0);
    check("quiet bus", bus_out, NO_WORD);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic armed, same;
    logic [WORD_BITS-1:0] data;
    set = 0; bus_in = NO_WORD;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    send(6'b101010, 0, 0);
    @(negedge clk); set = 1; @(negedge clk); set = 0;
    send(6'b000000, 1, 0);        // all bits residual
    send(6'b110011, 0, 0);        // must pass: residuals were cleared
    repeat (500) begin
      armed = 1'($urandom_range(0, 1));
      same  = 1'($urandom_range(0, 1));
      data  = WORD_BITS'($urandom);
      if (armed && !same) begin
        @(negedge clk); set = 1; @(negedge clk); set = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      send(data, armed, armed && same);
      send(WORD_BITS'($urandom), 0, 0);
    end
    check("both paths used", (n_steered > 0) && (n_passed > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
