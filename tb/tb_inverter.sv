// Self-checking testbench for the inverter. Random words are trapped (at
// times split over several cycles, sometimes together with the read-out
// fluxoid), then read out; the output must be the bitwise complement with
// the control fluxoid, one cycle after read-out, and the gates must be empty
// afterwards (a second read-out gives all ones).
module tb_inverter;
  import pm_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [WORD_BITS-1:0] din;
  logic ctrl;
  word_t dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  inverter dut (.clk, .rst_n, .din, .ctrl, .dout);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic readout(logic [WORD_BITS-1:0] with_data, logic [WORD_BITS-1:0] exp_value);
    @(negedge clk);
    ctrl = 1; din = with_data;
    @(negedge clk);
    ctrl = 0; din = '0;
    check("dout", dout, {1'b1, exp_value});
    @(negedge clk);
    check("quiet", dout, NO_WORD);
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
    din = '0; ctrl = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    readout('0, '1);                         // empty inverter reads all ones
    repeat (400) begin
      v = WORD_BITS'($urandom);
      if ($urandom_range(0, 2) == 0) begin
        readout(v, ~v);                      // data with the read-out fluxoid
      end else begin
        part = WORD_BITS'($urandom) & v;
        @(negedge clk); din = part;
        @(negedge clk); din = v & ~part;
        @(negedge clk); din = '0;
        check("no output before read-out", dout, NO_WORD);
        readout('0, ~v);
      end
      readout('0, '1);                       // gates emptied by the read-out
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
