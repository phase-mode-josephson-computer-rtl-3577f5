// Self-checking testbench for the program counter. START must give R1 one
// cycle later; each count must give the next R line after one cycle per gate
// the count fluxoid passes (NWORDS-k cycles from line k); a count after the
// last line, or after STOP, must give nothing. Runs are cut short by STOP at
// random points and the counter is restarted.
module tb_program_counter;
  import pm_pkg::*;
  localparam int N = NWORDS;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start, count, stop;
  logic [N-1:0] r;
  int checks = 0, failures = 0;
  int n_stops = 0, n_overruns = 0;

  always #5 clk = ~clk;

  program_counter #(.N(N)) dut (.clk, .rst_n, .start, .count, .stop, .r);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // Pulse one input and collect the R lines for the next `window` cycles.
  task automatic pulse_and_watch(int which, int window, output logic [N-1:0] seen, output int delay);
    seen = '0; delay = -1;
    @(negedge clk);
    start = (which == 0); count = (which == 1); stop = (which == 2);
    @(negedge clk);
    start = 0; count = 0; stop = 0;
    for (int c = 1; c <= window; c++) begin
      if (r != '0 && delay < 0) begin seen = r; delay = c; end
      else if (r != '0) begin seen = seen | r; end
      @(negedge clk);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] seen;
    int delay, stop_at;
    start = 0; count = 0; stop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pulse_and_watch(1, N + 2, seen, delay);
    check("count before start is lost", seen, 0);
    repeat (40) begin
      stop_at = $urandom_range(1, N + 1);      // N+1: run off the end
      pulse_and_watch(0, 3, seen, delay);
      check("R1", seen, 1);
      check("R1 delay", delay, 1);
      for (int k = 1; k < N && k < stop_at; k++) begin
        pulse_and_watch(1, N + 2, seen, delay);
        check("next line", seen, 1 << k);
        check("count delay", delay, N - k);
      end
      if (stop_at <= N) begin
        pulse_and_watch(2, 3, seen, delay);
        n_stops++;
        check("stop gives nothing", seen, 0);
      end else begin
        n_overruns++;
      end
      pulse_and_watch(1, N + 2, seen, delay);
      check("count after stop or end is lost", seen, 0);
    end
    check("stop and overrun both exercised", (n_stops > 0) && (n_overruns > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
