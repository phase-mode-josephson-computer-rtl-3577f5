// Self-checking testbench for the fluxoid memory. Random writes (W, then a
// word on the bus), reads (R) and words passing through an unarmed memory are
// compared with a reference array. Checked: the read word and its control
// fluxoid leave the bus after k cycles for word k; reads do not destroy the
// word; W leaves on w_exit one cycle later; a written word lands after
// NWORDS-k+1 cycles with a wr_done pulse and does not leak out on the left;
// residual arming from 0 bits is cleared (the next write elsewhere is exact).
module tb_memory;
  import pm_pkg::*;
  localparam int N = NWORDS;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] r, w;
  word_t bus_in, bus_out;
  logic w_exit, wr_done;
  int checks = 0, failures = 0;
  int n_reads = 0, n_writes = 0, n_pass = 0;
  logic [WORD_BITS-1:0] ref_mem [N];

  always #5 clk = ~clk;

  memory #(.N(N)) dut (.clk, .rst_n, .r, .w, .bus_in, .bus_out, .w_exit, .wr_done);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // Watch bus_out and wr_done for `window` cycles after the current edge.
  task automatic watch(int window, output word_t first, output int at, output int n_words,
                       output int done_at);
    first = NO_WORD; at = -1; n_words = 0; done_at = -1;
    for (int c = 1; c <= window; c++) begin
      if (bus_out != NO_WORD) begin
        if (at < 0) begin first = bus_out; at = c; end
        n_words++;
      end
      if (wr_done && done_at < 0) done_at = c;
      @(negedge clk);
    end
  endtask

  task automatic do_read(int k);   // k = 1..N
    word_t first; int at, n, done_at;
    @(negedge clk); r[k-1] = 1;
    @(negedge clk); r = '0;
    watch(N + 2, first, at, n, done_at);
    check("read word", first, {1'b1, ref_mem[k-1]});
    check("read delay", at, k);
    check("one word", n, 1);
    n_reads++;
  endtask

  task automatic do_write(int k, logic [WORD_BITS-1:0] v);
    word_t first; int at, n, done_at;
    @(negedge clk); w[k-1] = 1;
    @(negedge clk); w = '0;
    check("w_exit", w_exit, 1);
    repeat ($urandom_range(0, 2)) @(negedge clk);
    bus_in = '{ctrl: 1'b1, d: v};
    @(negedge clk); bus_in = NO_WORD;
    watch(N + 3, first, at, n, done_at);
    check("written word does not leak", n, 0);
    check("wr_done delay", done_at, N - k + 1);
    ref_mem[k-1] = v;
    n_writes++;
  endtask

  task automatic do_pass(logic [WORD_BITS-1:0] v);
    word_t first; int at, n, done_at;
    @(negedge clk); bus_in = '{ctrl: 1'b1, d: v};
    @(negedge clk); bus_in = NO_WORD;
    watch(N + 3, first, at, n, done_at);
    check("passing word", first, {1'b1, v});
    check("passing delay", at, N);
    check("no wr_done", done_at, -1);
    n_pass++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = '0; w = '0; bus_in = NO_WORD;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 1; k <= N; k++) do_read(k);             // all zero after reset
    for (int k = 1; k <= N; k++) do_write(k, WORD_BITS'(7 * k + 1));
    for (int k = 1; k <= N; k++) do_read(k);
    repeat (600) begin
      case ($urandom_range(0, 4))
        0, 1: do_read($urandom_range(1, N));
        2, 3: do_write($urandom_range(1, N), WORD_BITS'($urandom));
        default: do_pass(WORD_BITS'($urandom));
      endcase
    end
    for (int k = 1; k <= N; k++) do_read(k);
    $display("reads=%0d writes=%0d passes=%0d", n_reads, n_writes, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
