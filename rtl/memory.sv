// Word-organised fluxoid memory: NWORDS words of WORD_BITS bits (8 x 6 = 48).
//
// Every cell is two ICF gates. The lower gate stores the bit as a trapped
// fluxoid. The upper gate steers a bit arriving on the bus into the lower
// gate when its word has been armed for writing. Below each word sits a
// control gate on the bus's control line, armed together with the word.
//
// Write: a W fluxoid for word k is fanned out; it arms the upper gates and the
// control gate of word k, clears the bits stored in word k (Re of the lower
// gates), and then leaves the memory on `w_exit`. The next word on the bus,
// travelling leftward from column to column, passes the unarmed words
// through the A outputs; at word k each data fluxoid leaves its upper gate on
// B and is trapped in the lower gate, and the control fluxoid leaves the
// control gate on B, clears the upper gates left armed by 0 bits and leaves
// on `wr_done`.
//
// Read: an R fluxoid for word k is fanned out to the X input of the lower
// gates. A stored fluxoid leaves on B and is fanned out: one copy is trapped
// again in the same gate (the read does not destroy the word), the other joins
// the bus and travels leftward. The R fluxoid itself joins the bus's control
// line as the word's control fluxoid.
//
// Interface: `r`, `w` one pulse line per word (bit k-1 is word k), `bus_in`
// from the right, `bus_out` to the left, `w_exit` and `wr_done` pulses.
// Timing: one cycle per column on the bus. A word read from word k leaves
// `bus_out` k cycles after R; a word entering `bus_in` is stored in word k
// NWORDS-k+1 cycles later, when `wr_done` pulses; `w_exit` is one cycle
// after W. A word must be armed before its data arrive.
//
// Following the document: the two-gate cell, the W and R sequences, the
// rewrite on read and the control gates on the control line. This design's
// own: the column-by-column timing and merging the read word into the bus
// (an OR of pulses) at its own column.
module memory
  import pm_pkg::*;
#(
  parameter int unsigned N = NWORDS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] r,
  input  logic [N-1:0] w,
  input  word_t        bus_in,
  output word_t        bus_out,
  output logic         w_exit,
  output logic         wr_done
);

  word_t                           col_in  [N];   // bus entering column k
  word_t                           col_out [N];   // bus leaving column k (leftward)
  logic [N-1:0][WORD_BITS-1:0]     pass_d;        // upper gate A: bit passes on
  logic [N-1:0][WORD_BITS-1:0]     steer;         // upper gate B: bit to be stored
  logic [N-1:0][WORD_BITS-1:0]     read_b;        // lower gate B: bit read out
  logic [N-1:0][WORD_BITS-1:0]     up_held;
  logic [N-1:0][WORD_BITS-1:0]     bit_held;
  logic [N-1:0]                    pass_ctrl;     // control gate A
  logic [N-1:0]                    ctrl_b;        // control gate B: word stored
  logic [N-1:0]                    ctrl_held;
  logic [N-1:0]                    r_q;           // R fluxoid joining the control line
  logic                            w_exit_q;

  for (genvar k = 0; k < N; k++) begin : g_word
    if (k == N - 1) begin : g_edge
      assign col_in[k] = bus_in;
    end else begin : g_inner
      assign col_in[k] = col_out[k+1];
    end

    for (genvar i = 0; i < WORD_BITS; i++) begin : g_cell
      icf_gate #(.HAS_C(1'b0)) u_upper (
        .clk    (clk),
        .rst_n  (rst_n),
        .x      (col_in[k].d[i]),
        .y      (w[k]),
        .re     (ctrl_b[k]),
        .a      (pass_d[k][i]),
        .b      (steer[k][i]),
        .c      (),
        .trapped(up_held[k][i])
      );
      icf_gate #(.HAS_C(1'b0)) u_lower (
        .clk    (clk),
        .rst_n  (rst_n),
        .x      (r[k]),
        .y      (steer[k][i] | read_b[k][i]),
        .re     (w[k]),
        .a      (),
        .b      (read_b[k][i]),
        .c      (),
        .trapped(bit_held[k][i])
      );
    end

    icf_gate #(.HAS_C(1'b0)) u_ctrl (
      .clk    (clk),
      .rst_n  (rst_n),
      .x      (col_in[k].ctrl),
      .y      (w[k]),
      .re     (1'b0),
      .a      (pass_ctrl[k]),
      .b      (ctrl_b[k]),
      .c      (),
      .trapped(ctrl_held[k])
    );

    assign col_out[k] = '{ctrl: pass_ctrl[k] | r_q[k], d: pass_d[k] | read_b[k]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q      <= '0;
      w_exit_q <= 1'b0;
    end else begin
      r_q      <= r;
      w_exit_q <= |w;
    end
  end

  assign bus_out = col_out[0];
  assign w_exit  = w_exit_q;
  assign wr_done = |ctrl_b;

  // A word is never read and written at once.
  a_no_read_write: assert property (@(posedge clk) disable iff (!rst_n)
    (r & w) == '0)
    else $error("memory word read and written in the same cycle");

endmodule
