// Parallel adder / accumulator / 1's complement subtractor on fluxoids.
//
// Each of the six stages is one ICF gate (the variant with a C output) that
// stores one bit as a trapped fluxoid. A fluxoid arriving at a stage (a data
// bit of an incoming word, or a carry) enters on X. If the stage is empty it
// leaves on A, which is led straight back into Y, so it is trapped there. If
// the stage already holds a fluxoid, the two leave together on B as a carry
// to the next stage, and the stage is empty. A stage thus toggles on each
// arrival and passes a carry on every second one. A word that arrives while
// the adder is empty is simply stored ("put into the adder"); every later
// word is added to the contents (accumulation).
//
// The carry out of the top stage enters the X input of one more ICF gate. A
// subtraction fluxoid, sent in beforehand on `sub`, is trapped there: the top
// carry then leaves on B and is led back into the lowest stage (end-around
// carry, giving 1's complement subtraction of an operand that was sent in
// already inverted). Without it the top carry leaves on A as `overflow`.
//
// A read-out control fluxoid `rd` is fanned out to the Re inputs: every
// stored fluxoid is pulled out on C onto the output lines, so the adder is
// empty afterwards, and an unused subtraction fluxoid is cleared.
//
// Interface: `din` data pulses, `sub` and `rd` pulses, `dout` the extracted
// word with its control fluxoid, `overflow` pulse, `acc` the contents once
// settled, `busy` while fluxoids are still moving inside. Timing: one cycle
// per gate, so a word settles within 14 cycles even with an end-around
// carry; `dout` one cycle after `rd`. `rd` must not arrive while `busy`, and
// a data fluxoid must not reach a stage in the same cycle as a carry (the
// merged line would carry only one of them).
//
// Following the document: one ICF gate per stage storing the bit, the carry
// leaving on B, the subtraction control and the overflow output, and the
// read-out by a control fluxoid. This design's own: the A-to-Y loop that
// stores an arriving fluxoid, the end-around wiring, and clearing the
// subtraction fluxoid on read-out.
module adder
  import pm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [WORD_BITS-1:0] din,
  input  logic                 sub,
  input  logic                 rd,
  output word_t                dout,
  output logic                 overflow,
  output logic [WORD_BITS-1:0] acc,
  output logic                 busy
);

  logic [WORD_BITS-1:0] sx;          // X of each stage: data or carry
  logic [WORD_BITS-1:0] sa;          // A of each stage, looped back to Y
  logic [WORD_BITS-1:0] carry;       // B of each stage
  logic [WORD_BITS-1:0] out_bits;    // C of each stage
  logic [WORD_BITS-1:0] held;
  logic                 end_around;
  logic                 sub_held;
  logic                 rd_q;

  assign sx = din | {carry[WORD_BITS-2:0], end_around};

  for (genvar k = 0; k < WORD_BITS; k++) begin : g_stage
    icf_gate #(.HAS_C(1'b1)) u_stage (
      .clk    (clk),
      .rst_n  (rst_n),
      .x      (sx[k]),
      .y      (sa[k]),
      .re     (rd),
      .a      (sa[k]),
      .b      (carry[k]),
      .c      (out_bits[k]),
      .trapped(held[k])
    );
  end

  icf_gate #(.HAS_C(1'b0)) u_sub (
    .clk    (clk),
    .rst_n  (rst_n),
    .x      (carry[WORD_BITS-1]),
    .y      (sub),
    .re     (rd),
    .a      (overflow),
    .b      (end_around),
    .c      (),
    .trapped(sub_held)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_q <= 1'b0;
    else        rd_q <= rd;
  end

  assign dout = '{ctrl: rd_q, d: out_bits};
  assign acc  = held;
  assign busy = (|sa) | (|carry) | end_around;

  // The read-out must find the adder settled and receive no new data, and a
  // data fluxoid must not meet a carry on a stage's input line.
  a_settled_readout: assert property (@(posedge clk) disable iff (!rst_n)
    rd |-> (!busy && din == '0))
    else $error("adder read out while fluxoids are moving or data arrive");
  a_no_merge_collision: assert property (@(posedge clk) disable iff (!rst_n)
    (din & {carry[WORD_BITS-2:0], end_around}) == '0)
    else $error("data fluxoid and carry reach a stage together");

endmodule
