// Inverter (1's complementer) built from six ICF gates.
//
// The data fluxoids of a word are trapped at the Y inputs of the six gates.
// A read-out control fluxoid, fanned out along the gates, enters each gate on
// X: where nothing is trapped (a 0 bit) it leaves on A as a 1 of the output
// word; where a fluxoid is trapped (a 1 bit) the two leave together on B and
// are discarded. The gates are empty afterwards, and the control fluxoid goes
// on with the inverted word.
//
// Interface: `din` data pulses in, `ctrl` read-out pulse, `dout` the inverted
// word with its control fluxoid. Timing: `dout` one cycle after `ctrl`; the
// data must be trapped before `ctrl` arrives or in the same cycle.
//
// The structure follows the document. Carrying the control fluxoid along with
// the output word (so that the word can be stored in memory) is this design's
// reading of how the inverter is used in the processor.
module inverter
  import pm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [WORD_BITS-1:0] din,
  input  logic                 ctrl,
  output word_t                dout
);

  logic [WORD_BITS-1:0] discard;
  logic [WORD_BITS-1:0] held;
  logic [WORD_BITS-1:0] inv_d;
  logic                 ctrl_q;

  for (genvar i = 0; i < WORD_BITS; i++) begin : g_bit
    icf_gate #(.HAS_C(1'b0)) u_gate (
      .clk    (clk),
      .rst_n  (rst_n),
      .x      (ctrl),
      .y      (din[i]),
      .re     (1'b0),
      .a      (inv_d[i]),
      .b      (discard[i]),
      .c      (),
      .trapped(held[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctrl_q <= 1'b0;
    else        ctrl_q <= ctrl;
  end

  assign dout = '{ctrl: ctrl_q, d: inv_d};

endmodule
