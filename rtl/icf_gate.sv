// INHIBIT circuit controlled by fluxoids (ICF gate), pulse-level model.
//
// A fluxoid arriving on Y is trapped in the gate's storage loop. A fluxoid
// arriving on X leaves on A when nothing is trapped (A = X and not Y), or, when
// a fluxoid is trapped, combines with it and leaves on B (B = X and Y), which
// empties the loop. A fluxoid on Re removes a trapped fluxoid: in the plain
// variant it is dissipated in a resistor, in the HAS_C variant it is pulled out
// onto line C. With nothing trapped a fluxoid on Re simply vanishes. The same
// gate, used on its own to steer one control fluxoid, is the type-II terminal.
//
// Interface: every input and output is a one-cycle pulse; `trapped` shows the
// loop state. Timing: A, B and C are registered, one cycle after the input.
//
// The truth table (X Y -> A B: 00->00, 01->00, 10->10, 11->01) and the C
// variant follow the document. Its own choices: a Y and an X in the same cycle
// act as if Y came first (as the XY=11 row of the table requires); an X in the
// same cycle as Re is served first; Re also removes a Y arriving in that cycle;
// a second Y while a fluxoid is already trapped is lost.
module icf_gate #(
  parameter bit HAS_C = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  input  logic y,
  input  logic re,
  output logic a,
  output logic b,
  output logic c,
  output logic trapped
);

  logic held;       // fluxoid held, counting one arriving on Y this cycle
  logic take_b;     // X combines with the held fluxoid
  logic pull_c;     // Re removes a held fluxoid that X did not take

  always_comb begin
    held   = trapped | y;
    take_b = x & held;
    pull_c = re & held & ~x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trapped <= 1'b0;
      a       <= 1'b0;
      b       <= 1'b0;
      c       <= 1'b0;
    end else begin
      trapped <= held & ~x & ~re;
      a       <= x & ~held;
      b       <= take_b;
      c       <= HAS_C & pull_c;
    end
  end

endmodule
