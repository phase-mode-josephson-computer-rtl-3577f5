// Type-I terminal: steers one bus word either down to a unit or on along the bus.
//
// Seven ICF gates, one per data line and one on the control line. A `set`
// fluxoid from the control unit is fanned out and trapped in all seven gates
// (the terminal is armed). When a word then arrives from the right, each data
// fluxoid meets a trapped fluxoid and leaves on B, down to the unit; the
// control fluxoid leaves its gate on B and is led up. On its way up it is fanned
// out to the Re input of every data gate, clearing the fluxoids left behind by
// the 0 bits, and it leaves the terminal on `ctrl_up`. An unarmed terminal
// passes the word on leftward unchanged through the A outputs.
//
// Interface: `set` pulse; `bus_in`/`bus_out` carry one word per cycle as
// pulses; `down` carries the data pulses to the unit. Timing: the word leaves
// (down or left) one cycle after it arrives, `ctrl_up` in the same cycle as
// `down`; the residual fluxoids are cleared at the end of that cycle. The terminal must be armed
// before the word arrives, or in the same cycle.
//
// The structure follows the document; the one-cycle hops are the model's.
module terminal_i
  import pm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 set,
  input  word_t                bus_in,
  output word_t                bus_out,
  output logic [WORD_BITS-1:0] down,
  output logic                 ctrl_up
);

  logic [WORD_BITS-1:0] bit_trapped;
  logic                 ctrl_trapped;
  logic                 ctrl_b;
  logic [WORD_BITS-1:0] pass_d;
  logic                 pass_ctrl;

  for (genvar i = 0; i < WORD_BITS; i++) begin : g_bit
    icf_gate #(.HAS_C(1'b0)) u_gate (
      .clk    (clk),
      .rst_n  (rst_n),
      .x      (bus_in.d[i]),
      .y      (set),
      .re     (ctrl_b),
      .a      (pass_d[i]),
      .b      (down[i]),
      .c      (),
      .trapped(bit_trapped[i])
    );
  end

  icf_gate #(.HAS_C(1'b0)) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .x      (bus_in.ctrl),
    .y      (set),
    .re     (1'b0),
    .a      (pass_ctrl),
    .b      (ctrl_b),
    .c      (),
    .trapped(ctrl_trapped)
  );

  assign ctrl_up = ctrl_b;
  assign bus_out = '{ctrl: pass_ctrl, d: pass_d};

endmodule
