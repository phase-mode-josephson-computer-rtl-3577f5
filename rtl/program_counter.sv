// Program counter: a chain of ICF gates that holds one circulating fluxoid.
//
// START is fanned out: one fluxoid leaves on R1 (read word 1), the other is
// trapped in gate 1. A count fluxoid enters at the far end of the chain and
// passes from gate to gate through the A outputs while the gates are empty.
// At the gate k that holds the trapped fluxoid it leaves on B and is fanned
// out again: one fluxoid leaves on R(k+1), the other is trapped in gate k+1.
// Each count thus moves the trapped fluxoid one gate on and reads the next
// word. STOP is fanned out to every gate's Re and clears the trapped fluxoid;
// count fluxoids arriving after that pass through all gates and are lost, so
// the machine halts. A count after R(NWORDS) also halts it.
//
// Interface: `start`, `count`, `stop` pulses in; `r[k-1]` is line Rk.
// Timing: R1 one cycle after `start`; R(k+1) comes NWORDS-k cycles after
// `count`, one cycle per gate passed. NWORDS-1 gates for NWORDS lines.
//
// The gate chain, the order in which the count fluxoid visits the gates and
// the fan-outs follow the document; the one-cycle hops are the model's.
module program_counter
  import pm_pkg::*;
#(
  parameter int unsigned N = NWORDS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         count,
  input  logic         stop,
  output logic [N-1:0] r
);

  localparam int unsigned G = N - 1;   // number of gates

  logic [G-1:0] gx;       // X input of each gate
  logic [G-1:0] gy;       // Y input of each gate
  logic [G-1:0] ga;       // A output: count fluxoid passing on
  logic [G-1:0] gb;       // B output: count met the trapped fluxoid
  logic [G-1:0] held;
  logic         r1_q;

  // The count fluxoid enters the last gate and moves towards gate 1; the
  // trapped fluxoid is handed from gate j-1 to gate j.
  assign gx = {count, ga[G-1:1]};
  assign gy = {gb[G-2:0], start};

  for (genvar j = 0; j < G; j++) begin : g_stage
    icf_gate #(.HAS_C(1'b0)) u_gate (
      .clk    (clk),
      .rst_n  (rst_n),
      .x      (gx[j]),
      .y      (gy[j]),
      .re     (stop),
      .a      (ga[j]),
      .b      (gb[j]),
      .c      (),
      .trapped(held[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r1_q <= 1'b0;
    else        r1_q <= start;
  end

  assign r = {gb, r1_q};

endmodule
