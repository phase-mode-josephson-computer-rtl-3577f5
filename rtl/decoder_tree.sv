// Binary tree of ICF gates that routes one control fluxoid to one of
// 2**DEPTH output lines, chosen by DEPTH data bits.
//
// All gates of tree level l receive bit sel[DEPTH-1-l] on Y, so a 1 bit is
// trapped in every gate of its level. The control fluxoid enters the root on
// X and at each level leaves on A (bit 0) or B (bit 1), reaching leaf line
// `out[v]` where v is the value of `sel`. Gates off the fluxoid's path keep
// their trapped fluxoids until a `reset` fluxoid on Re clears them.
//
// Interface: `sel` data pulses, `ctrl` and `reset` pulses, `out` one-hot
// pulse. Timing: `out` DEPTH cycles after `ctrl`; `sel` must arrive before
// or with `ctrl`. A helper of the control unit; the tree-matrix arrangement
// follows the document.
module decoder_tree #(
  parameter int unsigned DEPTH = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DEPTH-1:0]    sel,
  input  logic                ctrl,
  input  logic                reset,
  output logic [2**DEPTH-1:0] out
);

  localparam int unsigned NODES = 2**DEPTH;   // heap numbering, node 1 is the root

  logic [NODES-1:1] gx;
  logic [NODES-1:1] gy;
  logic [NODES-1:1] ga;
  logic [NODES-1:1] gb;
  logic [NODES-1:1] held;

  for (genvar l = 0; l < DEPTH; l++) begin : g_level
    for (genvar n = 2**l; n < 2**(l+1); n++) begin : g_node
      if (n == 1) begin : g_root
        assign gx[n] = ctrl;
      end else if (n % 2 == 0) begin : g_left
        assign gx[n] = ga[n/2];
      end else begin : g_right
        assign gx[n] = gb[n/2];
      end
      assign gy[n] = sel[DEPTH-1-l];

      icf_gate #(.HAS_C(1'b0)) u_gate (
        .clk    (clk),
        .rst_n  (rst_n),
        .x      (gx[n]),
        .y      (gy[n]),
        .re     (reset),
        .a      (ga[n]),
        .b      (gb[n]),
        .c      (),
        .trapped(held[n])
      );

      if (l == DEPTH - 1) begin : g_leaf
        assign out[2*(n-2**l)]   = ga[n];
        assign out[2*(n-2**l)+1] = gb[n];
      end
    end
  end

endmodule
