// Control unit: a tree-matrix decoder for the 6-bit instruction.
//
// An instruction word arrives from the bus. Its data fluxoids are trapped in
// the ICF gates of two decoder trees; its control fluxoid is fanned out into
// both. One copy runs through the operation tree, steered by the opcode bits
// b1 b2 b3, and leaves on one of eight OPERATION lines. The other runs through
// the address tree, steered first by b3 (0 = read, 1 = write) and then by the
// address bits X Y Z, and leaves on one of sixteen lines R1, W1 .. R8, W8. The
// fluxoids trapped off the two paths stay until the end-of-operation fluxoid
// on `reset` clears them.
//
// Interface: `bus_in` instruction word (b1 on D6 ... Z on D1); `reset` pulse;
// `op[v]` is the OPERATION line of opcode v; `r[k-1]`, `w[k-1]` are Rk and Wk,
// word k having address field k-1. Timing: `op` 3 cycles and `r`/`w` 4 cycles
// after the word arrives.
//
// Following the document: the trees of ICF gates, the fan-out of the control
// fluxoid, the eight OPERATION and sixteen ADDRESS lines. This design's own:
// which data line steers which tree level (the bit order above) and that b3
// chooses between R and W, the only opcode bit that separates the read-type
// from the write-type instructions.
module control_unit
  import pm_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  word_t                  bus_in,
  input  logic                   reset,
  output logic [2**OP_BITS-1:0]  op,
  output logic [NWORDS-1:0]      r,
  output logic [NWORDS-1:0]      w
);

  logic [OP_BITS-1:0]         op_bits;
  logic [ADDR_BITS:0]         addr_bits;    // {b3, X, Y, Z}
  logic [2**(ADDR_BITS+1)-1:0] addr_lines;

  assign op_bits   = bus_in.d[WORD_BITS-1 -: OP_BITS];
  assign addr_bits = bus_in.d[ADDR_BITS:0];

  decoder_tree #(.DEPTH(OP_BITS)) u_op_tree (
    .clk  (clk),
    .rst_n(rst_n),
    .sel  (op_bits),
    .ctrl (bus_in.ctrl),
    .reset(reset),
    .out  (op)
  );

  decoder_tree #(.DEPTH(ADDR_BITS + 1)) u_addr_tree (
    .clk  (clk),
    .rst_n(rst_n),
    .sel  (addr_bits),
    .ctrl (bus_in.ctrl),
    .reset(reset),
    .out  (addr_lines)
  );

  assign r = addr_lines[NWORDS-1:0];
  assign w = addr_lines[2*NWORDS-1:NWORDS];

endmodule
