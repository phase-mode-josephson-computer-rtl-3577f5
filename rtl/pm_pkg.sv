// Shared types and constants of the phase-mode processor model.
//
// The processor moves single flux quanta ("fluxoids") along lines. In this
// model a fluxoid is a one-cycle high pulse on a wire, and one clock cycle is
// the time a fluxoid needs to pass one gate. A bus word is the set of fluxoids
// that travel together: six data lines (a pulse means a 1, no pulse a 0) and a
// control line carrying a single control fluxoid.
//
// The word length of six bits, the eight memory words and the opcode values
// follow the document. Naming data line D1 as bit 0 (least significant) and
// D6 as bit 5, and reading the instruction (b1 b2 b3 . X Y Z) with b1 on D6
// and Z on D1, are this design's choices.
package pm_pkg;

  localparam int unsigned WORD_BITS = 6;
  localparam int unsigned NWORDS    = 8;
  localparam int unsigned ADDR_BITS = 3;
  localparam int unsigned OP_BITS   = 3;

  // One bus word: the control fluxoid and the data fluxoids that travel with it.
  typedef struct packed {
    logic                 ctrl;
    logic [WORD_BITS-1:0] d;
  } word_t;

  localparam word_t NO_WORD = '{ctrl: 1'b0, d: '0};

  // Opcodes, written as the three leading bits of the instruction (b1 b2 b3).
  typedef enum logic [OP_BITS-1:0] {
    OP_OUT  = 3'b000,  // memory word -> output register
    OP_SUB  = 3'b010,  // memory word -> adder, end-around carry (subtraction)
    OP_ADD  = 3'b100,  // memory word -> adder (put or accumulate)
    OP_INV  = 3'b110,  // memory word -> inverter
    OP_STA  = 3'b001,  // adder contents -> memory
    OP_STI  = 3'b101,  // inverter contents -> memory
    OP_STOP = 3'b111   // stop the machine
  } opcode_e;

  // Assemble an instruction word from an opcode and a 3-bit address field
  // (address field 0 selects word 1).
  function automatic logic [WORD_BITS-1:0] instr(opcode_e op, logic [ADDR_BITS-1:0] addr);
    return {op, addr};
  endfunction

endpackage
