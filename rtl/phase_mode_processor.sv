// Self-timed 6-bit stored-program processor in which every bit is a single
// flux quantum (fluxoid) and every logic function an ICF gate.
//
// There is no clock in the machine itself: each step is started by the
// control fluxoid that finished the step before ("automatic clock"). In this
// model `clk` only sets the time grain, one gate passage per cycle.
//
// Instruction cycle. START makes the program counter send R1. The memory
// puts word 1, with the R fluxoid as its control fluxoid, on the bus; it
// passes the three type-I terminals (none is armed) and reaches the control
// unit, which decodes it into one OPERATION fluxoid and one R or W fluxoid.
//  * Read-type (000 output, 100 add, 010 subtract, 110 invert): the
//    OPERATION fluxoid arms the type-I terminal of the target unit (and, for
//    010, sets the adder's subtraction gate). R reads the operand word; the
//    armed terminal turns its data down into the unit and its control
//    fluxoid up: that fluxoid is the end of the operation.
//  * Write-type (001 store adder, 101 store inverter): the OPERATION fluxoid
//    arms a type-II terminal. W arms the memory word and clears it, leaves
//    the memory and walks the chain of type-II terminals; the armed one sends
//    it into the adder or inverter as a read-out fluxoid. The unit's word
//    travels back on the bus into the memory, and the control fluxoid that
//    lands with it is the end of the operation.
//  * Stop (111 000): the OPERATION fluxoid arms the third type-II terminal;
//    the W fluxoid of the address field (word 1) walks the chain to it and is
//    led to the counter's STOP input. Word 1 is cleared on the way, since the
//    address part of the decoder sends W1 for this code.
// The end-of-operation fluxoid clears the residual fluxoids in the control
// unit and advances the program counter, which reads the next word.
//
// Interface: `start` (S) and `ext_w` (manual W lines) and `ext_word` (words
// from the input unit, entering the bus where the adder and inverter outputs
// do) load the memory and start the machine; `out_value`/`out_valid` show the
// output register, `overflow` and `stopped` are pulses.
//
// Following the document: the units, the instruction set and encodings, the
// bus through the memory and three type-I terminals to the control unit, and
// the read, write and stop sequences. This design's own: which type-I
// terminal serves which unit (adder nearest the memory, then inverter, then
// output), the order of the type-II chain (adder, inverter, stop), merging
// lines as ORs of pulses, and the subtraction operand being supplied already
// inverted by the program (invert, store, then subtract).
module phase_mode_processor
  import pm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NWORDS-1:0]    ext_w,
  input  word_t                ext_word,
  output logic [WORD_BITS-1:0] out_value,
  output logic                 out_valid,
  output logic                 overflow,
  output logic                 stopped
);

  // Control unit
  logic [2**OP_BITS-1:0] op;
  logic [NWORDS-1:0]     cu_r, cu_w;
  // Program counter
  logic [NWORDS-1:0]     pc_r;
  // Memory
  word_t                 mem_bus_in, mem_bus_out;
  logic                  w_exit, wr_done;
  // Type-I terminals, from the memory towards the control unit
  word_t                 bus_add_inv, bus_inv_out, bus_to_cu;
  logic [WORD_BITS-1:0]  down_add, down_inv, down_out;
  logic                  up_add, up_inv, up_out;
  // Type-II chain
  logic                  t2_add_a, t2_inv_a, t2_stop_a;
  logic                  rd_add, rd_inv;
  logic                  t2_add_held, t2_inv_held, t2_stop_held;
  // Units
  word_t                 add_word, inv_word;
  logic [WORD_BITS-1:0]  acc;
  logic                  add_busy;
  // Sequencing
  logic                  end_of_op;
  logic                  stop_f;

  assign end_of_op = up_add | up_inv | up_out | wr_done;

  program_counter #(.N(NWORDS)) u_pc (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .count(end_of_op),
    .stop (stop_f),
    .r    (pc_r)
  );

  control_unit u_cu (
    .clk   (clk),
    .rst_n (rst_n),
    .bus_in(bus_to_cu),
    .reset (end_of_op | stop_f),
    .op    (op),
    .r     (cu_r),
    .w     (cu_w)
  );

  // Words entering the bus from the right: adder, inverter and input unit.
  assign mem_bus_in = add_word | inv_word | ext_word;

  memory #(.N(NWORDS)) u_mem (
    .clk    (clk),
    .rst_n  (rst_n),
    .r      (pc_r | cu_r),
    .w      (cu_w | ext_w),
    .bus_in (mem_bus_in),
    .bus_out(mem_bus_out),
    .w_exit (w_exit),
    .wr_done(wr_done)
  );

  terminal_i u_ti_add (
    .clk    (clk),
    .rst_n  (rst_n),
    .set    (op[OP_ADD] | op[OP_SUB]),
    .bus_in (mem_bus_out),
    .bus_out(bus_add_inv),
    .down   (down_add),
    .ctrl_up(up_add)
  );

  terminal_i u_ti_inv (
    .clk    (clk),
    .rst_n  (rst_n),
    .set    (op[OP_INV]),
    .bus_in (bus_add_inv),
    .bus_out(bus_inv_out),
    .down   (down_inv),
    .ctrl_up(up_inv)
  );

  terminal_i u_ti_out (
    .clk    (clk),
    .rst_n  (rst_n),
    .set    (op[OP_OUT]),
    .bus_in (bus_inv_out),
    .bus_out(bus_to_cu),
    .down   (down_out),
    .ctrl_up(up_out)
  );

  // Type-II terminals: the W fluxoid leaving the memory is steered to the
  // unit whose store instruction is being executed, or to the counter's STOP.
  icf_gate #(.HAS_C(1'b0)) u_t2_add (
    .clk(clk), .rst_n(rst_n), .x(w_exit), .y(op[OP_STA]), .re(1'b0),
    .a(t2_add_a), .b(rd_add), .c(), .trapped(t2_add_held)
  );

  icf_gate #(.HAS_C(1'b0)) u_t2_inv (
    .clk(clk), .rst_n(rst_n), .x(t2_add_a), .y(op[OP_STI]), .re(1'b0),
    .a(t2_inv_a), .b(rd_inv), .c(), .trapped(t2_inv_held)
  );

  icf_gate #(.HAS_C(1'b0)) u_t2_stop (
    .clk(clk), .rst_n(rst_n), .x(t2_inv_a), .y(op[OP_STOP]), .re(1'b0),
    .a(t2_stop_a), .b(stop_f), .c(), .trapped(t2_stop_held)
  );

  adder u_add (
    .clk     (clk),
    .rst_n   (rst_n),
    .din     (down_add),
    .sub     (op[OP_SUB]),
    .rd      (rd_add),
    .dout    (add_word),
    .overflow(overflow),
    .acc     (acc),
    .busy    (add_busy)
  );

  inverter u_inv (
    .clk (clk),
    .rst_n(rst_n),
    .din (down_inv),
    .ctrl(rd_inv),
    .dout(inv_word)
  );

  output_register u_out (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(op[OP_OUT]),
    .din  (down_out),
    .done (up_out),
    .value(out_value),
    .valid(out_valid)
  );

  assign stopped = stop_f;

endmodule
