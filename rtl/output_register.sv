// Output register O: holds the last word sent out by the processor.
//
// The operation fluxoid of the "output" instruction clears the register
// before the word arrives; each data fluxoid turned down by the output
// terminal then sets its bit, and the control fluxoid that follows the
// transfer marks the word as complete. A word of value 0 carries no data
// fluxoids at all, which is why the clear and the completion mark are needed.
//
// Interface: `clear`, `din`, `done` pulses in; `value` the register contents,
// `valid` a one-cycle pulse. Timing: `valid` one cycle after `done`.
//
// The document names the output unit and what it receives but not how it is
// built; this register is the design's own, simplest choice.
module output_register
  import pm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [WORD_BITS-1:0] din,
  input  logic                 done,
  output logic [WORD_BITS-1:0] value,
  output logic                 valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value <= '0;
      valid <= 1'b0;
    end else begin
      value <= (clear ? '0 : value) | din;
      valid <= done;
    end
  end

endmodule
