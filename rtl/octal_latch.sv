// octal_latch: byte register holding one programmed value (a period M or a
// duration N). It loads d on the rising clock edge in which its decoded
// latch-select strobe we is high and otherwise keeps its value.
//
// Like the original edge-triggered octal latches, whose clear input is tied
// inactive, the register has no reset: master clear does not erase the
// programmed values. Here the select line acts as a clock enable on the
// common clock instead of clocking the register itself, so the whole design
// stays in one clock domain.
//
// Timing: q shows the new value one clock after the cycle with we high.
module octal_latch #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (we) q <= d;
  end
endmodule
