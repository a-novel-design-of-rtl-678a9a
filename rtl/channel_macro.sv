// channel_macro: one output macro, CHANNELS identical variable-duty-cycle
// channels sharing the counter value and the PRESET pulse. Each channel has
// a duration register (loaded from din when its select line ls[k] fires), a
// comparator of that register against the shared count, and an output
// flip-flop that PRESET sets and the comparator clears. Channel k is thus
// high for N_k clock periods of every M.
//
// The chip uses six of these macros of eight channels each. Master clear
// (rst_n low) clears the output flip-flops; cmp_en (low during master
// clear) disables the comparators. The duration registers are not cleared.
//
// Timing: a write through ls/din takes effect one clock later; an output
// follows its comparator by one clock (see duty_ff).
module channel_macro #(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned CHANNELS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cmp_en,
  input  logic                preset,
  input  logic [CHANNELS-1:0] ls,
  input  logic [WIDTH-1:0]    din,
  input  logic [WIDTH-1:0]    count,
  output logic [CHANNELS-1:0] out
);
  for (genvar k = 0; k < CHANNELS; k++) begin : g_ch
    logic [WIDTH-1:0] duration;
    logic             dur_match;

    octal_latch #(.WIDTH(WIDTH)) u_latch (
      .clk (clk),
      .we  (ls[k]),
      .d   (din),
      .q   (duration)
    );

    eq_comparator #(.WIDTH(WIDTH)) u_cmp (
      .en    (cmp_en),
      .p     (duration),
      .q     (count),
      .match (dur_match)
    );

    duty_ff u_ff (
      .clk    (clk),
      .rst_n  (rst_n),
      .preset (preset),
      .clear  (dur_match),
      .q      (out[k])
    );
  end
endmodule
