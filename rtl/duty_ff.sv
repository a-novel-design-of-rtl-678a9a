// duty_ff: output flip-flop of one channel. PRESET (the period match) sets
// it and the channel's duration match clears it, so it goes high when the
// counter restarts and low N counts later: high for N clock periods out of
// every M.
//
// The original flip-flop had an asynchronous active-high preset and an
// active-low clear driven by an AND of master clear and the duration
// comparator. Here preset and clear are sampled on the clock edge, which
// delays the output by one clock against the counter but keeps the high time
// and the period; master clear (rst_n low) still clears it asynchronously.
// Should preset and clear arrive together (N = M, which the programming rule
// 0 < N < M forbids), clear wins and the output stays low.
//
// Timing: q changes on the clock edge after the cycle in which preset or
// clear is high.
module duty_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic preset,
  input  logic clear,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= 1'b0;
    else if (clear)  q <= 1'b0;
    else if (preset) q <= 1'b1;
  end
endmodule
