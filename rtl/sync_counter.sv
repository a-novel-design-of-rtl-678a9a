// sync_counter: the shared period counter. It counts clock cycles; when the
// period comparator reports that the count has reached M (restart high) the
// next count is 1, so the count runs 1, 2, ..., M, 1, 2, ... and one turn
// takes exactly M clock periods, T = M * Tc.
//
// In the original two-chip counter the match cleared the counter
// asynchronously in the low half of the clock cycle, so it showed 0 for half
// a cycle before counting to 1 on the next edge. Here the counter steps
// straight from M to 1 on the edge, which keeps the same cycle count without
// an asynchronous clear. Master clear (rst_n low, asynchronous) sets the
// count to 0; 0 is thus only seen after a clear. If M is reprogrammed below
// the current count, the counter runs on to its maximum, wraps to 0 and
// then reaches M, as the original binary counter does.
module sync_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (restart) count <= WIDTH'(1);
    else              count <= count + WIDTH'(1);
  end
endmodule
