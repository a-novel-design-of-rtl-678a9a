// reset_sync: master-clear conditioning. The asynchronous, active-low clear
// pin resets everything at once when it falls; its release is passed
// through two flip-flops so that all registers leave reset on the same
// clock edge, two clocks after the pin rises. This is this design's own
// choice; the original fed the pin straight to the flip-flops.
module reset_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic meta;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      meta  <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      meta  <= 1'b1;
      rst_n <= meta;
    end
  end
endmodule
