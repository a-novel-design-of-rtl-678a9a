// prog_port: receiving side of the 15-line programming port. The external
// programming source drives the data lines ein and the select lines eils
// without reference to the generator's clock, so both are passed through a
// two-flop synchronizer. The write strobe eils[6] is edge-detected: its
// rising edge yields a one-clock pulse sel_q[6] together with the address
// sel_q[5:0] and data din that were on the lines at that time. Between
// writes sel_q[6] is low, so the select decoder fed from sel_q raises no
// line.
//
// This synchronizer is this design's own addition: on the original chip the
// pins only pass through pad buffers and the decoded select lines clock the
// registers directly.
//
// Programming rule (timing): hold ein and eils[5:0] stable from two clocks
// before the strobe rises until three clocks after; keep the strobe high and
// then low for at least two clocks each. The register is written four
// clocks after the strobe is first sampled high. rst_n (master clear) clears the pipeline.
module prog_port #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned SEL_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] ein,
  input  logic [SEL_W-1:0] eils,
  output logic [WIDTH-1:0] din,
  output logic [SEL_W-1:0] sel_q
);
  logic [WIDTH-1:0] ein_s1, ein_s2;
  logic [SEL_W-1:0] ils_s1, ils_s2;
  logic             stb_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ein_s1 <= '0;
      ein_s2 <= '0;
      ils_s1 <= '0;
      ils_s2 <= '0;
      stb_d  <= 1'b0;
      din    <= '0;
      sel_q  <= '0;
    end else begin
      ein_s1 <= ein;
      ein_s2 <= ein_s1;
      ils_s1 <= eils;
      ils_s2 <= ils_s1;
      stb_d  <= ils_s2[SEL_W-1];
      din    <= ein_s2;
      sel_q  <= {ils_s2[SEL_W-1] && !stb_d, ils_s2[SEL_W-2:0]};
    end
  end

  // The write pulse lasts exactly one clock.
  assert property (@(posedge clk) sel_q[SEL_W-1] |=> !sel_q[SEL_W-1])
    else $error("prog_port: write pulse longer than one clock");
endmodule
