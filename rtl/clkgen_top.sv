// clkgen_top: reprogrammable multi-output clock generator with variable duty
// cycles. Every output OUTk is a clock of period M*Tc that is high for
// N_k*Tc, where Tc is the period of clk, M is one byte shared by all
// outputs and N_k is a byte of its own, so the duty cycle N_k/M can be set
// from 1/255 to 254/255.
//
// How it works: one counter counts clk cycles and restarts every M counts.
// A period comparator flags count == M; that pulse (PRESET) restarts the
// counter and sets every output flip-flop. Each output has a comparator of
// the count against its N_k that clears its flip-flop, N_k counts later.
// The outputs come in N_MACRO macros of CH_PER_MACRO channels (six of eight,
// 48 outputs), all starting their high phase on the same clock edge.
//
// Programming: 1 + N_MACRO*CH_PER_MACRO bytes are written through ein (data)
// and eils (select): eils[5:0] is the register address and a rising edge of
// eils[6] writes ein into it. Addresses 0..47 are the durations N of OUT0..
// OUT47, address 48 is the period M, addresses 49..63 write nothing. The
// values must satisfy 0 < N_k < M; an output with N_k = 0 or N_k > M stays
// high, one with N_k = M stays low. Registers can be rewritten while the
// outputs run; the new value is used from the next match.
//
// Interface and timing: masterclr_n is the active-low master clear. While it
// is low the counter is 0, all outputs are low and the programming port is
// idle; it does not erase the programmed bytes. After it rises the outputs
// first rise M+3 clocks later (two clocks of reset release, M counts, one
// clock in the output flip-flop) and then repeat every M clocks. A write
// reaches its register four clocks after the strobe is first sampled high
// (see prog_port).
//
// From the original design: the counter/comparator/flip-flop structure, the
// sizes, the 49 programmed bytes and their select numbers, the nine-decoder
// select tree. This design's own choices: a single clock domain with
// synchronized programming lines, synchronous preset/clear of the output
// flip-flops (one clock of output latency), the counter stepping from M to 1
// instead of an asynchronous clear, and the active-high strobe eils[6].
module clkgen_top
  import clkgen_pkg::*;
#(
  parameter int unsigned WIDTH_P        = WIDTH,
  parameter int unsigned N_MACRO_P      = N_MACRO,
  parameter int unsigned CH_PER_MACRO_P = CH_PER_MACRO
) (
  input  logic                                clk,
  input  logic                                masterclr_n,
  input  logic [WIDTH_P-1:0]                  ein,
  input  logic [SEL_W-1:0]                    eils,
  output logic [N_MACRO_P*CH_PER_MACRO_P-1:0] out
);
  localparam int unsigned NO = N_MACRO_P * CH_PER_MACRO_P;

  initial begin
    assert (NO < N_SEL) else $error("clkgen_top: %0d outputs need more than %0d select lines", NO, N_SEL);
  end

  logic               rst_n;
  logic [WIDTH_P-1:0] din;
  logic [SEL_W-1:0]   sel_q;
  logic [N_SEL-1:0]   ls;
  logic [WIDTH_P-1:0] period;
  logic [WIDTH_P-1:0] count;
  logic               preset;

  reset_sync u_rst (
    .clk    (clk),
    .arst_n (masterclr_n),
    .rst_n  (rst_n)
  );

  prog_port #(.WIDTH(WIDTH_P), .SEL_W(SEL_W)) u_port (
    .clk   (clk),
    .rst_n (rst_n),
    .ein   (ein),
    .eils  (eils),
    .din   (din),
    .sel_q (sel_q)
  );

  ls_decoder u_dec (
    .ils (sel_q),
    .ls  (ls)
  );

  // Period register M, written through select line NO (48 on the chip).
  octal_latch #(.WIDTH(WIDTH_P)) u_period (
    .clk (clk),
    .we  (ls[NO]),
    .d   (din),
    .q   (period)
  );

  eq_comparator #(.WIDTH(WIDTH_P)) u_period_cmp (
    .en    (rst_n),
    .p     (period),
    .q     (count),
    .match (preset)
  );

  sync_counter #(.WIDTH(WIDTH_P)) u_counter (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart (preset),
    .count   (count)
  );

  for (genvar g = 0; g < N_MACRO_P; g++) begin : g_macro
    channel_macro #(.WIDTH(WIDTH_P), .CHANNELS(CH_PER_MACRO_P)) u_macro (
      .clk    (clk),
      .rst_n  (rst_n),
      .cmp_en (rst_n),
      .preset (preset),
      .ls     (ls[g*CH_PER_MACRO_P +: CH_PER_MACRO_P]),
      .din    (din),
      .count  (count),
      .out    (out[g*CH_PER_MACRO_P +: CH_PER_MACRO_P])
    );
  end
endmodule
