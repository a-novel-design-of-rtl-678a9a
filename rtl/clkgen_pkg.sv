// clkgen_pkg: sizes and constants shared by the variable-duty-cycle clock
// generator. The generator has one period register (M) and one duration
// register (N) per output; all of them are written through a single byte-wide
// programming port, addressed by a 6-bit latch select plus a write strobe.
// The numbers below are the sizes of the 48-output chip: 8-bit words, six
// macros of eight channels, a 1-of-64 select decoder.
// Select 48 addresses the period register, selects 0..47 the durations.
package clkgen_pkg;
  localparam int unsigned WIDTH        = 8;   // width of M, N and the counter
  localparam int unsigned CH_PER_MACRO = 8;   // channels in one output macro
  localparam int unsigned N_MACRO      = 6;   // output macros on the chip
  localparam int unsigned N_OUT        = N_MACRO * CH_PER_MACRO;  // 48
  localparam int unsigned ADDR_W       = 6;   // latch-select address bits
  localparam int unsigned SEL_W        = ADDR_W + 1;  // + write strobe
  localparam int unsigned N_SEL        = 1 << ADDR_W; // 64 select lines
endpackage
