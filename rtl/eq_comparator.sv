// eq_comparator: compares the running counter q with a stored value p and
// raises match while they are equal and the comparator is enabled (the
// enable input G of the original identity comparator). It is purely
// combinational; the comparators are disabled while master clear is active.
//
// The original part reports equality with an active-low output; here the
// flag is active high, and the gate that mixed it with the clear signal is
// folded into the output flip-flop.
module eq_comparator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             en,
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] q,
  output logic             match
);
  always_comb match = en && (p == q);
endmodule
