// dec3to8: 3-to-8 line decoder with enable, the building block of the
// 1-of-64 latch-select decoder. y has exactly the bit numbered a set while
// en is high, and is all zero while en is low. Outputs are active high,
// which is this design's choice. Combinational.
module dec3to8 (
  input  logic       en,
  input  logic [2:0] a,
  output logic [7:0] y
);
  always_comb begin
    y = '0;
    if (en) y[a] = 1'b1;
  end
endmodule
