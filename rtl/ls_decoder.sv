// ls_decoder: 1-of-64 latch-select decoder. The seven select lines are a
// 6-bit address ils[5:0] and an enable ils[6]; while the enable is high the
// select line ls[address] is high and all others are low.
//
// It is built, as on the chip, from nine 3-to-8 decoders with enable: a
// first-level decoder, enabled by ils[6], decodes the upper address bits
// ils[5:3] into enables for eight second-level decoders, each of which
// decodes ils[2:0] into eight select lines. Which of the seven lines acts as
// the enable and that outputs are active high are this design's choices.
// Combinational, no clock.
module ls_decoder (
  input  logic [6:0]  ils,
  output logic [63:0] ls
);
  logic [7:0] bank_en;

  dec3to8 u_first (
    .en (ils[6]),
    .a  (ils[5:3]),
    .y  (bank_en)
  );

  for (genvar b = 0; b < 8; b++) begin : g_bank
    dec3to8 u_second (
      .en (bank_en[b]),
      .a  (ils[2:0]),
      .y  (ls[8*b +: 8])
    );
  end

  // At most one select line may be active.
  always_comb begin
    assert ($onehot0(ls)) else $error("ls_decoder: more than one select line active");
  end
endmodule
