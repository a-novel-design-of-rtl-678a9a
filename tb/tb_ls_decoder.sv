// tb_ls_decoder: exhaustive test of the 1-of-64 select decoder. For all 128
// values of the seven select lines, exactly line ils[5:0] must be high when
// ils[6] is high, and no line when it is low.
module tb_ls_decoder;
  logic [6:0]  ils;
  logic [63:0] ls;
  int checks = 0, failures = 0;

  ls_decoder dut (.ils(ils), .ls(ls));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic [63:0] expected;
      ils = 7'(v);
      #1;
      expected = (v >= 64) ? (64'd1 << (v - 64)) : 64'd0;
      checks++;
      if (ls !== expected) begin
        failures++;
        $display("ils=%0d ls=%016h expected=%016h", v, ls, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
