// tb_eq_comparator: exhaustive test of the 8-bit equality comparator. Every
// pair (p, q) is applied with the enable high and low; match must be set
// exactly for p == q while enabled.
module tb_eq_comparator;
  logic       en, match;
  logic [7:0] p, q;
  int checks = 0, failures = 0;

  eq_comparator #(.WIDTH(8)) dut (.en(en), .p(p), .q(q), .match(match));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 256; a++)
        for (int b = 0; b < 256; b++) begin
          en = e[0]; p = 8'(a); q = 8'(b);
          #1;
          checks++;
          if (match !== (e == 1 && a == b)) begin
            failures++;
            if (failures < 10) $display("en=%0d p=%0d q=%0d match=%0b", e, a, b, match);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
