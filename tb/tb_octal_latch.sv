// tb_octal_latch: self-checking test of the byte register. Writes random
// bytes with random write strobes and checks after every clock that the
// register holds the last byte written and ignores data while not selected.
module tb_octal_latch;
  logic       clk = 1'b0;
  logic       we;
  logic [7:0] d, q, expected;
  int checks = 0, failures = 0;

  octal_latch #(.WIDTH(8)) dut (.clk(clk), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b1; d = 8'h00;
    @(posedge clk); #1;
    expected = 8'h00;
    for (int i = 0; i < 2000; i++) begin
      we = ($urandom_range(0, 2) == 0);
      d  = 8'($urandom);
      @(posedge clk); #1;
      if (we) expected = d;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("mismatch at step %0d: q=%02h expected=%02h", i, q, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
