// tb_duty_ff: self-checking test of the output flip-flop. Random preset and
// clear pulses and master-clear events are applied; after every clock the
// output must equal a reference (clear or master clear give 0, else preset
// gives 1, else the output holds).
module tb_duty_ff;
  logic clk = 1'b0;
  logic rst_n, preset, clear, q;
  logic expected;
  int checks = 0, failures = 0;

  duty_ff dut (.clk(clk), .rst_n(rst_n), .preset(preset), .clear(clear), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    preset = 1'b0; clear = 1'b0; rst_n = 1'b0;
    #1;
    checks++;
    if (q !== 1'b0) failures++;
    expected = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      preset = ($urandom_range(0, 3) == 0);
      clear  = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 99) == 0) begin
        rst_n = 1'b0;          // asynchronous master clear
        #1;
        checks++;
        if (q !== 1'b0) begin failures++; $display("master clear not asynchronous"); end
        expected = 1'b0;
        @(negedge clk); rst_n = 1'b1;
        continue;
      end
      @(negedge clk);
      if (clear) expected = 1'b0;
      else if (preset) expected = 1'b1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("step %0d preset=%0b clear=%0b q=%0b expected=%0b", i, preset, clear, q, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
