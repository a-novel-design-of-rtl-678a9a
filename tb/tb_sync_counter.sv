// tb_sync_counter: self-checking test of the period counter. The restart
// input is driven from count == M as in the generator, for several periods
// M. Checks that the count is 0 in master clear, then 1, 2, ... up to M,
// then 1 again, so that consecutive restarts are exactly M clocks apart. A
// final phase restarts at random moments and checks the count against a
// reference worked out in the testbench.
module tb_sync_counter;
  logic       clk = 1'b0;
  logic       rst_n, restart;
  logic [7:0] count;
  logic [7:0] m;
  logic       free_restart, use_free;
  int checks = 0, failures = 0;

  sync_counter #(.WIDTH(8)) dut (.clk(clk), .rst_n(rst_n), .restart(restart), .count(count));

  always #5 clk = ~clk;
  always_comb restart = use_free ? free_restart : (count == m);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (count=%0d)", what, count);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_restart, ref_count;
    int ms[5] = '{2, 3, 36, 50, 255};
    use_free = 1'b0; free_restart = 1'b0;
    foreach (ms[i]) begin
      m = 8'(ms[i]);
      rst_n = 1'b0;
      repeat (3) @(negedge clk);
      check(count == 0, "count is 0 in master clear");
      rst_n = 1'b1;
      last_restart = -1;
      for (int c = 1; c <= 3 * ms[i] + 1; c++) begin
        @(negedge clk);
        ref_count = ((c - 1) % ms[i]) + 1;
        check(int'(count) == ref_count, $sformatf("M=%0d cycle %0d expects %0d", ms[i], c, ref_count));
        if (restart) begin
          if (last_restart >= 0)
            check(c - last_restart == ms[i], $sformatf("period %0d for M=%0d", c - last_restart, ms[i]));
          last_restart = c;
        end
      end
    end
    // random restarts against a reference counter
    use_free = 1'b1;
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    ref_count = 0;
    for (int c = 0; c < 2000; c++) begin
      free_restart = ($urandom_range(0, 9) == 0);
      @(negedge clk);
      ref_count = free_restart ? 1 : (ref_count + 1) % 256;
      check(int'(count) == ref_count, "random restart");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
