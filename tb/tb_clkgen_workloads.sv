// tb_clkgen_workloads: the generator at full size running the example
// settings of the design's own evaluation:
//   A. one output with period M = 50 and duration N = 20 (high 20 clocks of
//      every 50, the single-channel prototype's example),
//   B. the first eight outputs at duty cycles 1/36, 2/36, 5/36, 7/36, 8/36,
//      22/36, 32/36 and 35/36,
//   C. a pulse of programmable width and position, made outside the chip as
//      (not OUT1) and OUT2 with OUT1 high m clocks and OUT2 high m+n clocks
//      of each period: the pulse must start m clocks into the period and
//      last n clocks (m = 5, n = 7, M = 30 here).
// For each case the outputs are measured over several periods; the measured
// high time, period and duty cycle must match the programmed values.
module tb_clkgen_workloads;
  import clkgen_pkg::*;

  logic             clk = 1'b0;
  logic             masterclr_n;
  logic [7:0]       ein;
  logic [6:0]       eils;
  logic [N_OUT-1:0] out;
  int checks = 0, failures = 0;

  clkgen_top dut (
    .clk(clk), .masterclr_n(masterclr_n), .ein(ein), .eils(eils), .out(out)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_reg(input int addr, input int val);
    @(negedge clk);
    ein = 8'(val); eils = {1'b0, 6'(addr)};
    repeat (2) @(negedge clk);
    eils[6] = 1'b1;
    repeat (3) @(negedge clk);
    eils[6] = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic restart();
    @(negedge clk);
    masterclr_n = 1'b0;
    repeat (2) @(negedge clk);
    masterclr_n = 1'b1;
  endtask

  // Measure output k over `periods` full periods after its next rise:
  // returns the high clocks of each period and the period lengths.
  task automatic measure(input int k, input int m, input int n, input int periods);
    int t_rise, t, high;
    // wait for a rising edge
    while (out[k]) @(negedge clk);
    while (!out[k]) @(negedge clk);
    for (int p = 0; p < periods; p++) begin
      t = 1; high = 1;
      while (1) begin
        @(negedge clk);
        if (out[k] && t >= 1 && high < t) break;   // next rise
        t++;
        if (out[k]) high++;
        if (t > 600) break;
      end
      check(high == n, $sformatf("OUT%0d high %0d clocks, expected %0d", k, high, n));
      check(t == m, $sformatf("OUT%0d period %0d clocks, expected %0d", k, t, m));
    end
    $display("OUT%0d: duty cycle %0d/%0d measured", k, high, t);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dur6[8] = '{1, 2, 5, 7, 8, 22, 32, 35};
    int width, start, t;
    logic pulse, pulse_q;
    ein = '0; eils = '0;
    masterclr_n = 1'b0;
    repeat (3) @(negedge clk);
    masterclr_n = 1'b1;
    repeat (3) @(negedge clk);

    // A. M = 50, N = 20 on OUT0
    write_reg(0, 20);
    write_reg(N_OUT, 50);
    restart();
    measure(0, 50, 20, 3);

    // B. M = 36, eight duty cycles on OUT0..OUT7
    foreach (dur6[k]) write_reg(k, dur6[k]);
    write_reg(N_OUT, 36);
    restart();
    foreach (dur6[k]) measure(k, 36, dur6[k], 2);

    // C. pulse of width n = 7 at position m = 5 from OUT1 (N = 5) and
    //    OUT2 (N = 12), M = 30
    write_reg(1, 5);
    write_reg(2, 12);
    write_reg(N_OUT, 30);
    restart();
    for (int p = 0; p < 3; p++) begin
      // period start: rising edge of OUT2
      while (out[2]) @(negedge clk);
      while (!out[2]) @(negedge clk);
      t = 0; width = 0; start = -1; pulse_q = 1'b0;
      for (int c = 0; c < 30; c++) begin
        pulse = !out[1] && out[2];
        if (pulse && !pulse_q) start = t;
        if (pulse) width++;
        pulse_q = pulse;
        t++;
        @(negedge clk);
      end
      check(start == 5, $sformatf("pulse starts %0d clocks into the period, expected 5", start));
      check(width == 7, $sformatf("pulse width %0d clocks, expected 7", width));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
