// tb_clkgen_top: end-to-end test of the 48-output clock generator at its
// full size. Everything goes through the chip's pins: bytes are written with
// the data lines and the latch-select lines, and the 48 outputs are measured
// clock by clock. For every output that follows the programming rule
// 0 < N < M, each high phase must last exactly N clocks and each period M
// clocks; all outputs must rise on the same clock, M+3 clocks after master
// clear is released. The test walks through:
//   1. programming all 49 bytes (period M and 48 durations),
//   2. master clear: outputs drop at once, the programmed bytes survive,
//   3. writes to the unused select numbers 49..63, which must change nothing,
//   4. rewriting durations and the period while the outputs run,
//   5. the extreme settings M = 255 with N = 1 and 254, and M = 2 with N = 1,
//   6. out-of-rule durations: N = 0 and N > M keep the output high, N = M
//      keeps it low,
// and counts how often each mechanism happened; one that never happened is
// a failure. The write latency (strobe to register) is checked too.
module tb_clkgen_top;
  import clkgen_pkg::*;

  logic             clk = 1'b0;
  logic             masterclr_n;
  logic [7:0]       ein;
  logic [6:0]       eils;
  logic [N_OUT-1:0] out, prev;

  int exp_m;
  int exp_n[N_OUT];
  int rise_t[N_OUT];
  int cyc = 0;
  int release_cyc;
  bit measure;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_writes = 0, n_presets = 0, n_highs = 0, n_periods = 0, n_first_rise = 0;
  int n_masterclr = 0, n_ignored = 0, n_rewrite_n = 0, n_rewrite_m = 0;
  int n_stuck_high = 0, n_stuck_low = 0, n_latency = 0;

  clkgen_top dut (
    .clk(clk), .masterclr_n(masterclr_n), .ein(ein), .eils(eils), .out(out)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Measure every output in the middle of each clock.
  always @(negedge clk) begin
    cyc++;
    if (measure && dut.preset) n_presets++;
    for (int k = 0; k < N_OUT; k++) begin
      if (measure && out[k] && !prev[k]) begin
        if (rise_t[k] >= 0) begin
          check(cyc - rise_t[k] == exp_m,
                $sformatf("OUT%0d period %0d, expected %0d", k, cyc - rise_t[k], exp_m));
          n_periods++;
        end else if (release_cyc >= 0) begin
          check(cyc - release_cyc == exp_m + 3,
                $sformatf("OUT%0d first rise %0d clocks after clear, expected %0d",
                          k, cyc - release_cyc, exp_m + 3));
          n_first_rise++;
        end
        rise_t[k] = cyc;
      end
      if (measure && !out[k] && prev[k] && rise_t[k] >= 0) begin
        check(cyc - rise_t[k] == exp_n[k],
              $sformatf("OUT%0d high %0d clocks, expected %0d", k, cyc - rise_t[k], exp_n[k]));
        n_highs++;
      end
    end
    prev = out;
  end

  // One write through the pins: address and data settle, the strobe
  // eils[6] rises and falls, the lines are held a little longer.
  task automatic write_reg(input int addr, input int val);
    @(negedge clk);
    ein = 8'(val); eils = {1'b0, 6'(addr)};
    repeat (2) @(negedge clk);
    eils[6] = 1'b1;
    repeat (3) @(negedge clk);
    eils[6] = 1'b0;
    repeat (3) @(negedge clk);
    if (addr <= N_OUT) n_writes++;
  endtask

  task automatic start_measure();
    measure = 1'b0;
    foreach (rise_t[k]) rise_t[k] = -1;
    release_cyc = -1;
    @(negedge clk);
    measure = 1'b1;
  endtask

  // Master clear, then release; measurement restarts and checks the first
  // rise relative to the release.
  task automatic master_clear();
    @(negedge clk);
    masterclr_n = 1'b0;
    #1;
    check(out == '0, "all outputs low at once in master clear");
    check(dut.count == '0, "counter cleared by master clear");
    n_masterclr++;
    measure = 1'b0;
    repeat (3) @(negedge clk);
    foreach (rise_t[k]) rise_t[k] = -1;
    masterclr_n = 1'b1;
    #1 release_cyc = cyc;
    measure = 1'b1;
  endtask

  task automatic program_all(input int m, input bit random_n);
    measure = 1'b0;
    exp_m = m;
    for (int k = 0; k < N_OUT; k++) begin
      exp_n[k] = random_n ? $urandom_range(1, m - 1) : ((k % (m - 1)) + 1);
      write_reg(k, exp_n[k]);
    end
    write_reg(N_OUT, m);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    measure = 1'b0; release_cyc = -1; prev = '0;
    ein = '0; eils = '0;
    foreach (rise_t[k]) rise_t[k] = -1;
    masterclr_n = 1'b0;
    repeat (4) @(negedge clk);
    check(out == '0, "outputs low while master clear is held");
    masterclr_n = 1'b1;
    repeat (3) @(negedge clk);

    // 1. program M = 36 and 48 random durations, then restart cleanly
    program_all(36, 1'b1);
    master_clear();
    repeat (4 * exp_m) @(negedge clk);

    // 2. master clear keeps the programmed bytes: no reprogramming needed
    master_clear();
    repeat (3 * exp_m) @(negedge clk);

    // 3. writes to unused select numbers change nothing (measurement goes on)
    for (int a = N_OUT + 1; a < N_SEL; a++) begin
      write_reg(a, $urandom_range(0, 255));
      n_ignored++;
    end
    check(int'(dut.period) == exp_m, "period register untouched by unused selects");
    repeat (2 * exp_m) @(negedge clk);

    // 4a. rewrite eight durations while running (a high phase that is in
    //     flight during a write may end at the old or the new value, so
    //     measuring stops until the writes are done)
    measure = 1'b0;
    for (int i = 0; i < 8; i++) begin
      int k = $urandom_range(0, N_OUT - 1);
      exp_n[k] = $urandom_range(1, exp_m - 1);
      write_reg(k, exp_n[k]);
      n_rewrite_n++;
    end
    start_measure();
    repeat (3 * exp_m) @(negedge clk);

    // 4b. rewrite the period while running (larger M: no wrap-around) and
    //     check the write latency from strobe to register
    measure = 1'b0;
    @(negedge clk);
    ein = 8'd100; eils = {1'b0, 6'(N_OUT)};
    repeat (2) @(negedge clk);
    eils[6] = 1'b1;
    lat = 0;
    while (int'(dut.period) != 100 && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 4, $sformatf("write latency %0d clocks, expected 4", lat));
    n_latency++;
    eils[6] = 1'b0;
    repeat (3) @(negedge clk);
    exp_m = 100;
    n_rewrite_m++;
    n_writes++;
    repeat (2 * 256) @(negedge clk);
    start_measure();
    repeat (3 * exp_m) @(negedge clk);

    // 5a. finest steps: M = 255, durations from 1 (0.4 %) to 254 (99.6 %)
    program_all(255, 1'b0);
    exp_n[0] = 1;   write_reg(0, 1);
    exp_n[1] = 254; write_reg(1, 254);
    master_clear();
    repeat (3 * exp_m + 10) @(negedge clk);

    // 5b. shortest period: M = 2, N = 1 on every output
    measure = 1'b0;
    exp_m = 2;
    for (int k = 0; k < N_OUT; k++) begin
      exp_n[k] = 1;
      write_reg(k, 1);
    end
    write_reg(N_OUT, 2);
    master_clear();
    repeat (20) @(negedge clk);

    // 6. out-of-rule durations with M = 20
    program_all(20, 1'b1);
    write_reg(3, 0);   exp_n[3] = -1;
    write_reg(4, 20);  exp_n[4] = -1;
    write_reg(5, 200); exp_n[5] = -1;
    master_clear();
    repeat (30) @(negedge clk);
    for (int c = 0; c < 3 * exp_m; c++) begin
      @(negedge clk);
      check(out[3] == 1'b1, "N = 0 keeps the output high");
      check(out[4] == 1'b0, "N = M keeps the output low");
      check(out[5] == 1'b1, "N > M keeps the output high");
    end
    n_stuck_high += 2;
    n_stuck_low++;

    measure = 1'b0;
    $display("writes=%0d presets=%0d high_phases=%0d periods=%0d first_rises=%0d",
             n_writes, n_presets, n_highs, n_periods, n_first_rise);
    $display("master_clears=%0d ignored_writes=%0d rewrite_n=%0d rewrite_m=%0d latency=%0d stuck_high=%0d stuck_low=%0d",
             n_masterclr, n_ignored, n_rewrite_n, n_rewrite_m, n_latency, n_stuck_high, n_stuck_low);
    check(n_writes > 0,      "mechanism: register write");
    check(n_presets > 0,     "mechanism: period match / counter restart");
    check(n_highs > 0,       "mechanism: duration match clears an output");
    check(n_periods > 0,     "mechanism: full output period");
    check(n_first_rise > 0,  "mechanism: first rise after master clear");
    check(n_masterclr > 0,   "mechanism: master clear");
    check(n_ignored > 0,     "mechanism: unused latch select");
    check(n_rewrite_n > 0,   "mechanism: duration rewritten while running");
    check(n_rewrite_m > 0,   "mechanism: period rewritten while running");
    check(n_stuck_high > 0,  "mechanism: out-of-rule duration (always high)");
    check(n_stuck_low > 0,   "mechanism: out-of-rule duration (always low)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
