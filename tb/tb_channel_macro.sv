// tb_channel_macro: self-checking test of one 8-channel output macro. The
// testbench plays the shared part of the generator: it counts 1..M and
// raises preset while the count equals M. It writes a duration into each
// channel through the select lines, then measures every output: each high
// phase must last N clocks and consecutive rising edges must be M clocks
// apart, with all channels rising together one clock after preset. Then it
// rewrites the durations while running, checks that a write reaches only
// the selected channel, and that master clear drops all outputs.
module tb_channel_macro;
  localparam int CH = 8;
  logic          clk = 1'b0;
  logic          rst_n, cmp_en, preset;
  logic [CH-1:0] ls, out;
  logic [7:0]    din, count;
  int            m;
  int            n_exp[CH];
  int            rise_t[CH];
  int            cyc = 0;
  logic [CH-1:0] prev;
  bit            measure;
  int checks = 0, failures = 0;
  int highs = 0, periods = 0;

  channel_macro #(.WIDTH(8), .CHANNELS(CH)) dut (
    .clk(clk), .rst_n(rst_n), .cmp_en(cmp_en), .preset(preset),
    .ls(ls), .din(din), .count(count), .out(out)
  );

  always #5 clk = ~clk;

  // reference period counter
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) count <= '0;
    else        count <= (int'(count) == m) ? 8'd1 : count + 8'd1;
  always_comb preset = rst_n && (int'(count) == m);
  always_comb cmp_en = rst_n;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // output measurement, sampled in the middle of each clock
  always @(negedge clk) begin
    cyc++;
    for (int k = 0; k < CH; k++) begin
      if (measure && out[k] && !prev[k]) begin
        if (rise_t[k] >= 0) begin
          check(cyc - rise_t[k] == m, $sformatf("ch%0d period %0d, expected %0d", k, cyc - rise_t[k], m));
          periods++;
        end
        rise_t[k] = cyc;
      end
      if (measure && !out[k] && prev[k] && rise_t[k] >= 0) begin
        check(cyc - rise_t[k] == n_exp[k], $sformatf("ch%0d high %0d, expected %0d", k, cyc - rise_t[k], n_exp[k]));
        highs++;
      end
    end
    prev = out;
  end

  task automatic write_ch(input int k, input int v);
    @(negedge clk);
    din = 8'(v); ls = CH'(1) << k;
    @(negedge clk);
    ls = '0;
  endtask

  task automatic restart_measure();
    measure = 1'b0;
    foreach (rise_t[k]) rise_t[k] = -1;
    @(negedge clk);
    measure = 1'b1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    measure = 1'b0; ls = '0; din = '0; prev = '0;
    foreach (rise_t[k]) rise_t[k] = -1;
    m = 36;
    rst_n = 1'b0;
    for (int k = 0; k < CH; k++) begin
      n_exp[k] = 1 + 4 * k;
      write_ch(k, n_exp[k]);
    end
    @(negedge clk);
    check(out == '0, "outputs low during master clear");
    rst_n = 1'b1;
    measure = 1'b1;
    repeat (4 * m) @(negedge clk);

    // rewrite the durations one by one while running
    for (int k = 0; k < CH; k++) begin
      n_exp[k] = $urandom_range(1, m - 1);
      write_ch(k, n_exp[k]);
    end
    restart_measure();
    repeat (4 * m) @(negedge clk);

    // master clear drops every output at once
    rst_n = 1'b0;
    #1;
    check(out == '0, "master clear clears all outputs");
    @(negedge clk);
    rst_n = 1'b1;
    restart_measure();
    repeat (3 * m) @(negedge clk);

    check(highs >= 8 * CH, $sformatf("only %0d high phases seen", highs));
    check(periods >= 6 * CH, $sformatf("only %0d periods seen", periods));
    $display("high phases measured %0d, periods measured %0d", highs, periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
