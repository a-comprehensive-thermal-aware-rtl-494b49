// tb_ctapm_clock_gate: runs an island clock through the gate while switching the enable at
// random times (asynchronously to the island clock), and checks that the gated clock stops
// within three island clocks of disabling, restarts within three of enabling, never pulses
// while disabled for longer than that, and that every gated pulse is a full half period.
module tb_ctapm_clock_gate;
  logic clk = 0, rst_n = 0, en = 1, gclk;
  int checks = 0, failures = 0;
  realtime t_rise;
  int pulses_on = 0, pulses_off = 0, stops = 0, restarts = 0;

  ctapm_clock_gate dut (.clk_i(clk), .rst_n, .en_i(en), .gclk_o(gclk));

  always #5 clk = ~clk;   // island clock, 10 time units

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Every gated pulse must be exactly half an island period wide.
  bit seen_rise = 0;
  always @(posedge gclk) if (rst_n) begin t_rise = $realtime; seen_rise = 1; end
  always @(negedge gclk) if (seen_rise) begin
    checks++;
    if ($realtime - t_rise != 5.0) begin
      failures++; $display("FAIL pulse width %0t at %0t", $realtime - t_rise, $realtime);
    end
  end

  task automatic count_pulses(int cycles, output int n);
    n = 0;
    repeat (cycles) begin
      @(posedge clk);
      #1;
      if (gclk) n++;
    end
  endtask

  initial begin
    int n;
    #23 rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      // Enabled: after three clocks of settling the gate passes every clock.
      #($urandom_range(1, 9));
      en = 1;
      count_pulses(3, n);
      count_pulses(10, n);
      checks++;
      if (n != 10) begin failures++; $display("FAIL enabled: %0d of 10 pulses", n); end
      else restarts++;
      pulses_on += n;
      #($urandom_range(1, 9));
      en = 0;
      count_pulses(3, n);
      count_pulses(10, n);
      checks++;
      if (n != 0) begin failures++; $display("FAIL disabled: %0d pulses", n); end
      else stops++;
      pulses_off += n;
    end
    // The first pulse after enabling arrives within three clocks.
    en = 1;
    count_pulses(3, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL no pulse within 3 clocks of enable"); end
    checks++;
    if (stops == 0 || restarts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
