// tb_ctapm_temp_step: sweeps every 9-bit temperature through the step encoder and compares
// the step and 5 degC sub-step with values computed from the table's step edges
// (-25, 0, 25, ..., 125 degC) by integer division.
module tb_ctapm_temp_step;
  import ctapm_pkg::*;

  logic signed [TEMP_W-1:0] temp;
  logic [2:0] tstep;
  logic [2:0] sub;
  int checks = 0, failures = 0;

  ctapm_temp_step dut (.temp_i(temp), .tstep_o(tstep), .sub_o(sub));

  function automatic int exp_step(int t);
    if (t < -25) return 0;
    return ((t + 50) / 25 > 7) ? 7 : (t + 50) / 25;
  endfunction

  function automatic int exp_sub(int t);
    int lo, d;
    lo = -50 + 25 * exp_step(t);
    d = t - lo;
    if (d < 0) return 0;
    return (d / 5 > 4) ? 4 : d / 5;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = -256; t < 256; t++) begin
      temp = TEMP_W'(t);
      #1;
      checks++;
      if (int'(tstep) != exp_step(t) || int'(sub) != exp_sub(t)) begin
        failures++;
        $display("FAIL temp=%0d step=%0d/%0d sub=%0d/%0d", t, tstep, exp_step(t), sub, exp_sub(t));
      end
    end
    // Spot checks against the table's column headings.
    temp = -40;  #1; checks++; if (tstep != 0) failures++;
    temp = -25;  #1; checks++; if (tstep != 1) failures++;
    temp = 24;   #1; checks++; if (tstep != 2) failures++;
    temp = 150;  #1; checks++; if (tstep != 7) failures++;
    temp = 12;   #1; checks++; if (sub != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
