// tb_tiq_comparator_bank: sweeps the analog input of the comparator bank over
// and beyond its range and checks that the output is a thermometer code whose
// number of ones is the level whose nominal voltage is nearest to the input
// (0 below the range, 63 above it).
module tb_tiq_comparator_bank;
  import dble_ref_pkg::*;

  real         vin_mv;
  logic [63:1] therm;
  int checks = 0, failures = 0;

  tiq_comparator_bank dut (.vin_mv(vin_mv), .therm(therm));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nearest_level(input real v);
    int  best = 0;
    real d, bd = 1.0e30;
    for (int k = 0; k < 64; k++) begin
      d = v - level_mv(k);
      if (d < 0.0) d = -d;
      if (d < bd) begin bd = d; best = k; end
    end
    return best;
  endfunction

  task automatic check_at(input real v);
    int exp_level, ones;
    bit is_therm;
    vin_mv = v;
    #1;
    exp_level = nearest_level(v);
    ones      = $countones(therm);
    is_therm  = 1'b1;
    for (int i = 1; i < 64; i++)
      if (therm[i] != (i <= ones)) is_therm = 1'b0;
    checks++;
    if (!is_therm || ones != exp_level) begin
      failures++;
      $display("FAIL v=%0.3f mV therm=%h level=%0d expected %0d", v, therm, ones, exp_level);
    end
  endtask

  initial begin
    // Deterministic sweep: 0.37 mV steps from 480 mV to 1120 mV.
    for (real v = 480.0; v < 1120.0; v += 0.37) check_at(v);
    // Random points, including far outside the range.
    for (int n = 0; n < 2000; n++) check_at(300.0 + real'($urandom_range(0, 1000000)) * 0.001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
