// tb_flash_adc_dble: end-to-end test of the flash ADC with double-base log
// encoder at its default size. A new analog sample is applied every clock:
// first a slow ramp over and beyond the input range, then random voltages.
// One cycle after each sample the output pair (b, t) must equal the pair
// nearest to the nominal voltage of the level nearest the input (real-valued
// reference), 2^b * 3^t must lie within 0.15 LSB of that level and within
// 0.65 LSB of the input itself, and exactly one word line must have been
// active. Counted events: every one of the 64 levels reached, inputs below
// and above the range (clamped to the end levels), and the reset clearing
// the output; an event that never happens counts as a failure.
module tb_flash_adc_dble;
  import dble_pkg::*;
  import dble_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  real         vin_mv;
  dlns_t       exp_out;
  logic [63:0] code_onehot;
  int checks = 0, failures = 0;
  int ref_b [64];
  int ref_t [64];
  int hits [64];
  int n_under = 0, n_over = 0, n_reset = 0;

  flash_adc_dble dut (.clk, .rst_n, .vin_mv, .exp_out, .code_onehot);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

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

  // Apply one sample before a rising edge; check the result after it.
  task automatic sample(input real v);
    int  k;
    real e_level, e_in;
    logic [63:0] onehot_seen;
    @(negedge clk);
    vin_mv = v;
    k = nearest_level(v);
    #1;
    onehot_seen = code_onehot;
    @(posedge clk); #1;
    hits[k]++;
    if (v < level_mv(0) - 0.5 * LSB_MV)  n_under++;
    if (v > level_mv(63) + 0.5 * LSB_MV) n_over++;
    check($onehot(onehot_seen) && onehot_seen[k],
          $sformatf("v=%0.3f: word lines %h, expected level %0d", v, onehot_seen, k));
    check(int'(exp_out.b) == ref_b[k] && int'(exp_out.t) == ref_t[k],
          $sformatf("v=%0.3f level %0d: (b,t)=(%0d,%0d) expected (%0d,%0d)",
                    v, k, exp_out.b, exp_out.t, ref_b[k], ref_t[k]));
    e_level = (dlns_mv(exp_out.b, exp_out.t) - level_mv(k)) / LSB_MV;
    e_in    = (dlns_mv(exp_out.b, exp_out.t) - v) / LSB_MV;
    if (e_level < 0.0) e_level = -e_level;
    if (e_in < 0.0) e_in = -e_in;
    check(e_level <= 0.15, $sformatf("v=%0.3f: %0.3f LSB from its level", v, e_level));
    if (k > 0 && k < 63)
      check(e_in <= 0.65, $sformatf("v=%0.3f: %0.3f LSB from the input", v, e_in));
  endtask

  initial begin
    for (int k = 0; k < 64; k++) begin
      nearest(level_mv(k), ref_b[k], ref_t[k]);
      hits[k] = 0;
    end

    rst_n  = 1'b0;
    vin_mv = 800.0;
    repeat (2) @(posedge clk);
    #1;
    check(exp_out == '0, "output cleared by reset");
    if (exp_out == '0) n_reset++;
    @(negedge clk);
    rst_n = 1'b1;

    for (real v = 500.0; v <= 1100.0; v += 1.3) sample(v);
    for (int n = 0; n < 3000; n++) sample(450.0 + real'($urandom_range(0, 700000)) * 0.001);

    for (int k = 0; k < 64; k++)
      check(hits[k] > 0, $sformatf("level %0d never reached", k));
    check(n_under > 0, "no input below the range");
    check(n_over  > 0, "no input above the range");
    check(n_reset > 0, "reset never cleared the output");
    $display("events: under-range %0d, over-range %0d, reset %0d, least-hit level %0d times",
             n_under, n_over, n_reset, hits.min()[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
