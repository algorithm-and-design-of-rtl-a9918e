// flash_adc_dble: 6-bit flash ADC whose output is a double-base logarithmic
// number rather than a binary code.
//
// Signal path: the analog input (real, millivolts) goes to 63 TIQ comparators,
// whose thermometer code the 0-1 generator reduces to one of 64 word lines;
// the double-base log encoder reads that row of its two ROM arrays and its sense
// amplifiers latch the binary exponent b and ternary exponent t on the rising
// clock edge. The sample then reads 2^b * 3^t volts, within 0.15 LSB of the
// level's nominal voltage (level k: 550 mV + (k-1) * 500/62 mV).
//
// The comparator bank is a behavioural model of analog circuitry; the rest is
// synthesizable. The word lines are brought out as code_onehot for
// observation. The consumer of (b, t), a DSP filter in the double-base number
// system, is outside this design.
//
// Interface: clk, rst_n (synchronous, active low), vin_mv in; exp_out (signed
// 9-bit b and t), code_onehot out.
// Timing: exp_out shows the input present at the previous rising edge of clk
// (one cycle latency, one new sample per cycle).
module flash_adc_dble
  import dble_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  real                vin_mv,
  output dlns_t              exp_out,
  output logic [N_CODES-1:0] code_onehot
);

  logic [N_COMP:1] therm;

  tiq_comparator_bank #(.N_BITS(N_BITS)) u_comparators (
    .vin_mv(vin_mv),
    .therm (therm)
  );

  zero_one_generator #(.N_BITS(N_BITS)) u_zero_one (
    .therm    (therm),
    .word_line(code_onehot)
  );

  dble_encoder u_dble (
    .clk      (clk),
    .rst_n    (rst_n),
    .word_line(code_onehot),
    .exp_out  (exp_out)
  );

  // A well-formed thermometer code selects exactly one ROM row.
  a_one_row : assert property (@(posedge clk) disable iff (!rst_n) $onehot(code_onehot))
    else $error("flash_adc_dble: word lines not one-hot: %h", code_onehot);

endmodule
