// tiq_comparator_bank: behavioural model of the analog front end of the flash
// ADC, the bank of 2^N_BITS - 1 threshold-inverter-quantisation (TIQ) voltage
// comparators. It is not synthesizable logic: in silicon each comparator is a
// pair of sized inverters whose switching voltage sets its threshold.
//
// Comparator i (i = 1..2^N_BITS-1) outputs 1 when the input voltage reaches
//     V_FIRST_MV + (i - 1.5) * LSB_MV,
// the midpoint between the nominal voltages of levels i-1 and i, where level k
// stands for V_FIRST_MV + (k - 1) * LSB_MV. The outputs together form a
// thermometer code: therm[i] is set for every i up to the number of the level
// the input falls in. Below the first threshold all outputs are 0 (level 0);
// above the last they are all 1 (level 2^N_BITS - 1).
//
// The number of comparators and the 550 mV / 500/62 mV level spacing follow the
// published code table of the design; placing thresholds at midpoints is this
// model's own choice. The model is ideal: no offset, no noise, no delay.
//
// Interface: vin_mv (real, millivolts) in, therm[2^N_BITS-1:1] out.
// Timing: combinational.
module tiq_comparator_bank #(
  parameter int  N_BITS     = dble_pkg::N_BITS,
  parameter real V_FIRST_MV = 550.0,
  parameter real LSB_MV     = 500.0 / 62.0
) (
  input  real                    vin_mv,
  output logic [2**N_BITS-1:1]   therm
);

  always_comb begin
    for (int i = 1; i < 2**N_BITS; i++)
      therm[i] = (vin_mv >= V_FIRST_MV + (real'(i) - 1.5) * LSB_MV);
  end

endmodule
