// zero_one_generator: thermometer code to one-hot word-line select.
//
// The comparators deliver a thermometer code therm[2^N_BITS-1:1] (bit i set
// when the input is at or above threshold i). The generator finds the single
// 1-to-0 transition and raises exactly one of 2^N_BITS word lines, which then
// triggers one row of the encoder ROM:
//     word_line[0]             = ~therm[1]                (input below range)
//     word_line[k], 0<k<top    =  therm[k] & ~therm[k+1]
//     word_line[top]           =  therm[top]              (top = 2^N_BITS-1)
// Word line 0 exists so that the lowest level also gets its own ROM row; a
// plain binary encoder would not need it. For a well-formed thermometer code
// exactly one word line is high. A bubble in the code (a 0 below a 1) is not
// corrected and may raise several lines.
//
// The function (thermometer code in, one active trigger line out) is the
// design's; the transition-detect equations above are this design's choice.
//
// Interface: therm in, word_line[2^N_BITS-1:0] out. Timing: combinational.
module zero_one_generator #(
  parameter int N_BITS = dble_pkg::N_BITS
) (
  input  logic [2**N_BITS-1:1] therm,
  output logic [2**N_BITS-1:0] word_line
);

  localparam int TOP = 2**N_BITS - 1;

  always_comb begin
    word_line[0]   = ~therm[1];
    for (int k = 1; k < TOP; k++)
      word_line[k] = therm[k] & ~therm[k+1];
    word_line[TOP] = therm[TOP];
  end

endmodule
