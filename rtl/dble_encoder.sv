// dble_encoder: double-base log encoder (DBLE) of a 6-bit flash ADC.
//
// Instead of turning the one-hot output of the 0-1 generator into a binary
// code, the encoder looks up, for the selected level, a pair of signed
// exponents (b, t) such that 2^b * 3^t volts is nearest to the level's input
// voltage. A DSP working in the double-base logarithmic number system can then
// multiply samples by adding exponents, with no binary-to-log conversion.
//
// Structure, as in the design's layout: two NMOS NOR ROM arrays share the 64
// word lines, one storing the 9-bit binary exponents, one the 9-bit ternary
// exponents (18 output columns in all), and a row of sense amplifiers turns the
// 18 bit lines into the output bits. The table contents and the nearest-value
// rule are described in dble_pkg.
//
// The clocked sense amplifiers (one cycle latency) and the synchronous reset
// are this design's choices; the document does not describe a clock.
//
// Interface: clk, rst_n, word_line[63:0] (one-hot) in; exp_out (struct with
// signed b and t) out. Timing: exp_out holds the pair of the word line that
// was active at the previous rising edge of clk.
module dble_encoder
  import dble_pkg::*;
#(
  parameter rom_cells_t B_ROM = B_CELLS,
  parameter rom_cells_t T_ROM = T_CELLS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_CODES-1:0] word_line,
  output dlns_t              exp_out
);

  logic [EXP_W-1:0] b_bit_line_n, t_bit_line_n;
  logic [EXP_W-1:0] b_data, t_data;

  nor_rom_array #(.ROWS(N_CODES), .COLS(EXP_W), .CELLS(B_ROM)) u_binary_rom (
    .word_line (word_line),
    .bit_line_n(b_bit_line_n)
  );

  nor_rom_array #(.ROWS(N_CODES), .COLS(EXP_W), .CELLS(T_ROM)) u_ternary_rom (
    .word_line (word_line),
    .bit_line_n(t_bit_line_n)
  );

  sense_amp #(.WIDTH(EXP_W)) u_binary_sa (
    .clk, .rst_n, .bit_line_n(b_bit_line_n), .data(b_data)
  );

  sense_amp #(.WIDTH(EXP_W)) u_ternary_sa (
    .clk, .rst_n, .bit_line_n(t_bit_line_n), .data(t_data)
  );

  assign exp_out.b = exp_t'(b_data);
  assign exp_out.t = exp_t'(t_data);

endmodule
