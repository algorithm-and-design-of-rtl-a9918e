// nor_rom_array: one NMOS NOR-type ROM array of the double-base log encoder.
//
// Each column has a bit line that is precharged high. A cell that stores a 1
// holds an NMOS transistor between the bit line and ground, gated by the row's
// word line. When a word line rises, every column whose cell in that row holds
// a transistor is discharged, so the bit line reads low for a stored 1 and high
// for a stored 0 (active-low data). With no word line active all bit lines stay
// high. If several word lines were active, a bit line would be pulled low by
// any of them: the wired-NOR behaviour of the real array.
//
// The encoder uses two of these arrays, one holding the binary exponents and
// one the ternary exponents, as in the design's layout. CELLS[k] is the stored
// word of row k; its default is the binary-exponent table of dble_pkg.
//
// Interface: word_line[ROWS-1:0] in (one-hot), bit_line_n[COLS-1:0] out
// (active low). Timing: combinational; the sense amplifiers sample it.
module nor_rom_array #(
  parameter int ROWS = dble_pkg::N_CODES,
  parameter int COLS = dble_pkg::EXP_W,
  parameter logic [ROWS-1:0][COLS-1:0] CELLS = dble_pkg::B_CELLS
) (
  input  logic [ROWS-1:0] word_line,
  output logic [COLS-1:0] bit_line_n
);

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      logic pulled;
      pulled = 1'b0;
      for (int r = 0; r < ROWS; r++)
        pulled |= word_line[r] & CELLS[r][c];
      bit_line_n[c] = ~pulled;
    end
  end

endmodule
