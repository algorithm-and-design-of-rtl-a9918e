// sense_amp: row of clocked sense amplifiers at the foot of the ROM arrays.
//
// Each amplifier compares its precharged bit line with the precharge level and,
// on the rising clock edge, latches the resolved full-swing value. A
// discharged (low) bit line means the addressed cell holds a transistor, i.e. a
// stored 1, so the amplifier outputs the inverse of the bit line. Between
// edges the output holds, so the exponents stay stable for the DSP that reads
// them while the array is precharged and evaluated for the next sample.
//
// The design only names the sense amplifiers; modelling them as edge-triggered
// latches with an active-low synchronous reset to 0 is this design's choice.
//
// Interface: clk, rst_n, bit_line_n[WIDTH-1:0] in, data[WIDTH-1:0] out.
// Timing: data shows the bit lines sampled at the previous rising edge
// (one cycle latency).
module sense_amp #(
  parameter int WIDTH = dble_pkg::EXP_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] bit_line_n,
  output logic [WIDTH-1:0] data
);

  always_ff @(posedge clk) begin
    if (!rst_n) data <= '0;
    else        data <= ~bit_line_n;
  end

endmodule
