// tb_nor_rom_array: checks the binary-exponent ROM array (the module's default
// contents). For each word line the active-low bit lines must carry the 9-bit
// binary exponent of the pair nearest to the level's voltage, worked out here
// by real-valued search. Also checks that with no word line all bit lines stay
// precharged, and that two active rows discharge the union of their columns.
module tb_nor_rom_array;
  import dble_ref_pkg::*;

  logic [63:0] word_line;
  logic [8:0]  bit_line_n;
  int checks = 0, failures = 0;
  int ref_b [64];
  int ref_t [64];

  nor_rom_array dut (.word_line(word_line), .bit_line_n(bit_line_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_lines(input logic [8:0] stored, input string what);
    #1;
    checks++;
    if (bit_line_n !== ~stored) begin
      failures++;
      $display("FAIL %s: bit_line_n=%b expected %b", what, bit_line_n, ~stored);
    end
  endtask

  initial begin
    for (int k = 0; k < 64; k++) nearest(level_mv(k), ref_b[k], ref_t[k]);

    word_line = '0;
    expect_lines(9'h000, "no word line");

    for (int k = 0; k < 64; k++) begin
      word_line = 64'd1 << k;
      expect_lines(9'(ref_b[k]), $sformatf("row %0d", k));
    end

    for (int n = 0; n < 200; n++) begin
      int r1, r2;
      r1 = $urandom_range(0, 63);
      r2 = $urandom_range(0, 63);
      word_line = (64'd1 << r1) | (64'd1 << r2);
      expect_lines(9'(ref_b[r1]) | 9'(ref_b[r2]), $sformatf("rows %0d+%0d", r1, r2));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
