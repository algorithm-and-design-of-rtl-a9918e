// tb_zero_one_generator: drives every well-formed thermometer code (0 to 63
// ones) and checks that exactly the word line of that level is raised.
module tb_zero_one_generator;
  logic [63:1] therm;
  logic [63:0] word_line;
  int checks = 0, failures = 0;

  zero_one_generator dut (.therm(therm), .word_line(word_line));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k < 64; k++) begin
        logic [63:0] expected;
        for (int i = 1; i < 64; i++) therm[i] = (i <= k);
        expected = '0;
        expected[k] = 1'b1;
        #1;
        checks++;
        if (word_line !== expected) begin
          failures++;
          $display("FAIL level %0d: word_line=%h expected %h", k, word_line, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
