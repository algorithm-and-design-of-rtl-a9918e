// tb_sense_amp: drives random bit-line patterns and checks that the data
// output is the inverted bit lines of the previous rising clock edge, that it
// holds between edges, and that reset clears it.
module tb_sense_amp;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [8:0] bit_line_n;
  logic [8:0] data;
  int checks = 0, failures = 0;

  sense_amp dut (.clk, .rst_n, .bit_line_n, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [8:0] expected, input string what);
    checks++;
    if (data !== expected) begin
      failures++;
      $display("FAIL %s: data=%b expected %b", what, data, expected);
    end
  endtask

  initial begin
    logic [8:0] sampled;
    rst_n = 1'b0;
    bit_line_n = 9'h0A5;
    @(posedge clk); @(negedge clk);
    check(9'h000, "during reset");
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      bit_line_n = 9'($urandom);
      sampled = ~bit_line_n;
      @(posedge clk); #1;
      check(sampled, "one cycle after sampling");
      bit_line_n = 9'($urandom);
      #2;
      check(sampled, "holding between edges");
    end
    @(negedge clk);
    rst_n = 1'b0;
    @(posedge clk); #1;
    check(9'h000, "after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
