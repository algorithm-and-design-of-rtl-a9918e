// tb_dble_encoder: selects each of the 64 ROM rows in turn, one per clock, and
// checks that one cycle later the encoder outputs the (b, t) pair nearest to
// the level's voltage (real-valued search), that the sixteen pairs of the
// design's published code table come out exactly, that every pair lies within
// 0.15 LSB of its level, and that the mean error of the sixteen published
// levels is 0.052 LSB (0.053 within rounding), as the table row errors give.
module tb_dble_encoder;
  import dble_pkg::*;
  import dble_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [63:0] word_line;
  dlns_t       exp_out;
  int checks = 0, failures = 0;
  int ref_b [64];
  int ref_t [64];

  // Published code table: level, b, t.
  localparam int PUB [16][3] = '{
    '{ 1, -134,   84}, '{ 5,  191, -121}, '{ 9,  115,  -73}, '{13,  207, -131},
    '{17, -186,  117}, '{21,  -10,    6}, '{25, -151,   95}, '{29,  193, -122},
    '{33,  136,  -86}, '{37,  163, -103}, '{41,  190, -120}, '{45, -184,  116},
    '{49,   11,   -7}, '{53,  206, -130}, '{57,  -84,   53}, '{61,  195, -123}};

  dble_encoder dut (.clk, .rst_n, .word_line, .exp_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  initial begin
    int  got_b [64];
    int  got_t [64];
    real err, sum_err;

    for (int k = 0; k < 64; k++) nearest(level_mv(k), ref_b[k], ref_t[k]);

    rst_n = 1'b0;
    word_line = 64'd1;
    @(posedge clk); #1;
    check(exp_out == '0, "output cleared by reset");
    @(negedge clk);
    rst_n = 1'b1;

    // One new row per clock; the output of row k appears after the edge that
    // sampled it and must be there already one cycle later.
    for (int k = 0; k < 64; k++) begin
      word_line = 64'd1 << k;
      @(posedge clk); #1;
      got_b[k] = int'(exp_out.b);
      got_t[k] = int'(exp_out.t);
      check(got_b[k] == ref_b[k] && got_t[k] == ref_t[k],
            $sformatf("row %0d: (b,t)=(%0d,%0d) expected (%0d,%0d)",
                      k, got_b[k], got_t[k], ref_b[k], ref_t[k]));
      err = (dlns_mv(got_b[k], got_t[k]) - level_mv(k)) / LSB_MV;
      if (err < 0.0) err = -err;
      check(err <= 0.15, $sformatf("row %0d: error %0.3f LSB above 0.15", k, err));
      @(negedge clk);
    end

    sum_err = 0.0;
    for (int i = 0; i < 16; i++) begin
      int k;
      k = PUB[i][0];
      check(got_b[k] == PUB[i][1] && got_t[k] == PUB[i][2],
            $sformatf("published level %0d: (%0d,%0d) expected (%0d,%0d)",
                      k, got_b[k], got_t[k], PUB[i][1], PUB[i][2]));
      err = (dlns_mv(got_b[k], got_t[k]) - level_mv(k)) / LSB_MV;
      sum_err += (err < 0.0) ? -err : err;
    end
    check(sum_err / 16.0 > 0.051 && sum_err / 16.0 < 0.054,
          $sformatf("mean error of published levels %0.4f LSB, expected 0.053", sum_err / 16.0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
