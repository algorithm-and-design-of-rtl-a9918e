// tb_table1_workload: runs the sixteen input voltages of the design's published
// code table through the whole ADC, one per clock, and checks each row: the
// level (DC), the exponents b and t, the value 2^b * 3^t in millivolts to the
// printed two decimals, and the error (input - value) in LSB to the printed
// three decimals. The table's printed numbers are copied here as data.
module tb_table1_workload;
  import dble_pkg::*;
  import dble_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  real         vin_mv;
  dlns_t       exp_out;
  logic [63:0] code_onehot;
  int checks = 0, failures = 0;

  // Input mV, DC, b, t, value mV, error LSB.
  localparam real ROWS [16][6] = '{
    '{ 550.00,  1, -134,   84,  549.75,  0.031},
    '{ 582.26,  5,  191, -121,  582.18,  0.010},
    '{ 614.52,  9,  115,  -73,  614.61, -0.011},
    '{ 646.77, 13,  207, -131,  646.14,  0.079},
    '{ 679.03, 17, -186,  117,  678.59,  0.055},
    '{ 711.29, 21,  -10,    6,  711.91, -0.077},
    '{ 743.55, 25, -151,   95,  743.00,  0.068},
    '{ 775.81, 29,  193, -122,  776.24, -0.054},
    '{ 808.07, 33,  136,  -86,  808.45, -0.047},
    '{ 840.32, 37,  163, -103,  840.23,  0.011},
    '{ 872.58, 41,  190, -120,  873.27, -0.085},
    '{ 904.84, 45, -184,  116,  904.79,  0.006},
    '{ 937.10, 49,   11,   -7,  936.44,  0.081},
    '{ 969.36, 53,  206, -130,  969.21,  0.019},
    '{1001.61, 57,  -84,   53, 1002.09, -0.059},
    '{1033.87, 61,  195, -123, 1034.99, -0.138}};

  flash_adc_dble dut (.clk, .rst_n, .vin_mv, .exp_out, .code_onehot);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
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

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    real cv, err;
    int  dc;
    rst_n  = 1'b0;
    vin_mv = 550.0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin
      vin_mv = ROWS[i][0];
      #1;
      dc = -1;
      for (int k = 0; k < 64; k++) if (code_onehot[k]) dc = k;
      check(dc == int'(ROWS[i][1]), $sformatf("row %0d: level %0d, printed %0d", i, dc, int'(ROWS[i][1])));
      @(posedge clk); #1;
      check(int'(exp_out.b) == int'(ROWS[i][2]) && int'(exp_out.t) == int'(ROWS[i][3]),
            $sformatf("row %0d: (b,t)=(%0d,%0d), printed (%0d,%0d)", i, exp_out.b, exp_out.t,
                      int'(ROWS[i][2]), int'(ROWS[i][3])));
      cv  = dlns_mv(exp_out.b, exp_out.t);
      err = (ROWS[i][0] - cv) / LSB_MV;
      check(absr(cv - ROWS[i][4]) <= 0.005 + 1.0e-9,
            $sformatf("row %0d: value %0.3f mV, printed %0.2f", i, cv, ROWS[i][4]));
      check(absr(err - ROWS[i][5]) <= 0.0015,
            $sformatf("row %0d: error %0.4f LSB, printed %0.3f", i, err, ROWS[i][5]));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
