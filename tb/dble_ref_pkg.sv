// dble_ref_pkg: reference model for the testbenches of the double-base log
// encoder, computed with real arithmetic and independent of the RTL tables.
//
// level_mv(k)  nominal input voltage of level k: 550 mV + (k-1) * 500/62 mV.
// dlns_mv(b,t) value of the pair in millivolts: 1000 * 2^b * 3^t.
// nearest()    exhaustive search over b, t in [-256, 256) for the pair whose
//              value is nearest to a given voltage. For every t only the two
//              b around log2(v) - t*log2(3) can be nearest, so 1024 candidates
//              are tried.
package dble_ref_pkg;

  localparam real LSB_MV = 500.0 / 62.0;
  localparam real LOG2_3 = 1.584962500721156;

  function automatic real level_mv(input int k);
    return 550.0 + (real'(k) - 1.0) * LSB_MV;
  endfunction

  function automatic real dlns_mv(input int b, input int t);
    return 1000.0 * (2.0 ** (real'(b) + real'(t) * LOG2_3));
  endfunction

  function automatic void nearest(input real v_mv, output int b_best, output int t_best);
    real x, err, best_err;
    int  b0;
    x        = $ln(v_mv / 1000.0) / $ln(2.0);
    best_err = 1.0e30;
    b_best   = 0;
    t_best   = 0;
    for (int t = -256; t < 256; t++) begin
      b0 = int'($floor(x - real'(t) * LOG2_3));
      for (int b = b0; b <= b0 + 1; b++) begin
        if (b >= -256 && b < 256) begin
          err = dlns_mv(b, t) - v_mv;
          if (err < 0.0) err = -err;
          if (err < best_err) begin
            best_err = err;
            b_best   = b;
            t_best   = t;
          end
        end
      end
    end
  endfunction

endpackage
