// lorenz_deriv_tb: checks the Lorenz vector-field unit against the integer
// reference model for random states spread over the attractor's range, and
// against the double-precision field (in physical units) to within the
// truncation error of the fixed-point format.
module lorenz_deriv_tb;
  import pmls_pkg::*;
  import pmls_ref_pkg::*;

  vec3_t s, ds;
  coef_t sigma, r, beta;
  int    checks = 0, failures = 0;

  lorenz_deriv dut (.s, .sigma, .r, .beta, .ds);

  function automatic longint rnd_range(int lo, int hi);
    // uniform physical value in [lo, hi) as a scaled Q4.28 word (2^21 per unit)
    longint span;
    span = longint'(hi - lo) * 2097152;
    return longint'(lo) * 2097152 + longint'({$urandom, $urandom} % span);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rvec_t rs, rd;
    dvec_t ps, pd;
    real   err;
    sigma = SIGMA_DEF;
    r     = R_DEF;
    beta  = BETA_DEF;
    for (int i = 0; i < 2000; i++) begin
      rs.x = rnd_range(-25, 25);
      rs.y = rnd_range(-30, 30);
      rs.z = rnd_range(0, 55);
      if (i == 1000) begin
        r = 32'sd503316480;  // r = 30
      end
      s.x = fx_t'(rs.x);
      s.y = fx_t'(rs.y);
      s.z = fx_t'(rs.z);
      #1;
      rd = ref_deriv(rs, longint'(sigma), longint'(r), longint'(beta));
      checks++;
      if (longint'(ds.x) != rd.x || longint'(ds.y) != rd.y || longint'(ds.z) != rd.z) begin
        failures++;
        if (failures < 10)
          $display("mismatch i=%0d dut=(%0d,%0d,%0d) ref=(%0d,%0d,%0d)", i,
                   ds.x, ds.y, ds.z, rd.x, rd.y, rd.z);
      end
      // against the exact field in physical units
      ps.x = to_phys(rs.x);
      ps.y = to_phys(rs.y);
      ps.z = to_phys(rs.z);
      pd   = d_deriv(ps, real'(sigma) / 2.0 ** 24, real'(r) / 2.0 ** 24, real'(beta) / 2.0 ** 24);
      err  = (to_phys(longint'(ds.x)) - pd.x) ** 2 + (to_phys(longint'(ds.y)) - pd.y) ** 2
           + (to_phys(longint'(ds.z)) - pd.z) ** 2;
      checks++;
      if (err > 1.0e-6) begin
        failures++;
        if (failures < 10) $display("field error %g at i=%0d", err, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
