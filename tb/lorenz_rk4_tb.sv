// lorenz_rk4_tb: runs the Lorenz generator from the specified initial point
// (x0 = y0 = z0 = 10, sigma = 10, r = 28, beta = 2.666) and checks
//  - every sample bit-exactly against the integer RK4 reference,
//  - the first 300 samples against a double-precision RK4 integration,
//  - one sample every 4 clocks while run is high, none while it is low,
//  - that a reload restarts the trajectory from the new configuration.
module lorenz_rk4_tb;
  import pmls_pkg::*;
  import pmls_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0, run = 1'b0;
  lorenz_cfg_t cfg;
  vec3_t       out_state;
  logic        out_valid;
  int          checks = 0, failures = 0;

  lorenz_rk4 dut (.clk, .rst_n, .load, .cfg, .run, .out_state, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rvec_t  rs;
  dvec_t  ds;
  longint c_sigma, c_r, c_beta;
  int     nsamp, last_cyc, cyc;
  logic   stall_window;

  always @(posedge clk) cyc <= cyc + 1;

  // compare each output sample with the reference models
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      rs = ref_rk4(rs, c_sigma, c_r, c_beta, longint'(H_DEF));
      ds = d_rk4(ds, real'(c_sigma) / 2.0 ** 24, real'(c_r) / 2.0 ** 24,
                 real'(c_beta) / 2.0 ** 24, 0.01);
      checks++;
      if (longint'(out_state.x) != rs.x || longint'(out_state.y) != rs.y ||
          longint'(out_state.z) != rs.z) begin
        failures++;
        if (failures < 10)
          $display("sample %0d: dut (%0d,%0d,%0d) ref (%0d,%0d,%0d)", nsamp,
                   out_state.x, out_state.y, out_state.z, rs.x, rs.y, rs.z);
        rs.x = longint'(out_state.x);
        rs.y = longint'(out_state.y);
        rs.z = longint'(out_state.z);
      end
      if (nsamp < 300) begin
        checks++;
        if ((to_phys(longint'(out_state.x)) - ds.x) ** 2 +
            (to_phys(longint'(out_state.y)) - ds.y) ** 2 +
            (to_phys(longint'(out_state.z)) - ds.z) ** 2 > 1.0e-3) begin
          failures++;
          $display("sample %0d far from double RK4: (%f,%f,%f) vs (%f,%f,%f)", nsamp,
                   to_phys(longint'(out_state.x)), to_phys(longint'(out_state.y)),
                   to_phys(longint'(out_state.z)), ds.x, ds.y, ds.z);
        end
      end
      if (nsamp > 0 && !stall_window) begin
        checks++;
        if (cyc - last_cyc != 4) begin
          failures++;
          $display("sample spacing %0d cycles, expected 4", cyc - last_cyc);
        end
      end
      last_cyc = cyc;
      nsamp++;
    end
  end

  task automatic start_run(coef_t r_val);
    cfg.sigma  = SIGMA_DEF;
    cfg.r      = r_val;
    cfg.beta   = BETA_DEF;
    cfg.init.x = INIT_DEF;
    cfg.init.y = INIT_DEF;
    cfg.init.z = INIT_DEF;
    c_sigma = longint'(cfg.sigma);
    c_r     = longint'(cfg.r);
    c_beta  = longint'(cfg.beta);
    rs.x = longint'(INIT_DEF);
    rs.y = longint'(INIT_DEF);
    rs.z = longint'(INIT_DEF);
    ds.x = 10.0;
    ds.y = 10.0;
    ds.z = 10.0;
    nsamp = 0;
    @(negedge clk);
    load = 1'b1;
    run  = 1'b1;
    @(negedge clk);
    load = 1'b0;
  endtask

  initial begin
    int seen;
    cyc = 0;
    stall_window = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    start_run(R_DEF);
    wait (nsamp == 2000);
    // stall: no samples while run is low
    @(negedge clk);
    run = 1'b0;
    stall_window = 1'b1;
    seen = nsamp;
    repeat (40) @(negedge clk);
    checks++;
    if (nsamp != seen) begin
      failures++;
      $display("samples produced while run was low");
    end
    run = 1'b1;
    wait (nsamp == seen + 2);
    stall_window = 1'b0;
    wait (nsamp == 5000);
    // reload with another r: trajectory restarts
    start_run(32'sd486539264);  // r = 29
    wait (nsamp == 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
