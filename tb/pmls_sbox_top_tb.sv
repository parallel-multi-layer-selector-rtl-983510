// pmls_sbox_top_tb: end-to-end test of the PMLS S-box generator.
// Two instances run side by side:
//   full  - default sizes; two generations (r = 28, then r = 30 with other
//           initial values), each ending with a complete, bijective S-box;
//   short - an attempt of only 200 samples, too few for 256 distinct
//           bytes, so the controller restarts with a larger r and finally
//           reports fail.
// Every selector byte, select code, outcome and table entry is compared
// with the reference model. Each mechanism (transient discard, repeat
// rejection, restart, done, fail, each select code of both layers) must
// occur at least once.
module pmls_sbox_top_tb;
  import pmls_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        go_full = 1'b0, go_short = 1'b0;
  lorenz_cfg_t cfg_full, cfg_short;
  logic        fin_full, fin_short;
  int          c_f, f_f, disc_f, rep_f, rs_f, dn_f, fl_f, s1_f[3], s2_f[3];
  int          c_s, f_s, disc_s, rep_s, rs_s, dn_s, fl_s, s1_s[3], s2_s[3];
  int          checks, failures;

  pmls_top_harness u_full (
    .clk, .rst_n, .go(go_full), .cfg(cfg_full), .finished(fin_full),
    .checks(c_f), .failures(f_f), .n_discarded(disc_f), .n_repeats(rep_f),
    .n_restarts(rs_f), .n_done(dn_f), .n_fail(fl_f), .n_sel1(s1_f), .n_sel2(s2_f));

  pmls_top_harness #(.DISCARD(20), .NUM_SAMPLES(200), .MAX_ATTEMPTS(3)) u_short (
    .clk, .rst_n, .go(go_short), .cfg(cfg_short), .finished(fin_short),
    .checks(c_s), .failures(f_s), .n_discarded(disc_s), .n_repeats(rep_s),
    .n_restarts(rs_s), .n_done(dn_s), .n_fail(fl_s), .n_sel1(s1_s), .n_sel2(s2_s));

  always #5 clk = ~clk;

  task automatic report();
    checks   = c_f + c_s;
    failures = f_f + f_s;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures = 1;
    $display("watchdog expired");
    checks   = c_f + c_s;
    failures = f_f + f_s + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(int count, string what);
    $display("  %-28s %0d", what, count);
    c_f++;
    if (count == 0) begin
      f_f++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    cfg_full.sigma   = SIGMA_DEF;
    cfg_full.r       = R_DEF;
    cfg_full.beta    = BETA_DEF;
    cfg_full.init.x  = INIT_DEF;
    cfg_full.init.y  = INIT_DEF;
    cfg_full.init.z  = INIT_DEF;
    cfg_short        = cfg_full;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    go_full  = 1'b1;
    go_short = 1'b1;
    @(negedge clk);
    go_full  = 1'b0;
    go_short = 1'b0;
    wait (fin_full && fin_short);
    // second generation on the full-size instance: other r and start point
    @(negedge clk);
    cfg_full.r      = 32'sd503316480;   // r = 30
    cfg_full.init.x = 32'sd2097152;     // x0 = 1
    cfg_full.init.y = -32'sd4194304;    // y0 = -2
    cfg_full.init.z = 32'sd41943040;    // z0 = 20
    go_full = 1'b1;
    @(negedge clk);
    go_full = 1'b0;
    @(negedge clk);
    wait (fin_full);
    $display("mechanisms:");
    need(disc_f + disc_s, "transient samples discarded");
    need(rep_f + rep_s,   "repeats rejected");
    need(rs_s,            "restarts with new r");
    need(dn_f,            "complete S-boxes");
    need(fl_s,            "failed generations");
    for (int c = 0; c < 3; c++) begin
      need(s1_f[c] + s1_s[c], $sformatf("layer-1 select code %0d", c));
      need(s2_f[c] + s2_s[c], $sformatf("layer-2 select code %0d", c));
    end
    report();
    $finish;
  end
endmodule
