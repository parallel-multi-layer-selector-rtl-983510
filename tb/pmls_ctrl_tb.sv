// pmls_ctrl_tb: exercises the generation sequencer with a small stand-in
// datapath (a sample every 4 clocks while gen_run is high, and a table that
// becomes full after a set number of accepted samples). Checked:
//  - the first DISCARD samples of each attempt are not accepted,
//  - an attempt ends after NUM_SAMPLES samples and restarts with r + R_STEP,
//    reloading the generator and clearing the table,
//  - fail after MAX_ATTEMPTS incomplete attempts,
//  - done as soon as the table is full, with the generator stopped.
module pmls_ctrl_tb;
  import pmls_pkg::*;

  localparam int    DISCARD = 5, NSAMP = 24, MAXATT = 3;
  localparam coef_t RSTEP   = 32'sd16777216;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  lorenz_cfg_t cfg, gen_cfg;
  logic        sample_valid, store_full;
  logic        gen_load, gen_run, flush, store_clear, accept, busy, done, fail;
  logic [7:0]  attempts;
  logic [15:0] sample_count;
  int          checks = 0, failures = 0;

  pmls_ctrl #(.DISCARD(DISCARD), .NUM_SAMPLES(NSAMP), .MAX_ATTEMPTS(MAXATT), .R_STEP(RSTEP)) dut (
    .clk, .rst_n, .start, .cfg, .sample_valid, .store_full,
    .gen_cfg, .gen_load, .gen_run, .flush, .store_clear, .accept,
    .busy, .done, .fail, .attempts, .sample_count);

  always #5 clk = ~clk;

  // stand-in datapath
  int full_at;       // accepted samples that fill the table (0: never)
  int phase, n_acc, n_samp, n_load, n_clear;
  coef_t loaded_r[$];
  always @(posedge clk) begin
    if (!rst_n) begin
      phase <= 0; n_acc <= 0; n_samp <= 0; n_load <= 0; n_clear <= 0;
    end else begin
      if (gen_run) phase <= (phase + 1) % 4;
      if (gen_load) begin
        n_load <= n_load + 1;
        loaded_r.push_back(gen_cfg.r);
        n_samp <= 0;
        phase  <= 0;
      end
      if (store_clear) begin
        n_clear <= n_clear + 1;
        n_acc   <= 0;
      end else if (accept) begin
        n_acc <= n_acc + 1;
        if (n_samp < DISCARD) begin
          failures++;
          $display("sample %0d accepted inside the discard window", n_samp);
        end
      end
      if (sample_valid) n_samp <= n_samp + 1;
    end
  end
  assign sample_valid = gen_run && phase == 3;
  assign store_full   = (full_at != 0) && (n_acc >= full_at);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse_start();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    cfg        = '0;
    cfg.sigma  = SIGMA_DEF;
    cfg.r      = R_DEF;
    cfg.beta   = BETA_DEF;
    cfg.init.x = INIT_DEF;
    full_at    = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && !fail, "idle after reset");

    // scenario 1: the table never fills -> restarts, then fail
    pulse_start();
    check(busy, "busy after start");
    wait (fail);
    @(negedge clk);
    check(n_load == MAXATT && n_clear == MAXATT, $sformatf("%0d loads, %0d clears, expected %0d", n_load, n_clear, MAXATT));
    check(int'(attempts) == MAXATT, "attempt counter");
    check(n_acc == NSAMP - DISCARD, $sformatf("accepted %0d in last attempt, expected %0d", n_acc, NSAMP - DISCARD));
    for (int i = 0; i < loaded_r.size(); i++)
      check(loaded_r[i] == R_DEF + coef_t'(i) * RSTEP, $sformatf("attempt %0d loaded r=%0d", i, loaded_r[i]));
    check(!gen_run && !busy, "generator stopped after fail");

    // scenario 2: the table fills in the first attempt
    loaded_r.delete();
    full_at = 10;
    n_load  = 0;
    n_clear = 0;
    pulse_start();
    wait (done);
    @(negedge clk);
    check(n_load == 1 && int'(attempts) == 1, "single attempt");
    check(n_acc == 10, "accepted until full");
    check(int'(sample_count) == DISCARD + 10, $sformatf("stopped after %0d samples", sample_count));
    check(!gen_run && !busy && !fail, "generator stopped after done");
    repeat (20) @(negedge clk);
    check(n_acc == 10, "no accepts after done");

    // scenario 3: the table fills in the second attempt
    loaded_r.delete();
    full_at = NSAMP - DISCARD + 1;  // too many for one attempt
    n_load  = 0;
    pulse_start();
    repeat (4 * NSAMP + 20) @(negedge clk);
    full_at = 4;  // second attempt can complete
    wait (done || fail);
    @(negedge clk);
    check(done && int'(attempts) == 2, $sformatf("done=%0d after %0d attempts", done, attempts));
    check(loaded_r.size() == 2 && loaded_r[1] == R_DEF + RSTEP, "second attempt with r+R_STEP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
