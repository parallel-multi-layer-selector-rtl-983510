// pmls_top_harness: test harness around one pmls_sbox_top instance with the
// given sizes. On each go pulse it starts a generation with cfg, predicts
// the outcome with the reference model, compares every selector byte and
// select code, the done/fail outcome and attempt count, and (when done)
// the whole table through the substitution port. It counts the mechanisms
// seen: discarded samples, rejected repeats, restarts, done, fail, and each
// select code of both layers. Raises finished when the run is checked.
module pmls_top_harness
  import pmls_pkg::*;
  import pmls_ref_pkg::*;
#(
  parameter int unsigned DISCARD      = 5000,
  parameter int unsigned NUM_SAMPLES  = 16384,
  parameter int unsigned MAX_ATTEMPTS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  input  lorenz_cfg_t cfg,
  output logic        finished,
  output int          checks,
  output int          failures,
  output int          n_discarded,
  output int          n_repeats,
  output int          n_restarts,
  output int          n_done,
  output int          n_fail,
  output int          n_sel1[3],
  output int          n_sel2[3]
);

  localparam coef_t RStep = 32'sd16777216;

  logic        start = 1'b0, busy, done, fail, rnd_valid, sub_valid_in = 1'b0, sub_valid_out;
  logic [7:0]  attempts;
  logic [8:0]  sbox_count;
  logic [15:0] repeats, sample_count;
  byte_t       rnd_byte, sub_in = '0, sub_out;
  logic [1:0]  rnd_sel1, rnd_sel2;

  pmls_sbox_top #(
    .DISCARD (DISCARD), .NUM_SAMPLES (NUM_SAMPLES), .MAX_ATTEMPTS (MAX_ATTEMPTS)
  ) dut (
    .clk, .rst_n, .start, .cfg, .busy, .done, .fail, .attempts, .sbox_count, .repeats,
    .sample_count, .rnd_valid, .rnd_byte, .rnd_sel1, .rnd_sel2,
    .sub_valid_in, .sub_in, .sub_valid_out, .sub_out);

  gen_result_t exp_res;
  int          nsamp;
  logic        active = 1'b0;

  initial begin
    checks = 0; failures = 0; n_discarded = 0; n_repeats = 0; n_restarts = 0;
    n_done = 0; n_fail = 0; finished = 1'b0; nsamp = 0;
    foreach (n_sel1[i]) begin n_sel1[i] = 0; n_sel2[i] = 0; end
  end

  always @(posedge clk) begin
    if (rst_n && active && rnd_valid) begin
      checks++;
      if (nsamp >= exp_res.stream.size() || int'(rnd_byte) != exp_res.stream[nsamp] ||
          int'(rnd_sel1) != exp_res.sel1[nsamp] || int'(rnd_sel2) != exp_res.sel2[nsamp]) begin
        failures++;
        if (failures < 10) $display("%m: selector byte %0d mismatch: %0d", nsamp, rnd_byte);
      end
      if (rnd_sel1 < 3) n_sel1[rnd_sel1]++;
      if (rnd_sel2 < 3) n_sel2[rnd_sel2]++;
      if (int'(sample_count) < DISCARD) n_discarded++;
      nsamp++;
    end
  end

  always @(posedge go) begin
    bit used[256];
    foreach (used[i]) used[i] = 1'b0;
    finished = 1'b0;
    ref_generate(longint'(cfg.sigma), longint'(cfg.r), longint'(cfg.beta), longint'(H_DEF),
                 longint'(cfg.init.x), longint'(cfg.init.y), longint'(cfg.init.z),
                 DISCARD, NUM_SAMPLES, MAX_ATTEMPTS, longint'(RStep), exp_res);
    nsamp  = 0;
    active = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done || fail);
    repeat (10) @(negedge clk);
    active = 1'b0;
    checks++;
    if (done != exp_res.done || int'(attempts) != exp_res.attempts ||
        nsamp != exp_res.stream.size()) begin
      failures++;
      $display("%m: done=%0d attempts=%0d samples=%0d, model %0d/%0d/%0d", done, attempts,
               nsamp, exp_res.done, exp_res.attempts, exp_res.stream.size());
    end
    checks++;
    if (int'(repeats) != exp_res.repeats) begin
      failures++;
      $display("%m: repeats %0d, model %0d", repeats, exp_res.repeats);
    end
    n_repeats  += int'(repeats);
    n_restarts += int'(attempts) - 1;
    if (done) n_done++;
    if (fail) n_fail++;
    if (done) begin
      for (int a = 0; a < 256; a++) begin
        sub_valid_in = 1'b1;
        sub_in       = byte_t'(a);
        @(negedge clk);
        checks++;
        if (!sub_valid_out || int'(sub_out) != exp_res.table_q[a] || used[sub_out]) begin
          failures++;
          if (failures < 10) $display("%m: S(%0d) = %0d, model %0d", a, sub_out, exp_res.table_q[a]);
        end
        used[sub_out] = 1'b1;
      end
      sub_valid_in = 1'b0;
    end
    finished = 1'b1;
  end

endmodule
