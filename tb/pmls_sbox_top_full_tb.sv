// pmls_sbox_top_full_tb: one complete S-box generation with the generator
// at its default size (discard 5000 samples, at most 2^14 samples per
// attempt) from the specified operating point sigma = 10, r = 28,
// beta = 2.666, x0 = y0 = z0 = 10. Checks against the reference model:
// every selector byte, the attempt count, the finished table read back
// through the substitution port, and that the table is bijective.
module pmls_sbox_top_full_tb;
  import pmls_pkg::*;
  import pmls_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  lorenz_cfg_t cfg;
  logic        busy, done, fail, rnd_valid, sub_valid_in = 1'b0, sub_valid_out;
  logic [7:0]  attempts;
  logic [8:0]  sbox_count;
  logic [15:0] repeats, sample_count;
  byte_t       rnd_byte, sub_in, sub_out;
  logic [1:0]  rnd_sel1, rnd_sel2;
  int          checks = 0, failures = 0;

  pmls_sbox_top dut (
    .clk, .rst_n, .start, .cfg, .busy, .done, .fail, .attempts, .sbox_count, .repeats,
    .sample_count, .rnd_valid, .rnd_byte, .rnd_sel1, .rnd_sel2,
    .sub_valid_in, .sub_in, .sub_valid_out, .sub_out);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gen_result_t exp_res;
  int          nsamp = 0;

  always @(posedge clk) begin
    if (rst_n && rnd_valid) begin
      checks++;
      if (nsamp >= exp_res.stream.size() || int'(rnd_byte) != exp_res.stream[nsamp]) begin
        failures++;
        if (failures < 10) $display("selector byte %0d mismatch: %0d", nsamp, rnd_byte);
      end
      nsamp++;
    end
  end

  initial begin
    bit used[256];
    cfg.sigma  = SIGMA_DEF;
    cfg.r      = R_DEF;
    cfg.beta   = BETA_DEF;
    cfg.init.x = INIT_DEF;
    cfg.init.y = INIT_DEF;
    cfg.init.z = INIT_DEF;
    sub_in     = '0;
    ref_generate(longint'(SIGMA_DEF), longint'(R_DEF), longint'(BETA_DEF), longint'(H_DEF),
                 longint'(INIT_DEF), longint'(INIT_DEF), longint'(INIT_DEF),
                 5000, 16384, 8, 64'sd16777216, exp_res);
    $display("model: done=%0d after %0d attempts, %0d samples, %0d repeats rejected",
             exp_res.done, exp_res.attempts, exp_res.stream.size(), exp_res.repeats);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done || fail);
    repeat (10) @(negedge clk);
    checks++;
    if (done != exp_res.done || int'(attempts) != exp_res.attempts ||
        nsamp != exp_res.stream.size()) begin
      failures++;
      $display("done=%0d attempts=%0d samples=%0d, model %0d/%0d/%0d", done, attempts, nsamp,
               exp_res.done, exp_res.attempts, exp_res.stream.size());
    end
    checks++;
    if (int'(repeats) != exp_res.repeats || (done && sbox_count != 9'd256)) begin
      failures++;
      $display("repeats %0d (model %0d), count %0d", repeats, exp_res.repeats, sbox_count);
    end
    if (done) begin
      for (int a = 0; a < 256; a++) begin
        sub_valid_in = 1'b1;
        sub_in       = byte_t'(a);
        @(negedge clk);
        checks++;
        if (!sub_valid_out || int'(sub_out) != exp_res.table_q[a] || used[sub_out]) begin
          failures++;
          if (failures < 10) $display("S(%0d) = %0d, model %0d", a, sub_out, exp_res.table_q[a]);
        end
        used[sub_out] = 1'b1;
      end
      sub_valid_in = 1'b0;
      $display("S-box row 0: %p", exp_res.table_q[0:15]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
