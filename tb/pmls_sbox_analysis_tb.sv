// pmls_sbox_analysis_tb: generates an S-box with the design at its default
// size from the specified operating point and evaluates it with the five
// standard S-box criteria: bijectivity (weight of every non-zero linear
// combination of the output bits = 128), nonlinearity of each output bit
// (Walsh spectrum), strict avalanche criterion (SAC), differential
// probability (DP) and bit independence (BIC: nonlinearity and SAC of every
// pair f_j ^ f_k). The analysis routines are first checked on the AES
// S-box, computed here from its definition (GF(2^8) inverse and affine map),
// whose nonlinearity is 112 for every bit and whose DP is 4/256.
// The generated table must be bijective; its other figures are printed.
module pmls_sbox_analysis_tb;
  import pmls_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  lorenz_cfg_t cfg;
  logic        busy, done, fail, rnd_valid, sub_valid_in = 1'b0, sub_valid_out;
  logic [7:0]  attempts;
  logic [8:0]  sbox_count;
  logic [15:0] repeats, sample_count;
  byte_t       rnd_byte, sub_in = '0, sub_out;
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

  typedef int sbox_t[256];

  function automatic int parity8(int v);
    return int'(^v[7:0]);
  endfunction

  // nonlinearity of the Boolean function x -> parity(S(x) & mask)
  function automatic int nl_of(sbox_t s, int mask);
    int maxw = 0, w;
    for (int a = 0; a < 256; a++) begin
      w = 0;
      for (int x = 0; x < 256; x++)
        w += (parity8(s[x] & mask) ^ parity8(x & a)) ? -1 : 1;
      if (w < 0) w = -w;
      if (w > maxw) maxw = w;
    end
    return 128 - maxw / 2;
  endfunction

  // fraction of inputs for which flipping input bit i flips parity(S & mask)
  function automatic real sac_of(sbox_t s, int mask, int i);
    int n = 0;
    for (int x = 0; x < 256; x++)
      n += parity8((s[x] ^ s[x ^ (1 << i)]) & mask);
    return real'(n) / 256.0;
  endfunction

  function automatic int balanced_combos(sbox_t s);
    int n = 0, wt;
    for (int a = 1; a < 256; a++) begin
      wt = 0;
      for (int x = 0; x < 256; x++) wt += parity8(s[x] & a);
      if (wt == 128) n++;
    end
    return n;
  endfunction

  function automatic int dp_max(sbox_t s);
    int best = 0;
    int cnt[256];
    for (int dx = 1; dx < 256; dx++) begin
      foreach (cnt[i]) cnt[i] = 0;
      for (int x = 0; x < 256; x++) cnt[s[x] ^ s[x ^ dx]]++;
      foreach (cnt[i]) if (cnt[i] > best) best = cnt[i];
    end
    return best;
  endfunction

  task automatic analyse(sbox_t s, string name, output int nl_min, output int dpm, output int bij);
    int  nl, nl_max = 0, bic_nl_min = 256;
    real nl_sum = 0.0, sac, sac_min = 1.0, sac_max = 0.0, sac_sum = 0.0;
    real bic_nl_sum = 0.0, bic_sac_sum = 0.0;
    int  pairs = 0;
    nl_min = 256;
    for (int j = 0; j < 8; j++) begin
      nl = nl_of(s, 1 << j);
      nl_sum += real'(nl);
      if (nl < nl_min) nl_min = nl;
      if (nl > nl_max) nl_max = nl;
      for (int i = 0; i < 8; i++) begin
        sac = sac_of(s, 1 << j, i);
        sac_sum += sac;
        if (sac < sac_min) sac_min = sac;
        if (sac > sac_max) sac_max = sac;
      end
    end
    for (int j = 0; j < 8; j++)
      for (int k = j + 1; k < 8; k++) begin
        nl = nl_of(s, (1 << j) | (1 << k));
        bic_nl_sum += real'(nl);
        if (nl < bic_nl_min) bic_nl_min = nl;
        for (int i = 0; i < 8; i++) bic_sac_sum += sac_of(s, (1 << j) | (1 << k), i);
        pairs++;
      end
    bij = balanced_combos(s);
    dpm = dp_max(s);
    $display("%s: balanced output combinations %0d of 255", name, bij);
    $display("%s: nonlinearity min %0d max %0d avg %0.2f", name, nl_min, nl_max, nl_sum / 8.0);
    $display("%s: SAC min %0.4f max %0.4f avg %0.4f", name, sac_min, sac_max, sac_sum / 64.0);
    $display("%s: BIC nonlinearity min %0d avg %0.2f, BIC-SAC avg %0.4f", name, bic_nl_min,
             bic_nl_sum / real'(pairs), bic_sac_sum / real'(pairs * 8));
    $display("%s: DP max %0d/256 = %0.5f", name, dpm, real'(dpm) / 256.0);
  endtask

  function automatic int gmul(int a, int b);
    int p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a << 1;
      if (a[8]) a ^= 'h11b;
    end
    return p & 'hff;
  endfunction

  function automatic int aes_sbox(int x);
    int inv = 0, b, r;
    for (int c = 1; c < 256; c++) if (gmul(x, c) == 1) inv = c;
    b = inv;
    r = b;
    for (int k = 1; k <= 4; k++) r ^= ((b << k) | (b >> (8 - k))) & 'hff;
    return (r ^ 'h63) & 'hff;
  endfunction

  initial begin
    sbox_t aes, gen;
    int    nl_min, dpm, bij;
    for (int x = 0; x < 256; x++) aes[x] = aes_sbox(x);
    analyse(aes, "AES reference", nl_min, dpm, bij);
    checks++;
    if (aes[0] != 'h63 || aes[1] != 'h7c || nl_min != 112 || dpm != 4 || bij != 255) begin
      failures++;
      $display("analysis routines disagree with the AES S-box figures");
    end

    cfg.sigma  = SIGMA_DEF;
    cfg.r      = R_DEF;
    cfg.beta   = BETA_DEF;
    cfg.init.x = INIT_DEF;
    cfg.init.y = INIT_DEF;
    cfg.init.z = INIT_DEF;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done || fail);
    @(negedge clk);
    checks++;
    if (!done) begin
      failures++;
      $display("generation failed");
    end
    for (int a = 0; a < 256; a++) begin
      sub_valid_in = 1'b1;
      sub_in       = byte_t'(a);
      @(negedge clk);
      gen[a] = int'(sub_out);
    end
    sub_valid_in = 1'b0;
    analyse(gen, "generated", nl_min, dpm, bij);
    checks++;
    if (bij != 255) begin
      failures++;
      $display("generated S-box is not bijective");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
