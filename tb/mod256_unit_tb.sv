// mod256_unit_tb: drives random Q4.28 words (both signs, and the edges of
// the byte boundaries) into the Mod(256) block and checks
// X = mod(floor(v * 2^14), 256) computed by integer division, the
// one-cycle latency, that data is held without in_valid, and flush.
module mod256_unit_tb;
  import pmls_pkg::*;
  import pmls_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, flush = 1'b0, in_valid = 1'b0;
  vec3_t in_state;
  byte_t out_x, out_y, out_z;
  logic  out_valid;
  int    checks = 0, failures = 0;

  mod256_unit dut (.clk, .rst_n, .flush, .in_state, .in_valid, .out_x, .out_y, .out_z, .out_valid);

  always #5 clk = ~clk;

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
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int ex, ey, ez;
    in_state = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      if (i < 8) begin
        // values around the integer steps of v * 2^14
        in_state.x = fx_t'(32'sd16384 * (i - 4));
        in_state.y = fx_t'(32'sd16384 * (i - 4) - 1);
        in_state.z = fx_t'(32'sd4194304 * (i - 4));
      end else begin
        in_state.x = fx_t'($urandom);
        in_state.y = fx_t'($urandom);
        in_state.z = fx_t'($urandom);
      end
      in_valid = 1'b1;
      ex = ref_mod256(longint'(in_state.x));
      ey = ref_mod256(longint'(in_state.y));
      ez = ref_mod256(longint'(in_state.z));
      @(negedge clk);
      check(out_valid == 1'b1, "out_valid one cycle after in_valid");
      check(int'(out_x) == ex && int'(out_y) == ey && int'(out_z) == ez,
            $sformatf("value %0d: got %0d %0d %0d expect %0d %0d %0d", i, out_x, out_y, out_z, ex, ey, ez));
      // idle cycle: outputs hold, valid drops
      in_valid   = 1'b0;
      in_state.x = fx_t'($urandom);
      @(negedge clk);
      check(out_valid == 1'b0 && int'(out_x) == ex, "hold without in_valid");
    end
    // flush suppresses the valid bit
    in_valid = 1'b1;
    flush    = 1'b1;
    @(negedge clk);
    check(out_valid == 1'b0, "flush clears out_valid");
    flush    = 1'b0;
    in_valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
