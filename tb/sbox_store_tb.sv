// sbox_store_tb: offers random bytes (with many repeats) to the S-box table
// and checks, against a reference list of first appearances, the entry
// count, the repeat counter, the full flag, that writes after full are
// ignored, every table entry through the lookup port (one-cycle latency),
// that the table is a permutation of 0..255, and that clear empties it.
module sbox_store_tb;
  import pmls_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, clear = 1'b0, wr_valid = 1'b0, rd_en = 1'b0;
  byte_t       wr_data, rd_addr, rd_data;
  logic        full, rd_valid;
  logic [8:0]  count;
  logic [15:0] repeats;
  int          checks = 0, failures = 0;

  sbox_store dut (.clk, .rst_n, .clear, .wr_valid, .wr_data, .full, .count, .repeats,
                  .rd_en, .rd_addr, .rd_data, .rd_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic fill_and_check(int round);
    int  order[$];
    bit  seen[256];
    int  reps;
    bit  used[256];
    reps = 0;
    while (order.size() < 256) begin
      wr_data  = byte_t'($urandom);
      // make repeats frequent in the second round
      if (round == 1 && order.size() > 0 && ($urandom % 3 == 0))
        wr_data = byte_t'(order[$urandom % order.size()]);
      wr_valid = 1'b1;
      if (seen[wr_data]) reps++;
      else begin
        seen[wr_data] = 1'b1;
        order.push_back(int'(wr_data));
      end
      @(negedge clk);
      wr_valid = 1'b0;
      check(int'(count) == order.size(), $sformatf("count %0d expected %0d", count, order.size()));
      check(int'(repeats) == reps, $sformatf("repeats %0d expected %0d", repeats, reps));
      check(full == (order.size() == 256), "full flag");
    end
    // writes after full change nothing
    for (int i = 0; i < 20; i++) begin
      wr_valid = 1'b1;
      wr_data  = byte_t'($urandom);
      @(negedge clk);
    end
    wr_valid = 1'b0;
    check(count == 9'd256 && int'(repeats) == reps, "writes after full ignored");
    // read back through the lookup port
    for (int a = 0; a < 256; a++) begin
      rd_en   = 1'b1;
      rd_addr = byte_t'(a);
      @(negedge clk);
      check(rd_valid && int'(rd_data) == order[a],
            $sformatf("S(%0d) = %0d expected %0d", a, rd_data, order[a]));
      check(!used[rd_data], "table has a repeated value");
      used[rd_data] = 1'b1;
    end
    rd_en = 1'b0;
    @(negedge clk);
    check(!rd_valid, "rd_valid drops");
  endtask

  initial begin
    wr_data = '0;
    rd_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 0 && !full, "empty after reset");
    fill_and_check(0);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(count == 0 && !full && repeats == 0, "empty after clear");
    fill_and_check(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
