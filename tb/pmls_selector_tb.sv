// pmls_selector_tb: checks the two-layer multiplexer selector against the
// selection tables (reference model) for random and corner byte triples,
// its one-cycle latency, and that every reachable select code of both
// layers (0, 1 and 2) occurs.
module pmls_selector_tb;
  import pmls_pkg::*;
  import pmls_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, flush = 1'b0, in_valid = 1'b0;
  byte_t      in_x, in_y, in_z;
  byte_t      out_byte, out_s1, out_s2, out_s3;
  logic [1:0] out_sel1, out_sel2;
  logic       out_valid;
  int         checks = 0, failures = 0;
  int         cov1[3], cov2[3];

  pmls_selector dut (.clk, .rst_n, .flush, .in_x, .in_y, .in_z, .in_valid,
                     .out_byte, .out_s1, .out_s2, .out_s3, .out_sel1, .out_sel2, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, s1r, s2r;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      in_x = byte_t'($urandom);
      in_y = byte_t'($urandom);
      in_z = byte_t'($urandom);
      if (i < 64) begin
        in_x = {i[0], 7'(i)};
        in_z = {i[1], 7'(i + 3)};
        in_y = {i[2], 7'(i + 5)};
      end
      in_valid = 1'b1;
      e = ref_select(int'(in_x), int'(in_y), int'(in_z), s1r, s2r);
      @(negedge clk);
      checks++;
      if (!out_valid || int'(out_byte) != e || int'(out_sel1) != s1r || int'(out_sel2) != s2r) begin
        failures++;
        if (failures < 10)
          $display("X=%0d Y=%0d Z=%0d: got %0d (sel %0d/%0d) expect %0d (sel %0d/%0d)",
                   in_x, in_y, in_z, out_byte, out_sel1, out_sel2, e, s1r, s2r);
      end
      if (s1r < 3) cov1[s1r]++;
      if (s2r < 3) cov2[s2r]++;
    end
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid without in_valid");
    end
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (cov1[c] == 0 || cov2[c] == 0) begin
        failures++;
        $display("select code %0d never occurred", c);
      end
    end
    $display("layer-1 codes 0/1/2: %0d/%0d/%0d, layer-2 codes: %0d/%0d/%0d",
             cov1[0], cov1[1], cov1[2], cov2[0], cov2[1], cov2[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
