// pmls_selector: the 'Select' block and the two-layer 'Parallel
// Multiplexers' block of the PMLS S-box.
//
// Layer 1: sel1 = MSB(X) + MSB(Z) (a two-bit sum, 0..2) drives three muxes
// that see the bytes in different orders:
//   Mux1 (X, Z, Y) -> S1, Mux2 (Y, X, Z) -> S2, Mux3 (Z, Y, X) -> S3,
//   each taking its first input for code 00, its second for 01 and 10,
//   its third for 11.
// Layer 2: sel2 = MSB(S1) + MSB(S3) drives Mux4, which picks S1 (00),
// S2 (01) or S3 (10) as the final byte.
// The mux tables and the select rule follow the specification. Reading
// "adds the two MSBs together" as an arithmetic sum means code 11 of the
// first layer never occurs; it is still wired as specified.
//
// Timing: both layers are combinational; one output register. flush clears
// the valid bit. sel1/sel2 and S1..S3 are brought out for observation.
// Synchronous active-low reset.
module pmls_selector
  import pmls_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  byte_t      in_x,
  input  byte_t      in_y,
  input  byte_t      in_z,
  input  logic       in_valid,
  output byte_t      out_byte,   // final selected byte
  output byte_t      out_s1,
  output byte_t      out_s2,
  output byte_t      out_s3,
  output logic [1:0] out_sel1,
  output logic [1:0] out_sel2,
  output logic       out_valid
);

  localparam logic [7:0] Layer1Map = {2'd2, 2'd1, 2'd1, 2'd0};
  localparam logic [7:0] Layer2Map = {2'd0, 2'd2, 2'd1, 2'd0};

  logic [1:0] sel1, sel2;
  byte_t      s1, s2, s3, fin;

  assign sel1 = msb_sel(in_x[7], in_z[7]);

  layer_mux #(.MAP(Layer1Map)) u_mux1 (.sel(sel1), .in0(in_x), .in1(in_z), .in2(in_y), .out(s1));
  layer_mux #(.MAP(Layer1Map)) u_mux2 (.sel(sel1), .in0(in_y), .in1(in_x), .in2(in_z), .out(s2));
  layer_mux #(.MAP(Layer1Map)) u_mux3 (.sel(sel1), .in0(in_z), .in1(in_y), .in2(in_x), .out(s3));

  assign sel2 = msb_sel(s1[7], s3[7]);

  layer_mux #(.MAP(Layer2Map)) u_mux4 (.sel(sel2), .in0(s1), .in1(s2), .in2(s3), .out(fin));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_byte  <= '0;
      out_s1    <= '0;
      out_s2    <= '0;
      out_s3    <= '0;
      out_sel1  <= '0;
      out_sel2  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && !flush;
      if (in_valid) begin
        out_byte <= fin;
        out_s1   <= s1;
        out_s2   <= s2;
        out_s3   <= s3;
        out_sel1 <= sel1;
        out_sel2 <= sel2;
      end
    end
  end

endmodule
