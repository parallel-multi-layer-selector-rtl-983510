// layer_mux: one 'Mux' subblock of the parallel multiplexer block.
//
// A three-input byte multiplexer driven by a two-bit select code. MAP holds
// four two-bit input indices, MAP[2*sel +: 2] being the input chosen for
// code sel. The first layer uses MAP = {2,1,1,0} (codes 00->in0, 01->in1,
// 10->in1, 11->in2); the second layer uses {0,2,1,0} (00->in0, 01->in1,
// 10->in2). Code 11 of the second layer is not specified and picks in0 here;
// it cannot occur because the code is a sum of two bits.
// Purely combinational.
module layer_mux #(
  parameter logic [7:0] MAP = 8'b10_01_01_00
) (
  input  logic [1:0] sel,
  input  logic [7:0] in0,
  input  logic [7:0] in1,
  input  logic [7:0] in2,
  output logic [7:0] out
);

  logic [1:0] idx;

  always_comb begin
    idx = MAP[2*sel +: 2];
    unique case (idx)
      2'd0:    out = in0;
      2'd1:    out = in1;
      default: out = in2;
    endcase
  end

endmodule
