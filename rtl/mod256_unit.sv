// mod256_unit: the "Mod (256)" block. Three identical Mod channels turn the
// Lorenz generator's fractional outputs x, y, z into bytes X, Y, Z.
//
// Each channel computes X = mod(floor(x * 2^MUL_EXP), 256): the Q4.28 value
// is multiplied by 2^MUL_EXP (an arithmetic right shift by 28-MUL_EXP), the
// fraction is dropped, and the integer is reduced modulo 256 (its low eight
// bits). Because the two's-complement low bits of floor() are already the
// mathematical modulus, negative samples need no special handling.
// MUL_EXP = 14 follows the specification. Keeping the low byte (rather than
// dividing the integer by 256) is this design's reading of the
// specification; see the README.
//
// Timing: one register stage. in_valid is delayed with the data to
// out_valid; flush clears the valid bit. Synchronous active-low reset.
module mod256_unit
  import pmls_pkg::*;
#(
  parameter int unsigned MUL_EXP = 14  // multiply the fraction by 2^MUL_EXP
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  vec3_t in_state,   // x, y, z in Q4.28
  input  logic  in_valid,
  output byte_t out_x,      // X = mod(x,256)
  output byte_t out_y,      // Y = mod(y,256)
  output byte_t out_z,      // Z = mod(z,256)
  output logic  out_valid
);

  // floor(v * 2^MUL_EXP) is v >>> (28 - MUL_EXP); mod 256 keeps its low
  // eight bits, which are bits [28-MUL_EXP+7 : 28-MUL_EXP] of v.
  localparam int unsigned Lsb = STATE_FRAC - MUL_EXP;

  function automatic byte_t mod256(fx_t v);
    return v[Lsb +: 8];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_x     <= '0;
      out_y     <= '0;
      out_z     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && !flush;
      if (in_valid) begin
        out_x <= mod256(in_state.x);
        out_y <= mod256(in_state.y);
        out_z <= mod256(in_state.z);
      end
    end
  end

endmodule
