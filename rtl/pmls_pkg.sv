// pmls_pkg: number formats, constants and fixed-point helpers shared by the
// PMLS (parallel multi-layer selector) chaotic S-box generator.
//
// State format. The Lorenz state x, y, z is held as 32-bit signed Q4.28
// (4 integer bits including the sign, 28 fraction bits), the format the
// design is specified in. The physical Lorenz attractor (|x|,|y| up to ~25,
// z up to ~50) does not fit in Q4.28, so the state is kept scaled by
// 2^-SCALE_EXP: a stored value s stands for the physical value s * 2^SCALE_EXP.
// With SCALE_EXP = 7 every state variable is a fraction well inside (-1, 1),
// as the specification asks of x, y and z. Scaling is this design's choice.
//
// Coefficient format. sigma, r, beta and the RK4 step weights are 32-bit
// signed Q8.24, so that sigma = 10 and r = 28 are representable.
//
// Scaled equations (s = physical / 2^SCALE_EXP):
//   dxs = sigma*(ys - xs)
//   dys = r*xs - ys - 2^SCALE_EXP * xs*zs
//   dzs = 2^SCALE_EXP * xs*ys - beta*zs
// All products are truncated toward minus infinity (arithmetic shift).
package pmls_pkg;

  localparam int unsigned STATE_W   = 32;  // Q4.28 word
  localparam int unsigned STATE_FRAC = 28;
  localparam int unsigned COEF_W    = 32;  // Q8.24 word
  localparam int unsigned COEF_FRAC = 24;
  localparam int unsigned SCALE_EXP = 7;   // state = physical / 2^7
  localparam int unsigned ACC_W     = 40;  // RK4 slope sum k1+2k2+2k3+k4

  typedef logic signed [STATE_W-1:0] fx_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [ACC_W-1:0]   acc_t;
  typedef logic [7:0]                byte_t;

  typedef struct packed {
    fx_t x;
    fx_t y;
    fx_t z;
  } vec3_t;

  // Control parameters and initial conditions of one generation run.
  typedef struct packed {
    coef_t sigma;
    coef_t r;
    coef_t beta;
    vec3_t init;
  } lorenz_cfg_t;

  // Specified operating point: sigma = 10, beta = 2.666, r = 28,
  // x0 = y0 = z0 = 10 (physical), step h = 0.01 (assumed).
  localparam coef_t SIGMA_DEF = 32'sd167772160;  // 10.0    in Q8.24
  localparam coef_t R_DEF     = 32'sd469762048;  // 28.0    in Q8.24
  localparam coef_t BETA_DEF  = 32'sd44728058;   // 2.666   in Q8.24
  localparam coef_t H_DEF     = 32'sd167772;     // 0.01    in Q8.24
  localparam fx_t   INIT_DEF  = 32'sd20971520;   // 10/2^7  in Q4.28

  // a (Q4.28) * c (Q8.24) -> Q4.28
  function automatic fx_t mul_fc(fx_t a, coef_t c);
    logic signed [STATE_W+COEF_W-1:0] p;
    p = a * c;
    return fx_t'(p >>> COEF_FRAC);
  endfunction

  // a (Q12.28 slope sum) * c (Q8.24) -> Q4.28
  function automatic fx_t mul_ac(acc_t a, coef_t c);
    logic signed [ACC_W+COEF_W-1:0] p;
    p = a * c;
    return fx_t'(p >>> COEF_FRAC);
  endfunction

  // 2^SCALE_EXP * a * b for two scaled states -> Q4.28 (wide result so the
  // intermediate sum of a derivative cannot wrap)
  function automatic logic signed [STATE_W+7:0] mul_nl(fx_t a, fx_t b);
    logic signed [2*STATE_W-1:0] p;
    p = a * b;
    return (STATE_W+8)'(p >>> (STATE_FRAC - SCALE_EXP));
  endfunction

  // Select code of a multiplexer layer: the most significant bits of two
  // bytes added together, giving 0, 1 or 2.
  function automatic logic [1:0] msb_sel(logic a_msb, logic b_msb);
    return {1'b0, a_msb} + {1'b0, b_msb};
  endfunction

endpackage
