// lorenz_deriv: the Lorenz vector field, evaluated combinationally.
//
// For a scaled state (x, y, z) in Q4.28 it returns
//   dx = sigma*(y - x)
//   dy = r*x - y - 2^7*x*z
//   dz = 2^7*x*y - beta*z
// which are equations (1)-(3) of the Lorenz system rewritten for a state
// held at 2^-7 of its physical value (see pmls_pkg). The unit uses five
// multipliers: sigma*(y-x), r*x, x*z, x*y and beta*z. sigma, r and beta are
// inputs in Q8.24 so a run can change r between attempts.
// Sums are formed at 40 bits and truncated to Q4.28 at the output; on the
// attractor the results stay well inside the Q4.28 range.
// Purely combinational: no clock, zero latency.
module lorenz_deriv
  import pmls_pkg::*;
(
  input  vec3_t s,      // state (scaled, Q4.28)
  input  coef_t sigma,  // Q8.24
  input  coef_t r,      // Q8.24
  input  coef_t beta,   // Q8.24
  output vec3_t ds      // time derivative (scaled, Q4.28)
);

  typedef logic signed [STATE_W+7:0] wide_t;

  fx_t   sig_term, rx_term, bz_term;
  wide_t xz_term, xy_term;
  wide_t dy_w, dz_w;

  always_comb begin
    sig_term = mul_fc(s.y - s.x, sigma);
    rx_term  = mul_fc(s.x, r);
    bz_term  = mul_fc(s.z, beta);
    xz_term  = mul_nl(s.x, s.z);
    xy_term  = mul_nl(s.x, s.y);
    dy_w     = wide_t'(rx_term) - wide_t'(s.y) - xz_term;
    dz_w     = xy_term - wide_t'(bz_term);
    ds.x     = sig_term;
    ds.y     = fx_t'(dy_w);
    ds.z     = fx_t'(dz_w);
  end

endmodule
