// lorenz_rk4: the Lorenz generator. Integrates the Lorenz system with the
// classical fourth-order Runge-Kutta method and emits one (x, y, z) sample
// per integration step.
//
// How it works: a single lorenz_deriv unit is time-shared over the four RK4
// stages, one stage per clock:
//   stage 0: k1 = f(s),          probe <= s + h/2*k1, acc <= k1
//   stage 1: k2 = f(probe),      probe <= s + h/2*k2, acc += 2*k2
//   stage 2: k3 = f(probe),      probe <= s + h*k3,   acc += 2*k3
//   stage 3: k4 = f(probe),      s <= s + h/6*(acc + k4), out_valid
// A new sample therefore leaves every four cycles while run is high.
// The RK4 method and the Q4.28 state follow the specification; the
// four-cycle stage sharing, the step H (a parameter, 0.01 by default) and the scaled state (see pmls_pkg) are this design's choices.
//
// Interface: load (one cycle) copies cfg into the working registers and
// restarts the stage counter; run lets the integration advance; out_state
// holds the newest state and out_valid pulses for one cycle when it
// changes. The first sample is the state after one step, not the initial
// condition. Synchronous active-low reset.
module lorenz_rk4
  import pmls_pkg::*;
#(
  parameter coef_t H = H_DEF  // integration step, Q8.24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,       // take a new configuration
  input  lorenz_cfg_t cfg,        // sigma, r, beta and initial state
  input  logic        run,        // advance the integration
  output vec3_t       out_state,  // current state (Q4.28, scaled)
  output logic        out_valid   // one-cycle strobe: new state
);

  vec3_t       s_q, probe_q, k;
  acc_t        accx_q, accy_q, accz_q;
  logic [1:0]  stage_q;
  coef_t       sigma_q, r_q, beta_q;

  localparam coef_t HHalf  = H >>> 1;
  localparam coef_t HSixth = coef_t'(H / 6);

  lorenz_deriv u_deriv (
    .s     (stage_q == 2'd0 ? s_q : probe_q),
    .sigma (sigma_q),
    .r     (r_q),
    .beta  (beta_q),
    .ds    (k)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q       <= '0;
      probe_q   <= '0;
      accx_q    <= '0;
      accy_q    <= '0;
      accz_q    <= '0;
      stage_q   <= '0;
      sigma_q   <= '0;
      r_q       <= '0;
      beta_q    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (load) begin
        s_q     <= cfg.init;
        sigma_q <= cfg.sigma;
        r_q     <= cfg.r;
        beta_q  <= cfg.beta;
        stage_q <= '0;
      end else if (run) begin
        stage_q <= stage_q + 2'd1;
        unique case (stage_q)
          2'd0: begin
            accx_q    <= acc_t'(k.x);
            accy_q    <= acc_t'(k.y);
            accz_q    <= acc_t'(k.z);
            probe_q.x <= s_q.x + mul_fc(k.x, HHalf);
            probe_q.y <= s_q.y + mul_fc(k.y, HHalf);
            probe_q.z <= s_q.z + mul_fc(k.z, HHalf);
          end
          2'd1, 2'd2: begin
            accx_q    <= accx_q + (acc_t'(k.x) <<< 1);
            accy_q    <= accy_q + (acc_t'(k.y) <<< 1);
            accz_q    <= accz_q + (acc_t'(k.z) <<< 1);
            probe_q.x <= s_q.x + mul_fc(k.x, stage_q == 2'd1 ? HHalf : H);
            probe_q.y <= s_q.y + mul_fc(k.y, stage_q == 2'd1 ? HHalf : H);
            probe_q.z <= s_q.z + mul_fc(k.z, stage_q == 2'd1 ? HHalf : H);
          end
          default: begin
            s_q.x     <= s_q.x + mul_ac(accx_q + acc_t'(k.x), HSixth);
            s_q.y     <= s_q.y + mul_ac(accy_q + acc_t'(k.y), HSixth);
            s_q.z     <= s_q.z + mul_ac(accz_q + acc_t'(k.z), HSixth);
            out_valid <= 1'b1;
          end
        endcase
      end
    end
  end

  assign out_state = s_q;

endmodule
