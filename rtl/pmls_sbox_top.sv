// pmls_sbox_top: parallel multi-layer selector (PMLS) chaotic S-box
// generator.
//
// Datapath, one sample every four clocks:
//   lorenz_rk4     RK4 integration of the Lorenz system (Q4.28)
//   mod256_unit    X, Y, Z = mod(floor(x,y,z * 2^14), 256)          (+1 cycle)
//   pmls_selector  two-layer multiplexer selection of one byte       (+1 cycle)
//   sbox_store     keeps the first 256 distinct bytes as the S-box
// pmls_ctrl loads the initial conditions, discards the transient, limits an
// attempt to NUM_SAMPLES samples and restarts with a larger r when the table
// is not complete.
//
// Interface: pulse start with cfg (sigma, r, beta, x0, y0, z0) applied;
// busy is high while generating, then done (table complete) or fail (no
// complete table after MAX_ATTEMPTS attempts). rnd_valid/rnd_byte expose the
// selector's output stream with its two select codes. Once done, sub_valid_in/sub_in perform S-box
// substitutions, answered one cycle later on sub_valid_out/sub_out.
// Synchronous active-low reset.
module pmls_sbox_top
  import pmls_pkg::*;
#(
  parameter int unsigned DISCARD      = 5000,
  parameter int unsigned NUM_SAMPLES  = 16384,
  parameter int unsigned MAX_ATTEMPTS = 8,
  parameter coef_t       R_STEP       = 32'sd16777216,  // r += 1.0 per retry
  parameter coef_t       H            = H_DEF,          // RK4 step 0.01
  parameter int unsigned MUL_EXP      = 14
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  lorenz_cfg_t cfg,
  output logic        busy,
  output logic        done,
  output logic        fail,
  output logic [7:0]  attempts,
  output logic [8:0]  sbox_count,
  output logic [15:0] repeats,
  output logic [15:0] sample_count,   // samples in the current attempt
  output logic        rnd_valid,
  output byte_t       rnd_byte,
  output logic [1:0]  rnd_sel1,       // layer-1 select code of rnd_byte
  output logic [1:0]  rnd_sel2,       // layer-2 select code of rnd_byte
  input  logic        sub_valid_in,
  input  byte_t       sub_in,
  output logic        sub_valid_out,
  output byte_t       sub_out
);

  lorenz_cfg_t gen_cfg;
  logic        gen_load, gen_run, flush, store_clear, accept, store_full;
  vec3_t       gen_state;
  logic        gen_valid;
  byte_t       bx, by, bz;
  logic        b_valid;
  byte_t       sel_byte;
  logic        sel_valid;

  pmls_ctrl #(
    .DISCARD      (DISCARD),
    .NUM_SAMPLES  (NUM_SAMPLES),
    .MAX_ATTEMPTS (MAX_ATTEMPTS),
    .R_STEP       (R_STEP)
  ) u_ctrl (
    .clk, .rst_n, .start, .cfg,
    .sample_valid (sel_valid),
    .store_full   (store_full),
    .gen_cfg, .gen_load, .gen_run, .flush, .store_clear, .accept,
    .busy, .done, .fail, .attempts, .sample_count
  );

  lorenz_rk4 #(.H(H)) u_gen (
    .clk, .rst_n,
    .load      (gen_load),
    .cfg       (gen_cfg),
    .run       (gen_run),
    .out_state (gen_state),
    .out_valid (gen_valid)
  );

  mod256_unit #(.MUL_EXP(MUL_EXP)) u_mod (
    .clk, .rst_n, .flush,
    .in_state  (gen_state),
    .in_valid  (gen_valid),
    .out_x     (bx),
    .out_y     (by),
    .out_z     (bz),
    .out_valid (b_valid)
  );

  pmls_selector u_sel (
    .clk, .rst_n, .flush,
    .in_x      (bx),
    .in_y      (by),
    .in_z      (bz),
    .in_valid  (b_valid),
    .out_byte  (sel_byte),
    .out_s1    (),
    .out_s2    (),
    .out_s3    (),
    .out_sel1  (rnd_sel1),
    .out_sel2  (rnd_sel2),
    .out_valid (sel_valid)
  );

  sbox_store u_store (
    .clk, .rst_n,
    .clear    (store_clear),
    .wr_valid (accept),
    .wr_data  (sel_byte),
    .full     (store_full),
    .count    (sbox_count),
    .repeats  (repeats),
    .rd_en    (sub_valid_in),
    .rd_addr  (sub_in),
    .rd_data  (sub_out),
    .rd_valid (sub_valid_out)
  );

  assign rnd_valid = sel_valid;
  assign rnd_byte  = sel_byte;

endmodule
