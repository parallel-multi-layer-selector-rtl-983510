// pmls_ctrl: sequencer of one S-box generation.
//
// It carries out the generation procedure around the datapath:
//   1. on start, load the initial state and control parameters into the
//      Lorenz generator, flush the pipeline and empty the S-box table;
//   2. let the generator run and count the selector's output samples;
//   3. drop the first DISCARD samples (the transient), then offer every
//      further sample to the S-box table;
//   4. finish (done) as soon as the table holds 256 distinct bytes;
//   5. if NUM_SAMPLES samples have been produced and the table is still not
//      full, go back to step 1 with new parameters (r increased by R_STEP),
//      up to MAX_ATTEMPTS attempts; after that raise fail.
// DISCARD = 5000 and NUM_SAMPLES = 2^14 follow the specification, as does
// the restart on an incomplete S-box. How r is varied (R_STEP) and the
// attempt limit are this design's choices.
//
// Interface: start is a one-cycle request taken in IDLE, DONE or FAIL.
// sample_valid is the selector's output strobe; accept qualifies it as a
// write into the table; store_full is the table's full flag. gen_cfg holds
// the configuration for the current attempt and is loaded by gen_load.
// Synchronous active-low reset.
module pmls_ctrl
  import pmls_pkg::*;
#(
  parameter int unsigned DISCARD      = 5000,
  parameter int unsigned NUM_SAMPLES  = 16384,
  parameter int unsigned MAX_ATTEMPTS = 8,
  parameter coef_t       R_STEP       = 32'sd16777216  // 1.0 in Q8.24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  lorenz_cfg_t cfg,          // parameters for the first attempt
  input  logic        sample_valid, // selector output strobe
  input  logic        store_full,
  output lorenz_cfg_t gen_cfg,      // parameters of the current attempt
  output logic        gen_load,
  output logic        gen_run,
  output logic        flush,        // clear the pipeline valid bits
  output logic        store_clear,
  output logic        accept,       // write this sample into the table
  output logic        busy,
  output logic        done,
  output logic        fail,
  output logic [7:0]  attempts,     // attempts started in this generation
  output logic [15:0] sample_count  // samples seen in the current attempt
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_LOAD,
    S_RUN,
    S_CHECK,
    S_DONE,
    S_FAIL
  } state_e;

  state_e      state_q;
  lorenz_cfg_t cfg_q;
  logic [15:0] cnt_q;
  logic [7:0]  att_q;
  logic        last_sample;

  assign last_sample = sample_valid && (32'(cnt_q) == NUM_SAMPLES - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cfg_q   <= '0;
      cnt_q   <= '0;
      att_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE, S_FAIL: begin
          if (start) begin
            cfg_q   <= cfg;
            att_q   <= 8'd1;
            state_q <= S_LOAD;
          end
        end
        S_LOAD: begin
          cnt_q   <= '0;
          state_q <= S_RUN;
        end
        S_RUN: begin
          if (store_full) begin
            state_q <= S_DONE;
          end else if (sample_valid) begin
            cnt_q <= cnt_q + 16'd1;
            if (last_sample) state_q <= S_CHECK;
          end
        end
        S_CHECK: begin
          // the last sample's write is visible in store_full now
          if (store_full) begin
            state_q <= S_DONE;
          end else if (32'(att_q) < MAX_ATTEMPTS) begin
            cfg_q.r <= cfg_q.r + R_STEP;
            att_q   <= att_q + 8'd1;
            state_q <= S_LOAD;
          end else begin
            state_q <= S_FAIL;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    gen_cfg      = cfg_q;
    gen_load     = (state_q == S_LOAD);
    flush        = (state_q == S_LOAD);
    store_clear  = (state_q == S_LOAD);
    gen_run      = (state_q == S_RUN) && !store_full;
    accept       = (state_q == S_RUN) && sample_valid && !store_full
                   && (32'(cnt_q) >= DISCARD);
    busy         = (state_q == S_LOAD) || (state_q == S_RUN) || (state_q == S_CHECK);
    done         = (state_q == S_DONE);
    fail         = (state_q == S_FAIL);
    attempts     = att_q;
    sample_count = cnt_q;
  end

endmodule
