// Preprocessing block placed in front of every stage module.
//
// Chains the three compensation functions in the order the engine uses:
// SPR (sample point reordering, clock drift) at the ADC sample rate, RSPF (random
// sample per frame, 2 samples per chip -> 1) and FOC (frequency offset compensation)
// at the chip rate. Each function is enabled or bypassed by its own bit of cfg; with
// all three bypassed the block passes the first sample of every chip unchanged. The
// drift and phase step in cfg are those of the frequency bin this block serves.
//
// Timing: the latency from a sample to the chip it produces is fixed and identical in
// every mode, so all preprocessing blocks of the engine stay chip-aligned.
// spr_restart/spr_load/spr_load_state control the SPR state at trial boundaries;
// spr_load also sets the RSPF selection to rspf_load_sel. foc_restart clears the FOC phase, and the lut_* port writes the FOC register file.
module preproc
  import cse_pkg::*;
#(
  parameter logic [15:0] SEED     = 16'hACE1,
  parameter int unsigned SPR_HALF = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  pre_cfg_t                 cfg,
  input  logic                     frame_start,
  input  logic                     spr_restart,
  input  logic                     spr_load,
  input  spr_state_t               spr_load_state,
  input  logic                     rspf_load_sel,
  input  logic                     foc_restart,
  input  logic                     lut_we,
  input  logic [LUT_AW-1:0]        lut_addr,
  input  logic signed [COEF_W-1:0] lut_cos,
  input  logic signed [COEF_W-1:0] lut_sin,
  input  logic                     smp_valid,
  input  iq_t                      smp,
  output logic                     chip_valid,
  output iq_t                      chip,
  output spr_state_t               spr_state,
  output logic                     rspf_sel
);
  logic spr_v, rspf_v;
  iq_t  spr_s, rspf_s;

  spr #(.HALF(SPR_HALF)) u_spr (
    .clk, .rst_n, .enable(cfg.en_spr), .drift(cfg.drift), .restart(spr_restart),
    .load(spr_load), .load_state(spr_load_state),
    .in_valid(smp_valid), .in_s(smp), .out_valid(spr_v), .out_s(spr_s), .state(spr_state));

  rspf #(.SEED(SEED)) u_rspf (
    .clk, .rst_n, .enable(cfg.en_rspf), .frame_start,
    .load(spr_load), .load_sel(rspf_load_sel),
    .in_valid(spr_v), .in_s(spr_s), .out_valid(rspf_v), .out_s(rspf_s), .sel(rspf_sel));

  foc u_foc (
    .clk, .rst_n, .enable(cfg.en_foc), .restart(foc_restart), .phase_step(cfg.phase_step),
    .lut_we, .lut_addr, .lut_cos, .lut_sin,
    .in_valid(rspf_v), .in_s(rspf_s), .out_valid(chip_valid), .out_s(chip));
endmodule
