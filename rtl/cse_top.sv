// Cell search engine (CSE) for WCDMA with two search algorithms.
//
// The engine finds a cell's slot boundary, frame boundary, code group and scrambling
// code from 2x oversampled 4-bit I/Q ADC samples. It contains two stage-1 modules
// (slot synchronisation, one per frequency bin), one stage-2 module (frame
// synchronisation and code group) and one stage-3 module (scrambling code), each
// behind its own preprocessing block (SPR -> RSPF -> FOC).
//
// Two algorithms share this hardware, chosen by `mode` when a search starts:
//  * primary (mode 0, idle/active-mode search): only stage-1 module 0 runs and every
//    preprocessing function is bypassed (one sample per chip is passed through);
//  * enhanced (mode 1, initial search under large frequency and clock errors): both
//    stage-1 modules run, each with its bin's frequency offset (FOC phase step) and
//    clock drift (SPR), with RSPF on; the enables en_spr/en_rspf/en_foc select which
//    functions are active. The bin whose stage-1 peak is larger wins: its slot
//    boundary is used and its frequency offset and drift (the coarse frequency
//    estimate) are applied by the stage-2 and stage-3 preprocessing blocks of the
//    same trial.
//
// The stages are pipelined: stage 1 runs one dwell of N_SLOTS slots after another;
// each result is held until stage 2 is free (a newer result replaces an unused
// one), and each stage-2 result is held until stage 3 is free. The search ends with
// the first stage-3 success, reported on result_valid with h_hat, fb_pos, g_hat,
// k_hat, bin_hat and freq_est. A shared chip timer (slot_pos, frame_pos) counts the
// chips of preprocessing block 0; all preprocessing blocks have the same latency, so
// every stage sees the same timing.
//
// The module set, the two bins, the mode switch and the per-stage preprocessing
// follow the engine's architecture. Results of stages started before the current
// search are discarded. Hand-over registers between the stages, the
// hand-over of the winning bin's SPR state and RSPF sampling point to stages 2 and 3
// (a state waiting in a hand-over register keeps stepping with its bin's drift)
// (RSPF draws a new point at each stage-1 dwell, i.e. once per frame of search, so
// that all three stages of a trial sample at the same point), the warm-up of one
// slot before the first dwell, and the external scrambling-code port are this
// design's. Timing: samples at most every second clock cycle (7.68 MHz samples from a
// 15.36-MHz clock in the reference design), chips every fourth.
module cse_top
  import cse_pkg::*;
#(
  parameter int unsigned SLOT_LEN = 2560,
  parameter int unsigned N_SLOTS  = 15,
  parameter int unsigned SPR_HALF = 4,
  localparam int unsigned POS_W   = $clog2(SLOT_LEN),
  localparam int unsigned FRAME_LEN = SLOT_LEN*FRAME_SLOTS,
  localparam int unsigned FPOS_W  = $clog2(FRAME_LEN)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // control
  input  logic                         start,
  input  logic                         mode,        // 0 primary, 1 enhanced
  input  logic                         en_spr,
  input  logic                         en_rspf,
  input  logic                         en_foc,
  input  logic signed [SPR_FRAC_W-1:0] bin_drift [2],
  input  logic signed [PH_W-1:0]       bin_phase [2],
  input  logic [7:0]                   threshold,
  // FOC register files (written into all four preprocessing blocks)
  input  logic                         lut_we,
  input  logic [LUT_AW-1:0]            lut_addr,
  input  logic signed [COEF_W-1:0]     lut_cos,
  input  logic signed [COEF_W-1:0]     lut_sin,
  // CFRS code-word table
  input  logic                         cb_we,
  input  logic [5:0]                   cb_group,
  input  logic [3:0]                   cb_pos,
  input  logic [3:0]                   cb_sym,
  // ADC samples
  input  logic                         smp_valid,
  input  iq_t                          smp,
  // scrambling-code generator
  output logic [5:0]                   scr_group,
  output logic [FPOS_W-1:0]            scr_idx,
  input  logic [N_CODES-1:0]           scr_code_i,
  input  logic [N_CODES-1:0]           scr_code_q,
  // results
  output logic                         searching,
  output logic                         result_valid,
  output logic [POS_W-1:0]             h_hat,
  output logic [FPOS_W-1:0]            fb_pos,
  output logic [5:0]                   g_hat,
  output logic [2:0]                   k_hat,
  output logic                         bin_hat,
  output logic signed [PH_W-1:0]       freq_est,
  output logic [3:0]                   cfrs_score,
  output logic [7:0]                   votes,
  output logic [15:0]                  trials_failed
);
  logic mode_r;

  // ---------------------------------------------------------------- timer
  logic              cv [4];
  iq_t               cd [4];
  spr_state_t        sst [4];
  logic              rsel [4];
  logic [POS_W-1:0]  slot_pos;
  logic [FPOS_W-1:0] frame_pos;
  logic              warm;
  logic [POS_W:0]    warm_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_pos  <= '0;
      frame_pos <= '0;
      warm_cnt  <= '0;
      warm      <= 1'b0;
    end else if (cv[0]) begin
      slot_pos  <= (slot_pos == POS_W'(SLOT_LEN-1)) ? '0 : slot_pos + 1'b1;
      frame_pos <= (frame_pos == FPOS_W'(FRAME_LEN-1)) ? '0 : frame_pos + 1'b1;
      if (!warm) begin
        warm_cnt <= warm_cnt + 1'b1;
        if (warm_cnt == (POS_W+1)'(SLOT_LEN-1)) warm <= 1'b1;
      end
    end
  end


  // ---------------------------------------------------------------- stage control
  logic              s1_start, s1_start_r, s1_busy, s1_busy_b, s1_done, s1_done_b;
  logic [POS_W-1:0]  s1_h [2];
  logic [15:0]       s1_pk [2];
  logic              win_bin;
  logic              s1_own, s2_own, s3_own;   // stage running for the current search

  logic              p1_v;
  logic [POS_W-1:0]  p1_h;
  logic              p1_bin;
  spr_state_t        p1_spr;
  logic              p1_rsel;

  logic              s2_start, s2_start_r, s2_busy, s2_done;
  logic              s2_bin;
  logic [5:0]        s2_g;
  logic [3:0]        s2_s, s2_score;
  logic [FPOS_W-1:0] s2_fb;
  logic [POS_W-1:0]  s2_h;

  logic              p2_v;
  logic [FPOS_W-1:0] p2_fb;
  logic [5:0]        p2_g;
  logic              p2_bin;
  logic [POS_W-1:0]  p2_h;
  spr_state_t        p2_spr;
  logic              p2_rsel;

  logic              s3_start, s3_start_r, s3_busy, s3_done, s3_found;
  logic              s3_bin;
  logic [POS_W-1:0]  s3_h;
  logic [FPOS_W-1:0] s3_fb;
  logic [5:0]        s3_g;
  logic [2:0]        s3_k;
  logic [7:0]        s3_votes;

  assign s1_start = searching && warm && !s1_busy && !s1_start_r;
  assign s2_start = p1_v && !s2_busy && !s2_start_r;
  assign s3_start = p2_v && !s3_busy && !s3_start_r;
  assign win_bin  = mode_r && (s1_pk[1] > s1_pk[0]);

  // One step of the SPR reordering controller, applied to an SPR state while it waits
  // in a hand-over register, so that the drift of the waiting time is not lost.
  localparam logic signed [SPR_FRAC_W+1:0] SPR_ONE  = (SPR_FRAC_W+2)'(1) <<< SPR_FRAC_W;
  localparam logic signed [SPR_SEL_W-1:0]  SPR_SMAX = SPR_SEL_W'(SPR_HALF);

  function automatic spr_state_t spr_step(input spr_state_t st,
                                          input logic signed [SPR_FRAC_W-1:0] drift);
    logic signed [SPR_FRAC_W+1:0] acc;
    spr_state_t r;
    acc = (SPR_FRAC_W+2)'(st.frac) + (SPR_FRAC_W+2)'(drift);
    r   = st;
    if (acc >= SPR_ONE) begin
      if (st.sel < SPR_SMAX) begin r.sel = st.sel + 1'b1; r.frac = (SPR_FRAC_W+1)'(acc - SPR_ONE); end
      else r.frac = (SPR_FRAC_W+1)'(SPR_ONE - 1);
    end else if (acc <= -SPR_ONE) begin
      if (st.sel > -SPR_SMAX) begin r.sel = st.sel - 1'b1; r.frac = (SPR_FRAC_W+1)'(acc + SPR_ONE); end
      else r.frac = -(SPR_FRAC_W+1)'(SPR_ONE - 1);
    end else begin
      r.frac = (SPR_FRAC_W+1)'(acc);
    end
    return r;
  endfunction

  logic spr_wait_step;
  assign spr_wait_step = smp_valid && mode_r && en_spr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_r        <= 1'b0;
      searching     <= 1'b0;
      s1_start_r    <= 1'b0;
      s1_own        <= 1'b0;
      s2_own        <= 1'b0;
      s3_own        <= 1'b0;
      s2_start_r    <= 1'b0;
      s3_start_r    <= 1'b0;
      p1_v          <= 1'b0;
      p1_h          <= '0;
      p1_bin        <= 1'b0;
      p1_spr        <= '0;
      p1_rsel       <= 1'b0;
      p2_v          <= 1'b0;
      p2_fb         <= '0;
      p2_g          <= '0;
      p2_bin        <= 1'b0;
      p2_h          <= '0;
      p2_spr        <= '0;
      p2_rsel       <= 1'b0;
      s2_bin        <= 1'b0;
      s2_h          <= '0;
      s3_bin        <= 1'b0;
      s3_h          <= '0;
      s3_fb         <= '0;
      s3_g          <= '0;
      result_valid  <= 1'b0;
      h_hat         <= '0;
      fb_pos        <= '0;
      g_hat         <= '0;
      k_hat         <= '0;
      bin_hat       <= 1'b0;
      freq_est      <= '0;
      trials_failed <= '0;
      cfrs_score    <= '0;
      votes         <= '0;
    end else begin
      s1_start_r   <= s1_start;
      s2_start_r   <= s2_start;
      s3_start_r   <= s3_start;
      result_valid <= 1'b0;
      if (start && !searching) begin
        searching     <= 1'b1;
        mode_r        <= mode;
        p1_v          <= 1'b0;
        p2_v          <= 1'b0;
        trials_failed <= '0;
        s1_own        <= 1'b0;
        s2_own        <= 1'b0;
        s3_own        <= 1'b0;
      end
      if (s1_start) s1_own <= 1'b1;
      // waiting SPR states keep following their bin's drift
      if (p1_v && spr_wait_step) p1_spr <= spr_step(p1_spr, bin_drift[p1_bin]);
      if (p2_v && spr_wait_step) p2_spr <= spr_step(p2_spr, bin_drift[p2_bin]);
      // stage 1 -> hand-over 1 (bin decision: coarse frequency estimate)
      if (s1_done && s1_own && searching) begin
        p1_v   <= 1'b1;
        p1_bin <= win_bin;
        p1_h   <= s1_h[win_bin];
        p1_spr <= win_bin ? sst[1] : sst[0];
        p1_rsel <= win_bin ? rsel[1] : rsel[0];
      end
      // hand-over 1 -> stage 2
      if (s2_start) begin
        if (!(s1_done && s1_own && searching)) p1_v <= 1'b0;
        s2_own <= 1'b1;
        s2_bin <= p1_bin;
        s2_h   <= p1_h;
      end
      // stage 2 -> hand-over 2
      if (s2_done && s2_own && searching) begin
        p2_v   <= 1'b1;
        p2_fb  <= s2_fb;
        p2_g   <= s2_g;
        p2_bin <= s2_bin;
        p2_h   <= s2_h;
        p2_spr <= sst[2];
        p2_rsel <= rsel[2];
        cfrs_score <= s2_score;
      end
      if (s3_start) begin
        if (!(s2_done && s2_own && searching)) p2_v <= 1'b0;
        s3_own <= 1'b1;
        s3_bin <= p2_bin;
        s3_h   <= p2_h;
        s3_fb  <= p2_fb;
        s3_g   <= p2_g;
      end
      // stage 3 -> result
      if (s3_done && s3_own && searching) begin
        if (s3_found) begin
          searching    <= 1'b0;
          p1_v         <= 1'b0;
          p2_v         <= 1'b0;
          result_valid <= 1'b1;
          h_hat        <= s3_h;
          fb_pos       <= s3_fb;
          g_hat        <= s3_g;
          k_hat        <= s3_k;
          votes        <= s3_votes;
          bin_hat      <= s3_bin;
          freq_est     <= mode_r ? bin_phase[s3_bin] : '0;
        end else begin
          trials_failed <= trials_failed + 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- preprocessing
  pre_cfg_t cfg [4];
  logic     spr_restart [4];
  logic     spr_load [4];
  spr_state_t spr_ld_st [4];
  logic     rspf_new [4];
  logic     rspf_ld_sel [4];

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      cfg[n].en_spr  = mode_r && en_spr;
      cfg[n].en_rspf = mode_r && en_rspf;
      cfg[n].en_foc  = mode_r && en_foc;
    end
    cfg[0].drift = bin_drift[0];      cfg[0].phase_step = bin_phase[0];
    cfg[1].drift = bin_drift[1];      cfg[1].phase_step = bin_phase[1];
    cfg[2].drift = bin_drift[s2_bin]; cfg[2].phase_step = bin_phase[s2_bin];
    cfg[3].drift = bin_drift[s3_bin]; cfg[3].phase_step = bin_phase[s3_bin];
    spr_restart[0] = s1_start;  spr_load[0] = 1'b0;     spr_ld_st[0] = '0;
    spr_restart[1] = s1_start;  spr_load[1] = 1'b0;     spr_ld_st[1] = '0;
    spr_restart[2] = 1'b0;      spr_load[2] = s2_start; spr_ld_st[2] = p1_spr;
    spr_restart[3] = 1'b0;      spr_load[3] = s3_start; spr_ld_st[3] = p2_spr;
    // RSPF: a new random sampling point for every stage-1 dwell (one frame), carried
    // with the SPR state to stages 2 and 3 of the same trial
    rspf_new[0] = s1_start;     rspf_ld_sel[0] = 1'b0;
    rspf_new[1] = s1_start;     rspf_ld_sel[1] = 1'b0;
    rspf_new[2] = 1'b0;         rspf_ld_sel[2] = p1_rsel;
    rspf_new[3] = 1'b0;         rspf_ld_sel[3] = p2_rsel;
  end

  for (genvar n = 0; n < 4; n++) begin : g_pre
    preproc #(.SEED(16'hACE1 + 16'(n*16'h1F35)), .SPR_HALF(SPR_HALF)) u_pre (
      .clk, .rst_n, .cfg(cfg[n]), .frame_start(rspf_new[n]),
      .spr_restart(spr_restart[n]), .spr_load(spr_load[n]), .spr_load_state(spr_ld_st[n]),
      .rspf_load_sel(rspf_ld_sel[n]),
      .foc_restart(1'b0), .lut_we, .lut_addr, .lut_cos, .lut_sin,
      .smp_valid, .smp, .chip_valid(cv[n]), .chip(cd[n]), .spr_state(sst[n]), .rspf_sel(rsel[n]));
  end

  // ---------------------------------------------------------------- stages
  stage1 #(.SLOT_LEN(SLOT_LEN), .N_SLOTS(N_SLOTS)) u_s1a (
    .clk, .rst_n, .chip_valid(cv[0]), .chip(cd[0]), .slot_pos,
    .start(s1_start), .busy(s1_busy), .done(s1_done), .h_hat(s1_h[0]), .peak(s1_pk[0]));

  stage1 #(.SLOT_LEN(SLOT_LEN), .N_SLOTS(N_SLOTS)) u_s1b (
    .clk, .rst_n, .chip_valid(cv[1]), .chip(cd[1]), .slot_pos,
    .start(s1_start && mode_r), .busy(s1_busy_b), .done(s1_done_b), .h_hat(s1_h[1]), .peak(s1_pk[1]));

  stage2 #(.SLOT_LEN(SLOT_LEN)) u_s2 (
    .clk, .rst_n, .chip_valid(cv[2]), .chip(cd[2]), .slot_pos, .frame_pos,
    .start(s2_start), .h_hat(p1_h), .cb_we, .cb_group, .cb_pos, .cb_sym,
    .busy(s2_busy), .done(s2_done), .g_hat(s2_g), .s_hat(s2_s), .fb_pos(s2_fb), .score(s2_score));

  stage3 #(.SLOT_LEN(SLOT_LEN)) u_s3 (
    .clk, .rst_n, .chip_valid(cv[3]), .chip(cd[3]), .frame_pos,
    .start(s3_start), .fb_pos(p2_fb), .group(p2_g), .threshold,
    .scr_group, .scr_idx, .scr_code_i, .scr_code_q,
    .busy(s3_busy), .done(s3_done), .found(s3_found), .k_hat(s3_k), .votes(s3_votes));

  // Stage-1 bin 1 only runs in lockstep with bin 0.
  assert property (@(posedge clk) disable iff (!rst_n) s1_done_b |-> s1_done);
  // All preprocessing blocks deliver chips on the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) cv[0] == cv[3]);
endmodule
