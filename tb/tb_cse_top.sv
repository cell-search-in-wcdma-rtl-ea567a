// End-to-end testbench of the cell search engine at a reduced slot length (512
// chips, so a frame is 7680 chips; every other size is the default). ADC samples are
// produced at two per chip (one every second clock) from a cell with PSC, SSC and
// CPICH, group G and code K, frame boundary at chip OFF.
//
// Run A, primary mode: no frequency or clock error. The engine must report the slot
// and frame boundary (cell timing plus the 2-chip preprocessing latency), the group
// and the code, and finish within six frames.
// Run B, enhanced mode: the signal carries a frequency offset of 1/320 cycle per chip
// (12 kHz at 3.84 Mchip/s) and an ADC clock error of 40 ppm (exaggerated so that
// sample drops happen within a short simulation). Bin 0 assumes the opposite offset
// and drift, bin 1 the right ones, so bin 1 must win and freq_est must be its phase
// step. The vote threshold starts unreachable, so stage-3 trials fail and the search
// goes on; it is then lowered and the search must succeed.
// Mechanisms counted (each must occur): primary success, enhanced success, bin-1
// decision, SPR sample drops/stuffs, RSPF selection changes, FOC-active chips, SPR state hand-over
// to stage 2, SPR steps of a state waiting in the stage-1 hand-over register,
// stage-3 threshold failures.
module tb_cse_top;
  import cse_pkg::*;
  import cse_tb_pkg::*;
  localparam int SLOT = 512, FRAME = SLOT * 15;
  localparam int G = 11, K = 6;

  logic clk = 0, rst_n = 0, start = 0, mode = 0, en_spr = 1, en_rspf = 1, en_foc = 1;
  logic signed [SPR_FRAC_W-1:0] bin_drift [2];
  logic signed [PH_W-1:0] bin_phase [2];
  logic [7:0] threshold = 8'd15;
  logic lut_we = 0, cb_we = 0, smp_valid = 0;
  logic [LUT_AW-1:0] lut_addr = '0;
  logic signed [COEF_W-1:0] lut_cos = '0, lut_sin = '0;
  logic [5:0] cb_group = '0;
  logic [3:0] cb_pos = '0, cb_sym = '0;
  iq_t smp = '0;
  logic [5:0] scr_group;
  logic [12:0] scr_idx;
  logic [7:0] scr_code_i, scr_code_q;
  logic searching, result_valid, bin_hat;
  logic [8:0] h_hat;
  logic [12:0] fb_pos;
  logic [5:0] g_hat;
  logic [2:0] k_hat;
  logic signed [PH_W-1:0] freq_est;
  logic [3:0] cfrs_score;
  logic [7:0] votes;
  logic [15:0] trials_failed;

  int checks = 0, failures = 0;
  int off = 1500;
  real eps = 0.0, fcyc = 0.0;
  longint n = 0;       // sample index
  // mechanism counters
  int n_primary = 0, n_enhanced = 0, n_bin1 = 0, n_drop = 0 /* SPR drops and stuffs */, n_rspf = 0, n_foc = 0, n_load = 0, n_fail = 0, n_wait = 0;

  cse_top #(.SLOT_LEN(SLOT)) dut (.*);
  always #5 clk = ~clk;

  always_comb
    for (int c = 0; c < 8; c++) begin
      scr_code_i[c] = scr_neg_i(int'(scr_group) * 8 + c, int'(scr_idx));
      scr_code_q[c] = scr_neg_q(int'(scr_group) * 8 + c, int'(scr_idx));
    end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC: one sample every second clock; sample n sees chip floor(n / (2 (1 + eps)))
  always begin
    real re, im;
    longint c;
    @(negedge clk);
    c = longint'($floor(real'(n) / (2.0 * (1.0 + eps))));
    cell_chip(c, off, SLOT, G, K, 2.0, 1.0, fcyc, re, im);
    smp_valid = rst_n;
    smp = '{i: quant(re), q: quant(im)};
    @(negedge clk);
    smp_valid = 0;
    if (rst_n) n++;
  end

  // mechanism monitors
  // SPR reorder events: a selection step in any block that is not a restart or load
  logic [3:0] last_sel [4] = '{default: '0};
  logic last_rsel = 0;
  logic was_ld [4] = '{default: 1'b0};
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < 4; b++) begin
      if (dut.sst[b].sel != last_sel[b] && !was_ld[b]) n_drop++;
      last_sel[b] <= dut.sst[b].sel;
      was_ld[b]   <= dut.spr_load[b] || dut.spr_restart[b];
    end
    if (dut.rsel[0] != last_rsel) n_rspf++;
    last_rsel <= dut.rsel[0];
    if (dut.cv[0] && dut.cfg[0].en_foc) n_foc++;
    if (dut.spr_load[2] && dut.mode_r) n_load++;
    if (dut.p1_v && dut.spr_wait_step && !dut.s1_done) n_wait++;
  end

  task automatic search(input logic m, input int max_chips);
    longint n0;
    @(negedge clk); mode = m; start = 1;
    @(negedge clk); start = 0;
    n0 = n;
    while (!result_valid) begin
      @(negedge clk);
      if (m && trials_failed >= 2 && threshold == 8'd255) threshold = 8'd15;
      if ((n - n0) / 2 > longint'(max_chips)) break;
    end
    if (!result_valid) begin failures++; $display("search did not finish"); end
    else $display("search done after %0d chips (%0d failed trials)", (n - n0) / 2, trials_failed);
  endtask

  function automatic int cdist(input int a, input int b, input int m);
    int d;
    d = (a - b) % m; if (d < 0) d += m;
    return (d > m / 2) ? m - d : d;
  endfunction

  initial begin
    bin_drift[0] = -24'sd671; bin_drift[1] = 24'sd671;     // 40 ppm, 2^-24 units
    bin_phase[0] = 16'sd205;  bin_phase[1] = -16'sd205;    // 1/320 cycle per chip
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); lut_we = 1; lut_addr = LUT_AW'(a);
      lut_cos = COEF_W'($rtoi($floor(31.0 * $cos(2.0 * 3.14159265358979 * a / 64.0) + 0.5)));
      lut_sin = COEF_W'($rtoi($floor(31.0 * $sin(2.0 * 3.14159265358979 * a / 64.0) + 0.5)));
    end
    @(negedge clk); lut_we = 0;
    for (int g = 0; g < 64; g++)
      for (int p = 0; p < 15; p++) begin
        @(negedge clk); cb_we = 1; cb_group = 6'(g); cb_pos = 4'(p); cb_sym = cw_sym(g, p);
      end
    @(negedge clk); cb_we = 0;

    // ---- run A: primary
    search(1'b0, 6 * FRAME);
    checks += 5;
    if (int'(h_hat) != (off + 2) % SLOT) begin failures++; $display("A h_hat %0d expected %0d", h_hat, (off + 2) % SLOT); end
    if (int'(fb_pos) != (off + 2) % FRAME) begin failures++; $display("A fb_pos %0d expected %0d", fb_pos, (off + 2) % FRAME); end
    if (int'(g_hat) != G) begin failures++; $display("A g_hat %0d", g_hat); end
    if (int'(k_hat) != K) begin failures++; $display("A k_hat %0d", k_hat); end
    if (bin_hat != 1'b0 || freq_est != '0) begin failures++; $display("A bin %0d", bin_hat); end
    if (result_valid && int'(g_hat) == G && int'(k_hat) == K) n_primary++;

    // ---- run B: enhanced under frequency and clock error
    eps = 40e-6; fcyc = 1.0 / 320.0; threshold = 8'd255; off = 4000;
    search(1'b1, 20 * FRAME);
    checks += 5;
    // cell timing in timer chips at the time of the final trial (drift lags the timer)
    if (cdist(int'(h_hat), int'((off + 2 + eps * real'(n) / 2.0)) % SLOT, SLOT) > 3) begin failures++; $display("B h_hat %0d", h_hat); end
    if (cdist(int'(fb_pos), int'((off + 2 + eps * real'(n) / 2.0)) % FRAME, FRAME) > 3) begin failures++; $display("B fb_pos %0d", fb_pos); end
    if (int'(g_hat) != G) begin failures++; $display("B g_hat %0d", g_hat); end
    if (int'(k_hat) != K) begin failures++; $display("B k_hat %0d", k_hat); end
    if (bin_hat != 1'b1 || freq_est != -16'sd205) begin failures++; $display("B bin %0d freq %0d", bin_hat, freq_est); end
    if (result_valid && int'(g_hat) == G && int'(k_hat) == K) n_enhanced++;
    if (bin_hat) n_bin1++;
    n_fail = int'(trials_failed);

    $display("mechanisms: primary=%0d enhanced=%0d bin1=%0d spr_reorders=%0d rspf_changes=%0d foc_chips=%0d spr_handover=%0d s3_failed=%0d wait_steps=%0d",
             n_primary, n_enhanced, n_bin1, n_drop, n_rspf, n_foc, n_load, n_fail, n_wait);
    checks += 8;
    if (n_primary == 0) failures++;
    if (n_enhanced == 0) failures++;
    if (n_bin1 == 0) failures++;
    if (n_drop == 0) failures++;
    if (n_rspf == 0) failures++;
    if (n_foc == 0) failures++;
    if (n_load == 0) failures++;
    checks++;
    if (n_wait == 0) begin failures++; $display("no waiting SPR state was advanced"); end
    if (n_fail == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
