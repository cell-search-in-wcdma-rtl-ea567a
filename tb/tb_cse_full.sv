// Full-size testbench of the cell search engine: every parameter at its default
// (2560-chip slots, 15-slot dwells, 150 CPICH symbols per stage-3 trial).
// Run A: a primary-mode search on a clean cell (group 11, code 6, frame boundary at
// chip 1500). The engine must report slot boundary and frame boundary (cell timing
// plus the 2-chip preprocessing latency), group and code within six frames.
// Run B: an enhanced-mode search under the worst oscillator error the engine is
// built for, 12 ppm. The ADC clock runs 12 ppm fast, so the cell drifts by 1.38
// chips per 30 ms, and the carrier is 18 kHz off. The two stage-1 bins assume
// -12 kHz / -12 ppm and +12 kHz / +12 ppm. Bin 1 must win, and the result must match
// the cell within 3 chips at the time of detection. SPR reordering and the SPR state
// hand-over must both have happened. The vote threshold is 100 of 150.
// Run C: the mirror image (ADC 12 ppm slow, -18 kHz); bin 0 must win.
// Run D: as run B with RSPF off (the FOC+SPR combination).
// The ADC samples a quarter chip after each chip edge, like a receiver whose sampling
// phase is not aligned to the chips; every search must end within 12 frames.
module tb_cse_full;
  import cse_pkg::*;
  import cse_tb_pkg::*;
  localparam int SLOT = 2560, FRAME = SLOT * 15;
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
  logic [15:0] scr_idx;
  logic [7:0] scr_code_i, scr_code_q;
  logic searching, result_valid, bin_hat;
  logic [11:0] h_hat;
  logic [15:0] fb_pos;
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
  int n_primary = 0, n_drop = 0, n_load = 0;

  cse_top dut (.*);
  always #5 clk = ~clk;

  always_comb
    for (int c = 0; c < 8; c++) begin
      scr_code_i[c] = scr_neg_i(int'(scr_group) * 8 + c, int'(scr_idx));
      scr_code_q[c] = scr_neg_q(int'(scr_group) * 8 + c, int'(scr_idx));
    end

  initial begin
    repeat (8_000_000) @(posedge clk);
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
    c = longint'($floor((real'(n) + 0.5) / (2.0 * (1.0 + eps))));
    cell_chip(c, off, SLOT, G, K, 2.0, 1.0, fcyc, re, im);
    smp_valid = rst_n;
    smp = '{i: quant(re), q: quant(im)};
    @(negedge clk);
    smp_valid = 0;
    if (rst_n) n++;
  end

  // SPR reorder events in any preprocessing block, outside restart and load cycles
  logic [3:0] last_sel [4] = '{default: '0};
  logic was_ld [4] = '{default: 1'b0};
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < 4; b++) begin
      if (dut.sst[b].sel != last_sel[b] && !was_ld[b]) n_drop++;
      last_sel[b] <= dut.sst[b].sel;
      was_ld[b]   <= dut.spr_load[b] || dut.spr_restart[b];
    end
    if (dut.spr_load[2] && dut.mode_r) n_load++;
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

  // enhanced search under clock error e (ADC fast for e > 0) and carrier offset f Hz,
  // cell frame boundary at chip o; the bin exp_bin must win
  task automatic enhanced(input string tag, input real e, input real f, input logic rspf_on,
                          input logic exp_bin, input int o);
    int d0, l0;
    eps = e; fcyc = f / 3.84e6; threshold = 8'd100; off = o; en_rspf = rspf_on;
    d0 = n_drop; l0 = n_load;
    search(1'b1, 12 * FRAME);
    checks += 7;
    if (cdist(int'(h_hat), int'(real'(off + 2) + eps * real'(n) / 2.0) % SLOT, SLOT) > 3) begin failures++; $display("%s h_hat %0d", tag, h_hat); end
    if (cdist(int'(fb_pos), int'(real'(off + 2) + eps * real'(n) / 2.0) % FRAME, FRAME) > 3) begin failures++; $display("%s fb_pos %0d", tag, fb_pos); end
    if (int'(g_hat) != G) begin failures++; $display("%s g_hat %0d", tag, g_hat); end
    if (int'(k_hat) != K) begin failures++; $display("%s k_hat %0d", tag, k_hat); end
    if (bin_hat != exp_bin || freq_est != bin_phase[exp_bin]) begin failures++; $display("%s bin %0d freq %0d", tag, bin_hat, freq_est); end
    if (n_drop == d0) begin failures++; $display("%s: no SPR reordering", tag); end
    if (n_load == l0) begin failures++; $display("%s: no SPR hand-over", tag); end
    $display("%s: votes %0d, cfrs score %0d, spr reorders %0d, hand-overs %0d", tag, votes, cfrs_score, n_drop - d0, n_load - l0);
  endtask

  initial begin
    bin_drift[0] = -24'sd201; bin_drift[1] = 24'sd201;     // 12 ppm, 2^-24 units
    bin_phase[0] = 16'sd205;  bin_phase[1] = -16'sd205;    // 12 kHz = 1/320 cycle per chip
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

    // ---- run B: enhanced, ADC 12 ppm fast and 18 kHz carrier offset: bin 1 must win
    enhanced("B", 12e-6, 18.0e3, 1'b1, 1'b1, 30000);
    // ---- run C: the mirror image, ADC 12 ppm slow and -18 kHz: bin 0 must win
    enhanced("C", -12e-6, -18.0e3, 1'b1, 1'b0, 12345);
    // ---- run D: FOC+SPR without RSPF, as run B
    enhanced("D", 12e-6, 18.0e3, 1'b0, 1'b1, 20000);

    checks++;
    if (n_primary == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
