// Self-checking testbench for stage3 at a reduced slot length (512 chips, so one
// frame is 30 CPICH symbols). The received signal is the cell of group g with
// scrambling code k (plus sync channels), frame boundary at chip `off`. The eight
// code chips of the requested group and chip index are supplied combinationally, as
// an external code generator would. Trial 1: threshold 20, k must win all 30 votes,
// found = 1. Trial 2: another code in noise. Trial 3: threshold 30 cannot be
// exceeded, so found must be 0. Each trial must end within one frame plus a few
// cycles after its first chip.
module tb_stage3;
  import cse_pkg::*;
  import cse_tb_pkg::*;
  localparam int SLOT = 512, FRAME = SLOT * 15;
  logic clk = 0, rst_n = 0, chip_valid = 0, start = 0;
  iq_t chip = '0;
  logic [12:0] frame_pos = '0, fb_pos = '0, scr_idx;
  logic [5:0] group = '0, scr_group;
  logic [7:0] threshold = 8'd20, votes;
  logic [7:0] scr_code_i, scr_code_q;
  logic busy, done, found;
  logic [2:0] k_hat;
  int checks = 0, failures = 0;
  int off = 1234, grp = 9, kk = 5, noise = 0;
  longint c = 0;

  stage3 #(.SLOT_LEN(SLOT)) dut (.*);
  always #5 clk = ~clk;

  // code generator stand-in
  always_comb
    for (int n = 0; n < 8; n++) begin
      scr_code_i[n] = scr_neg_i(int'(scr_group) * 8 + n, int'(scr_idx));
      scr_code_q[n] = scr_neg_q(int'(scr_group) * 8 + n, int'(scr_idx));
    end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always begin
    real re, im;
    @(negedge clk);
    cell_chip(c, off, SLOT, grp, kk, 1.5, 1.0, 0.0, re, im);
    if (noise > 0) begin
      re += real'($urandom_range(2*noise)) - real'(noise);
      im += real'($urandom_range(2*noise)) - real'(noise);
    end
    chip_valid = 1;
    chip = '{i: quant(re), q: quant(im)};
    frame_pos = 13'(c % FRAME);
    @(negedge clk); chip_valid = 0;
    @(negedge clk);
    @(negedge clk);
    c++;
  end

  task automatic trial(input int exp_found, input int exp_votes);
    longint c0;
    @(negedge clk);
    fb_pos = 13'(off % FRAME); group = 6'(grp);
    start = 1;
    @(negedge clk); start = 0;
    @(posedge clk iff (chip_valid && frame_pos == fb_pos));
    c0 = c;
    @(posedge done); #1;
    checks += 3;
    if (int'(found) != exp_found) begin failures++; $display("found %0d expected %0d", found, exp_found); end
    if (exp_found == 1 && int'(k_hat) != kk) begin failures++; $display("k_hat %0d expected %0d", k_hat, kk); end
    if (exp_votes >= 0 && int'(votes) != exp_votes) begin failures++; $display("votes %0d", votes); end
    if (c - c0 > FRAME + 1) begin failures++; $display("took %0d chips", c - c0); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    trial(1, 30);
    kk = 2; grp = 40; off = 5000; noise = 2;
    trial(1, -1);
    threshold = 8'd30; noise = 0;
    trial(0, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
