// Self-checking testbench for stage1 at a reduced slot length (512 chips, 3 slots per
// dwell; the structure is the same as at 2560 x 15). Chips arrive every four cycles
// as at 15.36 MHz. Dwell 1: a clean PSC of amplitude 3 on I and Q at slot offset 137:
// h_hat must be 137 and the peak 3 * ((2*768^2) >> 12) = 864, and the dwell must take
// SLOT_LEN*N_SLOTS chips (counted from start, +-1 for the correlator latency). Dwell 2: PSC of amplitude 2 at offset 400 in
// uniform noise of +-3: h_hat must be 400. Dwell 3: offset 10 (a hypothesis that
// wraps around the slot end while the PSC window is open). In every dwell, busy must
// still be high in the cycle before done, so that no new dwell can start before the
// previous result is out.
module tb_stage1;
  import cse_pkg::*;
  localparam int SLOT = 512, NS = 3;
  logic clk = 0, rst_n = 0, chip_valid = 0, start = 0;
  iq_t chip = '0;
  logic [8:0] slot_pos = '0;
  logic busy, done;
  logic [8:0] h_hat;
  logic [15:0] peak;
  int checks = 0, failures = 0;
  int off = 137, amp = 3, noise = 0;
  longint c = 0;
  int chips_in_dwell = 0;
  logic counting = 0;

  stage1 #(.SLOT_LEN(SLOT), .N_SLOTS(NS)) dut (.*);
  always #5 clk = ~clk;

  logic busy_q = 0;
  always @(posedge clk) begin
    if (rst_n && done) begin
      checks++;
      if (!busy_q) begin failures++; $display("busy fell before done"); end
    end
    busy_q <= busy;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chip source: one chip every four cycles
  always begin
    int u, v, vi, vq;
    @(negedge clk);
    u = int'((c - off) % SLOT); if (u < 0) u += SLOT;
    v = (u < PSC_LEN) ? (psc_neg(u) ? -amp : amp) : 0;
    vi = v + ((noise > 0) ? $urandom_range(2*noise) - noise : 0);
    vq = v + ((noise > 0) ? $urandom_range(2*noise) - noise : 0);
    chip_valid = 1;
    chip = '{i: quant_i(vi), q: quant_i(vq)};
    slot_pos = 9'(c % SLOT);
    if (counting) chips_in_dwell++;
    @(negedge clk); chip_valid = 0;
    @(negedge clk);
    @(negedge clk);
    c++;
  end

  function automatic sample_t quant_i(input int v);
    return sample_t'((v > 7) ? 7 : (v < -8) ? -8 : v);
  endfunction

  task automatic dwell(input int exp_h, input int exp_peak);
    @(negedge clk);
    start = 1; counting = 1; chips_in_dwell = 0;
    @(negedge clk);
    start = 0;
    @(posedge done);
    counting = 0;
    #1;
    checks++;
    if (int'(h_hat) != exp_h) begin failures++; $display("h_hat %0d expected %0d", h_hat, exp_h); end
    if (exp_peak >= 0) begin
      checks++;
      if (int'(peak) != exp_peak) begin failures++; $display("peak %0d expected %0d", peak, exp_peak); end
    end
    checks++;
    if (chips_in_dwell < SLOT*NS - 1 || chips_in_dwell > SLOT*NS + 1) begin
      failures++; $display("dwell took %0d chips", chips_in_dwell);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300 * 4) @(posedge clk);          // fill the correlators
    dwell(137, 864);
    off = 400; amp = 2; noise = 3;
    repeat (300 * 4) @(posedge clk);
    dwell(400, -1);
    off = 10; amp = 3; noise = 1;
    repeat (300 * 4) @(posedge clk);
    dwell(10, -1);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
