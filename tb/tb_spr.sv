// Self-checking testbench for spr. Each sample carries its own index (low 8 bits in
// the I and Q nibbles), so the output shows which input sample was taken. A reference
// model of the reordering controller predicts the tap selection; the test covers
// positive drift (samples dropped) up to saturation, negative drift (samples stuffed),
// restart, state load and bypass, and checks the HALF-sample delay at selection 0.
module tb_spr;
  import cse_pkg::*;
  localparam int HALF = 4;
  localparam longint ONE = 64'sd1 <<< SPR_FRAC_W;
  logic clk = 0, rst_n = 0, enable = 0, restart = 0, load = 0, in_valid = 0;
  logic signed [SPR_FRAC_W-1:0] drift = '0;
  spr_state_t load_state = '0, state;
  iq_t in_s = '0, out_s;
  logic out_valid;
  int checks = 0, failures = 0, drops = 0, stuffs = 0;
  int n = 0;                 // sample index
  int sel_ref = 0;
  longint acc_ref = 0;

  spr #(.HALF(HALF)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx_of(iq_t s);
    return int'({s.q, s.i}) & 255;
  endfunction

  // one sample strobe; checks the output against the model
  task automatic step();
    int exp_idx, prev_sel;
    longint a;
    @(negedge clk);
    in_valid = 1;
    in_s = '{i: sample_t'(n & 15), q: sample_t'((n >> 4) & 15)};
    exp_idx = n - HALF + (enable ? sel_ref : 0);
    prev_sel = sel_ref;
    // model update
    if (!enable) begin sel_ref = 0; acc_ref = 0; end
    else begin
      a = acc_ref + longint'(drift);
      if (a >= ONE) begin
        if (sel_ref < HALF) begin sel_ref++; acc_ref = a - ONE; drops++; end else acc_ref = ONE - 1;
      end else if (a <= -ONE) begin
        if (sel_ref > -HALF) begin sel_ref--; acc_ref = a + ONE; stuffs++; end else acc_ref = -(ONE - 1);
      end else acc_ref = a;
    end
    @(negedge clk);
    in_valid = 0;
    if (n >= 2*HALF + 2) begin
      checks++;
      if (!out_valid || idx_of(out_s) != (exp_idx & 255)) begin
        failures++;
        if (failures < 10) $display("n=%0d sel=%0d: got %0d expected %0d", n, prev_sel, idx_of(out_s), exp_idx & 255);
      end
    end
    checks++;
    if (state.sel != SPR_SEL_W'(sel_ref)) begin
      failures++;
      if (failures < 10) $display("n=%0d state.sel %0d expected %0d", n, state.sel, sel_ref);
    end
    n++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // bypass: fixed delay of HALF samples
    enable = 0;
    repeat (20) step();
    // positive drift: drops until saturation at +HALF
    enable = 1; drift = SPR_FRAC_W'(5_000_000);
    repeat (80) step();
    checks++; if (state.sel != SPR_SEL_W'(HALF)) failures++;
    // restart returns to the centre tap
    @(negedge clk); restart = 1; @(negedge clk); restart = 0; sel_ref = 0; acc_ref = 0;
    repeat (10) step();
    // negative drift: stuffs until saturation at -HALF
    @(negedge clk); restart = 1; @(negedge clk); restart = 0; sel_ref = 0; acc_ref = 0;
    drift = -SPR_FRAC_W'(3_000_000);
    repeat (80) step();
    checks++; if (state.sel != -SPR_SEL_W'(HALF)) failures++;
    // load a state and continue with a small drift
    @(negedge clk); load = 1; load_state = '{sel: 4'sd2, frac: '0};
    @(negedge clk); load = 0; sel_ref = 2; acc_ref = 0;
    drift = SPR_FRAC_W'(1_000_000);
    repeat (40) step();
    checks++; if (drops < 6 || stuffs < 4) begin failures++; $display("drops %0d stuffs %0d", drops, stuffs); end
    $display("drops=%0d stuffs=%0d", drops, stuffs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
