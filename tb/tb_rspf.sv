// Self-checking testbench for rspf. Samples carry their index; each output chip must
// be the first or second sample of its chip as the current selection says, the
// selection must be redrawn (and change) across frame starts when enabled, and fixed
// to the first sample when bypassed. A load sets the selection to the loaded value,
// also when a frame start comes in the same cycle. One output per two input samples.
module tb_rspf;
  import cse_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, frame_start = 0, load = 0, load_sel = 0, in_valid = 0;
  iq_t in_s = '0, out_s;
  logic out_valid, sel;
  int checks = 0, failures = 0, n = 0, outs = 0, sel_changes = 0, sel1 = 0;
  logic last_sel = 0;

  rspf dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample();
    @(negedge clk);
    in_valid = 1;
    in_s = '{i: sample_t'(n & 15), q: sample_t'((n >> 4) & 15)};
    @(negedge clk);
    in_valid = 0;
    if (n % 2 == 1) begin
      checks++;
      if (!out_valid || (int'({out_s.q, out_s.i}) & 255) != ((n - (sel ? 0 : 1)) & 255)) begin
        failures++;
        $display("n=%0d sel=%0d out=%0d", n, sel, int'({out_s.q, out_s.i}) & 255);
      end
      outs++;
    end else begin
      checks++;
      if (out_valid) failures++;
    end
    n++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 0;
    repeat (8) sample();
    // enabled: 40 frames of 4 chips each
    enable = 1;
    for (int f = 0; f < 40; f++) begin
      @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
      if (sel != last_sel) sel_changes++;
      if (sel) sel1++;
      last_sel = sel;
      repeat (8) sample();
    end
    checks++; if (sel_changes < 5 || sel1 < 5 || sel1 > 35) begin failures++; $display("changes %0d ones %0d", sel_changes, sel1); end
    // loads, alone and together with a frame start
    for (int l = 0; l < 8; l++) begin
      @(negedge clk); load = 1; load_sel = l[0]; frame_start = l[1];
      @(negedge clk); load = 0; frame_start = 0;
      checks++; if (sel !== l[0]) begin failures++; $display("load %0d sel %0d", l, sel); end
      repeat (4) sample();
    end
    // bypass again: first sample
    enable = 0;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    checks++; if (sel !== 1'b0) failures++;
    repeat (8) sample();
    checks++; if (outs != n/2) failures++;
    $display("selection changes=%0d", sel_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
