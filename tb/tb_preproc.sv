// Self-checking testbench for preproc. Samples carry their index. With every function
// bypassed, each chip must be the first sample of its chip pair, delayed by the
// fixed latency (4 samples). With RSPF on, the chip is the first or second sample as
// the RSPF selection says. With FOC on and a table holding -31 (cos) at every phase,
// each chip must come out negated (rounded, saturated). With SPR on and a large
// drift, sample drops must show as jumps of the delivered chip index (two drops per jump) until the
// selection saturates at +4.
module tb_preproc;
  import cse_pkg::*;
  logic clk = 0, rst_n = 0;
  pre_cfg_t cfg = '0;
  logic frame_start = 0, rspf_load_sel = 0, spr_restart = 0, spr_load = 0, foc_restart = 0, lut_we = 0, smp_valid = 0;
  spr_state_t spr_load_state = '0, spr_state;
  logic [LUT_AW-1:0] lut_addr = '0;
  logic signed [COEF_W-1:0] lut_cos = '0, lut_sin = '0;
  iq_t smp = '0, chip;
  logic chip_valid, rspf_sel;
  int checks = 0, failures = 0, n = 0, jumps = 0;
  int last_idx = -1;

  preproc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nib(input int v);  // 3-bit index value kept positive in 4-bit signed
    return v & 7;
  endfunction

  // drive one sample per three cycles, chip index in low 3 bits of I, and bit 0 of Q
  // marking first/second sample of its pair
  task automatic run(input int nsamp, input int mode);
    int got, exp_i;
    for (int s = 0; s < nsamp; s++) begin
      @(negedge clk);
      smp_valid = 1;
      smp = '{i: sample_t'(nib(n >> 1)), q: sample_t'(n & 1)};
      @(negedge clk);
      smp_valid = 0;
      @(negedge clk);
      @(negedge clk);
      if (chip_valid && n >= 12) begin
        // the chip finished at this strobe belongs to sample pair ((n-4)-1, n-4)
        checks++;
        case (mode)
          0: if (!(int'(chip.i) == nib((n-4) >> 1) && int'(chip.q) == 0)) failures++;
          1: if (!(int'(chip.i) == nib((n-4) >> 1) && int'(chip.q) == (rspf_sel ? 1 : 0))) failures++;
          2: if (!(int'(chip.i) == -nib((n-4) >> 1) && int'(chip.q) == 0)) failures++;
          default: begin
            got = int'(chip.i);
            if (last_idx >= 0 && got != ((last_idx + 1) & 7)) jumps++;
            last_idx = got;
            checks--;
          end
        endcase
      end
      n++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); lut_we = 1; lut_addr = LUT_AW'(a); lut_cos = -6'sd31; lut_sin = '0;
    end
    @(negedge clk); lut_we = 0;
    run(40, 0);                       // all bypassed
    checks++; if (n/2 < 19) failures++;
    cfg.en_rspf = 1;
    for (int f = 0; f < 12; f++) begin
      @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
      run(8, 1);
    end
    cfg.en_rspf = 0;
    for (int f = 0; f < 12; f++) begin   // bypassed RSPF ignores new frames
      @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
      run(8, 0);
    end
    cfg.en_foc = 1; cfg.phase_step = 16'sd300;
    run(40, 2);
    cfg.en_foc = 0;
    cfg.en_spr = 1; cfg.drift = 24'sd2_000_000;      // about one drop per 8 samples
    run(60, 3);
    checks++;
    if (jumps < 2 || spr_state.sel != 4'sd4) begin failures++; $display("jumps %0d", jumps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
