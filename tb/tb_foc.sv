// Self-checking testbench for foc. The register file is loaded with one cycle of
// cos/sin at 64 phases (31*cos(2 pi a/64), 31*sin(2 pi a/64)); random chips are
// rotated with a running phase and compared with a reference computed from the
// integer complex product, rounded and saturated. Also checks bypass, restart of the
// phase, a table refresh, and the one-cycle latency.
module tb_foc;
  import cse_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, restart = 0, lut_we = 0, in_valid = 0;
  logic signed [PH_W-1:0] phase_step = '0;
  logic [LUT_AW-1:0] lut_addr = '0;
  logic signed [COEF_W-1:0] lut_cos = '0, lut_sin = '0;
  iq_t in_s = '0, out_s;
  logic out_valid;
  int checks = 0, failures = 0;
  int cos_m [64], sin_m [64];
  int ph = 0;

  foc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rsat(input int v);
    int r;
    r = (v + 16) >>> 5;
    if (r > 7) r = 7;
    if (r < -8) r = -8;
    return r;
  endfunction

  task automatic load_lut(input real scale);
    for (int a = 0; a < 64; a++) begin
      cos_m[a] = $rtoi($floor(scale * $cos(2.0 * 3.14159265358979 * a / 64.0) + 0.5));
      sin_m[a] = $rtoi($floor(scale * $sin(2.0 * 3.14159265358979 * a / 64.0) + 0.5));
      @(negedge clk);
      lut_we = 1; lut_addr = LUT_AW'(a); lut_cos = COEF_W'(cos_m[a]); lut_sin = COEF_W'(sin_m[a]);
    end
    @(negedge clk); lut_we = 0;
  endtask

  task automatic chip(input int i, input int q);
    int a, ei, eq;
    @(negedge clk);
    in_valid = 1; in_s = '{i: sample_t'(i), q: sample_t'(q)};
    a  = (ph >> 10) & 63;
    ei = enable ? rsat(i * cos_m[a] - q * sin_m[a]) : i;
    eq = enable ? rsat(i * sin_m[a] + q * cos_m[a]) : q;
    if (enable) ph = (ph + int'(phase_step)) & 16'hFFFF;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || int'(out_s.i) != ei || int'(out_s.q) != eq) begin
      failures++;
      if (failures < 10) $display("in (%0d,%0d) idx %0d: got (%0d,%0d) expected (%0d,%0d)", i, q, a, out_s.i, out_s.q, ei, eq);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_lut(31.0);
    enable = 0;
    repeat (20) chip($urandom_range(15) - 8, $urandom_range(15) - 8);
    enable = 1; phase_step = 16'sd1234;
    repeat (300) chip($urandom_range(15) - 8, $urandom_range(15) - 8);
    phase_step = -16'sd205;
    repeat (300) chip($urandom_range(15) - 8, $urandom_range(15) - 8);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0; ph = 0;
    load_lut(-20.0);   // refresh the table
    repeat (100) chip($urandom_range(15) - 8, $urandom_range(15) - 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
