// Frequency offset compensation (FOC).
//
// Multiplies every chip r = rI + j rQ by e = cos + j sin of a phase that advances by
// phase_step each chip, i.e. by exp(j 2 pi i df Tc) for the bin's assumed offset df:
//   outI = rI cos - rQ sin,   outQ = rI sin + rQ cos
// using four multipliers and two adders. The cos/sin words are quantised and held in
// a 2^LUT_AW-entry register file, indexed by the top LUT_AW bits of the phase
// accumulator, and can be rewritten at any time through the write port (so the table
// can be refreshed for other conditions). Products are scaled back by 2^(COEF_W-1)
// with rounding and saturated to the 4-bit sample width.
//
// The complex multiplier, the register file and the bypass follow the engine's
// preprocessing block; the phase-accumulator indexing, the table size and the word
// widths are this design's. Timing: one registered cycle from in_valid to out_valid,
// also when bypassed (the input is then registered unchanged).
module foc
  import cse_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     restart,
  input  logic signed [PH_W-1:0]   phase_step,
  input  logic                     lut_we,
  input  logic [LUT_AW-1:0]        lut_addr,
  input  logic signed [COEF_W-1:0] lut_cos,
  input  logic signed [COEF_W-1:0] lut_sin,
  input  logic                     in_valid,
  input  iq_t                      in_s,
  output logic                     out_valid,
  output iq_t                      out_s
);
  localparam int unsigned PW = DATA_W + COEF_W + 1;   // sum of two products
  localparam int unsigned SH = COEF_W - 1;

  logic signed [COEF_W-1:0] cos_rf [1 << LUT_AW];
  logic signed [COEF_W-1:0] sin_rf [1 << LUT_AW];
  logic [PH_W-1:0]          phase;
  logic signed [COEF_W-1:0] c, s;
  logic signed [PW-1:0]     yi, yq;

  always_ff @(posedge clk) begin
    if (lut_we) begin
      cos_rf[lut_addr] <= lut_cos;
      sin_rf[lut_addr] <= lut_sin;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 phase <= '0;
    else if (restart)           phase <= '0;
    else if (in_valid && enable) phase <= phase + PH_W'(phase_step);
  end

  assign c  = cos_rf[phase[PH_W-1 -: LUT_AW]];
  assign s  = sin_rf[phase[PH_W-1 -: LUT_AW]];
  assign yi = PW'(in_s.i) * PW'(c) - PW'(in_s.q) * PW'(s);
  assign yq = PW'(in_s.i) * PW'(s) + PW'(in_s.q) * PW'(c);

  function automatic sample_t scale_sat(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + PW'(1 <<< (SH-1))) >>> SH;
    if (r > PW'(2**(DATA_W-1)-1))        return sample_t'(2**(DATA_W-1)-1);
    else if (r < -PW'(2**(DATA_W-1)))    return sample_t'(-(2**(DATA_W-1)));
    else                                  return sample_t'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_s     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (enable) out_s <= '{i: scale_sat(yi), q: scale_sat(yq)};
        else        out_s <= in_s;
      end
    end
  end
endmodule
