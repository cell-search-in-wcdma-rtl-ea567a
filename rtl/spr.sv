// Sample point reordering (SPR).
//
// Compensates the clock drift of the ADC, assumed known per frequency bin, by dropping
// or stuffing single samples. Samples enter a tapped delay line of 2*HALF+1 taps; the
// output multiplexer normally takes the centre tap (selection 0). A reordering
// controller adds the bin's drift (a signed fraction of a sample per input sample) to
// an accumulator; each time the accumulator passes +1 sample the selection moves one
// tap towards the newer end, so one sample is skipped (dropped), and each time it
// passes -1 the selection moves one tap towards the older end, so one sample is
// repeated (stuffed). The selection saturates at +-HALF. When disabled the selection
// is held at 0 and the block is a fixed HALF-sample delay.
//
// The tapped line, multiplexer and controller follow the engine's preprocessing
// block; the fixed-point drift accumulator, the number of taps and the load port
// (used to continue a trial's reordering state in a later stage) are this design's.
//
// Timing: one output per input strobe, registered in the cycle after the strobe; at
// selection 0 the output taken at strobe n is the sample of strobe n-HALF. HALF
// should be even so that the delay is a whole number of chips at two samples per
// chip.
module spr
  import cse_pkg::*;
#(
  parameter int unsigned HALF = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         enable,
  input  logic signed [SPR_FRAC_W-1:0] drift,
  input  logic                         restart,
  input  logic                         load,
  input  spr_state_t                   load_state,
  input  logic                         in_valid,
  input  iq_t                          in_s,
  output logic                         out_valid,
  output iq_t                          out_s,
  output spr_state_t                   state
);
  localparam int unsigned NTAP = 2*HALF + 1;
  localparam logic signed [SPR_FRAC_W+1:0] ONE = (SPR_FRAC_W+2)'(1) <<< SPR_FRAC_W;

  localparam logic signed [SPR_SEL_W-1:0] SMAX = SPR_SEL_W'(HALF);
  localparam logic signed [SPR_SEL_W-1:0] SMIN = -SMAX;

  iq_t taps [NTAP];               // taps[0] = current input, taps[t] = t strobes ago
  iq_t line [NTAP-1];             // storage behind taps[1..]
  logic signed [SPR_SEL_W-1:0] sel;
  logic signed [SPR_FRAC_W:0]  frac;
  logic signed [SPR_FRAC_W+1:0] acc_next;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      line[0] <= in_s;
      for (int t = 1; t < NTAP-1; t++) line[t] <= line[t-1];
    end
  end

  always_comb begin
    taps[0] = in_s;
    for (int t = 1; t < NTAP; t++) taps[t] = line[t-1];
  end

  assign acc_next = (SPR_FRAC_W+2)'(frac) + (SPR_FRAC_W+2)'(drift);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel  <= '0;
      frac <= '0;
    end else if (restart || !enable) begin
      sel  <= '0;
      frac <= '0;
    end else if (load) begin
      sel  <= load_state.sel;
      frac <= load_state.frac;
    end else if (in_valid) begin
      if (acc_next >= ONE) begin
        if (sel < SMAX) begin
          sel  <= sel + 1'b1;
          frac <= (SPR_FRAC_W+1)'(acc_next - ONE);
        end else begin
          frac <= (SPR_FRAC_W+1)'(ONE - 1);
        end
      end else if (acc_next <= -ONE) begin
        if (sel > SMIN) begin
          sel  <= sel - 1'b1;
          frac <= (SPR_FRAC_W+1)'(acc_next + ONE);
        end else begin
          frac <= -(SPR_FRAC_W+1)'(ONE - 1);
        end
      end else begin
        frac <= (SPR_FRAC_W+1)'(acc_next);
      end
    end
  end

  // Output tap HALF-sel: the selection in force when the sample is taken.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_s     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_s <= taps[HALF - int'(sel)];
    end
  end

  assign state = '{sel: sel, frac: frac};

  initial assert (HALF < (1 << (SPR_SEL_W-1))) else $error("HALF too large for SPR_SEL_W");
endmodule
