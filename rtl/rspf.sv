// Random sample per frame (RSPF).
//
// Turns the 2x oversampled stream into one sample per chip. A delay element holds the
// first sample of each chip; when the second sample arrives a 2-to-1 multiplexer
// passes either the held first sample or the second one. The selection is redrawn at
// random at every frame start from a 16-bit LFSR, so successive frames use different
// sampling points within the chip; when disabled the selection is fixed to the first
// sample. A load pulse sets the selection directly instead, so that a later stage can
// keep the sampling point an earlier stage of the same trial used. The structure (delay element, 2:1 multiplexer, per-frame controller) follows
// the engine's preprocessing block; the LFSR and its seed are this design's.
//
// Interface and timing: in_valid marks each sample (7.68 MHz in the reference
// design); the chip phase is a toggle counted from reset. out_valid pulses one cycle
// after the second sample of each chip. A frame_start or load pulse changes the
// selection for the chips that follow it; load wins if both come together.
module rspf
  import cse_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic frame_start,
  input  logic load,
  input  logic load_sel,
  input  logic in_valid,
  input  iq_t  in_s,
  output logic out_valid,
  output iq_t  out_s,
  output logic sel
);
  logic [15:0] lfsr;
  logic        phase;   // 0: next sample is the first of a chip
  iq_t         held;
  logic        sel_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr  <= SEED;
      sel_r <= 1'b0;
    end else if (load) begin
      sel_r <= load_sel;
    end else if (frame_start) begin
      lfsr  <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      sel_r <= lfsr[15];
    end
  end

  assign sel = enable ? sel_r : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      held      <= '0;
      out_valid <= 1'b0;
      out_s     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          held <= in_s;
        end else begin
          out_valid <= 1'b1;
          out_s     <= sel ? in_s : held;
        end
      end
    end
  end
endmodule
