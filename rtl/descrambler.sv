// One CPICH de-scrambler of stage 3.
//
// Multiplies each received chip r = rI + j rQ by the conjugate of the candidate's
// scrambling-code chip c = cI + j cQ (cI, cQ = +-1):
//   dI = rI cI + rQ cQ,   dQ = rQ cI - rI cQ        (two adders per chip)
// accumulates dI and dQ coherently over one 256-chip CPICH symbol (two adders per
// chip), and at the end of the symbol combines them noncoherently as
// energy = accI^2 + accQ^2 (two squarers, one adder), the squared form of eq. (3).
//
// Follows the engine's stage-3 de-scrambler (complex de-spreading and noncoherent
// combining); exact squares and the accumulator width are this design's.
//
// Interface and timing: code_i/code_q are sign bits (1 means -1). first marks the
// first chip of a symbol (the accumulator restarts), last its final chip; e_valid
// pulses two cycles after the last chip with energy.
module descrambler
  import cse_pkg::*;
#(
  parameter int unsigned ACC_W = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  iq_t                  chip,
  input  logic                 code_i,
  input  logic                 code_q,
  input  logic                 first,
  input  logic                 last,
  output logic                 e_valid,
  output logic [2*ACC_W-1:0]   energy
);
  logic signed [ACC_W-1:0] ri, rq, di, dq, acc_i, acc_q, fin_i, fin_q;
  logic                    fin_v;

  assign ri = ACC_W'(chip.i);
  assign rq = ACC_W'(chip.q);
  assign di = (code_i ? -ri : ri) + (code_q ? -rq : rq);
  assign dq = (code_i ? -rq : rq) - (code_q ? -ri : ri);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i   <= '0;
      acc_q   <= '0;
      fin_i   <= '0;
      fin_q   <= '0;
      fin_v   <= 1'b0;
      e_valid <= 1'b0;
      energy  <= '0;
    end else begin
      fin_v   <= 1'b0;
      e_valid <= fin_v;
      if (in_valid) begin
        acc_i <= (first ? '0 : acc_i) + di;
        acc_q <= (first ? '0 : acc_q) + dq;
        if (last) begin
          fin_i <= (first ? '0 : acc_i) + di;
          fin_q <= (first ? '0 : acc_q) + dq;
          fin_v <= 1'b1;
        end
      end
      if (fin_v) energy <= (2*ACC_W)'(fin_i * fin_i) + (2*ACC_W)'(fin_q * fin_q);
    end
  end
endmodule
