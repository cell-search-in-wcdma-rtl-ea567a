// Stage 2: frame synchronisation and code-group identification.
//
// Starting at the slot boundary h_hat found by stage 1, the 256 chips at the start of
// each of 15 consecutive slots are de-spread on both branches with the 16 secondary
// synchronisation codes and with the PSC (34 accumulators, coefficients +-1). The
// PSC correlation is the phase reference: for each SSC j the coherent combination
//   z_j = yI_PSC * yI_SSCj + yQ_PSC * yQ_SSCj        (eq. 2)
// is formed, truncated by TRUNC (10) bits, and the largest z_j is the hard decision
// for that slot's SSC symbol. One multiplier pair is shared by the 16 codes, which
// are combined one per cycle after the 256-chip window. After 15 slots the symbols
// go to the CFRS decoder, which returns the code group g_hat and the frame slot of
// the first received symbol; the frame boundary position fb_pos (on the chip timer's
// frame count) follows from the first window's start time.
//
// De-spreading at the slot boundary, coherent combining with the PSC phase reference,
// the 10-bit truncation, per-slot hard decision and CFRS decoding follow the engine's
// stage-2 module; the shared multiplier pair and the PSC reference correlator inside
// this module are this design's. SSC number j stands for code-word symbol j (0..15).
//
// Interface and timing: start (while not busy) latches h_hat; the first window opens
// at the next chip whose slot_pos equals h_hat. done pulses after the 15th slot's
// window, the combination and 961 decoder cycles, with g_hat, s_hat, fb_pos, score.
module stage2
  import cse_pkg::*;
#(
  parameter int unsigned SLOT_LEN = 2560,
  parameter int unsigned TRUNC    = 10,
  parameter int unsigned POS_W    = $clog2(SLOT_LEN),
  parameter int unsigned FPOS_W   = $clog2(SLOT_LEN*FRAME_SLOTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              chip_valid,
  input  iq_t               chip,
  input  logic [POS_W-1:0]  slot_pos,
  input  logic [FPOS_W-1:0] frame_pos,
  input  logic              start,
  input  logic [POS_W-1:0]  h_hat,
  input  logic              cb_we,
  input  logic [5:0]        cb_group,
  input  logic [3:0]        cb_pos,
  input  logic [3:0]        cb_sym,
  output logic              busy,
  output logic              done,
  output logic [5:0]        g_hat,
  output logic [3:0]        s_hat,
  output logic [FPOS_W-1:0] fb_pos,
  output logic [3:0]        score
);
  localparam int unsigned YW = 13;
  localparam int unsigned ZW = 2*YW + 1;
  localparam int unsigned TW = ZW - TRUNC;
  localparam int unsigned FRAME_LEN = SLOT_LEN * FRAME_SLOTS;

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_ACC, S_COMB, S_DEC} st_t;
  st_t st;

  logic [POS_W-1:0]          h_r;
  logic [FPOS_W-1:0]         t0;
  logic [7:0]                c;          // chip within window
  logic [3:0]                k;          // slot within the frame being collected
  logic [3:0]                j;          // SSC being combined
  logic signed [YW-1:0]      ssc_i [N_SSC];
  logic signed [YW-1:0]      ssc_q [N_SSC];
  logic signed [YW-1:0]      psc_i, psc_q;
  logic signed [ZW-1:0]      z;
  logic signed [TW-1:0]      zt, zmax;
  logic [3:0]                zarg;
  logic [FRAME_SLOTS-1:0][3:0] syms;
  logic                      dec_start, dec_done, dec_busy;
  logic [5:0]                dec_g;
  logic [3:0]                dec_s, dec_score;
  logic                      open_now;

  assign open_now = chip_valid && (slot_pos == h_r);

  function automatic logic signed [YW-1:0] sacc(input logic first, input logic signed [YW-1:0] a,
                                                input sample_t x, input logic neg);
    logic signed [YW-1:0] base, v;
    base = first ? '0 : a;
    v    = neg ? -YW'(x) : YW'(x);
    return base + v;
  endfunction

  // ---- correlators
  always_ff @(posedge clk) begin
    if ((st == S_WAIT && open_now) || (st == S_ACC && chip_valid)) begin
      for (int n = 0; n < N_SSC; n++) begin
        ssc_i[n] <= sacc(st == S_WAIT, ssc_i[n], chip.i, ssc_neg(n, int'(c)));
        ssc_q[n] <= sacc(st == S_WAIT, ssc_q[n], chip.q, ssc_neg(n, int'(c)));
      end
      psc_i <= sacc(st == S_WAIT, psc_i, chip.i, psc_neg(int'(c)));
      psc_q <= sacc(st == S_WAIT, psc_q, chip.q, psc_neg(int'(c)));
    end
  end

  // ---- coherent combiner (one multiplier pair, one SSC per cycle)
  assign z  = ZW'(psc_i * ssc_i[j]) + ZW'(psc_q * ssc_q[j]);
  assign zt = TW'(z >>> TRUNC);

  // ---- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      h_r       <= '0;
      t0        <= '0;
      c         <= '0;
      k         <= '0;
      j         <= '0;
      zmax      <= '0;
      zarg      <= '0;
      syms      <= '0;
      dec_start <= 1'b0;
      done      <= 1'b0;
      g_hat     <= '0;
      s_hat     <= '0;
      fb_pos    <= '0;
      score     <= '0;
    end else begin
      dec_start <= 1'b0;
      done      <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          h_r <= h_hat;
          k   <= '0;
          st  <= S_WAIT;
        end
        S_WAIT: if (open_now) begin
          if (k == '0) t0 <= frame_pos;
          c  <= 8'd1;
          st <= S_ACC;
        end
        S_ACC: if (chip_valid) begin
          c <= c + 1'b1;
          if (c == 8'(PSC_LEN-1)) begin
            j  <= '0;
            st <= S_COMB;
          end
        end
        S_COMB: begin
          if (j == '0 || zt > zmax) begin
            zmax <= zt;
            zarg <= j;
          end
          j <= j + 1'b1;
          if (j == 4'(N_SSC-1)) begin
            syms[k] <= (j == '0 || zt > zmax) ? j : zarg;
            k <= k + 1'b1;
            if (k == 4'(FRAME_SLOTS-1)) begin
              dec_start <= 1'b1;
              st        <= S_DEC;
            end else begin
              st <= S_WAIT;
            end
          end
        end
        S_DEC: if (dec_done) begin
          g_hat  <= dec_g;
          s_hat  <= dec_s;
          score  <= dec_score;
          fb_pos <= FPOS_W'((int'(t0) + FRAME_LEN - int'(dec_s) * SLOT_LEN) % FRAME_LEN);
          done   <= 1'b1;
          st     <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  cfrs_decoder #(.N_GROUPS(N_GROUPS), .CW_LEN(FRAME_SLOTS)) u_cfrs (
    .clk, .rst_n, .cb_we, .cb_group, .cb_pos, .cb_sym,
    .start(dec_start), .rx_syms(syms), .busy(dec_busy), .done(dec_done),
    .g_hat(dec_g), .s_hat(dec_s), .score(dec_score));

  // The decoder is only started when idle.
  assert property (@(posedge clk) disable iff (!rst_n) dec_start |-> !dec_busy);
endmodule
