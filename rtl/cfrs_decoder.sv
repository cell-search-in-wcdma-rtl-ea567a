// Comma-free Reed-Solomon (CFRS) decoder of stage 2.
//
// Finds the code group and the frame timing from the 15 hard-decided SSC symbols of
// one frame. Every one of the N_GROUPS code words is tried at all CW_LEN cyclic
// shifts (64 x 15 = 960 hypotheses); the score of hypothesis (g, s) is the number of
// positions k where the received symbol rx[k] equals cw_g[(k+s) mod 15], i.e. 15
// minus the Hamming distance. Because no cyclic shift of a code word is another code
// word, the best (g, s) gives the code group g_hat and the slot number s_hat of the
// first received symbol within the frame.
//
// Architecture: a 1 x 15 systolic array. The received symbols sit in a 15-entry ring
// that rotates by one position per cycle; processing element s compares its ring tap
// with the code-word symbol broadcast that cycle and counts matches for shift s. One
// code word takes 15 cycles; at its end a comparator tree picks the best of the 15
// counters and updates the running maximum. The code-word table (64 x 15 symbols of
// 4 bits) is the air-interface standard's and is held in a writable register file,
// loaded through the cb_* port before use.
//
// The 1 x 15 systolic decoder and the 960-hypothesis search follow the engine's
// stage-2 design; the ring organisation, the table port and the tie rule (the first
// hypothesis found keeps the lead) are this design's.
//
// Timing: start latches rx_syms; done pulses N_GROUPS*15 + 1 cycles later with
// g_hat, s_hat and score, held until the next done.
module cfrs_decoder
#(
  parameter int unsigned N_GROUPS = 64,
  parameter int unsigned CW_LEN   = 15
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           cb_we,
  input  logic [$clog2(N_GROUPS)-1:0]    cb_group,
  input  logic [3:0]                     cb_pos,
  input  logic [3:0]                     cb_sym,
  input  logic                           start,
  input  logic [CW_LEN-1:0][3:0]         rx_syms,
  output logic                           busy,
  output logic                           done,
  output logic [$clog2(N_GROUPS)-1:0]    g_hat,
  output logic [3:0]                     s_hat,
  output logic [3:0]                     score
);
  localparam int unsigned GW = $clog2(N_GROUPS);

  logic [3:0] cb [N_GROUPS*CW_LEN];

  always_ff @(posedge clk) begin
    if (cb_we) cb[int'(cb_group)*CW_LEN + int'(cb_pos)] <= cb_sym;
  end

  logic [3:0]    ring [CW_LEN];
  logic [3:0]    cnt  [CW_LEN];
  logic [GW-1:0] g;
  logic [3:0]    i;
  logic [3:0]    sym;
  logic [3:0]    pe_next [CW_LEN];
  logic [3:0]    cw_best;
  logic [3:0]    cw_best_s;

  assign sym = cb[int'(g)*CW_LEN + int'(i)];

  always_comb begin
    for (int s = 0; s < CW_LEN; s++)
      pe_next[s] = cnt[s] + 4'(ring[(CW_LEN - s) % CW_LEN] == sym);
    cw_best   = pe_next[0];
    cw_best_s = '0;
    for (int s = 1; s < CW_LEN; s++)
      if (pe_next[s] > cw_best) begin
        cw_best   = pe_next[s];
        cw_best_s = 4'(s);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      g     <= '0;
      i     <= '0;
      g_hat <= '0;
      s_hat <= '0;
      score <= '0;
      for (int s = 0; s < CW_LEN; s++) begin
        ring[s] <= '0;
        cnt[s]  <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        g     <= '0;
        i     <= '0;
        score <= '0;
        g_hat <= '0;
        s_hat <= '0;
        for (int s = 0; s < CW_LEN; s++) begin
          ring[s] <= rx_syms[s];
          cnt[s]  <= '0;
        end
      end else if (busy) begin
        for (int s = 0; s < CW_LEN; s++) ring[s] <= ring[(s+1) % CW_LEN];
        if (i == 4'(CW_LEN-1)) begin
          for (int s = 0; s < CW_LEN; s++) cnt[s] <= '0;
          if ((g == '0) || (cw_best > score)) begin
            score <= cw_best;
            g_hat <= g;
            s_hat <= cw_best_s;
          end
          i <= '0;
          if (g == GW'(N_GROUPS-1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            g <= g + 1'b1;
          end
        end else begin
          for (int s = 0; s < CW_LEN; s++) cnt[s] <= pe_next[s];
          i <= i + 1'b1;
        end
      end
    end
  end
endmodule
