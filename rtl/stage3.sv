// Stage 3: scrambling-code identification by majority vote.
//
// From the frame boundary fb_pos found by stage 2, the CPICH is de-spread in
// parallel by eight de-scramblers, one per scrambling code of the identified group.
// After every 256-chip symbol a comparator tree picks the code with the largest
// energy and its vote counter is incremented. After N_SYM symbols (150, one frame)
// the code with the most votes is compared with the threshold: if its count exceeds
// the threshold, found is raised and k_hat names the code; otherwise the trial ends
// without a result and a later trial tries again.
//
// The eight parallel de-scramblers, comparators, vote counters and the threshold
// test follow the engine's stage-3 module. Ties go to the lower code number. The
// scrambling codes themselves come from outside: for the chip being processed, the
// engine presents the group (scr_group) and the chip index in the frame (scr_idx),
// and the eight code chips of that group must be returned in the same cycle on
// scr_code_i/scr_code_q (sign bits, 1 means -1).
//
// Interface and timing: start (while not busy) latches fb_pos and the group; the
// first symbol begins at the next chip whose frame_pos equals fb_pos. done pulses
// three cycles after the last chip of symbol N_SYM with found, k_hat and votes.
module stage3
  import cse_pkg::*;
#(
  parameter int unsigned SLOT_LEN = 2560,
  parameter int unsigned N_SYM    = SLOT_LEN*FRAME_SLOTS/SYM_LEN,
  parameter int unsigned FPOS_W   = $clog2(SLOT_LEN*FRAME_SLOTS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                chip_valid,
  input  iq_t                 chip,
  input  logic [FPOS_W-1:0]   frame_pos,
  input  logic                start,
  input  logic [FPOS_W-1:0]   fb_pos,
  input  logic [5:0]          group,
  input  logic [7:0]          threshold,
  output logic [5:0]          scr_group,
  output logic [FPOS_W-1:0]   scr_idx,
  input  logic [N_CODES-1:0]  scr_code_i,
  input  logic [N_CODES-1:0]  scr_code_q,
  output logic                busy,
  output logic                done,
  output logic                found,
  output logic [2:0]          k_hat,
  output logic [7:0]          votes
);
  localparam int unsigned EW = 28;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RUN, S_DECIDE} st_t;
  st_t st;

  logic [FPOS_W-1:0] fb_r, idx;
  logic [7:0]        m;                 // symbols voted so far
  logic [7:0]        vcnt [N_CODES];
  logic              run_chip, first, last;
  logic [N_CODES-1:0] ev;
  logic [EW-1:0]     en [N_CODES];
  logic [2:0]        win;
  logic [2:0]        vk;
  logic [7:0]        vmax;

  assign run_chip  = chip_valid && ((st == S_WAIT && frame_pos == fb_r) || st == S_RUN);
  assign first     = (st == S_WAIT) || (idx[7:0] == 8'd0);
  assign last      = (st == S_RUN) && (idx[7:0] == 8'd255);
  assign scr_idx   = (st == S_RUN) ? idx : '0;

  for (genvar n = 0; n < N_CODES; n++) begin : g_ds
    descrambler #(.ACC_W(14)) u_ds (
      .clk, .rst_n, .in_valid(run_chip), .chip, .code_i(scr_code_i[n]), .code_q(scr_code_q[n]),
      .first, .last, .e_valid(ev[n]), .energy(en[n]));
  end

  // comparator tree over the eight energies
  always_comb begin
    win = '0;
    for (int n = 1; n < N_CODES; n++)
      if (en[n] > en[win]) win = 3'(n);
  end

  // largest vote count
  always_comb begin
    vk   = '0;
    vmax = vcnt[0];
    for (int n = 1; n < N_CODES; n++)
      if (vcnt[n] > vmax) begin
        vmax = vcnt[n];
        vk   = 3'(n);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      fb_r      <= '0;
      idx       <= '0;
      m         <= '0;
      scr_group <= '0;
      done      <= 1'b0;
      found     <= 1'b0;
      k_hat     <= '0;
      votes     <= '0;
      for (int n = 0; n < N_CODES; n++) vcnt[n] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          fb_r      <= fb_pos;
          scr_group <= group;
          st        <= S_WAIT;
        end
        S_WAIT: if (run_chip) begin
          idx <= FPOS_W'(1);
          m   <= '0;
          for (int n = 0; n < N_CODES; n++) vcnt[n] <= '0;
          st  <= S_RUN;
        end
        S_RUN: if (run_chip) begin
          idx <= idx + 1'b1;
          if (idx == FPOS_W'(N_SYM*SYM_LEN-1)) st <= S_DECIDE;
        end
        S_DECIDE: if (m == 8'(N_SYM)) begin
          done  <= 1'b1;
          found <= (vmax > threshold);
          k_hat <= vk;
          votes <= vmax;
          st    <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
      if (ev[0]) begin
        vcnt[win] <= vcnt[win] + 1'b1;
        m         <= m + 1'b1;
      end
    end
  end

  assign busy = (st != S_IDLE);

  // All de-scramblers finish a symbol together.
  assert property (@(posedge clk) disable iff (!rst_n) ev[0] |-> &ev);
endmodule
