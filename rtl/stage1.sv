// Stage 1: slot synchronisation.
//
// For every chip the I and Q branches are correlated with the 256-chip PSC (two egc
// de-spreaders), combined noncoherently as yI^2 + yQ^2, and truncated to the most
// significant TRUNC bits (12 of 24). The result belongs to the slot-boundary
// hypothesis h = (slot_pos - 255) mod SLOT_LEN, where slot_pos is the chip timer's
// position within the slot of the chip that completed the 256-chip window. The
// truncated values are accumulated per hypothesis over N_SLOTS slots in the
// SLOT_LEN x 16-bit memory (s1_ram): the first slot of a dwell writes, later slots
// read, add and write back. During the last slot a peak detector keeps the largest
// accumulated value and its hypothesis; at the end of the dwell h_hat is the slot
// boundary candidate and peak its accumulated energy.
//
// The de-spreading, noncoherent combining, 12-bit truncation, 2560 x 16-bit memory
// and peak detection follow the engine's stage-1 module. Exact squares are used for
// the magnitude; ties in the peak search keep the earlier hypothesis.
//
// Interface and timing: start (one cycle, while not busy) begins a dwell with the
// next correlator output; a dwell consumes SLOT_LEN*N_SLOTS chips; done pulses one
// cycle with h_hat/peak valid, which hold until the next done. busy stays high until
// the cycle before done, so a new dwell cannot begin before the previous result is
// out (it may begin in the cycle of done). Chips must be at least
// two clock cycles apart (four at the 15.36-MHz reference clock).
module stage1
  import cse_pkg::*;
#(
  parameter int unsigned SLOT_LEN = 2560,
  parameter int unsigned N_SLOTS  = 15,
  parameter int unsigned TRUNC    = 12,
  parameter int unsigned POS_W    = $clog2(SLOT_LEN)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             chip_valid,
  input  iq_t              chip,
  input  logic [POS_W-1:0] slot_pos,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [POS_W-1:0] h_hat,
  output logic [15:0]      peak
);
  localparam int unsigned YW   = 13;
  localparam int unsigned EW   = 2*YW - 2;            // yI^2+yQ^2 <= 2^23: 24 bits
  localparam int unsigned PW   = EW - TRUNC;          // truncated partial result
  localparam int unsigned ACCW = 16;
  localparam int unsigned CNT_W = $clog2(SLOT_LEN*N_SLOTS + 1);

  logic                  yv, yv_q;
  logic signed [YW-1:0]  yi, yq;
  logic [POS_W-1:0]      pos_d1, pos_d2;
  logic [EW-1:0]         e;
  logic [POS_W-1:0]      h_c;

  egc #(.IN_W(DATA_W), .OUT_W(YW)) u_egc_i (.clk, .rst_n, .in_valid(chip_valid), .x(chip.i), .out_valid(yv), .y(yi));
  egc #(.IN_W(DATA_W), .OUT_W(YW)) u_egc_q (.clk, .rst_n, .in_valid(chip_valid), .x(chip.q), .out_valid(yv_q), .y(yq));

  // slot position travels with the chip through the two correlator cycles
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_d1 <= '0;
      pos_d2 <= '0;
    end else begin
      if (chip_valid) pos_d1 <= slot_pos;
      pos_d2 <= pos_d1;
    end
  end

  assign e   = EW'(yi * yi) + EW'(yq * yq);
  assign h_c = (pos_d2 >= POS_W'(PSC_LEN-1)) ? pos_d2 - POS_W'(PSC_LEN-1)
                                             : POS_W'(int'(pos_d2) + SLOT_LEN - (PSC_LEN-1));

  // ---- accumulation pipeline
  logic             p_valid, p_first, p_last_slot, p_end;
  logic [PW-1:0]    p_val;
  logic [POS_W-1:0] p_h;
  logic [CNT_W-1:0] cnt;
  logic             run;   // chips of the dwell still to be taken
  logic [ACCW-1:0]  rdata, acc_new;
  logic             take;

  assign take = yv && run;
  // busy covers the dwell and its last accumulation, up to the cycle before done
  assign busy = run || (p_valid && p_end);

  s1_ram #(.DEPTH(SLOT_LEN), .W(ACCW), .AW(POS_W)) u_ram (
    .clk, .we(p_valid), .waddr(p_h), .wdata(acc_new), .raddr(h_c), .rdata);

  assign acc_new = p_first ? ACCW'(p_val) : rdata + ACCW'(p_val);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run         <= 1'b0;
      cnt         <= '0;
      p_valid     <= 1'b0;
      p_first     <= 1'b0;
      p_last_slot <= 1'b0;
      p_end       <= 1'b0;
      p_val       <= '0;
      p_h         <= '0;
    end else begin
      p_valid <= take;
      if (start && !busy) begin
        run  <= 1'b1;
        cnt  <= '0;
      end else if (take) begin
        p_val       <= PW'(e >> TRUNC);
        p_h         <= h_c;
        p_first     <= (cnt < CNT_W'(SLOT_LEN));
        p_last_slot <= (cnt >= CNT_W'(SLOT_LEN*(N_SLOTS-1)));
        p_end       <= (cnt == CNT_W'(SLOT_LEN*N_SLOTS-1));
        cnt         <= cnt + 1'b1;
        if (cnt == CNT_W'(SLOT_LEN*N_SLOTS-1)) run <= 1'b0;
      end
    end
  end

  // ---- peak detector over the last slot
  logic             have_pk;
  logic [ACCW-1:0]  pk_val;
  logic [POS_W-1:0] pk_h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_pk <= 1'b0;
      pk_val  <= '0;
      pk_h    <= '0;
      done    <= 1'b0;
      h_hat   <= '0;
      peak    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) have_pk <= 1'b0;
      if (p_valid && p_last_slot) begin
        if (!have_pk || acc_new > pk_val) begin
          pk_val  <= acc_new;
          pk_h    <= p_h;
          have_pk <= 1'b1;
        end
        if (p_end) begin
          done  <= 1'b1;
          if (!have_pk || acc_new > pk_val) begin
            h_hat <= p_h;
            peak  <= acc_new;
          end else begin
            h_hat <= pk_h;
            peak  <= pk_val;
          end
        end
      end
    end
  end

  // The I and Q correlators run in lockstep.
  assert property (@(posedge clk) disable iff (!rst_n) yv == yv_q);
endmodule
