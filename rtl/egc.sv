// PSC de-spreader for one branch (I or Q): hierarchical matched filter with an
// efficient Golay correlator (EGC).
//
// The 256-chip primary synchronisation code is hierarchical: PSC(16i+j) = o(i) a(j)
// with two 16-chip sequences a and o. The correlator therefore works in two levels.
// The first level matches a with a 16-tap filter (15 adders, coefficients +-1). The
// second level matches o on the first level's output with taps spaced 16 chips
// apart; o is a Golay sequence, so this level is a 4-stage Golay correlator: stage n
// forms a_n = a_(n-1) + w_n b_(n-1)(t - 16 D_n) and b_n = a_(n-1) - w_n b_(n-1)(t - 16 D_n)
// with D = (2,1,4,8) and w = (-1,+1,-1,-1), seven adders in all. The delays are
// pointer-based FIFO buffers (ptr_delay). The output y(t) = sum_k PSC(k) x(t-255+k) is
// the correlation over the last 256 chips, the value of eq. (1) before the magnitude.
//
// Using a Golay correlator in place of a 256-tap matched filter follows the engine's
// stage-1 design; splitting off the base sequence into a direct 16-tap filter is this
// design's, because the base sequence used here has no power-of-two Golay structure.
//
// Timing: in_valid with x; out_valid two cycles later with y. Outputs are valid once
// 256 chips have been shifted in.
module egc
  import cse_pkg::*;
#(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 13
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);
  localparam int unsigned NST = 4;
  localparam int unsigned D [NST] = '{2, 1, 4, 8};
  localparam logic        WNEG [NST] = '{1'b1, 1'b0, 1'b1, 1'b1};

  // ---- level 1: 16-tap matched filter for a (taps reversed: tap j uses a(15-j))
  logic signed [IN_W-1:0]  hist [15];   // hist[0] = previous chip
  logic signed [OUT_W-1:0] y1_c, y1_r;
  logic                    v1;

  always_comb begin
    y1_c = a_neg(15) ? -OUT_W'(x) : OUT_W'(x);
    for (int j = 1; j < 16; j++)
      y1_c += a_neg(15-j) ? -OUT_W'(hist[j-1]) : OUT_W'(hist[j-1]);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      hist[0] <= x;
      for (int j = 1; j < 15; j++) hist[j] <= hist[j-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      y1_r <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) y1_r <= y1_c;
    end
  end

  // ---- level 2: Golay correlator for o on the 16-spaced stream
  logic signed [OUT_W-1:0] sa [NST+1];
  logic signed [OUT_W-1:0] sb [NST+1];
  logic signed [OUT_W-1:0] bd [NST];

  assign sa[0] = y1_r;
  assign sb[0] = y1_r;

  for (genvar n = 0; n < NST; n++) begin : g_stage
    ptr_delay #(.W(OUT_W), .DEPTH(16*D[n])) u_dl (
      .clk, .rst_n, .en(v1), .din(sb[n]), .dout(bd[n]));
    assign sa[n+1] = WNEG[n] ? sa[n] - bd[n] : sa[n] + bd[n];
    assign sb[n+1] = WNEG[n] ? sa[n] + bd[n] : sa[n] - bd[n];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= v1;
      if (v1) y <= sa[NST];
    end
  end
endmodule
