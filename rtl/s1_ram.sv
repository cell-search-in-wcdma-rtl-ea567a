// Stage-1 accumulation memory (the 5.12-kB register file).
//
// DEPTH fields of W bits, one per slot-boundary hypothesis: 2560 x 16 bits by default.
// Written as a plain synchronous array with one write port and one read port so that
// a synthesis flow maps it onto an embedded SRAM. The read data appears one clock
// after raddr (registered read); a write takes effect at the clock edge. Reading and
// writing the same address in one cycle returns the old contents. No reset: every
// field is written before it is read in each dwell.
module s1_ram #(
  parameter int unsigned DEPTH = 2560,
  parameter int unsigned W     = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
