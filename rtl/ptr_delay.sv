// Pointer-based FIFO delay line.
//
// Delays a stream of W-bit words by DEPTH advances. Instead of shifting every stage of
// a register chain on each advance (which toggles DEPTH*W flip-flops per chip), the
// words stay in place in a DEPTH-entry array and a single pointer walks around it: the
// word under the pointer is the oldest one, it is read out and overwritten by the new
// word, and the pointer moves on. This is the low-power de-spreader buffer the engine
// uses in its correlators; its organisation (one read/write pointer) is this design's.
//
// Interface: when en is high, din is stored and the pointer advances. dout shows,
// combinationally, the word stored DEPTH advances ago. Contents are not reset: the
// first DEPTH outputs after reset are whatever the array held.
module ptr_delay #(
  parameter int unsigned W     = 13,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ptr <= '0;
    else if (en)  ptr <= (ptr == AW'(DEPTH-1)) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  assign dout = mem[ptr];
endmodule
