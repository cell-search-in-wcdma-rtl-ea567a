// Self-checking testbench for s1_ram at its full 2560 x 16 size: writes every field
// with a known pattern, reads all back with one cycle of read latency, then checks
// read-during-write returns the old contents.
module tb_s1_ram;
  localparam int DEPTH = 2560, W = 16, AW = 12;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  int checks = 0, failures = 0;

  s1_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [W-1:0] pat(input int a, input int r);
    return W'(a * 40503 + r * 977 + 11);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = pat(a, 0);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); raddr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== pat(a, 0)) begin failures++; $display("addr %0d: %h", a, rdata); end
    end
    // read during write of the same address returns the old word
    @(negedge clk); we = 1; waddr = 12'd77; wdata = pat(77, 1); raddr = 12'd77;
    @(posedge clk); #1;
    checks++; if (rdata !== pat(77, 0)) failures++;
    @(negedge clk); we = 0;
    @(posedge clk); #1;
    checks++; if (rdata !== pat(77, 1)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
