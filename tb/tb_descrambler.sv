// Self-checking testbench for descrambler: random chips and random code chips over
// several 256-chip symbols (and one short 5-chip symbol); each symbol energy must
// equal |sum r(i) conj(c(i))|^2 computed directly, two cycles after the last chip.
module tb_descrambler;
  import cse_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, code_i = 0, code_q = 0, first = 0, last = 0;
  iq_t chip = '0;
  logic e_valid;
  logic [27:0] energy;
  int checks = 0, failures = 0;

  descrambler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic symbol(input int len, input int bias);
    int ai = 0, aq = 0, ri, rq, ci, cq;
    longint e;
    for (int n = 0; n < len; n++) begin
      @(negedge clk);
      ri = $urandom_range(15) - 8; rq = $urandom_range(15) - 8;
      code_i = $urandom_range(1); code_q = $urandom_range(1);
      if (bias == -8) begin ri = -8; rq = -8; code_i = 1; code_q = 1; end
      else if (bias != 0) begin ri = code_i ? -bias : bias; rq = code_q ? -bias : bias; end
      ci = code_i ? -1 : 1; cq = code_q ? -1 : 1;
      ai += ri * ci + rq * cq;
      aq += rq * ci - ri * cq;
      in_valid = 1; chip = '{i: sample_t'(ri), q: sample_t'(rq)};
      first = (n == 0); last = (n == len - 1);
      @(negedge clk);
      in_valid = 0; first = 0; last = 0;
    end
    @(negedge clk);
    e = longint'(ai) * ai + longint'(aq) * aq;
    checks++;
    if (!e_valid || longint'(energy) != e) begin failures++; $display("energy %0d expected %0d", energy, e); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (6) symbol(256, 0);
    symbol(256, -8);       // largest magnitude: every chip -8 against a -1 code chip
    symbol(5, 0);
    symbol(256, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
