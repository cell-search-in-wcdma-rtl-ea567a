// Self-checking testbench for cfrs_decoder. A pseudo-random 64 x 15 code-word table
// is loaded; the received symbols are code word g read from slot s on, with a few
// symbols corrupted. The decoder must return g and s, a score of 15 minus the
// corruptions, and finish in 64*15+1 cycles. Several (g, s) pairs are tried,
// including the first and last code word and shift 0 and 14.
module tb_cfrs_decoder;
  import cse_tb_pkg::*;
  logic clk = 0, rst_n = 0, cb_we = 0, start = 0;
  logic [5:0] cb_group = '0;
  logic [3:0] cb_pos = '0, cb_sym = '0;
  logic [14:0][3:0] rx_syms = '0;
  logic busy, done;
  logic [5:0] g_hat;
  logic [3:0] s_hat, score;
  int checks = 0, failures = 0;

  cfrs_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic trial(input int g, input int s, input int nerr);
    int cyc;
    for (int k = 0; k < 15; k++) rx_syms[k] = cw_sym(g, (k + s) % 15);
    for (int e = 0; e < nerr; e++) rx_syms[(3 * e + 1) % 15] = rx_syms[(3 * e + 1) % 15] + 4'd7;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 4;
    if (int'(g_hat) != g) begin failures++; $display("g_hat %0d expected %0d", g_hat, g); end
    if (int'(s_hat) != s) begin failures++; $display("s_hat %0d expected %0d", s_hat, s); end
    if (int'(score) != 15 - nerr) begin failures++; $display("score %0d", score); end
    if (cyc != 64 * 15 + 1) begin failures++; $display("took %0d cycles", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 64; g++)
      for (int n = 0; n < 15; n++) begin
        @(negedge clk);
        cb_we = 1; cb_group = 6'(g); cb_pos = 4'(n); cb_sym = cw_sym(g, n);
      end
    @(negedge clk); cb_we = 0;
    trial(0, 0, 0);
    trial(63, 14, 0);
    trial(17, 5, 3);
    trial(42, 9, 5);
    trial(5, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
