// Self-checking testbench for egc: random 4-bit chips; once 256 chips have entered,
// every output must equal the direct 256-term correlation sum_k PSC(k) x(t-255+k),
// computed from the PSC chip definition. Also checks the two-cycle latency and
// full-scale inputs matched and anti-matched to the PSC (outputs near +-2048).
module tb_egc;
  import cse_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [3:0] x = '0;
  logic signed [12:0] y;
  logic out_valid;
  int checks = 0, failures = 0;
  int hist [$];

  egc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input int v);
    int e;
    @(negedge clk);
    in_valid = 1; x = 4'(v);
    hist.push_back(v);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (out_valid) failures++;            // not yet: two-cycle latency
    @(negedge clk);
    if (hist.size() >= 256) begin
      e = 0;
      for (int k = 0; k < 256; k++)
        e += (psc_neg(k) ? -1 : 1) * hist[hist.size() - 256 + k];
      checks++;
      if (!out_valid || int'(y) != e) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d expected %0d", hist.size(), y, e);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (700) push($urandom_range(15) - 8);
    for (int k = 0; k < 256; k++) push(psc_neg(k) ? 7 : -8);
    for (int k = 0; k < 256; k++) push(psc_neg(k) ? -8 : 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
