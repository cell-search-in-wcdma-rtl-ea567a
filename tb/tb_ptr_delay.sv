// Self-checking testbench for ptr_delay: random words with random enable gaps; after
// the line has filled, every output must equal the word written DEPTH advances ago.
module tb_ptr_delay;
  localparam int W = 13, DEPTH = 37;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  ptr_delay #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      din = W'($urandom);
      if (en) begin
        if (hist.size() >= DEPTH) begin
          checks++;
          if (dout !== hist[hist.size()-DEPTH]) begin
            failures++;
            $display("mismatch at %0d: %h vs %h", n, dout, hist[hist.size()-DEPTH]);
          end
        end
        hist.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
