// Self-checking testbench for stage2 at a reduced slot length (512 chips; 15 slots
// per frame as always). The received chips carry PSC, SSC (code word of group g) and
// a CPICH, quantised to 4 bits, with the cell's frame boundary at chip `off`. Given
// the slot boundary, stage 2 must return the group g, the frame boundary position
// off mod 7680, and a full CFRS score of 15, within 16 slots plus decoding time.
// A second trial adds noise and another group and offset.
module tb_stage2;
  import cse_pkg::*;
  import cse_tb_pkg::*;
  localparam int SLOT = 512, FRAME = SLOT * 15;
  logic clk = 0, rst_n = 0, chip_valid = 0, start = 0, cb_we = 0;
  iq_t chip = '0;
  logic [8:0] slot_pos = '0, h_hat = '0;
  logic [12:0] frame_pos = '0;
  logic [5:0] cb_group = '0;
  logic [3:0] cb_pos = '0, cb_sym = '0;
  logic busy, done;
  logic [5:0] g_hat;
  logic [3:0] s_hat, score;
  logic [12:0] fb_pos;
  int checks = 0, failures = 0;
  int off = 3000, grp = 21, noise = 0;
  longint c = 0;

  stage2 #(.SLOT_LEN(SLOT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always begin
    real re, im;
    @(negedge clk);
    cell_chip(c, off, SLOT, grp, 3, 2.0, 0.7, 0.0, re, im);
    if (noise > 0) begin
      re += real'($urandom_range(2*noise)) - real'(noise);
      im += real'($urandom_range(2*noise)) - real'(noise);
    end
    chip_valid = 1;
    chip = '{i: quant(re), q: quant(im)};
    slot_pos = 9'(c % SLOT);
    frame_pos = 13'(c % FRAME);
    @(negedge clk); chip_valid = 0;
    @(negedge clk);
    @(negedge clk);
    c++;
  end

  task automatic trial();
    longint c0;
    @(negedge clk);
    h_hat = 9'(off % SLOT);
    start = 1;
    c0 = c;
    @(negedge clk); start = 0;
    @(posedge done); #1;
    checks += 4;
    if (int'(g_hat) != grp) begin failures++; $display("g_hat %0d expected %0d", g_hat, grp); end
    if (int'(fb_pos) != off % FRAME) begin failures++; $display("fb_pos %0d expected %0d", fb_pos, off % FRAME); end
    if (score != 4'd15) begin failures++; $display("score %0d", score); end
    if (c - c0 > 16 * SLOT + 300) begin failures++; $display("took %0d chips", c - c0); end
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
    trial();
    off = 7000; grp = 58; noise = 2;
    trial();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
