// Self-checking testbench of wp2bs_sr: a random 5-word group is loaded every
// 10 cycles; in the 10 cycles after the load the bytes must leave word 0 first,
// low byte first.
module tb_wp2bs_sr;
  import lc_pkg::*;
  localparam int unsigned NWORDS = 5;
  localparam int unsigned WB     = 2;
  localparam int unsigned W      = 8 * WB;
  localparam int unsigned NB     = NWORDS * WB;
  logic clk, rst_n, load;
  logic [W-1:0] words [NWORDS];
  logic [W-1:0] grp   [NWORDS];
  byte_t byte_out;
  int checks = 0, failures = 0;

  wp2bs_sr #(.NWORDS(NWORDS), .WORD_BYTES(WB)) dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    rst_n = 0; load = 0;
    for (int w = 0; w < NWORDS; w++) words[w] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 60; g++) begin
      for (int w = 0; w < NWORDS; w++) begin grp[w] = W'($urandom); words[w] = grp[w]; end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int w = 0; w < NWORDS; w++) words[w] = W'($urandom);   // must be ignored
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (byte_out !== grp[b / WB][(b % WB) * 8 +: 8]) begin
          failures++;
          $display("FAIL group %0d byte %0d: %h", g, b, byte_out);
        end
        if (b < NB - 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
