// Self-checking testbench of bs2wp_sr: random groups of 5 words of 2 bytes are
// sent back to back, word 0 first, low byte first; during the cycle of each
// group's last byte the parallel output must equal the group sent.
module tb_bs2wp_sr;
  import lc_pkg::*;
  localparam int unsigned NWORDS = 5;
  localparam int unsigned WB     = 2;
  localparam int unsigned W      = 8 * WB;
  logic clk, rst_n;
  byte_t byte_in;
  logic [W-1:0] words [NWORDS];
  logic [W-1:0] grp   [NWORDS];
  int checks = 0, failures = 0;

  bs2wp_sr #(.NWORDS(NWORDS), .WORD_BYTES(WB)) dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    rst_n = 0; byte_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 60; g++) begin
      for (int w = 0; w < NWORDS; w++) grp[w] = W'($urandom);
      for (int b = 0; b < NWORDS * WB; b++) begin
        byte_in = grp[b / WB][(b % WB) * 8 +: 8];
        if (b == NWORDS * WB - 1) begin
          #1;
          for (int w = 0; w < NWORDS; w++) begin
            checks++;
            if (words[w] !== grp[w]) begin
              failures++;
              $display("FAIL group %0d word %0d: %h expected %h", g, w, words[w], grp[w]);
            end
          end
        end
        @(negedge clk);
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
