// Self-checking testbench of result_latch (N = 3, 2-byte words): random groups
// arrive back to back; one cycle after each group ends, result_valid must pulse
// with words 3 (g) and 4 (l) of that group, and the outputs must hold until the
// next group ends.
module tb_result_latch;
  import lc_pkg::*;
  localparam int N  = 3;
  localparam int WB = 2;
  localparam int NW = N + 2;
  localparam int NB = NW * WB;
  localparam int W  = 8 * WB;
  logic clk, rst_n, result_valid;
  byte_t byte_in;
  logic [W-1:0] result_g, result_l;
  logic [W-1:0] grp [NW];
  logic [W-1:0] eg, el;
  int checks = 0, failures = 0;

  result_latch #(.N(N), .WORD_BYTES(WB)) dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    rst_n = 0; byte_in = '0; eg = '0; el = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 60; p++) begin
      for (int w = 0; w < NW; w++) grp[w] = W'($urandom);
      for (int b = 0; b < NB; b++) begin
        byte_in = grp[b / WB][(b % WB) * 8 +: 8];
        #1;
        checks++;
        if (result_valid !== (p > 0 && b == 0) || result_g !== eg || result_l !== el) begin
          failures++;
          $display("FAIL period %0d byte %0d: valid=%b g=%h l=%h expected %h %h", p, b,
                   result_valid, result_g, result_l, eg, el);
        end
        @(negedge clk);
      end
      eg = grp[N]; el = grp[N+1];
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
