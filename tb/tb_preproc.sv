// Self-checking testbench of preproc (N = 3, 2-byte words): a random unskewed
// group is sent every group period; during period p the output must carry, as
// word i, word i of the group sent in period p-1-d_i (d = 0,1,2,3,3), low byte
// first.
module tb_preproc;
  import lc_pkg::*;
  localparam int N  = 3;
  localparam int WB = 2;
  localparam int NW = N + 2;
  localparam int NB = NW * WB;
  localparam int W  = 8 * WB;
  localparam int NP = 50;
  logic clk, rst_n;
  byte_t byte_in, byte_out;
  logic [W-1:0] grp [NP][NW];
  int checks = 0, failures = 0;

  preproc #(.N(N), .WORD_BYTES(WB)) dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  function automatic int dly(int i);
    return (i >= NW - 1) ? NW - 2 : i;
  endfunction

  initial begin
    for (int p = 0; p < NP; p++) for (int w = 0; w < NW; w++) grp[p][w] = W'($urandom);
    rst_n = 0; byte_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      for (int b = 0; b < NB; b++) begin
        int src;
        logic [7:0] exp_b;
        byte_in = grp[p][b / WB][(b % WB) * 8 +: 8];
        src = p - 1 - dly(b / WB);
        exp_b = (src >= 0) ? grp[src][b / WB][(b % WB) * 8 +: 8] : 8'h00;
        #1;
        if (p >= 1) begin
          checks++;
          if (byte_out !== exp_b) begin
            failures++;
            $display("FAIL period %0d byte %0d: %h expected %h", p, b, byte_out, exp_b);
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
