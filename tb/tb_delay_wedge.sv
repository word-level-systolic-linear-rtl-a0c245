// Self-checking testbench of delay_wedge: random 5-word groups on random
// enabled steps; output word i must be the word i of the group entered d_i
// enabled steps earlier, with d = 0, 1, 2, 3, 3.
module tb_delay_wedge;
  localparam int unsigned NWORDS = 5;
  localparam int unsigned W      = 16;
  localparam int D [NWORDS] = '{0, 1, 2, 3, 3};
  logic clk, rst_n, en;
  logic [W-1:0] din [NWORDS], dout [NWORDS];
  logic [W-1:0] hist [8][NWORDS];   // hist[k]: group entered k enabled steps ago (k>=1)
  int checks = 0, failures = 0;

  delay_wedge #(.NWORDS(NWORDS), .W(W)) dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    rst_n = 0; en = 0;
    for (int k = 0; k < 8; k++) for (int w = 0; w < NWORDS; w++) hist[k][w] = '0;
    for (int w = 0; w < NWORDS; w++) din[w] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      for (int w = 0; w < NWORDS; w++) din[w] = W'($urandom);
      en = ($urandom_range(3) != 0);
      #1;
      for (int w = 0; w < NWORDS; w++) begin
        checks++;
        if (dout[w] !== ((D[w] == 0) ? din[w] : hist[D[w]][w])) begin
          failures++;
          $display("FAIL step %0d word %0d: %h", i, w, dout[w]);
        end
      end
      @(negedge clk);
      if (en) begin
        for (int k = 7; k > 1; k--) hist[k] = hist[k-1];
        hist[1] = din;
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
