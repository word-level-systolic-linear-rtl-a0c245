// Self-checking testbench of delay_column: random words enter the bottom on
// random enabled steps; the taps must show the last C entered words (row 1 the
// oldest) and d_out_nxt the word that will sit in row 1 after the next step.
module tb_delay_column;
  localparam int unsigned W = 16;
  localparam int unsigned C = 4;
  logic clk, rst_n, en;
  logic [W-1:0] d_in, d_out_nxt;
  logic [W-1:0] tap [C];
  logic [W-1:0] hist [C+1];     // hist[0] newest entered word
  int checks = 0, failures = 0;

  delay_column #(.W(W), .C(C)) dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    rst_n = 0; en = 0; d_in = '0;
    for (int i = 0; i <= C; i++) hist[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      d_in = W'($urandom);
      en = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (d_out_nxt !== hist[C-2]) begin
        failures++;
        $display("FAIL %0d: d_out_nxt=%h expected %h", i, d_out_nxt, hist[C-2]);
      end
      @(negedge clk);
      if (en) begin
        for (int k = C; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = d_in;
      end
      for (int r = 0; r < C; r++) begin
        checks++;
        if (tap[r] !== hist[C-1-r]) begin
          failures++;
          $display("FAIL %0d: row %0d = %h expected %h", i, r + 1, tap[r], hist[C-1-r]);
        end
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
