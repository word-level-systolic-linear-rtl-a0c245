// Self-checking testbench of class_cell: random discriminants (small range so
// ties occur) and labels; checks the next-step values g_d/l_d (larger of g1 and
// g2 with its label, the upper one kept on a tie) and that g_o/l_o take them on
// enabled edges only.
module tb_class_cell;
  localparam int unsigned W = 16;
  logic clk, rst_n, en;
  logic [W-1:0] g1, l1, g2, l2, g_o, l_o, g_d, l_d;
  logic [W-1:0] eg, el, rg, rl;
  int checks = 0, failures = 0, n_left = 0, n_up = 0, n_tie = 0;

  class_cell #(.W(W)) dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    rst_n = 0; en = 0; g1 = '0; g2 = '0; l1 = '0; l2 = '0;
    rg = '0; rl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      g1 = W'(int'($urandom_range(20)) - 10);
      g2 = W'(int'($urandom_range(20)) - 10);
      if (i % 50 == 7) g2 = 16'h8000;            // most negative start value
      l1 = W'($urandom); l2 = W'($urandom);
      en = ($urandom_range(4) != 0);
      if ($signed(g1) > $signed(g2)) begin eg = g1; el = l1; n_left++; end
      else begin eg = g2; el = l2; n_up++; if (g1 == g2) n_tie++; end
      #1;
      checks++;
      if (g_d !== eg || l_d !== el) begin
        failures++;
        $display("FAIL %0d: g_d=%0d l_d=%h expected %0d %h", i, $signed(g_d), l_d, $signed(eg), el);
      end
      if (en) begin rg = eg; rl = el; end
      @(negedge clk);
      checks++;
      if (g_o !== rg || l_o !== rl) begin
        failures++;
        $display("FAIL %0d: g_o=%0d l_o=%h expected %0d %h", i, $signed(g_o), l_o, $signed(rg), rl);
      end
    end
    checks++;
    if (n_left == 0 || n_up == 0 || n_tie == 0) failures++;
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
