// Self-checking testbench of ips_cell: random operands and random step enables;
// after every clock edge the registers must hold y = x, v = u, a_o = a + x*u
// (mod 2^W) from the last enabled edge, and must not move on disabled edges.
module tb_ips_cell;
  localparam int unsigned W = 16;
  logic clk, rst_n, en;
  logic [W-1:0] x, u, a, y, v, a_o;
  logic [W-1:0] ey, ev, ea;
  int checks = 0, failures = 0, holds = 0;

  ips_cell #(.W(W)) dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    rst_n = 0; en = 0; x = '0; u = '0; a = '0;
    ey = '0; ev = '0; ea = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      x  = W'($urandom); u = W'($urandom); a = W'($urandom);
      en = ($urandom_range(3) != 0);
      if (en) begin
        ey = x; ev = u;
        ea = W'(int'(a) + int'(x) * int'(u));
      end else holds++;
      @(negedge clk);
      checks++;
      if (y !== ey || v !== ev || a_o !== ea) begin
        failures++;
        $display("FAIL %0d: y=%h v=%h a_o=%h expected %h %h %h", i, y, v, a_o, ey, ev, ea);
      end
    end
    checks++;
    if (holds == 0) failures++;
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
