// Runs classifier_system at several sizes side by side: a single array chip,
// a chip of one row, five features with byte-wide words, and a deeper cascade.
// Each instance checks its own results (system_run); this top sums the counts.
module tb_system_sizes;
  logic clk;
  initial clk = 0;
  always #5 clk = ~clk;

  localparam int NR = 4;
  logic done [NR];
  int   chk  [NR];
  int   fl   [NR];

  system_run #(.N(3), .C(4), .WB(2), .K(1))               u_one_chip   (.clk, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  system_run #(.N(2), .C(1), .WB(2), .K(3))               u_one_row    (.clk, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  system_run #(.N(5), .C(3), .WB(1), .K(2), .VMAX(3))     u_byte_words (.clk, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  system_run #(.N(1), .C(6), .WB(3), .K(4), .VMAX(1000))  u_deep       (.clk, .done(done[3]), .checks(chk[3]), .failures(fl[3]));

  int checks, failures;

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < NR; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NR; i++) begin checks += chk[i]; failures += fl[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
