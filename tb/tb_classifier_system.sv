// End-to-end testbench of classifier_system at its default size
// (N = 3 features, C = 4 rows per chip, 3 chips, 16-bit words).
//
// Plays the memory: sends the weighted vectors byte-serially, each in two
// consecutive group periods and cyclically repeated, and a dense stream of random
// feature vectors. Halfway through, the whole weight set is replaced on the fly.
// Every result the latch reports is checked against discriminants computed here:
// its value must be the maximum over all classes of the weight set the feature
// met, and its label must name a class reaching that maximum. Results must come
// one per group period at the latency the design states, and the weight stream
// must leave the top chip intact and still skewed.
// Counted mechanisms: results under the first and under the replaced weight set,
// winners located in every chip (partial maxima crossing the chip links), and
// both outcomes of the compare in the bottom classification cell.
module tb_classifier_system;
  import lc_pkg::*;
  localparam int N  = 3;      // defaults of classifier_system
  localparam int C  = 4;
  localparam int WB = 2;
  localparam int K  = 3;
  localparam int CT = K * C;              // classes in the system
  localparam int NW = N + 2;
  localparam int NB = NW * WB;            // bytes per group period
  localparam int W  = 8 * WB;
  localparam int NF    = 120;             // feature vectors
  localparam int PF0   = 2;               // period of feature 0
  localparam int PS    = PF0 + NF / 2;    // period the weight set changes
  localparam int NPER  = PF0 + NF + N + CT + 6;
  localparam int LAT   = N + CT + 1;      // latch period minus send period

  logic clk, rst_n;
  byte_t wgt_byte, feat_byte, wgt_exit;
  logic result_valid;
  logic [W-1:0] result_g, result_l;

  classifier_system dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  int wt [2][CT][N+1];
  logic [W-1:0] sent [NPER][NW];          // weight groups as sent
  int n_exit = 0;        // [set][class][0: w^{n+1}, j: w^j]
  int xs [NF][N];
  int checks = 0, failures = 0, cyc = 0;
  int n_set [2] = '{0, 0};
  int n_chip [K];
  int n_replaced = 0, n_kept = 0, n_results = 0;
  logic [W-1:0] wwords [NW], fwords [NW];

  function automatic int disc(int set, int k, int i);
    int g = wt[set][i][0];
    for (int j = 0; j < N; j++) g += xs[k][j] * wt[set][i][j+1];
    return g;
  endfunction

  // set whose weights feature k met, or -1 if it met a mixture
  function automatic int clean_set(int k);
    int p = PF0 + k;
    if (p + 1 - (CT + N + 2) >= PS) return 1;
    if (p + 1 + N + CT < PS && p + 1 - (CT + N + 2) >= 0) return 0;
    return -1;
  endfunction

  // Outcomes of the compare in the bottom classification cell of the system.
  always @(posedge clk) if (rst_n && dut.g_chip[0].u_a.step) begin
    if ($signed(dut.g_chip[0].u_a.u_array.g_row[C-1].u_cls.g1) >
        $signed(dut.g_chip[0].u_a.u_array.g_row[C-1].u_cls.g2)) n_replaced++;
    else n_kept++;
  end

  // result check
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (result_valid) begin
      int q, k, s, gmax, li;
      q = cyc / NB - 1;
      k = q - PF0 - LAT;
      if (k >= 0 && k < NF) begin
        s = clean_set(k);
        n_results++;
        if (s >= 0) begin
          gmax = -(1 << 30);
          for (int i = 0; i < CT; i++) if (disc(s, k, i) > gmax) gmax = disc(s, k, i);
          li = int'(result_l) - 1;
          checks++;
          n_set[s]++;
          if (int'($signed(result_g)) != gmax || li < 0 || li >= CT || disc(s, k, li) != gmax) begin
            failures++;
            $display("FAIL feature %0d (set %0d): g=%0d l=%0d, expected max %0d", k, s,
                     $signed(result_g), result_l, gmax);
          end else begin
            n_chip[li / C]++;
          end
        end
      end
    end
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < CT; i++)
        for (int j = 0; j <= N; j++) wt[s][i][j] = int'($urandom_range(60)) - 30;
    for (int k = 0; k < NF; k++)
      for (int j = 0; j < N; j++) xs[k][j] = int'($urandom_range(60)) - 30;
    for (int i = 0; i < K; i++) n_chip[i] = 0;
    rst_n = 0;
    wgt_byte = '0; feat_byte = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPER; p++) begin
      int set, m, k;
      set = (p >= PS) ? 1 : 0;
      m = ((p - ((set != 0) ? PS : 0)) / 2) % CT;
      wwords[0] = W'(wt[set][m][0]);
      for (int j = 1; j <= N; j++) wwords[j] = W'(wt[set][m][j]);
      wwords[N+1] = W'(m + 1);
      sent[p] = wwords;
      k = p - PF0;
      for (int j = 0; j < N; j++) fwords[j] = (k >= 0 && k < NF) ? W'(xs[k][j]) : '0;
      fwords[N]   = {1'b1, {(W-1){1'b0}}};
      fwords[N+1] = '0;
      for (int b = 0; b < NB; b++) begin
        wgt_byte  = wwords[b / WB][(b % WB) * 8 +: 8];
        feat_byte = fwords[b / WB][(b % WB) * 8 +: 8];
        // the weight stream leaves the top chip skewed, CT+1+d periods later
        begin
          int src, c;
          c = b / WB;
          src = p - CT - 1 - ((c > N) ? N : c);
          if (src >= 0) begin
            checks++;
            n_exit++;
            if (wgt_exit !== sent[src][c][(b % WB) * 8 +: 8]) begin
              failures++;
              $display("FAIL wgt_exit period %0d byte %0d: %h", p, b, wgt_exit);
            end
          end
        end
        @(negedge clk);
      end
    end
    // coverage of the mechanisms
    checks++;
    if (n_results != NF) begin
      failures++;
      $display("FAIL: %0d results in their slots, expected %0d", n_results, NF);
    end
    for (int s = 0; s < 2; s++) begin
      checks++;
      if (n_set[s] == 0) begin failures++; $display("FAIL: no result checked with weight set %0d", s); end
    end
    for (int i = 0; i < K; i++) begin
      checks++;
      if (n_chip[i] == 0) begin failures++; $display("FAIL: no winner in chip %0d", i); end
    end
    checks++;
    if (n_replaced == 0 || n_kept == 0) begin failures++; $display("FAIL: compare outcomes not both seen"); end
    $display("results=%0d set0=%0d set1=%0d replaced=%0d kept=%0d", n_results, n_set[0], n_set[1], n_replaced, n_kept);
    for (int i = 0; i < K; i++) $display("winners in chip %0d: %0d", i, n_chip[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * (NPER + 20)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
