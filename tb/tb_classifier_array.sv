// Self-checking testbench of classifier_array.
//
// Drives the skewed contraflow streams directly at word level: C weighted
// vectors, each sent for two consecutive steps and recirculated, and a dense
// stream of random feature vectors. Every step one result must leave the bottom
// exactly N+C-1 steps after the x^1 of its feature vector entered; it is compared
// with the maximum discriminant computed here and its label must point at a class
// whose discriminant equals that maximum. Steps are separated by random idle
// cycles with en low, which must not disturb anything. Features start C steps
// after the weights, the least delay at which the very first result is already
// correct.
module tb_classifier_array;
  localparam int unsigned W  = 16;
  localparam int unsigned N  = 3;
  localparam int unsigned C  = 4;
  localparam int          NF = 40;              // feature vectors
  // x^1 of vector 0 enters C steps after w^{n+1} of weighted vector 0: the
  // smallest start delay at which the first feature vector meets only valid
  // weighted vectors.
  localparam int          F0 = C;
  localparam int          NSTEP = F0 + NF + N + C + 4;

  logic clk, rst_n = 0, en = 0;
  initial clk = 0;
  always #5 clk = ~clk;

  logic [W-1:0] x_top [N], x_bot [N], w_bot [N], w_top [N];
  logic [W-1:0] g_top, l_top, g_bot, l_bot, winit_bot, lab_bot, winit_top, lab_top;

  classifier_array #(.W(W), .N(N), .C(C)) dut (.*);

  int wt [C][N+1];          // [class][0] = w^{n+1}, [class][j] = w^j
  int xs [NF][N];
  int gref [NF][C];
  int gmax [NF];
  int k, li;
  int checks = 0, failures = 0, step = 0, results = 0, idles = 0;

  // Word of the weight stream at column c (0: w^{n+1}, 1..N: w^c, N+1: label).
  function automatic logic [W-1:0] wword(int t, int c);
    int s = t - ((c > N) ? N : c);
    int m;
    if (s < 0) return '0;
    m = (s / 2) % C;
    if (c == N + 1) return W'(m + 1);
    return W'(wt[m][c]);
  endfunction

  // Word of the feature stream at column c (0..N-1: x^{c+1}, N: g', N+1: l').
  function automatic logic [W-1:0] fword(int t, int c);
    int kk = t - F0 - ((c > N) ? N : c);
    if (c == N)     return {1'b1, {(W-1){1'b0}}};   // most negative start value
    if (c == N + 1) return '0;
    if (kk < 0 || kk >= NF) return '0;
    return W'(xs[kk][c]);
  endfunction

  initial begin
    for (int i = 0; i < C; i++)
      for (int j = 0; j <= N; j++) wt[i][j] = int'($urandom_range(40)) - 20;
    for (int k = 0; k < NF; k++) begin
      for (int j = 0; j < N; j++) xs[k][j] = int'($urandom_range(40)) - 20;
      gmax[k] = -(1 << 30);
      for (int i = 0; i < C; i++) begin
        gref[k][i] = wt[i][0];
        for (int j = 0; j < N; j++) gref[k][i] += xs[k][j] * wt[i][j+1];
        if (gref[k][i] > gmax[k]) gmax[k] = gref[k][i];
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (step = 0; step < NSTEP; step++) begin
      // present this step's inputs
      for (int j = 0; j < N; j++) begin
        x_top[j] = fword(step, j);
        w_bot[j] = wword(step, j + 1);
      end
      g_top = fword(step, N); l_top = fword(step, N + 1);
      winit_bot = wword(step, 0); lab_bot = wword(step, N + 1);
      // random idle cycles
      en = 0;
      while ($urandom_range(3) == 0) begin
        @(negedge clk);
        idles++;
      end
      en = 1;
      #1;
      // result leaving during this step
      begin
        k = step - F0 - (N + C - 1);
        if (k >= 0 && k < NF) begin
          li = int'(l_bot) - 1;
          checks++;
          results++;
          if (int'($signed(g_bot)) != gmax[k] || li < 0 || li >= C) begin
            failures++;
            $display("FAIL vec %0d: g=%0d l=%0d expected max %0d", k, $signed(g_bot), l_bot, gmax[k]);
          end else if (gref[k][li] != gmax[k]) begin
            failures++;
            $display("FAIL vec %0d: label %0d has g=%0d, max %0d", k, li + 1, gref[k][li], gmax[k]);
          end
        end
      end
      // pass-through streams leave C-1 steps after entering (next-step values)
      if (step >= int'(C) - 1) begin
        checks++;
        for (int j = 0; j < N; j++)
          if (x_bot[j] != fword(step - C + 1, j) || w_top[j] != wword(step - C + 1, j + 1)) begin
            failures++;
            $display("FAIL pass-through column %0d at step %0d", j, step);
          end
        if (winit_top != wword(step - C + 1, 0) || lab_top != wword(step - C + 1, N + 1)) begin
          failures++;
          $display("FAIL delay columns at step %0d", step);
        end
      end
      @(negedge clk);
    end
    en = 0;
    checks++;
    if (results != NF) begin
      failures++;
      $display("FAIL: %0d results, expected %0d", results, NF);
    end
    checks++;
    if (idles == 0) begin
      failures++;
      $display("FAIL: no idle cycles exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
