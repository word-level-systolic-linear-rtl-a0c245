// Self-checking testbench of array_chip (N = 3, C = 4, 2-byte words).
//
// Sends already-skewed byte-serial streams, one group per group period of 10
// bytes: on wgt_in the 4 weighted vectors, each for two periods, recirculated;
// on feat_in a dense stream of random feature vectors. Collects every group that
// leaves on feat_out and wgt_out and checks: the result words (maximum
// discriminant and a label reaching it) of feature k in period F0+k+N+C, the
// feature words passing through C periods after they entered, and the weight
// words leaving the top C periods after they entered.
module tb_array_chip;
  import lc_pkg::*;
  localparam int N  = 3;
  localparam int C  = 4;
  localparam int WB = 2;
  localparam int NW = N + 2;
  localparam int NB = NW * WB;
  localparam int W  = 8 * WB;
  localparam int NF = 40;
  localparam int F0 = C;                 // features start C steps after the weights
  localparam int NP = F0 + NF + N + C + 4;

  logic clk, rst_n;
  byte_t feat_in, feat_out, wgt_in, wgt_out;

  array_chip #(.N(N), .C(C), .WORD_BYTES(WB)) dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;

  int wt [C][N+1];
  int xs [NF][N];
  int gref [NF][C];
  int gmax [NF];
  int checks = 0, failures = 0, n_results = 0;
  logic [W-1:0] fo [NW], wo [NW];

  function automatic logic [W-1:0] wword(int t, int c);
    int s = t - ((c > N) ? N : c);
    int m;
    if (s < 0) return '0;
    m = (s / 2) % C;
    if (c == N + 1) return W'(m + 1);
    return W'(wt[m][c]);
  endfunction

  function automatic logic [W-1:0] fword(int t, int c);
    int kk = t - F0 - ((c > N) ? N : c);
    if (c == N)     return {1'b1, {(W-1){1'b0}}};
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
    rst_n = 0; feat_in = '0; wgt_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      for (int b = 0; b < NB; b++) begin
        logic [W-1:0] fw, ww;
        fw = fword(p, b / WB);
        ww = wword(p, b / WB);
        feat_in = fw[(b % WB) * 8 +: 8];
        wgt_in  = ww[(b % WB) * 8 +: 8];
        #1;
        fo[b / WB][(b % WB) * 8 +: 8] = feat_out;
        wo[b / WB][(b % WB) * 8 +: 8] = wgt_out;
        @(negedge clk);
      end
      // groups that left during period p
      if (p >= C) begin
        checks++;
        for (int c = 0; c < NW; c++)
          if (wo[c] !== wword(p - C, c)) begin
            failures++;
            $display("FAIL period %0d: weight word %0d = %h expected %h", p, c, wo[c], wword(p - C, c));
          end
        for (int c = 0; c < N; c++)
          if (fo[c] !== fword(p - C, c)) begin
            failures++;
            $display("FAIL period %0d: feature word %0d = %h expected %h", p, c, fo[c], fword(p - C, c));
          end
      end
      begin
        int k, li;
        k = p - F0 - N - C;
        if (k >= 0 && k < NF) begin
          li = int'(fo[N+1]) - 1;
          checks++;
          n_results++;
          if (int'($signed(fo[N])) != gmax[k] || li < 0 || li >= C || gref[k][li] != gmax[k]) begin
            failures++;
            $display("FAIL feature %0d: g=%0d l=%0d expected max %0d", k, $signed(fo[N]), fo[N+1], gmax[k]);
          end
        end
      end
    end
    checks++;
    if (n_results != NF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * (NP + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
