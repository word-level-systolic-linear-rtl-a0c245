// Stimulus and checker for one classifier_system instance of any size, used by
// tb_system_sizes. Sends a cyclic weight stream (each vector in two consecutive
// group periods) and a dense stream of random feature vectors, and checks every
// latched result against the maximum discriminant computed here, at the latency
// N + K*C + 1 group periods after the feature group was sent. Values are kept
// small enough that every discriminant fits in a word of 8*WB bits.
module system_run
  import lc_pkg::*;
#(
  parameter int N  = 3,
  parameter int C  = 4,
  parameter int WB = 2,
  parameter int K  = 3,
  parameter int NF = 40,
  parameter int VMAX = 10
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int CT  = K * C;
  localparam int NW  = N + 2;
  localparam int NB  = NW * WB;
  localparam int W   = 8 * WB;
  localparam int PF0 = CT + N + 2;        // features start once the array is full
  localparam int LAT = N + CT + 1;
  localparam int NPER = PF0 + NF + LAT + 3;

  logic rst_n;
  byte_t wgt_byte, feat_byte, wgt_exit;
  logic result_valid;
  logic [W-1:0] result_g, result_l;

  classifier_system #(.N(N), .C(C), .WORD_BYTES(WB), .NUM_CHIPS(K)) dut (.*);

  int wt [CT][N+1];
  int xs [NF][N];
  int cyc, n_res;
  logic [W-1:0] wwords [NW], fwords [NW];

  function automatic int disc(int k, int i);
    int g = wt[i][0];
    for (int j = 0; j < N; j++) g += xs[k][j] * wt[i][j+1];
    return g;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (result_valid) begin
      int q, k, gmax, li;
      q = cyc / NB - 1;
      k = q - PF0 - LAT;
      if (k >= 0 && k < NF) begin
        gmax = -(1 << 30);
        for (int i = 0; i < CT; i++) if (disc(k, i) > gmax) gmax = disc(k, i);
        li = int'(result_l) - 1;
        checks++;
        n_res++;
        if (int'($signed(result_g)) != gmax || li < 0 || li >= CT || disc(k, li) != gmax) begin
          failures++;
          $display("FAIL N=%0d C=%0d K=%0d WB=%0d feature %0d: g=%0d l=%0d max %0d",
                   N, C, K, WB, k, $signed(result_g), result_l, gmax);
        end
      end
    end
  end

  initial begin
    done = 0; checks = 0; failures = 0; cyc = 0; n_res = 0;
    for (int i = 0; i < CT; i++)
      for (int j = 0; j <= N; j++) wt[i][j] = int'($urandom_range(2 * VMAX)) - VMAX;
    for (int k = 0; k < NF; k++)
      for (int j = 0; j < N; j++) xs[k][j] = int'($urandom_range(2 * VMAX)) - VMAX;
    rst_n = 0; wgt_byte = '0; feat_byte = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPER; p++) begin
      int m, k;
      m = (p / 2) % CT;
      wwords[0] = W'(wt[m][0]);
      for (int j = 1; j <= N; j++) wwords[j] = W'(wt[m][j]);
      wwords[N+1] = W'(m + 1);
      k = p - PF0;
      for (int j = 0; j < N; j++) fwords[j] = (k >= 0 && k < NF) ? W'(xs[k][j]) : '0;
      fwords[N]   = {1'b1, {(W-1){1'b0}}};
      fwords[N+1] = '0;
      for (int b = 0; b < NB; b++) begin
        wgt_byte  = wwords[b / WB][(b % WB) * 8 +: 8];
        feat_byte = fwords[b / WB][(b % WB) * 8 +: 8];
        @(negedge clk);
      end
    end
    checks++;
    if (n_res != NF) begin
      failures++;
      $display("FAIL N=%0d C=%0d K=%0d WB=%0d: %0d results, expected %0d", N, C, K, WB, n_res, NF);
    end
    done = 1;
  end
endmodule
