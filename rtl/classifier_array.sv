// Systolic linear classifier array module: C classes x n features.
//
// Computes, for every feature vector X that passes through, the class label i
// whose discriminant g_i(X) = w_i^{n+1} + x^1 w_i^1 + ... + x^n w_i^n is largest.
// Layout, left to right: a column of C delay elements carrying the initial values
// w^{n+1}; C x n inner product step cells; a column of C classification cells; a
// column of C delay elements carrying the class labels. Feature vectors
// [x^1..x^n, g', l'] move down one row per step, the weighted vectors
// [w^{n+1}, w^1..w^n, l] move up one row per step (contraflow), and partial sums
// move right one column per step. Each weighted vector is held for two
// consecutive steps in its stream and the C vectors recirculate, so every feature
// vector meets every weighted vector exactly once while crossing the C rows, and
// consecutive feature vectors can follow each other every step: every cell works
// every step and one result leaves per step.
//
// Input timing (the skew, supplied by the preprocessing circuit): within one
// vector, x^j enters j-1 steps after x^1, g' and l' n steps after x^1; w^j enters
// j steps after w^{n+1}, l n steps after w^{n+1}. A result (g, l) leaves the
// bottom of the classification column n+C-1 steps after x^1 of its vector entered.
// g' is the starting running maximum (send the most negative word) and l' its
// label.
//
// Boundary outputs (x_bot, g_bot, l_bot, winit_top, w_top, lab_top) are the
// values the boundary row registers take at the next step. A chip's output shift
// register, loaded at that step, then plays the part of the boundary register and
// two cascaded modules behave as one array of 2C rows. This presentation is this
// design's choice; the cell equations, the columns and the dataflow follow the
// array as it was proposed.
module classifier_array #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 3,
  parameter int unsigned C = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,          // one systolic step
  // feature side (top)
  input  logic [W-1:0] x_top [N],
  input  logic [W-1:0] g_top,
  input  logic [W-1:0] l_top,
  output logic [W-1:0] x_bot [N],
  output logic [W-1:0] g_bot,       // classification result
  output logic [W-1:0] l_bot,
  // weight side (bottom)
  input  logic [W-1:0] winit_bot,
  input  logic [W-1:0] w_bot [N],
  input  logic [W-1:0] lab_bot,
  output logic [W-1:0] winit_top,
  output logic [W-1:0] w_top [N],
  output logic [W-1:0] lab_top
);
  logic [W-1:0] y   [C][N];
  logic [W-1:0] v   [C][N];
  logic [W-1:0] ao  [C][N];
  logic [W-1:0] go  [C];
  logic [W-1:0] lo  [C];
  logic [W-1:0] gd  [C];
  logic [W-1:0] ld  [C];
  logic [W-1:0] winit_tap [C];
  logic [W-1:0] lab_tap   [C];

  delay_column #(.W(W), .C(C)) u_init_col (
    .clk, .rst_n, .en, .d_in(winit_bot), .tap(winit_tap), .d_out_nxt(winit_top)
  );

  delay_column #(.W(W), .C(C)) u_label_col (
    .clk, .rst_n, .en, .d_in(lab_bot), .tap(lab_tap), .d_out_nxt(lab_top)
  );

  for (genvar r = 0; r < C; r++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic [W-1:0] xin, uin, ain;
      if (r == 0) begin : g_xt
        assign xin = x_top[j];
      end else begin : g_xi
        assign xin = y[r-1][j];
      end
      if (r == C - 1) begin : g_ub
        assign uin = w_bot[j];
      end else begin : g_ui
        assign uin = v[r+1][j];
      end
      if (j == 0) begin : g_al
        assign ain = winit_tap[r];
      end else begin : g_ai
        assign ain = ao[r][j-1];
      end
      ips_cell #(.W(W)) u_ips (
        .clk, .rst_n, .en, .x(xin), .u(uin), .a(ain),
        .y(y[r][j]), .v(v[r][j]), .a_o(ao[r][j])
      );
    end

    logic [W-1:0] g2, l2;
    if (r == 0) begin : g_gt
      assign g2 = g_top;
      assign l2 = l_top;
    end else begin : g_gi
      assign g2 = go[r-1];
      assign l2 = lo[r-1];
    end
    class_cell #(.W(W)) u_cls (
      .clk, .rst_n, .en, .g1(ao[r][N-1]), .l1(lab_tap[r]), .g2, .l2,
      .g_o(go[r]), .l_o(lo[r]), .g_d(gd[r]), .l_d(ld[r])
    );
  end

  // Next-step values of the boundary registers.
  if (C == 1) begin : g_c1
    assign x_bot = x_top;
    assign w_top = w_bot;
  end else begin : g_cn
    assign x_bot = y[C-2];
    assign w_top = v[1];
  end
  assign g_bot = gd[C-1];
  assign l_bot = ld[C-1];
endmodule
