// Array chip (A): one classifier_array module behind a byte-serial grouped I/O.
//
// Four 8-bit ports, 32 data pins whatever the array size: features enter on
// feat_in and leave (with the classification results) on feat_out; weighted
// vectors enter on wgt_in and leave on wgt_out. Each port carries one group of
// N+2 words per group period of (N+2)*WORD_BYTES byte cycles, and the array
// takes one systolic step per group period, at the edge that ends it, while the
// next groups are already being transferred (I/O in parallel with computation).
// Input groups are assembled by byte-serial / word-parallel shift registers; the
// output shift registers load the array's next-step boundary values at the same
// edge, so a link between two chips costs no systolic step and a stack of chips
// is one taller array.
//
// Group layout: feature side [x^1..x^N, g, l], weight side [w^{n+1}, w^1..w^N,
// label], word 0 first, least significant byte first. Clock and reset are shared
// by all chips and are not counted among the 32 pins.
module array_chip
  import lc_pkg::*;
#(
  parameter int unsigned N          = 3,
  parameter int unsigned C          = 4,
  parameter int unsigned WORD_BYTES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t feat_in,
  output byte_t feat_out,
  input  byte_t wgt_in,
  output byte_t wgt_out
);
  localparam int unsigned NW = N + 2;
  localparam int unsigned W  = BYTE_W * WORD_BYTES;

  logic         step;
  logic [W-1:0] fin  [NW];
  logic [W-1:0] win  [NW];
  logic [W-1:0] fout [NW];
  logic [W-1:0] wout [NW];
  logic [W-1:0] x_top [N], x_bot [N], w_bot [N], w_top [N];

  group_counter #(.NBYTES(NW * WORD_BYTES)) u_cnt (.clk, .rst_n, .last(step));

  bs2wp_sr #(.NWORDS(NW), .WORD_BYTES(WORD_BYTES)) u_fin (
    .clk, .rst_n, .byte_in(feat_in), .words(fin)
  );
  bs2wp_sr #(.NWORDS(NW), .WORD_BYTES(WORD_BYTES)) u_win (
    .clk, .rst_n, .byte_in(wgt_in), .words(win)
  );

  for (genvar j = 0; j < N; j++) begin : g_map
    assign x_top[j]  = fin[j];
    assign w_bot[j]  = win[j+1];
    assign fout[j]   = x_bot[j];
    assign wout[j+1] = w_top[j];
  end

  classifier_array #(.W(W), .N(N), .C(C)) u_array (
    .clk, .rst_n, .en(step),
    .x_top, .g_top(fin[N]), .l_top(fin[N+1]),
    .x_bot, .g_bot(fout[N]), .l_bot(fout[N+1]),
    .winit_bot(win[0]), .w_bot, .lab_bot(win[N+1]),
    .winit_top(wout[0]), .w_top, .lab_top(wout[N+1])
  );

  wp2bs_sr #(.NWORDS(NW), .WORD_BYTES(WORD_BYTES)) u_fout (
    .clk, .rst_n, .load(step), .words(fout), .byte_out(feat_out)
  );
  wp2bs_sr #(.NWORDS(NW), .WORD_BYTES(WORD_BYTES)) u_wout (
    .clk, .rst_n, .load(step), .words(wout), .byte_out(wgt_out)
  );
endmodule
