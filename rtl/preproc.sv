// Preprocessing circuit (P): turns an unskewed byte-serial vector stream into
// the skewed byte-serial stream an array chip expects.
//
// Bytes of one (N+2)-word vector arrive per group period. A byte-serial /
// word-parallel shift register assembles the group, the delay wedge delays word
// i by 0, 1, ..., N, N group periods, and a word-parallel / byte-serial shift
// register sends the skewed group out during the following group period. One P
// serves the feature vectors [x^1..x^n, g', l'], another the weighted vectors
// [w^{n+1}, w^1..w^n, l]. Latency: a group that arrives during period q leaves,
// with its word i, during period q+1+d_i. Group framing comes from a counter
// reset together with the rest of the system (this design's choice).
module preproc
  import lc_pkg::*;
#(
  parameter int unsigned N          = 3,
  parameter int unsigned WORD_BYTES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t byte_in,
  output byte_t byte_out
);
  localparam int unsigned NW = N + 2;
  localparam int unsigned W  = BYTE_W * WORD_BYTES;

  logic         last;
  logic [W-1:0] grp    [NW];
  logic [W-1:0] skewed [NW];

  group_counter #(.NBYTES(NW * WORD_BYTES)) u_cnt (.clk, .rst_n, .last);

  bs2wp_sr #(.NWORDS(NW), .WORD_BYTES(WORD_BYTES)) u_in (
    .clk, .rst_n, .byte_in, .words(grp)
  );

  delay_wedge #(.NWORDS(NW), .W(W)) u_wedge (
    .clk, .rst_n, .en(last), .din(grp), .dout(skewed)
  );

  wp2bs_sr #(.NWORDS(NW), .WORD_BYTES(WORD_BYTES)) u_out (
    .clk, .rst_n, .load(last), .words(skewed), .byte_out
  );
endmodule
