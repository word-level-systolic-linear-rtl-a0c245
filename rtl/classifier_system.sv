// Complete linear classifier system: P - A - A - ... - A - P, plus L.
//
// The weighted vectors [w^{n+1}, w^1..w^n, label] enter byte-serially, unskewed,
// at wgt_byte; one preprocessing circuit skews them and feeds the bottom array
// chip. The feature vectors [x^1..x^n, g', l'] enter at feat_byte; the other
// preprocessing circuit skews them and feeds the top chip. NUM_CHIPS array chips
// of C rows are stacked, features flowing down and weights flowing up, so the
// system classifies among NUM_CHIPS*C classes. The result latch picks the
// running maximum and its label out of the stream leaving the bottom chip.
//
// Stream rules for the source (memory) of the two inputs: one vector per group
// period of (N+2)*WORD_BYTES bytes, least significant byte first; each weighted
// vector is sent in two consecutive group periods and the NUM_CHIPS*C vectors are
// repeated cyclically; feature vectors may follow each other in every group
// period, with g' the most negative word. The weight stream leaving the top chip
// is brought out on wgt_exit. A result appears on result_g/result_l
// N + NUM_CHIPS*C + 2 group periods after the group of its feature vector was
// sent (1 period in P, N + NUM_CHIPS*C - 1 in the array, 1 to leave the bottom
// chip and 1 in L), one result per group period. All blocks share clock and
// reset; their group counters therefore run in phase.
module classifier_system
  import lc_pkg::*;
#(
  parameter int unsigned N          = 3,
  parameter int unsigned C          = 4,
  parameter int unsigned WORD_BYTES = 2,
  parameter int unsigned NUM_CHIPS  = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  byte_t                        wgt_byte,
  input  byte_t                        feat_byte,
  output byte_t                        wgt_exit,
  output logic                         result_valid,
  output logic [BYTE_W*WORD_BYTES-1:0] result_g,
  output logic [BYTE_W*WORD_BYTES-1:0] result_l
);
  // Chips are counted from the bottom: chip 0 receives the weights and
  // delivers the results, chip NUM_CHIPS-1 receives the features.
  byte_t feat_link [NUM_CHIPS+1];   // feat_link[i]: into chip i-1 from chip i (or P)
  byte_t wgt_link  [NUM_CHIPS+1];   // wgt_link[i]:  into chip i from chip i-1 (or P)

  preproc #(.N(N), .WORD_BYTES(WORD_BYTES)) u_p_wgt (
    .clk, .rst_n, .byte_in(wgt_byte), .byte_out(wgt_link[0])
  );
  preproc #(.N(N), .WORD_BYTES(WORD_BYTES)) u_p_feat (
    .clk, .rst_n, .byte_in(feat_byte), .byte_out(feat_link[NUM_CHIPS])
  );

  for (genvar i = 0; i < NUM_CHIPS; i++) begin : g_chip
    array_chip #(.N(N), .C(C), .WORD_BYTES(WORD_BYTES)) u_a (
      .clk, .rst_n,
      .feat_in(feat_link[i+1]), .feat_out(feat_link[i]),
      .wgt_in(wgt_link[i]),     .wgt_out(wgt_link[i+1])
    );
  end

  assign wgt_exit = wgt_link[NUM_CHIPS];

  result_latch #(.N(N), .WORD_BYTES(WORD_BYTES)) u_latch (
    .clk, .rst_n, .byte_in(feat_link[0]), .result_valid, .result_g, .result_l
  );
endmodule
