// Result latch (L): extracts the classification results from the byte-serial
// feature stream leaving the bottom array chip.
//
// That stream carries, per group, the feature words that have passed the array
// and the pair (g, l) from the bottom classification cell: the largest
// discriminant found and its class label. The latch assembles each group,
// captures words N (g) and N+1 (l) at the end of the group and pulses
// result_valid for one cycle; the outputs then hold until the next group ends.
// Which groups carry real feature vectors is known to whoever sends the
// features (one result per group period, N+K*C-1 group periods after the x^1 of
// the vector entered the top chip's array, K chips of C rows).
module result_latch
  import lc_pkg::*;
#(
  parameter int unsigned N          = 3,
  parameter int unsigned WORD_BYTES = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  byte_t                        byte_in,
  output logic                         result_valid,
  output logic [BYTE_W*WORD_BYTES-1:0] result_g,
  output logic [BYTE_W*WORD_BYTES-1:0] result_l
);
  localparam int unsigned NW = N + 2;
  localparam int unsigned W  = BYTE_W * WORD_BYTES;

  logic         last;
  logic [W-1:0] grp [NW];

  group_counter #(.NBYTES(NW * WORD_BYTES)) u_cnt (.clk, .rst_n, .last);

  bs2wp_sr #(.NWORDS(NW), .WORD_BYTES(WORD_BYTES)) u_in (
    .clk, .rst_n, .byte_in, .words(grp)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_valid <= 1'b0;
      result_g     <= '0;
      result_l     <= '0;
    end else begin
      result_valid <= last;
      if (last) begin
        result_g <= grp[N];
        result_l <= grp[N+1];
      end
    end
  end
endmodule
