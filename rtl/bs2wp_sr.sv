// Byte-serial / word-parallel shift register.
//
// Collects one group of NWORDS words that arrives as NWORDS*WORD_BYTES
// consecutive 8-bit bytes, word 0 first and each word least significant byte
// first, and presents the whole group in parallel. The register holds the first
// NWORDS*WORD_BYTES-1 bytes; together with the byte currently on byte_in they
// form `words`, which is the complete group during the cycle in which the last
// byte is on the bus (group_counter's `last`). The receiver takes the group at
// the edge ending that cycle, so the conversion adds no cycle of its own. The
// byte order and this timing are this design's choices.
module bs2wp_sr
  import lc_pkg::*;
#(
  parameter int unsigned NWORDS     = 5,
  parameter int unsigned WORD_BYTES = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  byte_t                         byte_in,
  output logic [BYTE_W*WORD_BYTES-1:0]  words [NWORDS]
);
  localparam int unsigned NB = NWORDS * WORD_BYTES;

  byte_t sr [NB-1];
  byte_t grp [NB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB - 1; i++) sr[i] <= '0;
    end else begin
      for (int i = 0; i < NB - 2; i++) sr[i] <= sr[i+1];
      sr[NB-2] <= byte_in;
    end
  end

  always_comb begin
    for (int i = 0; i < NB - 1; i++) grp[i] = sr[i];
    grp[NB-1] = byte_in;
    for (int w = 0; w < NWORDS; w++)
      for (int b = 0; b < WORD_BYTES; b++)
        words[w][b*BYTE_W +: BYTE_W] = grp[w*WORD_BYTES + b];
  end
endmodule
