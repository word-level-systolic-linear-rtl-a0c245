// Word-parallel / byte-serial shift register: the inverse of bs2wp_sr.
//
// When `load` is high the NWORDS words are taken in parallel at the clock edge;
// from the next cycle on they leave one byte per cycle on byte_out, word 0
// first and each word least significant byte first. Between loads the register
// shifts every cycle. Loaded once per group (at group_counter's `last`), it
// sends exactly one group per group period.
module wp2bs_sr
  import lc_pkg::*;
#(
  parameter int unsigned NWORDS     = 5,
  parameter int unsigned WORD_BYTES = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          load,
  input  logic [BYTE_W*WORD_BYTES-1:0]  words [NWORDS],
  output byte_t                         byte_out
);
  localparam int unsigned NB = NWORDS * WORD_BYTES;

  byte_t sr [NB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) sr[i] <= '0;
    end else if (load) begin
      for (int w = 0; w < NWORDS; w++)
        for (int b = 0; b < WORD_BYTES; b++)
          sr[w*WORD_BYTES + b] <= words[w][b*BYTE_W +: BYTE_W];
    end else begin
      for (int i = 0; i < NB - 1; i++) sr[i] <= sr[i+1];
      sr[NB-1] <= '0;
    end
  end

  assign byte_out = sr[0];
endmodule
