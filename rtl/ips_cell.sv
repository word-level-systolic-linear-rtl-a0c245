// Inner product step cell of the classifier array.
//
// Each systolic step (en high) the cell passes the feature word down (y <- x),
// passes the weight word up (v <- u) and adds their product to the partial sum
// coming from its left neighbour (a_o <- a + x*u). The three equations are the
// cell definition of the array; the number format (two's complement, W bits,
// wrapping, product truncated to W bits) and the reset to zero are this design's
// choices. All outputs are registers: one step of latency in every direction.
module ips_cell #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,    // feature word from the cell above
  input  logic [W-1:0] u,    // weight word from the cell below
  input  logic [W-1:0] a,    // partial sum from the left
  output logic [W-1:0] y,    // feature word to the cell below
  output logic [W-1:0] v,    // weight word to the cell above
  output logic [W-1:0] a_o   // partial sum to the right
);
  logic [W-1:0] prod;
  assign prod = x * u;  // low W bits of the product

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y   <= '0;
      v   <= '0;
      a_o <= '0;
    end else if (en) begin
      y   <= x;
      v   <= u;
      a_o <= a + prod;
    end
  end
endmodule
