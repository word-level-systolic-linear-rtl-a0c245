// Delay wedge of the preprocessing circuit.
//
// Word i of each group is delayed by d_i systolic steps (en high),
// d = 0, 1, ..., NWORDS-2, NWORDS-2: a chain of d_i registers per word. The
// last two words share the largest delay, as the drawn wedge (delays 0,1,2,3,3
// for five words) shows, because they enter the array's classification side
// together (g' and l' of a feature vector; w^n and the label of a weighted
// vector). Output word i with d_i = 0 is the input itself.
module delay_wedge
  import lc_pkg::*;
#(
  parameter int unsigned NWORDS = 5,
  parameter int unsigned W      = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din  [NWORDS],
  output logic [W-1:0] dout [NWORDS]
);
  for (genvar i = 0; i < NWORDS; i++) begin : g_word
    localparam int unsigned D = wedge_delay(i, NWORDS);
    if (D == 0) begin : g_direct
      assign dout[i] = din[i];
    end else begin : g_chain
      logic [W-1:0] chain [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < D; k++) chain[k] <= '0;
        end else if (en) begin
          chain[0] <= din[i];
          for (int k = 1; k < D; k++) chain[k] <= chain[k-1];
        end
      end
      assign dout[i] = chain[D-1];
    end
  end
endmodule
