// Classification cell of the classifier array.
//
// Each systolic step (en high) the cell compares the discriminant g1 of its row
// with the running maximum g2 arriving from the cell above and passes the larger
// one down together with its label: G' <- max(G1, G2), l' <- l_i where G' = G_i.
// The row's label l1 comes from the label delay column on the right. Comparison is
// signed; on a tie the value from above is kept (this design's choice).
// g_o/l_o are the registered outputs; g_d/l_d are the values they will take at the
// next step, used by the array to hand its bottom result straight to an output
// shift register.
module class_cell #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] g1,   // discriminant of this row (from the left)
  input  logic [W-1:0] l1,   // label of this row's weighted vector (from the right)
  input  logic [W-1:0] g2,   // running maximum (from above)
  input  logic [W-1:0] l2,   // its label
  output logic [W-1:0] g_o,
  output logic [W-1:0] l_o,
  output logic [W-1:0] g_d,
  output logic [W-1:0] l_d
);
  always_comb begin
    if ($signed(g1) > $signed(g2)) begin
      g_d = g1;
      l_d = l1;
    end else begin
      g_d = g2;
      l_d = l2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_o <= '0;
      l_o <= '0;
    end else if (en) begin
      g_o <= g_d;
      l_o <= l_d;
    end
  end
endmodule
