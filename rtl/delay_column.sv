// Column of C delay elements (D) beside the classifier array.
//
// The weighted-vector stream moves up the column one row per systolic step:
// a word enters row C (the bottom) and leaves row 1 (the top) C steps later.
// Each row's content is tapped to the side: in the left column it is the initial
// value w^{n+1} of the row's inner product, in the right column the class label
// of the weighted vector the row is working with. tap[0] is row 1 (top).
// d_out_nxt is the word row 1 will hold after the next step, i.e. the word
// leaving the column, presented without the row-1 register's extra step so a
// chip's output shift register can take that register's place.
module delay_column #(
  parameter int unsigned W = 16,
  parameter int unsigned C = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d_in,
  output logic [W-1:0] tap [C],
  output logic [W-1:0] d_out_nxt
);
  logic [W-1:0] r [C];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < C; i++) r[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < int'(C) - 1; i++) r[i] <= r[i+1];
      r[C-1] <= d_in;
    end
  end

  assign tap       = r;
  assign d_out_nxt = (C > 1) ? r[1 % C] : d_in;
endmodule
