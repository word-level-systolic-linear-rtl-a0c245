// Byte counter that frames the byte-serial grouped streams.
//
// A group is the (n+2) words a vector stream carries per systolic step, sent as
// NBYTES consecutive bytes. The counter runs 0..NBYTES-1 from reset; `last` is
// high during the cycle in which the final byte of a group is on the bus, and the
// systolic step happens at the clock edge that ends that cycle. Every chip of a
// system is reset together, so all counters run in phase (this design's choice
// of framing; how groups are delimited is not part of the original scheme).
module group_counter #(
  parameter int unsigned NBYTES = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic last
);
  logic [$clog2(NBYTES+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else begin
      a_cnt_range: assert (32'(cnt) < NBYTES);
      if (last) cnt <= '0;
      else      cnt <= cnt + 1'b1;
    end
  end

  assign last = (cnt == ($bits(cnt))'(NBYTES - 1));

endmodule
