// tmr_voter -- bitwise two-out-of-three majority of three copies of a bus.
// Used wherever the design triplicates a small block (the input and output
// adders and the syndrome decoder / corrector) so that a soft error in one
// copy cannot reach the outputs. Purely combinational.
module tmr_voter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch   // some copy disagrees with the vote
);
  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = (a != y) || (b != y) || (c != y);
  end
endmodule
