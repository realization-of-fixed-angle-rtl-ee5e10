// Line changer of the interleaved CORDIC cell.
//
// Two 2:1 multiplexers that exchange two W-bit lines: with swap low a goes to
// oa and b to ob, with swap high a goes to ob and b to oa. In the interleaved
// cell it sits on the unshifted lines in front of the adders, so that in a
// scaling cycle each adder receives the same coordinate on both inputs, and
// the critical path through the barrel shifter is left as it is.
// Purely combinational.
module line_changer #(
  parameter int unsigned W = 16
) (
  input  logic         swap,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] oa,
  output logic [W-1:0] ob
);
  always_comb begin
    oa = swap ? b : a;
    ob = swap ? a : b;
  end
endmodule
