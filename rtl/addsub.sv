// Adder/subtractor of the CORDIC datapath.
//
// Computes y = a + b when sub is 0 and y = a - b when sub is 1, in W-bit
// two's complement with wrap-around (no saturation; the rotators keep their
// operands small enough that no overflow occurs). Purely combinational. The
// published design leaves the adder architecture open; a plain carry-chain
// adder as inferred by synthesis is used.
module addsub #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                sub,
  output logic signed [W-1:0] y
);
  always_comb y = sub ? (a - b) : (a + b);
endmodule
