// Barrel shifter with hardwired pre-shifting.
//
// Shifts a signed W-bit word right arithmetically by PRE + sel bit positions.
// The first PRE positions cost nothing: only the W-PRE most significant bits
// of the input are wired into the multiplexer stages, which therefore are
// W-PRE bits wide and only have to cover the range 0 .. MAXSEL. PRE is the
// smallest shift of the angle set and PRE + MAXSEL the largest. The result
// sits in the W-PRE least significant bits of the output; the PRE top bits
// are filled with the sign, so that negative operands are shifted correctly
// in two's complement (a zero fill, as for unsigned data, would be wrong for
// them). The PRE least significant input bits are unused by design: they
// would be shifted out anyway. One stage of 2:1 multiplexers per bit of sel, $clog2(MAXSEL+1)
// stages in all. Purely combinational. The PRE+1 top output bits all carry
// the input sign bit, so synthesis sees them as wired to the input.
module preshift_barrel_shifter #(
  parameter int unsigned W      = 16,
  parameter int unsigned PRE    = 2,
  parameter int unsigned MAXSEL = 5,
  localparam int unsigned SW    = (MAXSEL > 0) ? $clog2(MAXSEL + 1) : 1
) (
  input  logic signed [W-1:0]  d,
  input  logic        [SW-1:0] sel,
  output logic signed [W-1:0]  q
);
  localparam int unsigned NW = W - PRE;

  // stage[0] is the pre-shifted word, stage[s+1] the output of mux stage s.
  logic signed [NW-1:0] stage [SW+1];

  assign stage[0] = d[W-1:PRE];

  for (genvar s = 0; s < SW; s++) begin : g_stage
    if (MAXSEL > 0) begin : g_mux
      assign stage[s+1] = sel[s] ? (stage[s] >>> (2 ** s)) : stage[s];
    end else begin : g_none
      // A single fixed shift needs no multiplexer at all.
      assign stage[s+1] = stage[s];
    end
  end

  // Sign-extend back to the full word.
  always_comb q = W'(stage[SW]);
endmodule
