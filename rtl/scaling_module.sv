// Single scaling module: multiplies a vector by the constant (1 + tau*2^-J).
//
// The scaling counterpart of single_rotation_module, used by the pipelined
// cascades: each coordinate is added to (TAU = 1) or reduced by (TAU = 0) a
// copy of itself shifted right by J through wiring:
//   xo = x + tau * (x >> J),   yo = y + tau * (y >> J).
// Purely combinational.
module scaling_module #(
  parameter int unsigned L = 16,
  parameter int unsigned J = 5,
  parameter bit TAU = 1'b0
) (
  input  logic signed [L-1:0] xi,
  input  logic signed [L-1:0] yi,
  output logic signed [L-1:0] xo,
  output logic signed [L-1:0] yo
);
  logic signed [L-1:0] xw, yw;

  // The shifted copy: the top L-J bits wired down J places, the J top bits
  // filled with the sign; shifts of L or more leave only the sign.
  if (J < L) begin : g_shift
    assign xw = xi >>> J;
    assign yw = yi >>> J;
  end else begin : g_sign
    assign xw = {L{xi[L-1]}};
    assign yw = {L{yi[L-1]}};
  end

  if (TAU) begin : g_add
    assign xo = xi + xw;
    assign yo = yi + yw;
  end else begin : g_sub
    assign xo = xi - xw;
    assign yo = yi - yw;
  end
endmodule
