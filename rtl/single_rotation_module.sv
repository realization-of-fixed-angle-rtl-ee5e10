// Single-rotation module: one fixed micro-rotation by sigma * atan(2^-K).
//
// A pair of adder/subtractors whose operation is fixed by SIGN (1: sigma=+1):
//   xo = x - sigma * (y >> K),   yo = y + sigma * (x >> K).
// There is no barrel shifter and no sign-bit register: the shifted operand is
// wired in, its L-K most significant bits feeding the K-bit-shifted position
// and its top K bits filled with the sign. Purely combinational; the cascade
// that uses it registers the outputs.
module single_rotation_module #(
  parameter int unsigned L = 16,
  parameter int unsigned K = 2,
  parameter bit SIGN = 1'b1
) (
  input  logic signed [L-1:0] xi,
  input  logic signed [L-1:0] yi,
  output logic signed [L-1:0] xo,
  output logic signed [L-1:0] yo
);
  logic signed [L-K-1:0] xw, yw;   // hardwired pre-shifted words

  assign xw = xi[L-1:K];
  assign yw = yi[L-1:K];

  if (SIGN) begin : g_ccw
    assign xo = xi - L'(yw);
    assign yo = yi + L'(xw);
  end else begin : g_cw
    assign xo = xi + L'(yw);
    assign yo = yi - L'(xw);
  end
endmodule
