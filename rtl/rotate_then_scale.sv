// Fixed-angle CORDIC rotator with micro-rotation and scaling in two stages.
//
// A fixed_rotation_cell performs the M micro-rotations of the angle set and
// hands the unscaled vector to a shift_add_scaler placed behind it, which
// multiplies by the approximated scale factor K. Both stages are iterative
// and work concurrently on consecutive vectors.
//
// Interface: in_valid/in_ready handshake on (x0, y0); out_valid pulses for
// one cycle when (xo, yo) holds the rotated and scaled vector, which stays
// there until the scaler accepts the next one.
// Timing: the rotation stage takes M+1 cycles, the scaler NS+1, so out_valid
// is sampled high at the (2 + M + NS)-th clock edge after the edge that
// accepted the vector (10 with the defaults) and a new
// one is accepted every M+1 cycles. The scaler must not be slower than the
// rotation stage (NS <= M); an assertion watches the hand-over.
module rotate_then_scale #(
  parameter int unsigned L  = 16,
  parameter int unsigned M  = 4,
  parameter int unsigned KSH [M] = '{2, 3, 5, 7},
  parameter logic [M-1:0] KSIGNS = 4'b0111,
  parameter int unsigned NS = 4,
  parameter int unsigned SSH [NS] = '{5, 7, 10, 15},
  parameter logic [NS-1:0] SSIGNS = 4'b1100
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [L-1:0] x0,
  input  logic signed [L-1:0] y0,
  output logic                out_valid,
  output logic signed [L-1:0] xo,
  output logic signed [L-1:0] yo
);
  logic                rot_valid, scl_ready;
  logic signed [L-1:0] xr, yr;

  fixed_rotation_cell #(.L(L), .M(M), .KSH(KSH), .SIGNS(KSIGNS)) u_rot (
    .clk, .rst_n, .in_valid, .in_ready, .x0, .y0,
    .out_valid(rot_valid), .xn(xr), .yn(yr)
  );

  shift_add_scaler #(.L(L), .N(NS), .SSH(SSH), .SIGNS(SSIGNS)) u_scale (
    .clk, .rst_n, .in_valid(rot_valid), .in_ready(scl_ready), .xi(xr), .yi(yr),
    .out_valid, .xs_o(xo), .ys_o(yo)
  );

  // The scaler is free whenever the rotation stage delivers a vector.
  a_handover: assert property (@(posedge clk) disable iff (!rst_n)
                               rot_valid |-> scl_ready)
    else $error("rotate_then_scale: scaler busy at hand-over");
endmodule
