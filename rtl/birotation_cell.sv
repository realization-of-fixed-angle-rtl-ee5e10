// Bi-rotation CORDIC cell: two fixed micro-rotations k0 < k1 in two cycles.
//
// The cell is the rotation cell reduced to one pair of micro-rotations. The
// barrel shifters take the register words pre-shifted by k0 through wiring
// and need a single stage of 2:1 multiplexers: control bit 0 adds no further
// shift (micro-rotation by 2^-k0), control bit 1 shifts by k1 - k0 more
// (micro-rotation by 2^-k1). The control bit comes from a T flip-flop that
// toggles every working cycle; the two directions sit in a 2-bit sign-bit
// register that rotates with it.
//
// Interface: in_valid/in_ready handshake on (x0, y0). The result of the
// second micro-rotation is presented combinationally on (xo, yo) with
// out_valid high during the second working cycle, straight from the adders,
// so that a following cell can load it at the same clock edge.
// Timing: a vector is loaded at the accepting edge, the first micro-rotation
// is written back one edge later and the second is on the outputs in the
// cycle after that. A new vector can be loaded at the edge that ends the
// second micro-rotation, so the cell takes one vector every two cycles.
// Loading through a valid/ready handshake and the combinational hand-over
// are this design's own choices.
module birotation_cell #(
  parameter int unsigned L  = 16,
  parameter int unsigned K0 = 2,
  parameter int unsigned K1 = 3,
  parameter logic [1:0] SIGNS = 2'b11
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
  logic signed [L-1:0] xr, yr, xs, ys, xsum, ysum;
  logic                busy, t, sigma, accept;

  assign in_ready  = !busy || t;
  assign accept    = in_valid && in_ready;
  assign out_valid = busy && t;

  // T flip-flop: control bit of the one-stage barrel shifters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      t <= 1'b0;
    else if (accept) t <= 1'b0;
    else if (busy)   t <= !t;
  end

  sign_bit_register #(.N(2), .SIGNS(SIGNS)) u_sbr (
    .clk, .rst_n, .load(accept), .step(busy), .sign(sigma)
  );

  // One-stage barrel shifters: the top L-K0 bits are wired in (pre-shift by
  // K0), and one row of 2:1 multiplexers adds K1-K0 when t is 1.
  localparam int unsigned NW = L - K0;
  logic signed [NW-1:0] xpre, ypre, xmux, ymux;

  assign xpre = xr[L-1:K0];
  assign ypre = yr[L-1:K0];
  assign xmux = t ? (xpre >>> (K1 - K0)) : xpre;
  assign ymux = t ? (ypre >>> (K1 - K0)) : ypre;
  assign xs   = L'(xmux);
  assign ys   = L'(ymux);

  addsub #(.W(L)) u_addx (.a(xr), .b(ys), .sub(sigma),  .y(xsum));
  addsub #(.W(L)) u_addy (.a(yr), .b(xs), .sub(!sigma), .y(ysum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr   <= '0;
      yr   <= '0;
      busy <= 1'b0;
    end else if (accept) begin
      xr   <= x0;
      yr   <= y0;
      busy <= 1'b1;
    end else if (busy) begin
      xr   <= xsum;
      yr   <= ysum;
      busy <= !t;
    end
  end

  assign xo = xsum;
  assign yo = ysum;

  if (K1 <= K0 || K0 >= L) begin : g_bad_shifts
    $error("birotation_cell: need K0 < K1 and K0 < L");
  end
endmodule
