// Cartesian-to-polar converter: a vectoring-mode CORDIC.
//
// Converts (x0, y0) into a magnitude xn1 and an angle zn1. It is built from
// the four parts whose names appear on the simulation waveform published
// with the design: Initial_Condition (captures the inputs and clears the
// angle accumulator), Controller (an 8-bit step counter, 0 to 7), the CORDIC
// algorithm (seven vectoring micro-rotations i = 0..6 that drive y towards
// zero while accumulating the angle) and GainCorrection (multiplies x by
// 1/1.6468 with shift-adds, 2^-1 + 2^-3 - 2^-6 - 2^-9 = 0.60742).
//   y >= 0: x <- x + (y >> i), y <- y - (x >> i), z <- z + atan(2^-i)
//   y <  0: x <- x - (y >> i), y <- y + (x >> i), z <- z - atan(2^-i)
// Angles are in degrees with eight fractional bits (1 degree = 256), which
// is the unit of the angle values printed on that waveform: the elementary
// angles round(256 * 180/pi * atan(2^-i)) are 11520, 6801, 3593, 1824, 916,
// 458 and 229, and their running sums 18321, 21914, ... 25341 appear there.
// Without a quadrant pre-rotation the angle range is that of plain CORDIC,
// about +-99 degrees, so x0 should be non-negative for exact results.
//
// Interface: synchronous active-high reset; clk_enable gates all state and
// is echoed on ce_out. Timing: the controller counts 0..7 in enabled cycles;
// at count 0 the inputs are sampled, counts 1..7 perform the seven
// iterations, and at the end of count 7 the results are registered on xn1,
// zn1 with dvld high for one enabled cycle. One conversion every eight
// enabled cycles, continuously. Word lengths (16-bit ports, two guard bits
// inside), the counter schedule and the reset style are this design's own
// choices.
module cartesian2polar #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                clk_enable,
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] y0,
  output logic                ce_out,
  output logic signed [W-1:0] xn1,
  output logic signed [W-1:0] zn1,
  output logic                dvld
);
  localparam int unsigned NIT = 7;
  localparam int unsigned WI  = W + 2;   // internal width with guard bits

  // Elementary angles atan(2^-i) in degrees * 256.
  localparam logic signed [W-1:0] ATAN [NIT] =
    '{16'sd11520, 16'sd6801, 16'sd3593, 16'sd1824, 16'sd916, 16'sd458, 16'sd229};

  logic [7:0]           count;           // Controller
  logic [2:0]           it;              // iteration index i
  logic signed [WI-1:0] xr, yr, xsh, ysh, xnext, ynext;
  logic signed [W-1:0]  zr, znext;
  logic signed [WI-1:0] xgain;           // GainCorrection

  assign it  = 3'(count - 8'd1);
  assign xsh = xr >>> it;
  assign ysh = yr >>> it;

  // CordicAlgorithm: one vectoring micro-rotation, direction from sign of y.
  always_comb begin
    if (!yr[WI-1]) begin
      xnext = xr + ysh;
      ynext = yr - xsh;
      znext = zr + ATAN[it];
    end else begin
      xnext = xr - ysh;
      ynext = yr + xsh;
      znext = zr - ATAN[it];
    end
  end

  // GainCorrection applied to the result of the last iteration.
  always_comb xgain = (xnext >>> 1) + (xnext >>> 3) - (xnext >>> 6) - (xnext >>> 9);

  always_ff @(posedge clk) begin
    if (reset) begin
      count <= '0;
      xr    <= '0;
      yr    <= '0;
      zr    <= '0;
      xn1   <= '0;
      zn1   <= '0;
      dvld  <= 1'b0;
    end else if (clk_enable) begin
      count <= (count == 8'(NIT)) ? '0 : count + 8'd1;
      dvld  <= (count == 8'(NIT));
      if (count == 0) begin
        // Initial_Condition
        xr <= WI'(x0);
        yr <= WI'(y0);
        zr <= '0;
      end else begin
        xr <= xnext;
        yr <= ynext;
        zr <= znext;
      end
      if (count == 8'(NIT)) begin
        xn1 <= W'(xgain);
        zn1 <= znext;
      end
    end
  end

  assign ce_out = clk_enable;
endmodule
