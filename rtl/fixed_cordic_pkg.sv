// Shared constants and types of the fixed-angle CORDIC rotators.
//
// Every rotator in this library turns a two's-complement vector (x, y) through
// one angle that is known when the hardware is built. The angle is written as
// a short sum of elementary CORDIC angles sigma(i)*atan(2^-k(i)); the shift
// counts k(i) live in a small ROM (or are wired in) and the directions sigma(i)
// in a sign-bit register (SBR), so no angle datapath is needed. The CORDIC
// gain 1/K is removed afterwards (or in between) by shift-add scaling steps
// x <- x + tau(j)*x*2^-j(j) whose product approximates K.
//
// The default configuration rotates by +22.5 degrees with four micro-rotations
// k = 2, 3, 5, 7 with directions +, +, +, - (sum 22.4964 deg, error 0.0036 deg)
// and scales by (1-2^-5)(1-2^-7)(1+2^-10)(1+2^-15) = 0.9621497 against the exact
// K = 0.9621519. Both sets were chosen by exhaustive search over four terms;
// the angle, the word length and both sets are this library's own defaults,
// and any other fixed angle is obtained by overriding the parameters.
//
// Sign bits: a 1 means sigma = +1 (counter-clockwise micro-rotation,
// x' = x - y*2^-k, y' = y + x*2^-k) or, for a scaling step, tau = +1.
package fixed_cordic_pkg;

  // Word length of the x and y datapaths.
  localparam int unsigned WL = 16;

  // Number of micro-rotations and of scaling steps in the default angle set.
  localparam int unsigned NROT   = 4;
  localparam int unsigned NSCALE = 4;

  // Shift counts k(i) of the micro-rotations, ascending.
  localparam int unsigned ROT_SHIFT [NROT] = '{2, 3, 5, 7};
  // Directions of the micro-rotations, bit i for micro-rotation i.
  localparam logic [NROT-1:0] ROT_SIGN = 4'b0111;

  // Shift counts j of the scaling steps and their signs (bit i = 1: add).
  localparam int unsigned SCALE_SHIFT [NSCALE] = '{5, 7, 10, 15};
  localparam logic [NSCALE-1:0] SCALE_SIGN = 4'b1100;

  // One vector of the datapath.
  typedef struct packed {
    logic signed [WL-1:0] x;
    logic signed [WL-1:0] y;
  } vec_t;

endpackage
