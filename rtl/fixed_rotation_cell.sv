// Iterative CORDIC cell for one fixed rotation (constant complex multiplier).
//
// Two registers hold x and y. Each cycle both words pass through a barrel
// shifter that shifts them right by k(i); the shifted words cross over to the
// opposite adder/subtractor, and the sums go back into the registers:
//   x <- x - sigma(i) * (y >> k(i)),   y <- y + sigma(i) * (x >> k(i)).
// The shift counts come from a ROM addressed by an iteration counter, the
// directions sigma(i) from the sign-bit register (SBR); no angle is computed.
// The barrel shifters use hardwired pre-shifting: the smallest shift of the
// set is wired in and the multiplexer stages cover only the rest, so the ROM
// holds k(i) - min(k). The CORDIC gain is not removed here (see
// shift_add_scaler and rotate_then_scale).
//
// Interface: a valid/ready handshake on the input (x0, y0 are taken on the
// clock edge where in_valid and in_ready are both high) and a one-cycle
// out_valid pulse with the rotated, unscaled vector on xn, yn.
// Timing: the input is loaded at the accepting clock edge and the M
// iterations are written back at the next M edges; out_valid is then high
// and is sampled at the (M+1)-th edge after the accepting one, and
// xn, yn stay valid until the next vector is accepted. in_ready is low while
// the iterations run, so the cell takes one vector every M+1 cycles.
// The handshake, reset and counter are this design's own choices; the
// datapath (registers, ROM, SBR, shifters, crossing adders) follows the
// CORDIC cell for constant complex multiplication.
module fixed_rotation_cell #(
  parameter int unsigned L = 16,
  parameter int unsigned M = 4,
  parameter int unsigned KSH [M] = '{2, 3, 5, 7},
  parameter logic [M-1:0] SIGNS = 4'b0111
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [L-1:0] x0,
  input  logic signed [L-1:0] y0,
  output logic                out_valid,
  output logic signed [L-1:0] xn,
  output logic signed [L-1:0] yn
);
  function automatic int unsigned kmin();
    int unsigned m = KSH[0];
    for (int i = 1; i < M; i++) if (KSH[i] < m) m = KSH[i];
    return m;
  endfunction

  function automatic int unsigned kmax();
    int unsigned m = KSH[0];
    for (int i = 1; i < M; i++) if (KSH[i] > m) m = KSH[i];
    return m;
  endfunction

  localparam int unsigned PRE    = kmin();
  localparam int unsigned MAXSEL = kmax() - kmin();
  localparam int unsigned SW     = (MAXSEL > 0) ? $clog2(MAXSEL + 1) : 1;
  localparam int unsigned CW     = (M > 1) ? $clog2(M) : 1;

  function automatic logic [M-1:0][SW-1:0] rom_image();
    logic [M-1:0][SW-1:0] img;
    for (int i = 0; i < M; i++) img[i] = SW'(KSH[i] - PRE);
    return img;
  endfunction

  logic signed [L-1:0] xr, yr;           // REGISTER: X and REGISTER: Y
  logic signed [L-1:0] xs, ys;           // barrel-shifter outputs
  logic signed [L-1:0] xsum, ysum;       // adder/subtractor outputs
  logic [SW-1:0]       sel;              // ROM word of this iteration
  logic [CW-1:0]       cnt;              // iteration counter = ROM address
  logic                busy, sigma, accept, last;

  assign in_ready = !busy;
  assign accept   = in_valid && in_ready;
  assign last     = (32'(cnt) == M - 1);

  shift_rom #(.N(M), .DW(SW), .CONTENTS(rom_image())) u_rom (
    .addr(cnt), .data(sel)
  );

  sign_bit_register #(.N(M), .SIGNS(SIGNS)) u_sbr (
    .clk, .rst_n, .load(accept), .step(busy), .sign(sigma)
  );

  preshift_barrel_shifter #(.W(L), .PRE(PRE), .MAXSEL(MAXSEL)) u_shx (
    .d(xr), .sel, .q(xs)
  );
  preshift_barrel_shifter #(.W(L), .PRE(PRE), .MAXSEL(MAXSEL)) u_shy (
    .d(yr), .sel, .q(ys)
  );

  // sigma = +1: x - (y>>k), y + (x>>k); sigma = -1: x + (y>>k), y - (x>>k)
  addsub #(.W(L)) u_addx (.a(xr), .b(ys), .sub(sigma),  .y(xsum));
  addsub #(.W(L)) u_addy (.a(yr), .b(xs), .sub(!sigma), .y(ysum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr        <= '0;
      yr        <= '0;
      cnt       <= '0;
      busy      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= busy && last;
      if (accept) begin
        xr   <= x0;                      // initial values through the input mux
        yr   <= y0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        xr   <= xsum;                    // feedback X(i+1), Y(i+1)
        yr   <= ysum;
        cnt  <= last ? '0 : cnt + 1'b1;
        busy <= !last;
      end
    end
  end

  assign xn = xr;
  assign yn = yr;
endmodule
