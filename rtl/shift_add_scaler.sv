// Shift-add scaling circuit: removes the gain of a fixed CORDIC rotation.
//
// Multiplies x and y by the constant prod_j (1 + tau(j) * 2^-s(j)), which
// approximates the CORDIC scale factor K = prod_i (1 + 2^-2k(i))^-1/2 of the
// micro-rotations. Same structure as the rotation cell, but the shifted word
// is added to its own coordinate (no crossing):
//   x <- x + tau(j) * (x >> s(j)),   y <- y + tau(j) * (y >> s(j)).
// Shift counts come from a ROM (pre-shifted by the smallest s), signs tau
// from a sign-bit register. The factor set is a parameter; the default is
// the four-term set that approximates K of the default 22.5-degree rotation.
//
// Interface and timing as in fixed_rotation_cell: in_valid/in_ready input
// handshake, out_valid is sampled high at the (N+1)-th clock edge after
// the edge that accepted the vector, and the
// scaled vector stays on xs_o, ys_o until the next one is accepted.
module shift_add_scaler #(
  parameter int unsigned L = 16,
  parameter int unsigned N = 4,
  parameter int unsigned SSH [N] = '{5, 7, 10, 15},
  parameter logic [N-1:0] SIGNS = 4'b1100
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [L-1:0] xi,
  input  logic signed [L-1:0] yi,
  output logic                out_valid,
  output logic signed [L-1:0] xs_o,
  output logic signed [L-1:0] ys_o
);
  function automatic int unsigned smin();
    int unsigned m = SSH[0];
    for (int i = 1; i < N; i++) if (SSH[i] < m) m = SSH[i];
    return m;
  endfunction

  function automatic int unsigned smax();
    int unsigned m = SSH[0];
    for (int i = 1; i < N; i++) if (SSH[i] > m) m = SSH[i];
    return m;
  endfunction

  localparam int unsigned PRE    = smin();
  localparam int unsigned MAXSEL = smax() - smin();
  localparam int unsigned SW     = (MAXSEL > 0) ? $clog2(MAXSEL + 1) : 1;
  localparam int unsigned CW     = (N > 1) ? $clog2(N) : 1;

  function automatic logic [N-1:0][SW-1:0] rom_image();
    logic [N-1:0][SW-1:0] img;
    for (int i = 0; i < N; i++) img[i] = SW'(SSH[i] - PRE);
    return img;
  endfunction

  logic signed [L-1:0] xr, yr, xsh, ysh, xsum, ysum;
  logic [SW-1:0]       sel;
  logic [CW-1:0]       cnt;
  logic                busy, tau, accept, last;

  assign in_ready = !busy;
  assign accept   = in_valid && in_ready;
  assign last     = (32'(cnt) == N - 1);

  shift_rom #(.N(N), .DW(SW), .CONTENTS(rom_image())) u_rom (
    .addr(cnt), .data(sel)
  );

  sign_bit_register #(.N(N), .SIGNS(SIGNS)) u_sbr (
    .clk, .rst_n, .load(accept), .step(busy), .sign(tau)
  );

  preshift_barrel_shifter #(.W(L), .PRE(PRE), .MAXSEL(MAXSEL)) u_shx (
    .d(xr), .sel, .q(xsh)
  );
  preshift_barrel_shifter #(.W(L), .PRE(PRE), .MAXSEL(MAXSEL)) u_shy (
    .d(yr), .sel, .q(ysh)
  );

  addsub #(.W(L)) u_addx (.a(xr), .b(xsh), .sub(!tau), .y(xsum));
  addsub #(.W(L)) u_addy (.a(yr), .b(ysh), .sub(!tau), .y(ysum));

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
        xr   <= xi;
        yr   <= yi;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        xr   <= xsum;
        yr   <= ysum;
        cnt  <= last ? '0 : cnt + 1'b1;
        busy <= !last;
      end
    end
  end

  assign xs_o = xr;
  assign ys_o = yr;
endmodule
