// Generalized fixed-angle CORDIC cell with interleaved scaling.
//
// One pair of registers, barrel shifters and adder/subtractors performs both
// the micro-rotations and the shift-add scaling steps, alternating cycle by
// cycle: micro-rotation 0, scaling step 0, micro-rotation 1, scaling step 1,
// and so on (2*M steps for M micro-rotations and M scaling steps).
//   rotation step i:  x <- x - sigma(i)*(y >> k(i)),  y <- y + sigma(i)*(x >> k(i))
//   scaling step j:   x <- x + tau(j)*(x >> s(j)),    y <- y + tau(j)*(y >> s(j))
// A ROM of 2*M words holds the interleaved shift counts (less the smallest
// one, which is hardwired as a pre-shift) and a 2*M-bit sign-bit register the
// interleaved directions. A T flip-flop toggles every step and marks the
// scaling cycles. In a scaling cycle a line changer on the unshifted lines
// swaps the direct operands, so the adder that normally forms x gets y and
// y >> s, and the other gets x and x >> s; the results are written back
// crosswise (into the register they came from). The barrel-shifter paths are
// never switched, so the critical path is that of the plain rotation cell.
// The crosswise write-back is folded into the register input multiplexer
// that already selects between the initial and the fed-back value.
//
// Interface and timing: in_valid/in_ready handshake on (x0, y0); out_valid
// is sampled high at the (2*M+1)-th clock edge after the accepting edge
// (9 with the defaults) with the rotated
// and scaled vector on (xn, yn), held until the next vector is accepted.
module interleaved_cordic_cell #(
  parameter int unsigned L = 16,
  parameter int unsigned M = 4,
  parameter int unsigned KSH [M] = '{2, 3, 5, 7},
  parameter logic [M-1:0] KSIGNS = 4'b0111,
  parameter int unsigned SSH [M] = '{5, 7, 10, 15},
  parameter logic [M-1:0] SSIGNS = 4'b1100
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
  localparam int unsigned NSTEP = 2 * M;

  function automatic int unsigned shift_of(int unsigned step);
    return (step % 2 == 0) ? KSH[step/2] : SSH[step/2];
  endfunction

  function automatic int unsigned min_shift();
    int unsigned m = shift_of(0);
    for (int i = 1; i < NSTEP; i++) if (shift_of(i) < m) m = shift_of(i);
    return m;
  endfunction

  function automatic int unsigned max_shift();
    int unsigned m = shift_of(0);
    for (int i = 1; i < NSTEP; i++) if (shift_of(i) > m) m = shift_of(i);
    return m;
  endfunction

  localparam int unsigned PRE    = min_shift();
  localparam int unsigned MAXSEL = max_shift() - min_shift();
  localparam int unsigned SW     = (MAXSEL > 0) ? $clog2(MAXSEL + 1) : 1;
  localparam int unsigned CW     = $clog2(NSTEP);

  function automatic logic [NSTEP-1:0][SW-1:0] rom_image();
    logic [NSTEP-1:0][SW-1:0] img;
    for (int i = 0; i < NSTEP; i++) img[i] = SW'(shift_of(i) - PRE);
    return img;
  endfunction

  function automatic logic [NSTEP-1:0] sbr_image();
    logic [NSTEP-1:0] img;
    for (int i = 0; i < M; i++) begin
      img[2*i]   = KSIGNS[i];
      img[2*i+1] = SSIGNS[i];
    end
    return img;
  endfunction

  logic signed [L-1:0] xr, yr, xs, ys, dl, dr, suml, sumr;
  logic [SW-1:0]       sel;
  logic [CW-1:0]       cnt;
  logic                busy, sgn, scale, accept, last;

  assign in_ready = !busy;
  assign accept   = in_valid && in_ready;
  assign last     = (32'(cnt) == NSTEP - 1);

  shift_rom #(.N(NSTEP), .DW(SW), .CONTENTS(rom_image())) u_rom (
    .addr(cnt), .data(sel)
  );

  sign_bit_register #(.N(NSTEP), .SIGNS(sbr_image())) u_sbr (
    .clk, .rst_n, .load(accept), .step(busy), .sign(sgn)
  );

  // T flip-flop: 0 in micro-rotation cycles, 1 in scaling cycles.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      scale <= 1'b0;
    else if (accept) scale <= 1'b0;
    else if (busy)   scale <= !scale;
  end

  preshift_barrel_shifter #(.W(L), .PRE(PRE), .MAXSEL(MAXSEL)) u_shx (
    .d(xr), .sel, .q(xs)
  );
  preshift_barrel_shifter #(.W(L), .PRE(PRE), .MAXSEL(MAXSEL)) u_shy (
    .d(yr), .sel, .q(ys)
  );

  line_changer #(.W(L)) u_lc (
    .swap(scale), .a(xr), .b(yr), .oa(dl), .ob(dr)
  );

  // Left adder gets the shifted y, right adder the shifted x (crossed lines).
  // Rotation: left = x -/+ (y>>k), right = y +/- (x>>k).
  // Scaling:  left = y +/- (y>>s), right = x +/- (x>>s).
  addsub #(.W(L)) u_addl (.a(dl), .b(ys), .sub(scale ? !sgn : sgn), .y(suml));
  addsub #(.W(L)) u_addr (.a(dr), .b(xs), .sub(!sgn),               .y(sumr));

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
        xr   <= x0;
        yr   <= y0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        xr   <= scale ? sumr : suml;
        yr   <= scale ? suml : sumr;
        cnt  <= last ? '0 : cnt + 1'b1;
        busy <= !last;
      end
    end
  end

  assign xn = xr;
  assign yn = yr;
endmodule
