// Fixed-angle CORDIC rotators side by side, with a vectoring converter.
//
// Four alternative realizations of the same fixed rotation (default +22.5
// degrees, four micro-rotations, four scaling steps; see fixed_cordic_pkg)
// stand next to each other, each with its own input handshake and output
// (latency: clock edges from the accepting edge to the one at which
// out_valid is sampled high):
//   rts  rotate_then_scale        iterative cell, then iterative scaler
//                                 (one vector per 5 cycles, latency 10)
//   ilv  interleaved_cordic_cell  rotation and scaling in alternate cycles
//                                 of one cell (one per 9 cycles, latency 9)
//   src  single_rotation_cascade  fully pipelined single-rotation stages
//                                 (one per cycle, latency 8)
//   brc  birotation_cascade       two bi-rotation cells in a chain
//                                 (one per 2 cycles, latency 9)
// A fifth unit, cartesian2polar (c2p), is a seven-iteration vectoring CORDIC
// that converts a vector to magnitude and angle; its angle is in degrees
// times 256. The rotators share clk and the active-low asynchronous reset
// rst_n; the converter uses a synchronous active-high reset derived from it
// and has its own clock enable. Vectors are fixed_cordic_pkg::vec_t, 16-bit
// two's complement per coordinate; keep |x|, |y| below 2^13 so that no
// intermediate value overflows.
module fixed_angle_cordic_top
  import fixed_cordic_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // rotate_then_scale
  input  logic         rts_in_valid,
  output logic         rts_in_ready,
  input  vec_t         rts_in,
  output logic         rts_out_valid,
  output vec_t         rts_out,
  // interleaved_cordic_cell
  input  logic         ilv_in_valid,
  output logic         ilv_in_ready,
  input  vec_t         ilv_in,
  output logic         ilv_out_valid,
  output vec_t         ilv_out,
  // single_rotation_cascade
  input  logic         src_in_valid,
  input  vec_t         src_in,
  output logic         src_out_valid,
  output vec_t         src_out,
  // birotation_cascade
  input  logic         brc_in_valid,
  output logic         brc_in_ready,
  input  vec_t         brc_in,
  output logic         brc_out_valid,
  output vec_t         brc_out,
  // cartesian2polar
  input  logic         c2p_clk_enable,
  input  vec_t         c2p_in,
  output logic         c2p_ce_out,
  output logic signed [WL-1:0] c2p_mag,
  output logic signed [WL-1:0] c2p_angle,
  output logic         c2p_dvld
);
  rotate_then_scale #(
    .L(WL), .M(NROT), .KSH(ROT_SHIFT), .KSIGNS(ROT_SIGN),
    .NS(NSCALE), .SSH(SCALE_SHIFT), .SSIGNS(SCALE_SIGN)
  ) u_rts (
    .clk, .rst_n, .in_valid(rts_in_valid), .in_ready(rts_in_ready),
    .x0(rts_in.x), .y0(rts_in.y),
    .out_valid(rts_out_valid), .xo(rts_out.x), .yo(rts_out.y)
  );

  interleaved_cordic_cell #(
    .L(WL), .M(NROT), .KSH(ROT_SHIFT), .KSIGNS(ROT_SIGN),
    .SSH(SCALE_SHIFT), .SSIGNS(SCALE_SIGN)
  ) u_ilv (
    .clk, .rst_n, .in_valid(ilv_in_valid), .in_ready(ilv_in_ready),
    .x0(ilv_in.x), .y0(ilv_in.y),
    .out_valid(ilv_out_valid), .xn(ilv_out.x), .yn(ilv_out.y)
  );

  single_rotation_cascade #(
    .L(WL), .N(NROT), .KSH(ROT_SHIFT), .KSIGNS(ROT_SIGN),
    .NS(NSCALE), .SSH(SCALE_SHIFT), .SSIGNS(SCALE_SIGN)
  ) u_src (
    .clk, .rst_n, .in_valid(src_in_valid), .x0(src_in.x), .y0(src_in.y),
    .out_valid(src_out_valid), .xo(src_out.x), .yo(src_out.y)
  );

  birotation_cascade #(
    .L(WL), .NB(NROT / 2), .KSH(ROT_SHIFT), .KSIGNS(ROT_SIGN),
    .NS(NSCALE), .SSH(SCALE_SHIFT), .SSIGNS(SCALE_SIGN)
  ) u_brc (
    .clk, .rst_n, .in_valid(brc_in_valid), .in_ready(brc_in_ready),
    .x0(brc_in.x), .y0(brc_in.y),
    .out_valid(brc_out_valid), .xo(brc_out.x), .yo(brc_out.y)
  );

  cartesian2polar #(.W(WL)) u_c2p (
    .clk, .reset(!rst_n), .clk_enable(c2p_clk_enable),
    .x0(c2p_in.x), .y0(c2p_in.y),
    .ce_out(c2p_ce_out), .xn1(c2p_mag), .zn1(c2p_angle), .dvld(c2p_dvld)
  );
endmodule
