// End-to-end testbench of fixed_angle_cordic_top at its default (and only)
// configuration.
// The same stream of random vectors is offered to all four rotators at once,
// each through its own handshake, while the Cartesian-to-polar unit converts
// its own vectors with a randomly dropped clock enable. Every rotator result
// is compared bit for bit with the integer model of its schedule (all
// micro-rotations then all scaling steps, or both interleaved) and with the
// exact 22.5-degree rotation; every conversion with the vectoring model.
// The testbench also counts how often each mechanism of the design happened
// and fails if one never did: back-pressure on the iterative units
// (in_valid held while in_ready is low), a two-stage hand-over from rotation
// cell to scaler, vectors entering the single-rotation pipeline on
// consecutive edges, vectors accepted by the bi-rotation cascade two cycles
// apart, and converter cycles with the clock enable low.
module tb_fixed_angle_cordic_top;
  import cordic_ref_pkg::*;
  import fixed_cordic_pkg::*;

  localparam int unsigned L = WL;
  localparam real ANGLE = 22.5;
  localparam int  NVEC  = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rts_in_valid, rts_in_ready, rts_out_valid;
  logic ilv_in_valid, ilv_in_ready, ilv_out_valid;
  logic src_in_valid, src_out_valid;
  logic brc_in_valid, brc_in_ready, brc_out_valid;
  vec_t rts_in, rts_out, ilv_in, ilv_out, src_in, src_out, brc_in, brc_out, c2p_in;
  logic c2p_clk_enable, c2p_ce_out, c2p_dvld;
  logic signed [L-1:0] c2p_mag, c2p_angle;

  int checks = 0, failures = 0, cycle = 0;
  int n_stall = 0, n_handover = 0, n_stream = 0, n_bi_spacing = 0, n_ce_low = 0;
  int n_conv = 0;

  fixed_angle_cordic_top dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference models ---------------------------------------------------
  function automatic vec_t model(vec_t v, bit interleaved);
    longint x = v.x, y = v.y;
    vec_t r;
    if (interleaved) begin
      for (int i = 0; i < NROT; i++) begin
        rot_step(x, y, ROT_SHIFT[i], ROT_SIGN[i], L);
        scale_step(x, y, SCALE_SHIFT[i], SCALE_SIGN[i], L);
      end
    end else begin
      for (int i = 0; i < NROT; i++) rot_step(x, y, ROT_SHIFT[i], ROT_SIGN[i], L);
      for (int j = 0; j < NSCALE; j++) scale_step(x, y, SCALE_SHIFT[j], SCALE_SIGN[j], L);
    end
    r.x = L'(x); r.y = L'(y);
    return r;
  endfunction

  task automatic check_rot(string who, vec_t vin, vec_t vout, bit interleaved);
    vec_t e = model(vin, interleaved);
    real rx, ry;
    checks++;
    if (vout !== e) begin
      failures++;
      $display("FAIL %s in=(%0d,%0d) out=(%0d,%0d) exp=(%0d,%0d)", who,
               vin.x, vin.y, vout.x, vout.y, e.x, e.y);
    end
    ideal_rot(vin.x, vin.y, ANGLE, rx, ry);
    checks++;
    if (absr(vout.x - rx) > 6.0 || absr(vout.y - ry) > 6.0) begin
      failures++;
      $display("FAIL %s accuracy in=(%0d,%0d) out=(%0d,%0d)", who, vin.x, vin.y, vout.x, vout.y);
    end
  endtask

  // ---- stimulus: one vector list, each rotator walks through it ----------
  vec_t vecs [NVEC];
  int   rts_i = 0, ilv_i = 0, src_i = 0, brc_i = 0;   // next vector to offer
  int   rts_o = 0, ilv_o = 0, src_o = 0, brc_o = 0;   // next result expected
  int   brc_last = -10, src_last = -10;

  always @(negedge clk) if (rst_n) begin
    rts_in_valid <= (rts_i < NVEC);
    rts_in       <= vecs[rts_i % NVEC];
    ilv_in_valid <= (ilv_i < NVEC);
    ilv_in       <= vecs[ilv_i % NVEC];
    brc_in_valid <= (brc_i < NVEC);
    brc_in       <= vecs[brc_i % NVEC];
    src_in_valid <= (src_i < NVEC) && ($urandom_range(0, 3) !== 0);
    src_in       <= vecs[src_i % NVEC];
    c2p_clk_enable <= ($urandom_range(0, 3) !== 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (rts_in_valid && !rts_in_ready) n_stall++;
    if (ilv_in_valid && !ilv_in_ready) n_stall++;
    if (brc_in_valid && !brc_in_ready) n_stall++;
    if (rts_in_valid && rts_in_ready) rts_i++;
    if (ilv_in_valid && ilv_in_ready) ilv_i++;
    if (brc_in_valid && brc_in_ready) begin
      if (cycle - brc_last == 2) n_bi_spacing++;
      brc_last = cycle;
      brc_i++;
    end
    if (src_in_valid) begin
      if (cycle - src_last == 1) n_stream++;
      src_last = cycle;
      src_i++;
    end
    if (!c2p_clk_enable) n_ce_low++;
    if (rts_out_valid) begin n_handover++; check_rot("rts", vecs[rts_o], rts_out, 1'b0); rts_o++; end
    if (ilv_out_valid) begin check_rot("ilv", vecs[ilv_o], ilv_out, 1'b1); ilv_o++; end
    if (src_out_valid) begin check_rot("src", vecs[src_o], src_out, 1'b0); src_o++; end
    if (brc_out_valid) begin check_rot("brc", vecs[brc_o], brc_out, 1'b0); brc_o++; end
  end

  // ---- Cartesian-to-polar: vector (3000, 4000), magnitude 5000 -----------
  always @(posedge clk) if (rst_n && c2p_clk_enable && c2p_dvld) begin
    real ta = $atan2(4000.0, 3000.0) * 180.0 / 3.14159265358979 * 256.0;
    n_conv++;
    checks++;
    if (absr(c2p_angle - ta) > 240.0 || absr(c2p_mag - 5000.0) > 56.0) begin
      failures++;
      $display("FAIL c2p mag=%0d angle=%0d", c2p_mag, c2p_angle);
    end
  end

  initial begin
    for (int n = 0; n < NVEC; n++) begin
      vecs[n].x = L'($signed(14'($urandom)));
      vecs[n].y = L'($signed(14'($urandom)));
    end
    rts_in_valid = 0; ilv_in_valid = 0; src_in_valid = 0; brc_in_valid = 0;
    rts_in = '0; ilv_in = '0; src_in = '0; brc_in = '0;
    c2p_clk_enable = 1'b0;
    c2p_in.x = 16'sd3000; c2p_in.y = 16'sd4000;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (rts_o == NVEC && ilv_o == NVEC && src_o == NVEC && brc_o == NVEC);
    repeat (20) @(posedge clk);
    $display("mechanisms: stalls=%0d handovers=%0d pipelined_back_to_back=%0d birotation_2cycle=%0d ce_low=%0d conversions=%0d",
             n_stall, n_handover, n_stream, n_bi_spacing, n_ce_low, n_conv);
    checks++;
    if (n_stall == 0 || n_handover == 0 || n_stream == 0 || n_bi_spacing == 0 ||
        n_ce_low == 0 || n_conv == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
