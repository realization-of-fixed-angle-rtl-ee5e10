// Testbench of fixed_rotation_cell (with its ROM, SBR and pre-shifting
// barrel shifters). Vectors are offered back to back; each result is compared
// bit for bit with the integer model of the four micro-rotations, the result
// divided by the CORDIC gain must match the exact 22.5-degree rotation within
// a few LSBs, the latency from acceptance to out_valid must be M+1 cycles and
// acceptances must be M+1 cycles apart.
module tb_fixed_rotation_cell;
  import cordic_ref_pkg::*;
  import fixed_cordic_pkg::*;

  localparam int unsigned L = WL, M = NROT;
  localparam real ANGLE = 22.5;
  localparam int  NVEC  = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid;
  logic signed [L-1:0] x0, y0, xn, yn;
  int checks = 0, failures = 0;

  fixed_rotation_cell #(.L(L), .M(M), .KSH(ROT_SHIFT), .SIGNS(ROT_SIGN)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .x0, .y0, .out_valid, .xn, .yn
  );

  always #5 clk = !clk;

  longint qx[$], qy[$];      // accepted inputs
  int     qt[$];             // cycle of acceptance
  int     cycle = 0, last_accept = -1;
  real    gain;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record acceptances and check their spacing.
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    qx.push_back(x0); qy.push_back(y0); qt.push_back(cycle);
    if (last_accept >= 0) begin
      checks++;
      if (cycle - last_accept !== M + 1) begin
        failures++;
        $display("FAIL acceptance spacing %0d", cycle - last_accept);
      end
    end
    last_accept = cycle;
  end

  // Check every result.
  always @(posedge clk) if (rst_n && out_valid) begin
    longint ex, ey, ix, iy;
    real rx, ry;
    int t;
    ix = qx.pop_front(); iy = qy.pop_front(); t = qt.pop_front();
    ex = ix; ey = iy;
    for (int i = 0; i < M; i++) rot_step(ex, ey, ROT_SHIFT[i], ROT_SIGN[i], L);
    checks++;
    if (longint'(xn) !== ex || longint'(yn) !== ey) begin
      failures++;
      $display("FAIL in=(%0d,%0d) out=(%0d,%0d) exp=(%0d,%0d)", ix, iy, xn, yn, ex, ey);
    end
    ideal_rot(ix, iy, ANGLE, rx, ry);
    checks++;
    if (absr(xn * gain - rx) > 4.0 || absr(yn * gain - ry) > 4.0) begin
      failures++;
      $display("FAIL accuracy in=(%0d,%0d) out*K=(%f,%f) ideal=(%f,%f)",
               ix, iy, xn * gain, yn * gain, rx, ry);
    end
    checks++;
    if (cycle - t !== M + 1) begin
      failures++;
      $display("FAIL latency %0d", cycle - t);
    end
  end

  initial begin
    gain = 1.0;
    for (int i = 0; i < M; i++) gain = gain / $sqrt(1.0 + 2.0 ** (-2.0 * ROT_SHIFT[i]));
    in_valid = 1'b0; x0 = '0; y0 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      case (n)
        0: begin x0 = 16'sd8191;  y0 = 16'sd0;     end
        1: begin x0 = 16'sd0;     y0 = -16'sd8192; end
        2: begin x0 = -16'sd8192; y0 = -16'sd8192; end
        default: begin x0 = L'($signed(14'($urandom))); y0 = L'($signed(14'($urandom))); end
      endcase
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (2 * M + 4) @(posedge clk);
    checks++;
    if (qx.size() !== 0) begin
      failures++;
      $display("FAIL %0d results missing", qx.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
