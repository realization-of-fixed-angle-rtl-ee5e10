// Testbench of single_rotation_cascade. A new vector enters on most clock
// edges (with random gaps); every result is compared bit for bit with the
// integer model (four micro-rotations, then four scaling steps), must match
// the exact 22.5-degree rotation within 6 LSBs, and must be sampled with
// out_valid exactly 8 clock edges after the edge that took it in.
module tb_single_rotation_cascade;
  import cordic_ref_pkg::*;
  import fixed_cordic_pkg::*;

  localparam int unsigned L = WL;
  localparam real ANGLE = 22.5;
  localparam int  NVEC  = 400;
  localparam int  LAT   = NROT + NSCALE;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic signed [L-1:0] x0, y0, xo, yo;
  int checks = 0, failures = 0, back_to_back = 0;

  single_rotation_cascade dut (
    .clk, .rst_n, .in_valid, .x0, .y0, .out_valid, .xo, .yo
  );

  always #5 clk = !clk;

  longint qx[$], qy[$];
  int     qt[$];
  int     cycle = 0, last_in = -10;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid) begin
    qx.push_back(x0); qy.push_back(y0); qt.push_back(cycle);
    if (cycle - last_in == 1) back_to_back++;
    last_in = cycle;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint ex, ey, ix, iy;
    real rx, ry;
    int t;
    ix = qx.pop_front(); iy = qy.pop_front(); t = qt.pop_front();
    ex = ix; ey = iy;
    for (int i = 0; i < NROT; i++) rot_step(ex, ey, ROT_SHIFT[i], ROT_SIGN[i], L);
    for (int j = 0; j < NSCALE; j++) scale_step(ex, ey, SCALE_SHIFT[j], SCALE_SIGN[j], L);
    checks++;
    if (longint'(xo) !== ex || longint'(yo) !== ey) begin
      failures++;
      $display("FAIL in=(%0d,%0d) out=(%0d,%0d) exp=(%0d,%0d)", ix, iy, xo, yo, ex, ey);
    end
    ideal_rot(ix, iy, ANGLE, rx, ry);
    checks++;
    if (absr(xo - rx) > 6.0 || absr(yo - ry) > 6.0) begin
      failures++;
      $display("FAIL accuracy in=(%0d,%0d) out=(%0d,%0d) ideal=(%f,%f)", ix, iy, xo, yo, rx, ry);
    end
    checks++;
    if (cycle - t !== LAT) begin
      failures++;
      $display("FAIL latency %0d", cycle - t);
    end
  end

  initial begin
    in_valid = 1'b0; x0 = '0; y0 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) !== 0);
      x0 = L'($signed(14'($urandom)));
      y0 = L'($signed(14'($urandom)));
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (qx.size() !== 0 || back_to_back < 10) begin
      failures++;
      $display("FAIL %0d results missing, %0d back-to-back inputs", qx.size(), back_to_back);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
