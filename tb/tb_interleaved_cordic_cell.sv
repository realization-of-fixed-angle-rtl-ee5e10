// Testbench of interleaved_cordic_cell. The model alternates micro-rotations and scaling steps, as the cell does; the result must match the exact 22.5-degree rotation within 6 LSBs.
// Vectors are offered back to back through the valid/ready handshake; each
// result is compared bit for bit with the integer reference model, checked
// for accuracy where it applies, and the latency from acceptance to
// out_valid (9 clock edges from the accepting edge to the one at which
// out_valid is sampled high) and the spacing of acceptances (9 cycles) are checked.
module tb_interleaved_cordic_cell;
  import cordic_ref_pkg::*;
  import fixed_cordic_pkg::*;

  localparam int unsigned L = WL;
  localparam real ANGLE = 22.5;
  localparam int  NVEC  = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid;
  logic signed [L-1:0] x0, y0, xo, yo;
  int checks = 0, failures = 0;

  interleaved_cordic_cell dut (
    .clk, .rst_n, .in_valid, .in_ready, .x0, .y0, .out_valid, .xn(xo), .yn(yo)
  );

  always #5 clk = !clk;

  longint qx[$], qy[$];
  int     qt[$];
  int     cycle = 0, last_accept = -1;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    qx.push_back(x0); qy.push_back(y0); qt.push_back(cycle);
    if (last_accept >= 0) begin
      checks++;
      if (cycle - last_accept !== 9) begin
        failures++;
        $display("FAIL acceptance spacing %0d", cycle - last_accept);
      end
    end
    last_accept = cycle;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint ex, ey, ix, iy;
    real rx, ry;
    int t;
    ix = qx.pop_front(); iy = qy.pop_front(); t = qt.pop_front();
    ex = ix; ey = iy;
    for (int i = 0; i < NROT; i++) begin
      rot_step(ex, ey, ROT_SHIFT[i], ROT_SIGN[i], L);
      scale_step(ex, ey, SCALE_SHIFT[i], SCALE_SIGN[i], L);
    end
    ideal_rot(ix, iy, ANGLE, rx, ry);
    checks++;
    if (absr(xo - rx) > 6.0 || absr(yo - ry) > 6.0) begin
      failures++;
      $display("FAIL accuracy in=(%0d,%0d) out=(%0d,%0d) ideal=(%f,%f)", ix, iy, xo, yo, rx, ry);
    end
    checks++;
    if (longint'(xo) !== ex || longint'(yo) !== ey) begin
      failures++;
      $display("FAIL in=(%0d,%0d) out=(%0d,%0d) exp=(%0d,%0d)", ix, iy, xo, yo, ex, ey);
    end
    checks++;
    if (cycle - t !== 9) begin
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
    repeat (40) @(posedge clk);
    checks++;
    if (qx.size() !== 0) begin
      failures++;
      $display("FAIL %0d results missing", qx.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
