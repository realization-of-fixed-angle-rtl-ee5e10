// Testbench of cartesian2polar.
// First the vector (0, 1) of the published simulation is converted: the angle
// must come out as 25341 (98.99 degrees, the sum of the seven elementary
// angles) and the magnitude as 0. Then random vectors with x >= 0 are
// converted while clk_enable is dropped at random. The testbench counts
// enabled clock edges: inputs are sampled at every 8th enabled edge, and at
// the next such edge dvld must be high with the results of the previous
// window; at all other enabled edges dvld must be low. Results are compared
// bit for bit with an integer model (seven vectoring steps on 18-bit words,
// elementary angles computed here with $atan, shift-add gain correction) and
// against atan2 (within 240, the last elementary angle 229 plus rounding)
// and the true magnitude (within 1% + 6).
module tb_cartesian2polar;
  import cordic_ref_pkg::*;

  localparam int unsigned W = 16, WI = 18, NIT = 7;
  localparam int NWIN = 300;

  logic clk = 1'b0, reset = 1'b1, clk_enable = 1'b0;
  logic signed [W-1:0] x0, y0, xn1, zn1;
  logic ce_out, dvld;
  int checks = 0, failures = 0, ecount = 0, windows = 0;
  longint qx[$], qy[$];
  longint atab [NIT];

  cartesian2polar #(.W(W)) dut (
    .clk, .reset, .clk_enable, .x0, .y0, .ce_out, .xn1, .zn1, .dvld
  );

  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model(input longint xi, input longint yi,
                                output longint mag, output longint ang);
    longint x = xi, y = yi, z = 0, dx, dy;
    for (int i = 0; i < NIT; i++) begin
      dx = floor_div2(y, i);
      dy = floor_div2(x, i);
      if (y >= 0) begin x = wrap(x + dx, WI); y = wrap(y - dy, WI); z += atab[i]; end
      else        begin x = wrap(x - dx, WI); y = wrap(y + dy, WI); z -= atab[i]; end
    end
    mag = wrap(floor_div2(x, 1) + floor_div2(x, 3) - floor_div2(x, 6) - floor_div2(x, 9), W);
    ang = wrap(z, W);
  endfunction

  always @(posedge clk) if (!reset) begin
    checks++;
    if (ce_out !== clk_enable) begin
      failures++;
      $display("FAIL ce_out");
    end
    if (clk_enable) begin
      if (ecount % 8 == 0) begin
        if (ecount > 0) begin
          longint ix, iy, em, ea;
          real ta, tm;
          ix = qx.pop_front(); iy = qy.pop_front();
          model(ix, iy, em, ea);
          windows++;
          checks++;
          if (!dvld || longint'(xn1) !== em || longint'(zn1) !== ea) begin
            failures++;
            $display("FAIL in=(%0d,%0d) dvld=%b mag=%0d ang=%0d exp=(%0d,%0d)",
                     ix, iy, dvld, xn1, zn1, em, ea);
          end
          if (ix == 0 && iy == 1) begin
            checks++;
            if (zn1 !== 16'sd25341 || xn1 !== 16'sd0) begin
              failures++;
              $display("FAIL waveform vector: zn1=%0d xn1=%0d", zn1, xn1);
            end
          end else begin
            ta = $atan2(real'(iy), real'(ix)) * 180.0 / 3.14159265358979 * 256.0;
            tm = $sqrt(real'(ix) * ix + real'(iy) * iy);
            checks++;
            if (absr(zn1 - ta) > 240.0 || absr(xn1 - tm) > 0.01 * tm + 6.0) begin
              failures++;
              $display("FAIL accuracy in=(%0d,%0d) mag=%0d ang=%0d true=(%f,%f)",
                       ix, iy, xn1, zn1, tm, ta);
            end
          end
        end
        qx.push_back(x0); qy.push_back(y0);
      end else begin
        checks++;
        if (dvld) begin
          failures++;
          $display("FAIL dvld at enabled edge %0d", ecount);
        end
      end
      ecount <= ecount + 1;
    end
  end

  initial begin
    x0 = 16'sd0; y0 = 16'sd1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    while (windows < NWIN) begin
      @(negedge clk);
      clk_enable = (windows < 2) || ($urandom_range(0, 4) !== 0);
      if (windows >= 1 && (ecount % 8 !== 0)) begin
        x0 = W'($urandom_range(0, 12000));
        y0 = W'($signed(15'($urandom)) % 12000);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NIT; i++)
      atab[i] = longint'($rtoi($atan(2.0 ** (-i)) * 180.0 / 3.14159265358979 * 256.0 + 0.5));
  end
endmodule
