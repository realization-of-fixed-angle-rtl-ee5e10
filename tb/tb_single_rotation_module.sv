// Testbench of single_rotation_module: both directions and several shift
// counts, random signed inputs, compared with the integer reference model.
module tb_single_rotation_module;
  import cordic_ref_pkg::*;

  localparam int unsigned L = 16;
  logic signed [L-1:0] xi, yi;
  logic signed [L-1:0] xo [4];
  logic signed [L-1:0] yo [4];
  int checks = 0, failures = 0;

  localparam int unsigned KS [4] = '{1, 2, 5, 9};
  localparam bit          SG [4] = '{1'b1, 1'b0, 1'b1, 1'b0};

  for (genvar g = 0; g < 4; g++) begin : g_dut
    single_rotation_module #(.L(L), .K(KS[g]), .SIGN(SG[g])) dut (
      .xi, .yi, .xo(xo[g]), .yo(yo[g])
    );
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      longint ex, ey;
      xi = L'($signed(13'($urandom)));
      yi = L'($signed(13'($urandom)));
      #1;
      for (int g = 0; g < 4; g++) begin
        ex = xi; ey = yi;
        rot_step(ex, ey, KS[g], SG[g], L);
        checks++;
        if (longint'(xo[g]) !== ex || longint'(yo[g]) !== ey) begin
          failures++;
          if (failures < 10)
            $display("FAIL k=%0d in=(%0d,%0d) out=(%0d,%0d) exp=(%0d,%0d)",
                     KS[g], xi, yi, xo[g], yo[g], ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
