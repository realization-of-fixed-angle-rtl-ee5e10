// Testbench of preshift_barrel_shifter: every shift amount with random and
// corner-case words (both signs), compared with a floor division by 2^(PRE+sel).
module tb_preshift_barrel_shifter;
  import cordic_ref_pkg::*;

  localparam int unsigned W = 16, PRE = 2, MAXSEL = 5, SW = 3;

  logic signed [W-1:0] d, q;
  logic [SW-1:0]       sel;
  int checks = 0, failures = 0;

  preshift_barrel_shifter #(.W(W), .PRE(PRE), .MAXSEL(MAXSEL)) dut (.d, .sel, .q);

  task automatic check_one(logic signed [W-1:0] v, int unsigned s);
    longint exp;
    d = v; sel = SW'(s);
    #1;
    exp = floor_div2(longint'(v), PRE + s);
    checks++;
    if (longint'(q) !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL d=%0d sel=%0d q=%0d exp=%0d", v, s, q, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned s = 0; s <= MAXSEL; s++) begin
      check_one(16'sh7fff, s);
      check_one(-16'sh8000, s);
      check_one(-16'sd1, s);
      check_one(16'sd1, s);
      check_one(-16'sd5, s);
      for (int n = 0; n < 200; n++) check_one(W'($urandom), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
