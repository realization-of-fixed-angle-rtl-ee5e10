// Testbench of shift_rom: reads every address of a 6-word ROM (and two
// addresses past its end, which must read 0) and compares with the contents.
module tb_shift_rom;
  localparam int unsigned N = 6, DW = 4, AW = 3;
  localparam logic [N-1:0][DW-1:0] C = {4'd9, 4'd7, 4'd4, 4'd3, 4'd1, 4'd0};

  logic [AW-1:0] addr;
  logic [DW-1:0] data;
  int checks = 0, failures = 0;

  shift_rom #(.N(N), .DW(DW), .CONTENTS(C)) dut (.addr, .data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      addr = AW'(a);
      #1;
      checks++;
      if (data !== ((a < N) ? C[a] : '0)) begin
        failures++;
        $display("FAIL addr=%0d data=%0d", a, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
