// Testbench of sign_bit_register: after reset and after every load the
// register must present the direction bits of SIGNS in order, one per step,
// recirculating after N steps, and must hold its bit while step is low.
module tb_sign_bit_register;
  localparam int unsigned N = 5;
  localparam logic [N-1:0] SIGNS = 5'b10110;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0, sign;
  int checks = 0, failures = 0, pos = 0;

  sign_bit_register #(.N(N), .SIGNS(SIGNS)) dut (.clk, .rst_n, .load, .step, .sign);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected position in the pattern, advanced like the register.
  always @(posedge clk) if (rst_n) begin
    if (load)      pos <= 0;
    else if (step) pos <= (pos + 1) % N;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (sign !== SIGNS[pos]) begin
      failures++;
      $display("FAIL pos=%0d sign=%b", pos, sign);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      #1;
      load = ($urandom_range(0, 15) == 0);
      step = ($urandom_range(0, 3) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
