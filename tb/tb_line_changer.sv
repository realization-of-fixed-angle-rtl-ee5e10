// Testbench of line_changer: random words through both settings of swap.
module tb_line_changer;
  localparam int unsigned W = 16;
  logic         swap;
  logic [W-1:0] a, b, oa, ob;
  int checks = 0, failures = 0;

  line_changer #(.W(W)) dut (.swap, .a, .b, .oa, .ob);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = W'($urandom); b = W'($urandom); swap = n[0];
      #1;
      checks++;
      if (swap ? (oa !== b || ob !== a) : (oa !== a || ob !== b)) begin
        failures++;
        $display("FAIL swap=%0b a=%h b=%h oa=%h ob=%h", swap, a, b, oa, ob);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
