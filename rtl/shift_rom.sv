// ROM of the barrel-shifter control words.
//
// Holds one control word per CORDIC step: the shift that the pre-shifting
// barrel shifter still has to apply, i.e. k(i) minus the hardwired pre-shift.
// The contents are fixed when the circuit is built (parameter CONTENTS,
// word i in CONTENTS[i]) and
// the word is read combinationally at address addr, which the controller
// steps once per iteration. Addresses past N-1 read as 0.
module shift_rom #(
  parameter int unsigned N  = 4,
  parameter int unsigned DW = 3,
  parameter logic [N-1:0][DW-1:0] CONTENTS = {3'd5, 3'd3, 3'd1, 3'd0},
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  logic [DW-1:0] mem [N];

  always_comb begin
    for (int i = 0; i < N; i++) mem[i] = CONTENTS[i];
  end

  always_comb data = (32'(addr) < N) ? mem[addr] : '0;
endmodule
