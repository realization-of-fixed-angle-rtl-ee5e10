// Sign-bit register (SBR): the directions of the micro-rotations.
//
// An N-bit circular shift register. load presets it to the fixed direction
// pattern SIGNS (bit i belongs to step i); every cycle with step high it
// rotates right by one, so that sign always presents the direction of the
// current step. Having recirculated N times it holds SIGNS again. load has
// priority over step. The register is preset by the asynchronous active-low
// reset as well.
module sign_bit_register #(
  parameter int unsigned N = 4,
  parameter logic [N-1:0] SIGNS = 4'b0111
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic step,
  output logic sign
);
  logic [N-1:0] sbr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sbr <= SIGNS;
    else if (load) sbr <= SIGNS;
    else if (step) sbr <= N'({sbr[0], sbr} >> 1);
  end

  assign sign = sbr[0];
endmodule
