// Pipelined cascade of single-rotation modules, followed by pipelined scaling.
//
// Stage i is a single_rotation_module hardwired for micro-rotation k(i) in
// direction sigma(i); its result is registered and feeds stage i+1. After the
// N rotation stages come NS registered scaling_module stages that multiply by
// the approximated scale factor prod (1 + tau(j) 2^-s(j)). No ROM, SBR or
// barrel shifter is needed and the critical path is one addition.
//
// Interface: one vector may enter on every clock edge with in_valid high;
// the edge that takes it in already registers the first stage's result, so
// out_valid is sampled high at the (N+NS)-th edge after that one (8 with the
// defaults). There is no back-pressure.
// With PIPELINED = 0 the stages are chained without registers and only the
// last one is registered: the non-pipelined form, latency one edge, with a
// critical path through all N+NS additions. The valid pipeline and the pipelined
// scaling stages are this design's own choices; the published design
// cascades the rotation modules and leaves the placement of the scaling to
// the designer.
module single_rotation_cascade #(
  parameter int unsigned L  = 16,
  parameter int unsigned N  = 4,
  parameter int unsigned KSH [N] = '{2, 3, 5, 7},
  parameter logic [N-1:0] KSIGNS = 4'b0111,
  parameter int unsigned NS = 4,
  parameter int unsigned SSH [NS] = '{5, 7, 10, 15},
  parameter logic [NS-1:0] SSIGNS = 4'b1100,
  parameter bit PIPELINED = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [L-1:0] x0,
  input  logic signed [L-1:0] y0,
  output logic                out_valid,
  output logic signed [L-1:0] xo,
  output logic signed [L-1:0] yo
);
  localparam int unsigned NT = N + NS;   // pipeline depth

  // px/py[0] is the input, px/py[t+1] the input of stage t+1: the register
  // rx/ry[t] after stage t, or stage t's sum directly when not pipelined.
  logic signed [L-1:0] px [NT+1];
  logic signed [L-1:0] py [NT+1];
  logic signed [L-1:0] cx [NT];
  logic signed [L-1:0] cy [NT];
  logic [NT:0]         pv;
  logic signed [L-1:0] rx [NT];
  logic signed [L-1:0] ry [NT];
  logic [NT-1:0]       rv;

  assign px[0] = x0;
  assign py[0] = y0;
  assign pv[0] = in_valid;

  for (genvar t = 0; t < NT; t++) begin : g_stage
    if (t < N) begin : g_rot
      single_rotation_module #(.L(L), .K(KSH[t]), .SIGN(KSIGNS[t])) u_rot (
        .xi(px[t]), .yi(py[t]), .xo(cx[t]), .yo(cy[t])
      );
    end else begin : g_scale
      scaling_module #(.L(L), .J(SSH[t-N]), .TAU(SSIGNS[t-N])) u_scale (
        .xi(px[t]), .yi(py[t]), .xo(cx[t]), .yo(cy[t])
      );
    end

    // Stage register; in the non-pipelined form only the last one is used.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rx[t] <= '0;
        ry[t] <= '0;
        rv[t] <= 1'b0;
      end else begin
        rx[t] <= cx[t];
        ry[t] <= cy[t];
        rv[t] <= pv[t];
      end
    end

    if (PIPELINED || t == NT - 1) begin : g_reg
      assign px[t+1] = rx[t];
      assign py[t+1] = ry[t];
      assign pv[t+1] = rv[t];
    end else begin : g_wire
      assign px[t+1] = cx[t];
      assign py[t+1] = cy[t];
      assign pv[t+1] = pv[t];
    end
  end

  assign xo        = px[NT];
  assign yo        = py[NT];
  assign out_valid = pv[NT];
endmodule
