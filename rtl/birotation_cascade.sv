// Cascade of bi-rotation CORDIC cells, followed by pipelined scaling.
//
// NB bi-rotation cells are chained; cell b performs micro-rotations 2b and
// 2b+1 of the angle set (two cells for four micro-rotations, three for six).
// Each cell hands its second result straight from its adders to the next
// cell, which loads it at the same clock edge. The last result is registered
// and passes NS registered scaling_module stages that multiply by the
// approximated scale factor.
//
// Interface: in_valid/in_ready handshake on (x0, y0); in_ready is the first
// cell's, high every second cycle while vectors stream. out_valid marks
// (xo, yo) for one cycle.
// Timing: out_valid is sampled high at the (2*NB + NS + 1)-th clock edge
// after the edge that accepted the vector (9 with the defaults); throughput is one vector every two cycles. The cells of the
// chain run in lock-step, which an assertion checks at every hand-over.
// The scaling pipeline is this design's own choice.
module birotation_cascade #(
  parameter int unsigned L  = 16,
  parameter int unsigned NB = 2,
  parameter int unsigned KSH [2*NB] = '{2, 3, 5, 7},
  parameter logic [2*NB-1:0] KSIGNS = 4'b0111,
  parameter int unsigned NS = 4,
  parameter int unsigned SSH [NS] = '{5, 7, 10, 15},
  parameter logic [NS-1:0] SSIGNS = 4'b1100
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [L-1:0] x0,
  input  logic signed [L-1:0] y0,
  output logic                out_valid,
  output logic signed [L-1:0] xo,
  output logic signed [L-1:0] yo
);
  // Hand-over lines: index b is the input of cell b, index NB the last output.
  logic signed [L-1:0] hx [NB+1];
  logic signed [L-1:0] hy [NB+1];
  logic [NB:0]         hv;
  logic [NB-1:0]       rdy;

  assign hx[0] = x0;
  assign hy[0] = y0;
  assign hv[0] = in_valid;
  assign in_ready = rdy[0];

  for (genvar b = 0; b < NB; b++) begin : g_cell
    birotation_cell #(
      .L(L), .K0(KSH[2*b]), .K1(KSH[2*b+1]), .SIGNS(KSIGNS[2*b+1:2*b])
    ) u_cell (
      .clk, .rst_n, .in_valid(hv[b]), .in_ready(rdy[b]), .x0(hx[b]), .y0(hy[b]),
      .out_valid(hv[b+1]), .xo(hx[b+1]), .yo(hy[b+1])
    );

    if (b > 0) begin : g_chk
      a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                   hv[b] |-> rdy[b])
        else $error("birotation_cascade: cell %0d not ready at hand-over", b);
    end
  end

  // Scaling pipeline: sx/sy[0] is the registered cascade output.
  logic signed [L-1:0] sx [NS+1];
  logic signed [L-1:0] sy [NS+1];
  logic signed [L-1:0] cx [NS];
  logic signed [L-1:0] cy [NS];
  logic [NS:0]         sv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sx[0] <= '0;
      sy[0] <= '0;
      sv[0] <= 1'b0;
    end else begin
      sx[0] <= hx[NB];
      sy[0] <= hy[NB];
      sv[0] <= hv[NB];
    end
  end

  for (genvar j = 0; j < NS; j++) begin : g_scale
    scaling_module #(.L(L), .J(SSH[j]), .TAU(SSIGNS[j])) u_scale (
      .xi(sx[j]), .yi(sy[j]), .xo(cx[j]), .yo(cy[j])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sx[j+1] <= '0;
        sy[j+1] <= '0;
        sv[j+1] <= 1'b0;
      end else begin
        sx[j+1] <= cx[j];
        sy[j+1] <= cy[j];
        sv[j+1] <= sv[j];
      end
    end
  end

  assign xo        = sx[NS];
  assign yo        = sy[NS];
  assign out_valid = sv[NS];
endmodule
