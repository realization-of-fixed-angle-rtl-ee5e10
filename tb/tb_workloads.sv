// Rotation workloads of different sizes, each on the realization it suits:
//   +90 and -90 degrees  rotate_then_scale with k = 0, 0 (two 45-degree
//                        micro-rotations) and one scaling step (1 - 2^-1);
//                        the result must be exactly (-y, x) resp. (y, -x)
//   two micro-rotations  birotation_cell, k = 1, 4 (+, -): 22.16 degrees,
//                        within 0.033 rad of 22.5 degrees
//   three micro-rotations single_rotation_cascade, N = 3, k = 1, 4, 7
//                        (+, -, -), scaled by (1-2^-4)(1-2^-4)(1+2^-6):
//                        22.459 degrees, 0.041 degrees off; run both
//                        pipelined and in the non-pipelined form
//   six micro-rotations  birotation_cascade with three cells, and a six-stage
//                        single_rotation_cascade, k = 2..7
//                        (+, +, +, -, -, +), scaled by
//                        (1-2^-4)(1+2^-5)(1-2^-7)(1+2^-10): 0.0001 degrees off
// Each result is compared with the exact rotation by 22.5 degrees (times the
// gain of the set where no scaling is done), allowing the set's angle error
// times the vector length plus 6 LSBs of truncation.
module tb_workloads;
  import cordic_ref_pkg::*;

  localparam int unsigned L = 16;
  localparam int NVEC = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic                iv;
    logic                ir;
    logic signed [L-1:0] x0, y0;
    logic                ov;
    logic signed [L-1:0] xo, yo;
  } port_t;

  port_t p90p, p90m, p2, p3, p3c, p6, p6s;

  localparam int unsigned K90 [2] = '{0, 0};
  localparam int unsigned S90 [1] = '{1};
  localparam int unsigned K3  [3] = '{1, 4, 7};
  localparam int unsigned S3  [3] = '{4, 4, 6};
  localparam int unsigned K6  [6] = '{2, 3, 4, 5, 6, 7};
  localparam int unsigned S6  [4] = '{4, 5, 7, 10};

  rotate_then_scale #(.L(L), .M(2), .KSH(K90), .KSIGNS(2'b11),
                      .NS(1), .SSH(S90), .SSIGNS(1'b0)) u90p (
    .clk, .rst_n, .in_valid(p90p.iv), .in_ready(p90p.ir), .x0(p90p.x0), .y0(p90p.y0),
    .out_valid(p90p.ov), .xo(p90p.xo), .yo(p90p.yo)
  );
  rotate_then_scale #(.L(L), .M(2), .KSH(K90), .KSIGNS(2'b00),
                      .NS(1), .SSH(S90), .SSIGNS(1'b0)) u90m (
    .clk, .rst_n, .in_valid(p90m.iv), .in_ready(p90m.ir), .x0(p90m.x0), .y0(p90m.y0),
    .out_valid(p90m.ov), .xo(p90m.xo), .yo(p90m.yo)
  );
  birotation_cell #(.L(L), .K0(1), .K1(4), .SIGNS(2'b01)) u2 (
    .clk, .rst_n, .in_valid(p2.iv), .in_ready(p2.ir), .x0(p2.x0), .y0(p2.y0),
    .out_valid(p2.ov), .xo(p2.xo), .yo(p2.yo)
  );

  single_rotation_cascade #(.L(L), .N(3), .KSH(K3), .KSIGNS(3'b001),
                            .NS(3), .SSH(S3), .SSIGNS(3'b100)) u3 (
    .clk, .rst_n, .in_valid(p3.iv), .x0(p3.x0), .y0(p3.y0),
    .out_valid(p3.ov), .xo(p3.xo), .yo(p3.yo)
  );
  // The same three-step set in the non-pipelined form (one output register).
  single_rotation_cascade #(.L(L), .N(3), .KSH(K3), .KSIGNS(3'b001),
                            .NS(3), .SSH(S3), .SSIGNS(3'b100), .PIPELINED(1'b0)) u3c (
    .clk, .rst_n, .in_valid(p3c.iv), .x0(p3c.x0), .y0(p3c.y0),
    .out_valid(p3c.ov), .xo(p3c.xo), .yo(p3c.yo)
  );
  birotation_cascade #(.L(L), .NB(3), .KSH(K6), .KSIGNS(6'b100111),
                       .NS(4), .SSH(S6), .SSIGNS(4'b1010)) u6 (
    .clk, .rst_n, .in_valid(p6.iv), .in_ready(p6.ir), .x0(p6.x0), .y0(p6.y0),
    .out_valid(p6.ov), .xo(p6.xo), .yo(p6.yo)
  );
  single_rotation_cascade #(.L(L), .N(6), .KSH(K6), .KSIGNS(6'b100111),
                            .NS(4), .SSH(S6), .SSIGNS(4'b1010)) u6s (
    .clk, .rst_n, .in_valid(p6s.iv), .x0(p6s.x0), .y0(p6s.y0),
    .out_valid(p6s.ov), .xo(p6s.xo), .yo(p6s.yo)
  );

  // Offer NVEC random vectors through one port, one at a time, and check
  // each result; kind selects the expectation.
  task automatic run(ref port_t p, input int kind, input string name);
    real rx, ry, tol, g, len;
    logic signed [L-1:0] x, y;
    for (int n = 0; n < NVEC; n++) begin
      x = L'($signed(14'($urandom)));
      y = L'($signed(14'($urandom)));
      @(negedge clk);
      p.iv = 1'b1; p.x0 = x; p.y0 = y;
      do @(posedge clk); while (!p.ir);
      @(negedge clk) p.iv = 1'b0;
      while (!p.ov) @(negedge clk);
      len = $sqrt(real'(x) * x + real'(y) * y);
      checks++;
      case (kind)
        0: if (p.xo !== -y || p.yo !== x) begin
             failures++;
             $display("FAIL %s in=(%0d,%0d) out=(%0d,%0d)", name, x, y, p.xo, p.yo);
           end
        1: if (p.xo !== y || p.yo !== -x) begin
             failures++;
             $display("FAIL %s in=(%0d,%0d) out=(%0d,%0d)", name, x, y, p.xo, p.yo);
           end
        default: begin
          // kind 2: unscaled two-rotation set, kind 3/6: scaled sets
          g   = (kind == 2) ? $sqrt(1.25) * $sqrt(1.0 + 2.0 ** -8) : 1.0;
          tol = len * ((kind == 2) ? 0.033 : (kind == 3) ? 0.0411 * 3.14159265 / 180.0
                                                         : 0.0002 * 3.14159265 / 180.0)
                + 6.0;
          ideal_rot(x, y, 22.5, rx, ry);
          if (absr(p.xo - g * rx) > tol || absr(p.yo - g * ry) > tol) begin
            failures++;
            $display("FAIL %s in=(%0d,%0d) out=(%0d,%0d) ideal=(%f,%f) tol=%f", name,
                     x, y, p.xo, p.yo, g * rx, g * ry, tol);
          end
        end
      endcase
    end
  endtask

  initial begin
    p90p.iv = 0; p90m.iv = 0; p2.iv = 0; p3.iv = 0; p6.iv = 0; p3.ir = 1;
    p3c.iv = 0; p3c.ir = 1; p3c.x0 = 0; p3c.y0 = 0;
    p6s.iv = 0; p6s.ir = 1; p6s.x0 = 0; p6s.y0 = 0;
    p90p.x0 = 0; p90p.y0 = 0; p90m.x0 = 0; p90m.y0 = 0;
    p2.x0 = 0; p2.y0 = 0; p3.x0 = 0; p3.y0 = 0; p6.x0 = 0; p6.y0 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(p90p, 0, "+90");
    run(p90m, 1, "-90");
    run(p2, 2, "two");
    run(p3, 3, "three");
    run(p3c, 3, "three, not pipelined");
    run(p6, 6, "six");
    run(p6s, 6, "six, single-rotation stages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
