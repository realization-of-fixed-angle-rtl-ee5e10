// Reference models for the fixed-angle CORDIC testbenches.
//
// Arithmetic is done on plain integers: a right shift by k is written as a
// floor division by 2^k, so the models do not share the shift operators of
// the RTL. rot_seq/scale_seq reproduce the exact word-level results of the
// datapaths (truncating shifts, wrap to W bits); ideal_rot gives the exact
// real-valued rotation used for accuracy checks.
package cordic_ref_pkg;

  function automatic longint floor_div2(longint v, int unsigned k);
    longint p;
    if (k >= 62) return (v < 0) ? -1 : 0;
    p = longint'(1) << k;
    if (v >= 0) return v / p;
    return -((-v + p - 1) / p);
  endfunction

  function automatic longint wrap(longint v, int unsigned w);
    longint m = longint'(1) << w;
    longint r = v % m;
    if (r < 0) r += m;
    if (r >= m / 2) r -= m;
    return r;
  endfunction

  // One micro-rotation, sigma = +1 when ccw is 1.
  function automatic void rot_step(inout longint x, inout longint y,
                                   input int unsigned k, input bit ccw,
                                   input int unsigned w);
    longint dx = floor_div2(y, k);
    longint dy = floor_div2(x, k);
    if (ccw) begin x = wrap(x - dx, w); y = wrap(y + dy, w); end
    else     begin x = wrap(x + dx, w); y = wrap(y - dy, w); end
  endfunction

  // One scaling step, tau = +1 when add is 1.
  function automatic void scale_step(inout longint x, inout longint y,
                                     input int unsigned j, input bit add,
                                     input int unsigned w);
    longint dx = floor_div2(x, j);
    longint dy = floor_div2(y, j);
    if (add) begin x = wrap(x + dx, w); y = wrap(y + dy, w); end
    else     begin x = wrap(x - dx, w); y = wrap(y - dy, w); end
  endfunction

  // Exact rotation of (x, y) by deg degrees, rounded.
  function automatic void ideal_rot(input longint x, input longint y, input real deg,
                                    output real xr, output real yr);
    real a = deg * 3.14159265358979323846 / 180.0;
    xr = x * $cos(a) - y * $sin(a);
    yr = x * $sin(a) + y * $cos(a);
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
