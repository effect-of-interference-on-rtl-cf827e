// adm_ref_pkg: reference arithmetic for the delta-modulator testbenches,
// written from the algorithm's equations with plain integers and kept apart
// from the RTL so that the testbenches compare against an independent model.
//   step rule: |Y_k-1| < 2*Ymin -> 2*Ymin; else |Y_k-1| * (1 + 1/2) when the
//              two bits agree, |Y_k-1| * (1 - 1/2) (half rounded down before
//              it is taken away) when they differ; then at most Ymax
//   estimate:  X_k = X_k-1 + E_k |Y_k|, limited to 0 .. 2**W - 1
package adm_ref_pkg;

  function automatic int ref_step(bit e_k, bit e_km1, int y_prev, int ymin, int ymax);
    int sgn_k, sgn_km1, t;
    sgn_k   = e_k   ? 1 : -1;
    sgn_km1 = e_km1 ? 1 : -1;
    if (y_prev < 2 * ymin) return 2 * ymin;
    // y*(E_k + E_k-1/2) in magnitude, with y/2 rounded down
    t = sgn_k * y_prev + sgn_km1 * (y_prev / 2);
    if (t < 0) t = -t;
    if (t > ymax) t = ymax;
    return t;
  endfunction

  function automatic int ref_est(int x_prev, int y_mag, bit up, int w);
    int t;
    t = up ? x_prev + y_mag : x_prev - y_mag;
    if (t < 0) t = 0;
    if (t > (1 << w) - 1) t = (1 << w) - 1;
    return t;
  endfunction

  // Two-dimensional codec model: per-pixel state (estimate, step, bit) of
  // the previous pixel of the line and of every pixel of the line above.
  // The vertical predictor is used when strictly closer, never on the first
  // line of a frame, always at the start of the other lines.
  class adm2d_model;
    int w, ymin, ymax;
    int lx[], ly[], le[];
    int hx, hy, he;
    int col, row;

    function new(int w, int ymin, int ymax, int line_len);
      this.w = w; this.ymin = ymin; this.ymax = ymax;
      lx = new[line_len]; ly = new[line_len]; le = new[line_len];
      hx = 0; hy = 0; he = 0; col = 0; row = 0;
    endfunction

    // returns the reconstructed pixel; e and dir are what goes on the channel
    function int encode(int s, bit sol, bit sof, output bit e, output bit dir);
      int ax, ay, ae, dh, dv;
      if (sof) begin row = 0; hx = 0; hy = 0; he = 0; end
      else if (sol) row++;
      if (sol) col = 0;
      dh = s - hx; if (dh < 0) dh = -dh;
      dv = s - lx[col]; if (dv < 0) dv = -dv;
      if (row == 0) dir = 0;
      else if (col == 0) dir = 1;
      else dir = (dv < dh);
      if (dir) begin ax = lx[col]; ay = ly[col]; ae = le[col]; end
      else begin ax = hx; ay = hy; ae = he; end
      e = (s >= ax);
      return apply(ax, ay, ae, e);
    endfunction

    function int decode(bit e, bit dir, bit sol, bit sof);
      int ax, ay, ae;
      if (sof) begin hx = 0; hy = 0; he = 0; end
      if (sol) col = 0;
      if (dir) begin ax = lx[col]; ay = ly[col]; ae = le[col]; end
      else begin ax = hx; ay = hy; ae = he; end
      return apply(ax, ay, ae, e);
    endfunction

    function int apply(int ax, int ay, int ae, bit e);
      int ny, nx;
      ny = ref_step(e, 1'(ae), ay, ymin, ymax);
      nx = ref_est(ax, ny, e, w);
      hx = nx; hy = ny; he = e;
      lx[col] = nx; ly[col] = ny; le[col] = e;
      col++;
      return nx;
    endfunction
  endclass

endpackage
