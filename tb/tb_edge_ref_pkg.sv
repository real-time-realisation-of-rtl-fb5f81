// tb_edge_ref_pkg: bit-exact software model of the edge detector used by
// the end-to-end testbenches, written from the algorithm rather than from
// the RTL structure.
//
// The stream is a flat array d[] of grey pixels in raster order with
// image width w; neighbour (dy, dx) of index n is n + dy*w + dx (windows
// wrap across row ends, as in the hardware). For every index the model
// gives the smoothed value, the ADM strength and direction, and the final
// edge-map value and direction. A value whose window reaches outside the
// array is marked invalid (-1).
package tb_edge_ref_pkg;

  typedef int arr_t[];

  // Gaussian weights (sigma 1.7, lambda 2) in units of 2^-3, by offset.
  function automatic int gauss_w(input int dy, input int dx);
    int ay = (dy < 0) ? -dy : dy;
    int ax = (dx < 0) ? -dx : dx;
    case (ay * 3 + ax)
      0:       return 9;            // 2^0 + 2^-3
      1, 3, 4: return 6;            // 2^-1 + 2^-2
      2, 6:    return 4;            // 2^-1
      5, 7:    return 3;            // 2^-2 + 2^-3
      default: return 2;            // 2^-2 (corners)
    endcase
  endfunction

  function automatic void smooth(input arr_t d, input int w, output arr_t s);
    int n_tot = d.size();
    s = new[n_tot];
    for (int n = 0; n < n_tot; n++) begin
      int acc = 0;
      if (n - 2*w - 2 < 0 || n + 2*w + 2 >= n_tot) begin
        s[n] = -1;
        continue;
      end
      for (int dy = -2; dy <= 2; dy++)
        for (int dx = -2; dx <= 2; dx++) begin
          if (d[n + dy*w + dx] < 0) acc = -100000000;
          acc += gauss_w(dy, dx) * d[n + dy*w + dx];
        end
      // normalisation 2^-3 * (2^-4 + 2^-7) = 9 / 1024, truncated
      s[n] = (acc < 0) ? -1 : (acc * 9) / 1024;
    end
  endfunction

  function automatic int absd(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  // Direction codes: 1 edge along /, 2 along |, 3 along \, 4 along -.
  function automatic void strength(input arr_t s, input int w, output arr_t t, output arr_t dir);
    int n_tot = s.size();
    t   = new[n_tot];
    dir = new[n_tot];
    for (int n = 0; n < n_tot; n++) begin
      int df [4];
      int mx, md, mn;
      bit bad = 0;
      if (n - 2*w - 2 < 0 || n + 2*w + 2 >= n_tot) bad = 1;
      else
        for (int dy = -2; dy <= 2; dy++)
          for (int dx = -2; dx <= 2; dx++)
            if (s[n + dy*w + dx] < 0) bad = 1;
      if (bad) begin
        t[n] = -1; dir[n] = -1;
        continue;
      end
      df[0] = absd(s[n + w - 1] + s[n + 2*w - 2], s[n - w + 1] + s[n - 2*w + 2]);
      df[1] = absd(s[n - w] + s[n - 2*w], s[n + w] + s[n + 2*w]);
      df[2] = absd(s[n - w - 1] + s[n - 2*w - 2], s[n + w + 1] + s[n + 2*w + 2]);
      df[3] = absd(s[n - 1] + s[n - 2], s[n + 1] + s[n + 2]);
      mx = df[0]; mn = df[0]; md = 1;
      for (int i = 1; i < 4; i++) begin
        if (df[i] > mx) mx = df[i];
        if (df[i] < mn) begin mn = df[i]; md = i + 1; end
      end
      t[n]   = mx / 2;
      dir[n] = md;
    end
  endfunction

  // Edge-map value and direction; kind: 0 invalid, 1 edge, 2 suppressed
  // by a stronger neighbour, 3 local maximum at or below the threshold,
  // 4 below threshold and suppressed.
  function automatic void localise(input arr_t t, input arr_t dir, input int w,
                                   input int thr, input bit fin,
                                   output arr_t e, output arr_t ed, output arr_t kind);
    int n_tot = t.size();
    e    = new[n_tot];
    ed   = new[n_tot];
    kind = new[n_tot];
    for (int n = 0; n < n_tot; n++) begin
      int a, b, c;
      bit bad = 0;
      if (n - w - 1 < 0 || n + w + 1 >= n_tot) bad = 1;
      else
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (t[n + dy*w + dx] < 0) bad = 1;
      if (bad) begin
        e[n] = -1; ed[n] = -1; kind[n] = 0;
        continue;
      end
      c = t[n];
      // neighbours across the edge: a on the upper/left side, b opposite
      case (dir[n])
        1:       begin a = t[n - w - 1]; b = t[n + w + 1]; end
        2:       begin a = t[n - 1];     b = t[n + 1];     end
        3:       begin a = t[n - w + 1]; b = t[n + w - 1]; end
        default: begin a = t[n - w];     b = t[n + w];     end
      endcase
      if (c > b && c >= a) kind[n] = (c > thr) ? 1 : 3;
      else                 kind[n] = (c > thr) ? 2 : 4;
      if (kind[n] == 1) begin
        e[n]  = fin ? c : 255;
        ed[n] = dir[n];
      end else begin
        e[n]  = 0;
        ed[n] = 0;
      end
    end
  endfunction

endpackage
