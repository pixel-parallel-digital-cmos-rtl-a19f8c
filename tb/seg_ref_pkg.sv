// seg_ref_pkg: reference model of region-growing segmentation for the
// testbenches. It works on whole images in plain integer arithmetic and does
// not share code with the RTL: the link weight is computed with a real
// division, W = 255 / (1 + |d|), and its code as floor(log2 W) (0 below 2).
package seg_ref_pkg;

  localparam int MAXD = 16;

  typedef int img_t  [MAXD][MAXD][3];
  typedef int map_t  [MAXD][MAXD];

  // The image and the leader map the functions below work on.
  img_t g_img;
  map_t g_p;

  function automatic int ref_code(int a, int b);
    int d, w, c;
    d = (a > b) ? a - b : b - a;
    w = 255 / (1 + d);
    c = 0;
    while (c < 7 && (1 << (c + 1)) <= w) c++;
    return (w < 2) ? 0 : c;
  endfunction

  function automatic int ref_dec(int c);
    return (c == 0) ? 0 : (1 << c);
  endfunction

  // Code of the link between pixels (x1,y1) and (x2,y2); 0 outside the image.
  function automatic int link_code(int n, int m, bit grey,
                                   int x1, int y1, int x2, int y2);
    int c, cmin;
    if (x1 < 0 || x1 >= n || x2 < 0 || x2 >= n || y1 < 0 || y1 >= m || y2 < 0 || y2 >= m)
      return 0;
    cmin = 7;
    for (int ch = 0; ch < (grey ? 1 : 3); ch++) begin
      c = ref_code(g_img[x1][y1][ch], g_img[x2][y2][ch]);
      if (c < cmin) cmin = c;
    end
    return cmin;
  endfunction

  // The four codes of weight-register block (a,b): index 0..3 = w0..w3.
  function automatic int block_code(int n, int m, bit grey,
                                    int a, int b, int idx);
    bit is_h;
    is_h = ((a + b) % 2) == 1;
    case (idx)
      0: return link_code(n, m, grey, a-1, b-1, a, b);
      1: return link_code(n, m, grey, a, b-1, a-1, b);
      2: return is_h ? link_code(n, m, grey, a-1, b-1, a, b-1)
                     : link_code(n, m, grey, a-1, b-1, a-1, b);
      default: return is_h ? link_code(n, m, grey, a-1, b, a, b)
                           : link_code(n, m, grey, a, b-1, a, b);
    endcase
  endfunction

  function automatic int nb_sum(int n, int m, bit grey, int x, int y);
    int s;
    s = 0;
    for (int dx = -1; dx <= 1; dx++)
      for (int dy = -1; dy <= 1; dy++)
        if (dx != 0 || dy != 0)
          s += ref_dec(link_code(n, m, grey, x, y, x + dx, y + dy));
    return s;
  endfunction

  // Result of a reference segmentation.
  typedef struct {
    map_t label;     // 0 = unlabelled
    map_t order;     // excitation number of each cell (0 = never excited)
    int   segments;
    int   cycles;    // sum over segments of (excitation numbers + 1), plus 1
    int   passed_labelled_leaders;  // leader cells skipped because labelled
    int   growth_steps;
  } result_t;

  // Segment with leader map p (1 = leader).
  function automatic result_t segment(int n, int m, bit grey, int phi_z);
    result_t r;
    map_t xs, ls, nx;
    int num, e, sx, sy, s;
    bit found, any;
    for (int x = 0; x < MAXD; x++)
      for (int y = 0; y < MAXD; y++) begin
        r.label[x][y] = 0; r.order[x][y] = 0; xs[x][y] = 0; ls[x][y] = 0;
      end
    r.segments = 0; r.cycles = 0; r.passed_labelled_leaders = 0; r.growth_steps = 0;
    num = 0;
    forever begin
      found = 0;
      for (int k = 0; k < n * m && !found; k++) begin
        sy = k / n;
        sx = (sy % 2 == 0) ? k % n : n - 1 - k % n;
        if (g_p[sx][sy] == 1 && ls[sx][sy] == 0) found = 1;
        else if (g_p[sx][sy] == 1) r.passed_labelled_leaders++;
      end
      r.cycles++;               // the search clock
      if (!found) break;
      num++;
      xs[sx][sy] = 1; r.order[sx][sy] = num; e = 1;
      forever begin
        any = 0;
        for (int x = 0; x < n; x++)
          for (int y = 0; y < m; y++) begin
            nx[x][y] = 0;
            if (xs[x][y] == 0 && ls[x][y] == 0) begin
              s = 0;
              for (int dx = -1; dx <= 1; dx++)
                for (int dy = -1; dy <= 1; dy++)
                  if ((dx != 0 || dy != 0) && x+dx >= 0 && x+dx < n && y+dy >= 0 && y+dy < m)
                    if (xs[x+dx][y+dy] == 1)
                      s += ref_dec(link_code(n, m, grey, x, y, x+dx, y+dy));
              if (s > phi_z) begin nx[x][y] = 1; any = 1; end
            end
          end
        r.cycles++;
        if (!any) break;
        num++; e++; r.growth_steps++;
        for (int x = 0; x < n; x++)
          for (int y = 0; y < m; y++)
            if (nx[x][y] == 1) begin xs[x][y] = 1; r.order[x][y] = num; end
      end
      r.segments++;
      for (int x = 0; x < n; x++)
        for (int y = 0; y < m; y++)
          if (xs[x][y] == 1) begin
            xs[x][y] = 0; ls[x][y] = 1; r.label[x][y] = r.segments;
          end
    end
    return r;
  endfunction

  function automatic void leaders(int n, int m, bit grey, int phi_p);
    for (int x = 0; x < MAXD; x++)
      for (int y = 0; y < MAXD; y++)
        g_p[x][y] = (x < n && y < m && nb_sum(n, m, grey, x, y) > phi_p) ? 1 : 0;
  endfunction

endpackage
