// canny_ref_pkg: reference model of the edg-detection pipeline for the
// testbenches, written independently of the RTL (sorting instead of
// ranking, plain integer arithmetic, whole-image arrays).
//
// The rules follow the described algorithm; where the description is silent
// (AMF last branch, combining the four Sobel directions, NMS ties, single-pass
// hysteresis) the model makes the same documented choices as the RTL.
package canny_ref_pkg;

  typedef int img_t [][];

  function automatic void sort_min_med_max(input int v [], output int mn, output int md, output int mx);
    int s [];
    s = v;
    s.sort();
    mn = s[0];
    md = s[s.size() / 2];
    mx = s[s.size() - 1];
  endfunction

  // w5[r][c], returns filtered pixel; sel = branch 0..3
  function automatic int amf_ref(input int w5 [5][5], output int sel);
    int v3 [] = new[9];
    int v5 [] = new[25];
    int mn3, md3, mx3, mn5, md5, mx5, c;
    for (int r = 0; r < 5; r++)
      for (int k = 0; k < 5; k++) begin
        v5[r*5+k] = w5[r][k];
        if (r > 0 && r < 4 && k > 0 && k < 4) v3[(r-1)*3 + k-1] = w5[r][k];
      end
    sort_min_med_max(v3, mn3, md3, mx3);
    sort_min_med_max(v5, mn5, md5, mx5);
    c = w5[2][2];
    if (mn3 < md3 && md3 < mx3) begin
      if (mn3 < c && c < mx3) begin sel = 0; return c; end
      sel = 1; return md3;
    end
    if (mn5 < md5 && md5 < mx5 && mn5 < c && c < mx5) begin sel = 2; return c; end
    sel = 3;
    return md5;
  endfunction

  function automatic int iabs(input int x);
    return x < 0 ? -x : x;
  endfunction

  // four-direction Sobel: magnitude = max |G_d|, dir = first maximum
  function automatic void sobel_ref(input int p [3][3], output int mag, output int dir);
    int g [4];
    g[0] = p[0][2] + 2*p[1][2] + p[2][2] - p[0][0] - 2*p[1][0] - p[2][0];
    g[1] = p[1][2] + 2*p[2][2] + p[2][1] - p[0][1] - 2*p[0][0] - p[1][0];
    g[2] = p[2][0] + 2*p[2][1] + p[2][2] - p[0][0] - 2*p[0][1] - p[0][2];
    g[3] = p[0][1] + 2*p[0][2] + p[1][2] - p[1][0] - 2*p[2][0] - p[2][1];
    mag = 0; dir = 0;
    for (int i = 0; i < 4; i++) if (iabs(g[i]) > mag) begin mag = iabs(g[i]); dir = i; end
  endfunction

  function automatic void thr_ref(input int p [3][3], output int sum, output int th, output int tl);
    sum = 0;
    foreach (p[r, c]) sum += p[r][c];
    th = sum / 9;
    tl = th / 2;
  endfunction

  // m[3][3] magnitudes, d = centre direction; returns kept magnitude
  function automatic int nms_ref(input int m [3][3], input int d);
    int a, b;
    case (d)
      0: begin a = m[1][0]; b = m[1][2]; end
      1: begin a = m[0][0]; b = m[2][2]; end
      2: begin a = m[0][1]; b = m[2][1]; end
      default: begin a = m[0][2]; b = m[2][0]; end
    endcase
    return (m[1][1] > a && m[1][1] >= b) ? m[1][1] : 0;
  endfunction

  function automatic int class_ref(input int mag, input int th, input int tl);
    if (mag != 0 && mag >= th) return 2;
    if (mag != 0 && mag >= tl) return 1;
    return 0;
  endfunction

  function automatic int hyst_ref(input int k [3][3]);
    bit strong_nb = 0;
    foreach (k[r, c]) if (!(r == 1 && c == 1) && k[r][c] == 2) strong_nb = 1;
    return (k[1][1] == 2 || (k[1][1] == 1 && strong_nb)) ? 255 : 0;
  endfunction

  // Whole-image model. ok arrays mark pixels whose neighbourhoods lie in
  // the image. edg[r][c] is the final edg map (0 where not ok).
  class canny_model;
    int W, H;
    img_t gray, med, mag, dir, th, tl, nm, cls, edg;
    bit   med_ok [][], sob_ok [][], nms_ok [][], hys_ok [][];
    int   sel_count [4];

    function new(int w, int h);
      W = w; H = h;
      gray = new[H]; med = new[H]; mag = new[H]; dir = new[H]; th = new[H];
      tl = new[H]; nm = new[H]; cls = new[H]; edg = new[H];
      med_ok = new[H]; sob_ok = new[H]; nms_ok = new[H]; hys_ok = new[H];
      for (int r = 0; r < H; r++) begin
        gray[r] = new[W]; med[r] = new[W]; mag[r] = new[W]; dir[r] = new[W];
        th[r] = new[W]; tl[r] = new[W]; nm[r] = new[W]; cls[r] = new[W]; edg[r] = new[W];
        med_ok[r] = new[W]; sob_ok[r] = new[W]; nms_ok[r] = new[W]; hys_ok[r] = new[W];
      end
    endfunction

    function automatic bit inside_by(int r, int c, int b);
      return r >= b && c >= b && r < H - b && c < W - b;
    endfunction

    function void run();
      int w5 [5][5];
      int p [3][3];
      int s;
      sel_count = '{0, 0, 0, 0};
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          med_ok[r][c] = inside_by(r, c, 2);
          med[r][c] = 0;
          if (med_ok[r][c]) begin
            for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) w5[i][j] = gray[r-2+i][c-2+j];
            med[r][c] = amf_ref(w5, s);
            sel_count[s]++;
          end
        end
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          sob_ok[r][c] = inside_by(r, c, 3);
          mag[r][c] = 0; dir[r][c] = 0; th[r][c] = 0; tl[r][c] = 0;
          if (sob_ok[r][c]) begin
            int sum;
            for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = med[r-1+i][c-1+j];
            sobel_ref(p, mag[r][c], dir[r][c]);
            thr_ref(p, sum, th[r][c], tl[r][c]);
          end
        end
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          nms_ok[r][c] = inside_by(r, c, 4);
          nm[r][c] = 0; cls[r][c] = 0;
          if (nms_ok[r][c]) begin
            for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = mag[r-1+i][c-1+j];
            nm[r][c]  = nms_ref(p, dir[r][c]);
            cls[r][c] = class_ref(nm[r][c], th[r][c], tl[r][c]);
          end
        end
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          hys_ok[r][c] = inside_by(r, c, 5);
          edg[r][c] = 0;
          if (hys_ok[r][c]) begin
            for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = cls[r-1+i][c-1+j];
            edg[r][c] = hyst_ref(p);
          end
        end
    endfunction

    // expected value of stream output n when every stage lags by its
    // half-window: image position (row - lag, col - lag)
    function int expect_edge(int n);
      int r = n / W - 5, c = n % W - 5;
      if (r < 0 || c < 0) return 0;
      return edg[r][c];
    endfunction
  endclass

  // Test picture for camera-level tests, RGB565: a textured background, a
  // bright rectangle (a "defect"), a diagonal scratch and sparse impulses.
  function automatic logic [15:0] test_rgb565(int f, int r, int c, int w, int h);
    int v = 50 + ((r * 5 + c * 3 + f * 7) % 19);
    if (r >= h / 4 && r < h / 2 && c >= w / 4 && c < w / 2) v = 200;
    if (c - r == w / 3) v = 150;
    if ((r * 31 + c * 17 + f) % 37 == 0) v = 255;
    if ((r * 13 + c * 41 + f) % 43 == 0) v = 0;
    return {5'(v >> 3), 6'(v >> 2), 5'(v >> 3)};
  endfunction

  // gray value of an RGB565 pixel (BT.601 weights in 1/256)
  function automatic int gray_of(logic [15:0] p);
    int r8 = {p[15:11], p[15:13]};
    int g8 = {p[10:5], p[10:9]};
    int b8 = {p[4:0], p[4:2]};
    return (77 * r8 + 150 * g8 + 29 * b8) / 256;
  endfunction

endpackage
