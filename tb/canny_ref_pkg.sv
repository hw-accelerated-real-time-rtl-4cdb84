// canny_ref_pkg: reference model of the Canny pipeline for the testbenches.
//
// Works on whole frames held in dynamic arrays (row-major, index r*w + c),
// written directly from the definitions, independent of the streaming RTL:
//   blur   3x3 kernel [1 2 1; 2 4 2; 1 2 1] / 16, rounded; border pixels copied
//   sobel  gx, gy; magnitude floor(sqrt) saturated to 255 (real arithmetic);
//          angle rounded to 0/45/90/135 with tan(22.5) ~ 106/256 and
//          tan(67.5) ~ 618/256; border pixels give 0. Packed as mag*256 + dir.
//   nms    keep mag if >= both neighbours along the angle; then 255 / weak_v / 0
//   hyst   strong stays, weak_v with a strong 8-neighbour becomes 255, else 0
// Also a few small helpers for the testbenches.
package canny_ref_pkg;

  typedef int frame_t[];

  function automatic int at(const ref frame_t f, input int w, input int h, int r, int c);
    if (r < 0 || r >= h || c < 0 || c >= w) return 0;
    return f[r*w + c];
  endfunction

  function automatic frame_t ref_blur(const ref frame_t f, input int w, input int h);
    frame_t o = new[w*h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        if (r == 0 || c == 0 || r == h-1 || c == w-1) o[r*w+c] = f[r*w+c];
        else begin
          int s = 0;
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              s += at(f, w, h, r+dr, c+dc) * (2 - (dr == 0 ? 0 : 1)) * (2 - (dc == 0 ? 0 : 1));
          o[r*w+c] = (s + 8) / 16;
        end
      end
    return o;
  endfunction

  function automatic frame_t ref_sobel(const ref frame_t f, input int w, input int h);
    frame_t o = new[w*h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int gx, gy, mag, dir;
        real ax, ay;
        if (r == 0 || c == 0 || r == h-1 || c == w-1) begin
          o[r*w+c] = 0;
          continue;
        end
        gx = 0; gy = 0;
        for (int k = -1; k <= 1; k++) begin
          int wt = (k == 0) ? 2 : 1;
          gx += wt * (at(f, w, h, r+k, c+1) - at(f, w, h, r+k, c-1));
          gy += wt * (at(f, w, h, r+1, c+k) - at(f, w, h, r-1, c+k));
        end
        mag = int'($floor($sqrt(real'(gx*gx + gy*gy)) + 1.0e-9));
        if (mag > 255) mag = 255;
        ax = (gx < 0) ? -gx : gx;
        ay = (gy < 0) ? -gy : gy;
        if (ay <= ax * 106.0 / 256.0)      dir = 0;
        else if (ay >= ax * 618.0 / 256.0) dir = 90;
        else if (gx * gy > 0)              dir = 45;
        else                               dir = 135;
        o[r*w+c] = mag * 256 + dir;
      end
    return o;
  endfunction

  function automatic frame_t ref_nms(input frame_t g, input int w, input int h, int lo, int hi, int weak_v);
    frame_t o = new[w*h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int m = g[r*w+c] / 256;
        int d = g[r*w+c] % 256;
        int dr, dc, n1, n2;
        case (d)
          0:       begin dr = 0;  dc = 1; end
          90:      begin dr = 1;  dc = 0; end
          45:      begin dr = 1;  dc = 1; end
          default: begin dr = 1;  dc = -1; end
        endcase
        n1 = at(g, w, h, r+dr, c+dc) / 256;
        n2 = at(g, w, h, r-dr, c-dc) / 256;
        if (m < n1 || m < n2) o[r*w+c] = 0;
        else if (m >= hi)     o[r*w+c] = 255;
        else if (m >= lo)     o[r*w+c] = weak_v;
        else                  o[r*w+c] = 0;
      end
    return o;
  endfunction

  function automatic frame_t ref_hyst(const ref frame_t f, input int w, input int h, int weak_v);
    frame_t o = new[w*h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v = f[r*w+c];
        bit nb = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if ((dr != 0 || dc != 0) && at(f, w, h, r+dr, c+dc) == 255) nb = 1;
        o[r*w+c] = (v == 255 || (v == weak_v && nb)) ? 255 : 0;
      end
    return o;
  endfunction

  // Test image: a few flat rectangles of different gray levels on a gradient
  // background, plus noise of the given amplitude.
  function automatic frame_t make_image(int w, int h, int noise);
    frame_t o = new[w*h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v = 40 + (c * 60) / w + (r * 30) / h;
        if (r > h/5 && r < (3*h)/5 && c > w/6 && c < w/2)           v = 200;
        if (r > h/2 && r < (9*h)/10 && c > (5*w)/8 && c < (7*w)/8)  v = 120;
        if ((r - h/3) * (r - h/3) + (c - (3*w)/4) * (c - (3*w)/4) < (h*h)/49) v = 20;
        if (noise > 0) v += int'($urandom_range(2*noise)) - noise;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        o[r*w+c] = v;
      end
    return o;
  endfunction

endpackage
