// tb_ref_pkg: reference models shared by the testbenches: test images of
// black/white shapes and 8-connected component labelling by flood fill.
package tb_ref_pkg;

  localparam int RW = 128, RH = 128;

  typedef struct {
    int w, h;
    bit white [RH][RW];        // 1 = white pixel
    int comp  [RH][RW];        // component index per pixel
    int ncomp;
    bit ctype [RH*RW];         // 1 = black component
    int minx [RH*RW], maxx [RH*RW], miny [RH*RW], maxy [RH*RW];
    longint sx [RH*RW], sy [RH*RW];
    int cnt [RH*RW];
  } ref_img_t;

  // random rectangles and dots on a white background, plus salt noise
  function automatic void gen_image(ref ref_img_t im, int w, int h, int nshapes);
    im.w = w; im.h = h;
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) im.white[r][c] = 1;
    for (int s = 0; s < nshapes; s++) begin
      int x0 = $urandom_range(0, w-1), y0 = $urandom_range(0, h-1);
      int sw = $urandom_range(1, w/3 + 1), sh = $urandom_range(1, h/3 + 1);
      bit col = $urandom_range(0, 3) != 0 ? 0 : 1;
      for (int r = y0; r < y0 + sh && r < h; r++)
        for (int c = x0; c < x0 + sw && c < w; c++) im.white[r][c] = col;
    end
    for (int n = 0; n < w*h/40; n++) begin
      int ry, rx;
      ry = $urandom_range(0, h-1); rx = $urandom_range(0, w-1);
      im.white[ry][rx] = !im.white[ry][rx];
    end
  endfunction

  // 8-connected components of each colour, with their statistics
  function automatic void label_ref(ref ref_img_t im);
    int qx [$], qy [$];
    for (int r = 0; r < im.h; r++) for (int c = 0; c < im.w; c++) im.comp[r][c] = -1;
    im.ncomp = 0;
    for (int r = 0; r < im.h; r++) for (int c = 0; c < im.w; c++) begin
      if (im.comp[r][c] < 0) begin
        int id = im.ncomp++;
        im.ctype[id] = !im.white[r][c];
        im.minx[id] = c; im.maxx[id] = c; im.miny[id] = r; im.maxy[id] = r;
        im.sx[id] = 0; im.sy[id] = 0; im.cnt[id] = 0;
        im.comp[r][c] = id; qx.push_back(c); qy.push_back(r);
        while (qx.size() > 0) begin
          int x = qx.pop_front(), y = qy.pop_front();
          im.cnt[id]++; im.sx[id] += x; im.sy[id] += y;
          if (x < im.minx[id]) im.minx[id] = x;
          if (x > im.maxx[id]) im.maxx[id] = x;
          if (y < im.miny[id]) im.miny[id] = y;
          if (y > im.maxy[id]) im.maxy[id] = y;
          for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++) begin
            int nx = x + dx, ny = y + dy;
            if (nx >= 0 && ny >= 0 && nx < im.w && ny < im.h && im.comp[ny][nx] < 0
                && im.white[ny][nx] == im.white[y][x]) begin
              im.comp[ny][nx] = id; qx.push_back(nx); qy.push_back(ny);
            end
          end
        end
      end
    end
  endfunction

endpackage
