// tb_ref_pkg: reference models and stimulus generators shared by the
// testbenches. They are written independently of the RTL, pixel by pixel over
// whole frames, with flat arrays indexed y * H + x.
//
//  gen_alpha   draws a displacement map: per map group of three lines, alpha
//              grows from 0 at the frame centre outwards by 0/1 steps, capped
//              at the ring depth of the column's region minus four; returns the
//              1-bit map (g * HALF + i) and the full alpha(x, y).
//  gen_blank   marks every output position that no input pixel reaches.
//  ref_correct moves pixels to y + alpha (later lines win), fills blanks with
//              the last real pixel above (black at the top).
//  ref_compress chooses each 12x12 block's stage from the squared distance
//              of its pixel (6,6) to the gaze point and replaces every pixel by
//              the rounded mean of its KxK square.
//  pix_of      a deterministic test picture.
package tb_ref_pkg;

  function automatic int unsigned lcg(inout int unsigned s);
    s = s * 32'd1103515245 + 32'd12345;
    return (s >> 16) & 32'h7fff;
  endfunction

  function automatic int unsigned pix_of(int x, int y, int f);
    int unsigned s = 32'(x) * 32'd73856093 ^ 32'(y) * 32'd19349663 ^ 32'(f) * 32'd83492791;
    s = s ^ (s >> 13);
    s = s * 32'd2654435761;
    return (s ^ (s >> 16)) & 32'hffffff;
  endfunction

  function automatic int fold(int x, int H);
    return (x < H / 2) ? H / 2 - 1 - x : x - H / 2;
  endfunction

  function automatic void gen_alpha(int H, int V, int NREG, int depth[], int seed,
                                    ref bit cmap[], ref int alpha[]);
    int half = H / 2;
    int rw = H / NREG;
    int groups = V / 3;
    int unsigned s = 32'(seed);
    int a [];
    a = new[half];
    cmap = new[half * groups];
    alpha = new[H * V];
    for (int g = 0; g < groups; g++) begin
      int p = 2 + int'(lcg(s) % 9);      // step probability p/12
      int acc = 0;
      for (int i = 0; i < half; i++) begin
        int lim = depth[(half + i) / rw] - 4;
        bit b = (int'(lcg(s) % 12) < p) && (acc + 1 <= lim);
        cmap[g * half + i] = b;
        acc += int'(b);
        a[i] = acc;
      end
      for (int yy = 0; yy < 3; yy++)
        for (int x = 0; x < H; x++)
          alpha[(3 * g + yy) * H + x] = a[fold(x, H)];
    end
  endfunction

  function automatic void gen_blank(int H, int V, ref int alpha[], ref bit bmap[]);
    int half = H / 2;
    bit cov [];
    cov = new[H * V];
    bmap = new[half * V];
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++)
        if (y + alpha[y * H + x] < V) cov[(y + alpha[y * H + x]) * H + x] = 1;
    for (int y = 0; y < V; y++)
      for (int i = 0; i < half; i++)
        bmap[y * half + i] = !cov[y * H + half + i];
  endfunction

  function automatic void ref_correct(int H, int V, ref int unsigned src[], ref int alpha[],
                                      ref bit bmap[], ref int unsigned dst[]);
    int unsigned wr [];
    int unsigned lb [];
    wr = new[H * V];
    lb = new[H];
    dst = new[H * V];
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++)
        if (y + alpha[y * H + x] < V) wr[(y + alpha[y * H + x]) * H + x] = src[y * H + x];
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++) begin
        if (!bmap[y * (H / 2) + fold(x, H)]) begin
          dst[y * H + x] = wr[y * H + x];
          lb[x] = wr[y * H + x];
        end else if (y == 0) begin
          dst[y * H + x] = 0;
          lb[x] = 0;
        end else begin
          dst[y * H + x] = lb[x];
        end
      end
  endfunction

  function automatic int stage_k(int l);
    case (l)
      0: return 1;
      1: return 2;
      2: return 3;
      3: return 4;
      default: return 6;
    endcase
  endfunction

  function automatic int stage_of(longint unsigned s, longint unsigned thr[4]);
    for (int i = 0; i < 4; i++)
      if (s < thr[i]) return i;
    return 4;
  endfunction

  function automatic void ref_compress(int H, int V, ref int unsigned src[], int gx, int gy,
                                       longint unsigned thr[4],
                                       ref int unsigned dst[], ref int lvl[]);
    dst = new[H * V];
    lvl = new[H * V];
    for (int by = 0; by < V / 12; by++)
      for (int bx = 0; bx < H / 12; bx++) begin
        longint dx = longint'(12 * bx + 6) - longint'(gx);
        longint dy = longint'(12 * by + 6) - longint'(gy);
        longint unsigned dd = dx * dx + dy * dy;
        int l = stage_of(dd, thr);
        int k = stage_k(l);
        for (int sy = 0; sy < 12; sy += k)
          for (int sx = 0; sx < 12; sx += k) begin
            int unsigned m = 0;
            for (int c = 0; c < 3; c++) begin
              int unsigned sum = 0;
              for (int yy = 0; yy < k; yy++)
                for (int xx = 0; xx < k; xx++)
                  sum += (src[(12 * by + sy + yy) * H + 12 * bx + sx + xx] >> (8 * c)) & 32'hff;
              m |= ((sum + 32'(k * k / 2)) / 32'(k * k)) << (8 * c);
            end
            for (int yy = 0; yy < k; yy++)
              for (int xx = 0; xx < k; xx++) begin
                dst[(12 * by + sy + yy) * H + 12 * bx + sx + xx] = m;
                lvl[(12 * by + sy + yy) * H + 12 * bx + sx + xx] = l;
              end
          end
      end
  endfunction

endpackage
