// zs_ref_pkg: reference model of Zhang-Suen thinning for the testbenches.
//
// Written pixel by pixel over whole images, independently of the RTL's
// column/bit organisation. Images are flat bit arrays, index y*w + x,
// pixels outside the image count as background. zs_thin runs iterations of
// a Step=1 pass followed by a Step=0 pass until an iteration deletes
// nothing, and reports how many passes that took.
package zs_ref_pkg;

  // Pixel value with background outside the image.
  function automatic bit px(input int w, input int h, const ref bit img[], input int x, input int y);
    if (x < 0 || y < 0 || x >= w || y >= h) return 1'b0;
    return img[y * w + x];
  endfunction

  // Deletion decision for one pixel from its neighbours.
  // nb[0..7] = P2..P9 (above, upper-right, right, lower-right, below,
  // lower-left, left, upper-left).
  function automatic bit zs_delete(input bit first_pass, input bit centre, input bit nb[8]);
    int n, s;
    bit c, d;
    if (!centre) return 1'b0;
    n = 0;
    s = 0;
    foreach (nb[i]) begin
      if (nb[i]) n++;
      if (!nb[i] && nb[(i + 1) % 8]) s++;
    end
    if (first_pass) begin
      c = !(nb[0] && nb[2] && nb[4]);
      d = !(nb[2] && nb[4] && nb[6]);
    end else begin
      c = !(nb[0] && nb[2] && nb[6]);
      d = !(nb[0] && nb[4] && nb[6]);
    end
    return (n >= 2) && (n <= 6) && (s == 1) && c && d;
  endfunction

  // One sub-iteration pass over the whole image; returns deletions.
  function automatic int zs_pass(input int w, input int h, ref bit img[], input bit first_pass);
    bit nxt[];
    bit nb[8];
    int dels;
    nxt = new[w * h];
    dels = 0;
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        nb[0] = px(w, h, img, x,     y - 1);
        nb[1] = px(w, h, img, x + 1, y - 1);
        nb[2] = px(w, h, img, x + 1, y);
        nb[3] = px(w, h, img, x + 1, y + 1);
        nb[4] = px(w, h, img, x,     y + 1);
        nb[5] = px(w, h, img, x - 1, y + 1);
        nb[6] = px(w, h, img, x - 1, y);
        nb[7] = px(w, h, img, x - 1, y - 1);
        if (zs_delete(first_pass, img[y * w + x], nb)) begin
          nxt[y * w + x] = 1'b0;
          dels++;
        end else begin
          nxt[y * w + x] = img[y * w + x];
        end
      end
    end
    img = nxt;
    return dels;
  endfunction

  // Full thinning; passes = number of sub-iteration passes run.
  function automatic void zs_thin(input int w, input int h, ref bit img[], output int passes,
                                  output int deletions);
    int d1, d2;
    passes = 0;
    deletions = 0;
    forever begin
      d1 = zs_pass(w, h, img, 1'b1);
      d2 = zs_pass(w, h, img, 1'b0);
      passes += 2;
      deletions += d1 + d2;
      if (d1 + d2 == 0) break;
    end
  endfunction

  // Test images. gen_blobs: thick random rectangles, disks and bars, some
  // touching the image borders. gen_ridges: fingerprint-like curved ridges
  // thick pixels wide on a period-pixel spacing (default 4 of 9), centred
  // near the middle and moved sideways by shift.
  function automatic void gen_blobs(input int w, input int h, input int shapes, ref bit img[]);
    img = new[w * h];
    for (int i = 0; i < w * h; i++) img[i] = 1'b0;
    for (int s = 0; s < shapes; s++) begin
      int kind, x0, y0, a, b;
      kind = $urandom_range(0, 2);
      x0 = $urandom_range(0, w - 1);
      y0 = $urandom_range(0, h - 1);
      a  = $urandom_range(2, (w > 16) ? w / 4 : 4);
      b  = $urandom_range(2, (h > 16) ? h / 4 : 4);
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          int dx, dy;
          dx = x - x0; dy = y - y0;
          case (kind)
            0: if (dx >= 0 && dx < a && dy >= 0 && dy < b) img[y * w + x] = 1'b1;
            1: if (dx * dx + dy * dy <= a * a) img[y * w + x] = 1'b1;
            default: if (((dx + dy) >= 0) && ((dx + dy) < 4) && dy >= 0 && dy < 3 * b) img[y * w + x] = 1'b1;
          endcase
        end
    end
  endfunction

  function automatic void gen_ridges(input int w, input int h, ref bit img[],
                                     input int thick = 4, input int period = 9, input int shift = 0);
    img = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int dx, dy, r;
        dx = x - w / 2 + 17 + shift;
        dy = (y - h / 2) * 4 / 3;
        r  = int'($sqrt(real'(dx * dx + dy * dy))) + (x / 23) + ((x * y) % 5 == 0 ? 1 : 0);
        img[y * w + x] = ((r % period) < thick) && (x > 8) && (x < w - 8) && (y > 6) && (y < h - 6);
      end
  endfunction

  // Byte of the packed image: bit 7 is the leftmost of eight pixels.
  function automatic logic [7:0] pack_byte(input int w, const ref bit img[], input int y, input int c);
    logic [7:0] v;
    for (int i = 0; i < 8; i++) v[7 - i] = img[y * w + c * 8 + i];
    return v;
  endfunction

endpackage
