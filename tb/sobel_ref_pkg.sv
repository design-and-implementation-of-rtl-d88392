// sobel_ref_pkg: reference model and image generator for the testbenches.
//
// sobel_image holds a WIDTH x HEIGHT 8-bit image in raster order and computes
// the expected edge magnitude of any pixel straight from the definition: the
// convolution of the zero-padded image with the two Sobel kernels
//   Kx = [-1 0 1; -2 0 2; -1 0 1]   Ky = [-1 -2 -1; 0 0 0; 1 2 1]
// (weight of neighbour (i, j): Kx = i * (j == 0 ? 2 : 1), Ky = j * (i == 0 ? 2 : 1))
// followed by |Gx| + |Gy| saturated to 255. gray_ref gives the expected
// RGB-to-gray value, computed as floor((307R + 604G + 113B) / 1024).
// The generator mixes flat areas, hard steps, ramps and noise so that zero,
// mid-range and saturated magnitudes all occur.
package sobel_ref_pkg;

  function automatic int gray_ref(int r, int g, int b);
    return (307 * r + 604 * g + 113 * b) / 1024;
  endfunction

  class sobel_image;
    int w, h;
    byte unsigned px[];

    function new(int w_, int h_);
      w = w_;
      h = h_;
      px = new[w * h];
    endfunction

    function int get(int x, int y);
      int v;
      v = 0;
      if (x >= 0 && y >= 0 && x < w && y < h) v = int'(px[y * w + x]);
      return v;
    endfunction

    function int mag(int x, int y);
      // kernel weight of neighbour (i, j), i = column offset, j = row offset
      int gx, gy, m, v, wx, wy;
      gx = 0;
      gy = 0;
      for (int j = -1; j <= 1; j++) begin
        for (int i = -1; i <= 1; i++) begin
          v  = get(x + i, y + j);
          wx = i * ((j == 0) ? 2 : 1);
          wy = j * ((i == 0) ? 2 : 1);
          gx = gx + wx * v;
          gy = gy + wy * v;
        end
      end
      m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
      return (m > 255) ? 255 : m;
    endfunction

    // kind 0: random noise, 1: structured scene, 2: all one value
    function void fill(int kind, int unsigned seed_val = 0);
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          int v;
          case (kind)
            0: v = $urandom_range(255);
            1: begin
              if (x < w / 4)                         v = 20;
              else if (y < h / 3)                    v = (x * 255) / w;
              else if (((x / 3) + (y / 3)) % 2 == 0)       v = 230;
              else if (x > (3 * w) / 4)              v = $urandom_range(255);
              else                                         v = 60 + (y % 7);
            end
            default: v = int'(seed_val) & 255;
          endcase
          px[y * w + x] = byte'(v);
        end
    endfunction
  endclass

endpackage
