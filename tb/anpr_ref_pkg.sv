// Reference model shared by the testbenches of the plate pre-processing
// pipeline.  It synthesises test scenes (a greyscale car frame with an
// unevenly lit plate, and the localiser's binary frame with a tilted plate
// top edge) and computes, straight from the equations and without any of
// the RTL's pipelining, what every stage must produce:
//   binary pixel   b = f > mean8x8 - 6   (window x-3..x+4, y-3..y+4, clamped)
//   tilt           d1, d2 = first 1 from the top in columns x0+c, x0+b-c
//   alpha          round(16 (b - 2c) / (d2 - d1))       (4 fraction bits)
//   Va             |round((b/2) / alpha)|, at most (a-1)/2
//   source pixel   y2 = y1 + (x1 - b/2)/alpha
//                  x2 = x1 - (y1 - a/2)/alpha - ((a - Va) - y2)/alpha
// Quotients are rounded to nearest, halves away from zero, using real
// arithmetic.
package anpr_ref_pkg;

  localparam int IMG_W = 640;
  localparam int IMG_H = 480;

  typedef struct {
    int x0, y0, x1, y1;   // plate corners
    int tilt_num;          // top edge rises tilt_num rows per tilt_den columns
    int tilt_den;
    int seed;
  } scene_t;

  typedef struct {
    int  d1, d2;
    int  alpha;            // fixed point, 4 fractional bits
    bit  flat;
    int  va;
  } ref_angle_t;

  function automatic int hash3(int x, int y, int s);
    int unsigned h;
    h = 32'(x) * 32'd73856093 ^ 32'(y) * 32'd19349663 ^ 32'(s) * 32'd83492791;
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    return int'(h >> 16);
  endfunction

  // Greyscale frame: illumination gradient, a brighter plate with dark
  // character-like strokes, and a little noise.
  function automatic int gs_pix(scene_t s, int x, int y);
    int v, rx, ry;
    v = 50 + (x * 150) / IMG_W + (y * 40) / IMG_H;
    if (x >= s.x0 && x <= s.x1 && y >= s.y0 && y <= s.y1) begin
      rx = x - s.x0;
      ry = y - s.y0;
      v = v + 20;
      if (ry > 2 && ry < (s.y1 - s.y0 - 2) &&
          ((rx % 12) < 3 || ((ry % 9) < 2 && (rx % 12) < 8)))
        v = v / 3;
    end
    v = v + (hash3(x, y, s.seed) % 9) - 4;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  // Top row of the plate in the localiser's binary frame, relative to y0.
  function automatic int top_edge(scene_t s, int x);
    if (s.tilt_num >= 0) return 2 + ((x - s.x0) * s.tilt_num) / s.tilt_den;
    return 2 + ((s.x1 - x) * (-s.tilt_num)) / s.tilt_den;
  endfunction

  function automatic bit nb_pix(scene_t s, int x, int y);
    return (x >= s.x0 && x <= s.x1 && y >= s.y0 + top_edge(s, x) && y <= s.y1);
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // Equations 1-3 for plate pixel (rx, ry), relative to the top-left corner.
  function automatic bit ref_bin(scene_t s, int rx, int ry);
    int sum, x, y, mean, f;
    sum = 0;
    x = s.x0 + rx;
    y = s.y0 + ry;
    for (int dx = -3; dx <= 4; dx++)
      for (int dy = -3; dy <= 4; dy++)
        sum += gs_pix(s, clampi(x + dx, 0, IMG_W-1), clampi(y + dy, 0, IMG_H-1));
    mean = sum / 64;
    f = gs_pix(s, x, y);
    return !(f <= mean - 6);
  endfunction

  function automatic int round_away(real q);
    if (q >= 0.0) return int'($floor(q + 0.5));
    return -int'($floor(-q + 0.5));
  endfunction

  function automatic int ref_div(int n, int alpha, bit flat);
    if (flat || alpha == 0) return 0;
    return round_away(16.0 * real'(n) / real'(alpha));
  endfunction

  function automatic int first_one(scene_t s, int col);
    int a;
    a = s.y1 - s.y0 + 1;
    for (int r = 1; r <= a; r++)
      if (nb_pix(s, col, s.y0 + r - 1)) return r;
    return a;
  endfunction

  function automatic ref_angle_t ref_angle(scene_t s);
    ref_angle_t r;
    int a, b, c, dd;
    a = s.y1 - s.y0 + 1;
    b = s.x1 - s.x0 + 1;
    c = b / 4;
    r.d1 = first_one(s, s.x0 + c);
    r.d2 = first_one(s, s.x0 + b - c);
    dd = r.d2 - r.d1;
    r.flat = (dd == 0);
    r.alpha = r.flat ? 0 : round_away(16.0 * real'(b - 2 * c) / real'(dd));
    r.va = ref_div(b / 2, r.alpha, r.flat);
    if (r.va < 0) r.va = -r.va;
    if (r.va > (a - 1) / 2) r.va = (a - 1) / 2;
    return r;
  endfunction

  // Source coordinate of output pixel (x1, y1).
  function automatic void ref_map(int x1, int y1, int a, int b, int alpha, bit flat,
                                  int va, output int x2, output int y2);
    y2 = y1 + ref_div(x1 - b / 2, alpha, flat);
    x2 = x1 - ref_div(y1 - a / 2, alpha, flat) - ref_div((a - va) - y2, alpha, flat);
  endfunction

endpackage
