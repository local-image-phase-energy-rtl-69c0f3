// tb_ref_pkg: reference model of the feature core for the testbenches.
//
// Written independently of the RTL: the kernel taps and trigonometric weights
// are recomputed here from their closed-form definitions with real
// arithmetic, and each stage is modelled directly from its arithmetic
// definition (two-pass separable convolution with the rounding points of the
// design, steering sums, energies, angles from $atan2). Angles are compared
// with a tolerance of one LSB, because the hardware uses a CORDIC.
//
// The image under test lives in this package (img, img_w): img[r*img_w + c].
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;
  localparam real SP = 0.67;   // tap spacing

  int img [];
  int img_w;

  // ---------------- kernel taps ----------------
  function automatic real gauss(real t);
    return $exp(-t * t);
  endfunction

  // kernel id: 0 Gxx, 1 Gxy, 2 Gyy, 3 Hxx, 4 Hxy, 5 Hyx, 6 Hyy
  function automatic real kv_real(int kid, real y);
    case (kid)
      0, 3:    return gauss(y);
      1, 4:    return y * gauss(y);
      2:       return (2.0 * y * y - 1.0) * gauss(y);
      5:       return (y * y - 0.7515) * gauss(y);
      default: return (y * y * y - 2.254 * y) * gauss(y);
    endcase
  endfunction

  function automatic real kh_real(int kid, real x);
    case (kid)
      0:       return 0.9213 * (2.0 * x * x - 1.0) * gauss(x);
      1:       return 1.843 * x * gauss(x);
      2:       return 0.9213 * gauss(x);
      3:       return 0.9780 * (x * x * x - 2.254 * x) * gauss(x);
      4:       return 0.9780 * (x * x - 0.7515) * gauss(x);
      5:       return 0.9780 * x * gauss(x);
      default: return 0.9780 * gauss(x);
    endcase
  endfunction

  function automatic int q12(real v);
    int q;
    q = $rtoi(v * 4096.0 + (v >= 0.0 ? 0.5 : -0.5));
    if (q > 4095)  q = 4095;
    if (q < -4096) q = -4096;
    return q;
  endfunction

  function automatic int kv(int kid, int k);
    return q12(kv_real(kid, (k - 4) * SP));
  endfunction

  function automatic int kh(int kid, int k);
    return q12(kh_real(kid, (k - 4) * SP));
  endfunction

  // ---------------- fixed-point helpers ----------------
  function automatic longint rshr(longint v, int sh);   // round half up
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

  function automatic int sat(longint v, int w);
    longint mx = (longint'(1) <<< (w - 1)) - 1;
    if (v > mx)      return int'(mx);
    if (v < -mx - 1) return int'(-mx - 1);
    return int'(v);
  endfunction

  function automatic longint wrap16(longint v);          // to 16-bit signed
    longint t = v & 64'hFFFF;
    return (t >= 32768) ? t - 65536 : t;
  endfunction

  // Vertical pass on an explicit column (col[0] oldest row).
  function automatic longint vpass(int kid, int col [9]);
    longint acc = 0;
    for (int k = 0; k < 9; k++) acc += longint'(col[k]) * kv(kid, k);
    return wrap16(rshr(acc, 8));
  endfunction

  // Horizontal pass on nine vertical results (mids[0] oldest column);
  // returns the unsaturated rounded value.
  function automatic longint hpass_raw(int kid, longint mids [9]);
    longint acc = 0;
    for (int k = 0; k < 9; k++) acc += mids[k] * kh(kid, k);
    return rshr(acc, 16);
  endfunction

  // Basis response whose newest window pixel is (r, c) of img.
  function automatic longint conv_raw(int kid, int r, int c);
    longint mids [9];
    int     col [9];
    for (int j = 0; j < 9; j++) begin
      for (int k = 0; k < 9; k++) col[k] = img[(r - 8 + k) * img_w + (c - 8 + j)];
      mids[j] = vpass(kid, col);
    end
    return hpass_raw(kid, mids);
  endfunction

  // ---------------- steering ----------------
  function automatic int q7(real v);
    return $rtoi(v * 128.0 + (v >= 0.0 ? 0.5 : -0.5));
  endfunction

  function automatic int w_even(int i, int k);
    real t = i * PI / 8.0;
    real c = $cos(t), s = $sin(t);
    case (k)
      0:       return q7(c * c);
      1:       return q7(-2.0 * c * s);
      default: return q7(s * s);
    endcase
  endfunction

  function automatic int w_odd(int i, int k);
    real t = i * PI / 8.0;
    real c = $cos(t), s = $sin(t);
    case (k)
      0:       return q7(c * c * c);
      1:       return q7(-3.0 * c * c * s);
      2:       return q7(3.0 * c * s * s);
      default: return q7(-s * s * s);
    endcase
  endfunction

  function automatic int cos2(int i);
    return q7($cos(2.0 * i * PI / 8.0));
  endfunction

  function automatic int sin2(int i);
    return q7($sin(2.0 * i * PI / 8.0));
  endfunction

  function automatic int steer_c(int i, int g [3]);
    longint acc = 0;
    for (int k = 0; k < 3; k++) acc += longint'(g[k]) * w_even(i, k);
    return sat(rshr(acc, 7), 11);
  endfunction

  function automatic int steer_s(int i, int h [4]);
    longint acc = 0;
    for (int k = 0; k < 4; k++) acc += longint'(h[k]) * w_odd(i, k);
    return sat(rshr(acc, 7), 11);
  endfunction

  // ---------------- angles ----------------
  // Angle of (x, y) in units of 2*pi/512, rounded, 0..511.
  function automatic int ang9(real x, real y);
    real a;
    int  q;
    if (x == 0.0 && y == 0.0) return 0;
    a = $atan2(y, x) / (2.0 * PI) * 512.0;
    q = $rtoi(a + (a >= 0.0 ? 0.5 : -0.5));
    return ((q % 512) + 512) % 512;
  endfunction

  // Circular distance of two 9-bit angle codes.
  function automatic int adist(int a, int b);
    int d = ((a - b) % 512 + 512) % 512;
    return (d > 256) ? 512 - d : d;
  endfunction

  function automatic int orient_ref(longint e [8], output real sx, output real sy);
    sx = 0.0;
    sy = 0.0;
    for (int i = 0; i < 8; i++) begin
      sx += real'(e[i]) * cos2(i);
      sy += real'(e[i]) * sin2(i);
    end
    return ang9(sx, sy);
  endfunction

  // ---------------- whole core ----------------
  typedef struct {
    int     g [3];
    int     h [4];
    int     c [8];
    int     s [8];
    longint e [8];
    longint energy;
    int     orient;
    int     phase;
    real    ox, oy;         // orientation vector
    longint px, py;         // phase vector
    int     n_sat;          // saturated basis responses
  } feat_t;

  function automatic feat_t feat_ref(int r, int c);
    feat_t  f;
    longint v;
    longint sum = 0;
    f.n_sat = 0;
    for (int b = 0; b < 7; b++) begin
      v = conv_raw(b, r, c);
      if (v > 1023 || v < -1024) f.n_sat++;
      if (b < 3) f.g[b] = sat(v, 11);
      else       f.h[b-3] = sat(v, 11);
    end
    f.px = 0;
    f.py = 0;
    for (int i = 0; i < 8; i++) begin
      f.c[i] = steer_c(i, f.g);
      f.s[i] = steer_s(i, f.h);
      f.e[i] = longint'(f.c[i]) * f.c[i] + longint'(f.s[i]) * f.s[i];
      sum += f.e[i];
      f.px += f.c[i];
      f.py += f.s[i];
    end
    f.energy = sum >>> 3;
    f.orient = orient_ref(f.e, f.ox, f.oy);
    f.phase  = ang9(real'(f.px), real'(f.py));
    return f;
  endfunction

endpackage
