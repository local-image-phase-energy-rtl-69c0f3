// gauss_coef_pkg: word lengths and constant tables shared by the local
// energy / orientation / phase feature core.
//
// Word lengths follow the fixed-point study of the design: 13-bit kernel
// coefficients, 11-bit convolution outputs, 9-bit trigonometric weights,
// 22-bit energy, 9-bit angles, a 24-bit arctangent datapath fed with 21-bit
// inputs. The pixel width (8 bit) and the oriented-filter width (11 bit) are
// this design's choice.
//
// Kernel tables. The seven second-order Gaussian-derivative basis kernels and
// their Hilbert-transform approximations are separable, K(x,y) = kv(y)*kh(x),
// sampled at nine points x,y = (k-4)*0.67, k = 0..8, with e(t) = exp(-t^2):
//   Gxx: kv = e(y)               kh = 0.9213*(2x^2-1)*e(x)
//   Gxy: kv = y*e(y)             kh = 1.843*x*e(x)
//   Gyy: kv = (2y^2-1)*e(y)      kh = 0.9213*e(x)
//   Hxx: kv = e(y)               kh = 0.9780*(x^3-2.254x)*e(x)
//   Hxy: kv = y*e(y)             kh = 0.9780*(x^2-0.7515)*e(x)
//   Hyx: kv = (y^2-0.7515)*e(y)  kh = 0.9780*x*e(x)
//   Hyy: kv = (y^3-2.254y)*e(y)  kh = 0.9780*e(x)
// Each tap is round(value*4096) in 13-bit two's complement (Q12), with the
// value 1.0 clipped to 4095.
//
// Steering weights for theta_i = i*pi/8, i = 0..7, with c = cos(theta_i),
// s = sin(theta_i), each round(value*128) in 9-bit two's complement (Q7):
//   even: c_i = c^2*Gxx - 2cs*Gxy + s^2*Gyy
//   odd : s_i = c^3*Hxx - 3c^2 s*Hxy + 3c s^2*Hyx - s^3*Hyy
// Orientation weights: cos(2 theta_i), sin(2 theta_i), Q7.
//
// CORDIC table: round(atan(2^-i) / (2 pi) * 2^24), a 24-bit binary angle
// where 2^24 is one full turn.
package gauss_coef_pkg;

  localparam int PW    = 8;    // pixel
  localparam int KW    = 13;   // kernel coefficient
  localparam int CW    = 11;   // convolution output
  localparam int TW    = 9;    // trigonometric weight
  localparam int FW    = 11;   // oriented quadrature filter output
  localparam int EW    = 22;   // energy
  localparam int AW    = 9;    // orientation and phase
  localparam int ATW   = 24;  // arctangent datapath and angle
  localparam int ATIN  = 21;   // arctangent input after normalisation
  localparam int TAPS  = 9;
  localparam int NORI  = 8;    // number of filter orientations
  localparam int NBAS  = 7;    // number of basis kernels
  localparam int TRIG_FRAC = 7;

  // Basis kernel indices.
  typedef enum int {K_GXX = 0, K_GXY = 1, K_GYY = 2,
                    K_HXX = 3, K_HXY = 4, K_HYX = 5, K_HYY = 6} kernel_e;

  typedef logic signed [KW-1:0] coef_t;
  typedef logic signed [TW-1:0] trig_t;
  typedef logic signed [CW-1:0] conv_t;
  typedef logic signed [FW-1:0] filt_t;
  typedef logic        [EW-1:0] energy_t;

  typedef coef_t kern_t [TAPS];

  localparam coef_t KV [NBAS][TAPS] = '{
    '{   3,   72,  680, 2615, 4095, 2615,  680,   72,   3},  // Gxx
    '{  -8, -145, -911,-1752,    0, 1752,  911,  145,   8},  // Gxy
    '{  42,  510, 1762, -267,-4096, -267, 1762,  510,  42},  // Gyy
    '{   3,   72,  680, 2615, 4095, 2615,  680,   72,   3},  // Hxx
    '{  -8, -145, -911,-1752,    0, 1752,  911,  145,   8},  // Hxy
    '{  20,  237,  710, -791,-3078, -791,  710,  237,  20},  // Hyx
    '{ -41, -259,  418, 3162,    0,-3162, -418,  259,  41}   // Hyy
  };

  localparam coef_t KH [NBAS][TAPS] = '{
    '{  38,  470, 1623, -246,-3774, -246, 1623,  470,  38},  // Gxx
    '{ -15, -267,-1679,-3229,    0, 3229, 1679,  267,  15},  // Gxy
    '{   3,   66,  627, 2409, 3774, 2409,  627,   66,   3},  // Gyy
    '{ -40, -253,  409, 3093,    0,-3093, -409,  253,  40},  // Hxx
    '{  20,  232,  694, -774,-3010, -774,  694,  232,  20},  // Hxy
    '{  -8, -142, -891,-1713,    0, 1713,  891,  142,   8},  // Hyx
    '{   3,   70,  665, 2557, 4006, 2557,  665,   70,   3}   // Hyy
  };

  // Even steering weights: [orientation][Gxx, Gxy, Gyy]
  localparam trig_t WEVEN [NORI][3] = '{
    '{128,    0,   0}, '{109,  -91,  19}, '{ 64, -128,  64}, '{ 19,  -91, 109},
    '{  0,    0, 128}, '{ 19,   91, 109}, '{ 64,  128,  64}, '{109,   91,  19}
  };

  // Odd steering weights: [orientation][Hxx, Hxy, Hyx, Hyy]
  localparam trig_t WODD [NORI][4] = '{
    '{ 128,    0,    0,    0}, '{ 101, -125,   52,   -7},
    '{  45, -136,  136,  -45}, '{   7,  -52,  125, -101},
    '{   0,    0,    0, -128}, '{  -7,  -52, -125, -101},
    '{ -45, -136, -136,  -45}, '{-101, -125,  -52,   -7}
  };

  localparam trig_t COS2T [NORI] = '{128,  91,   0, -91, -128, -91,    0,  91};
  localparam trig_t SIN2T [NORI] = '{  0,  91, 128,  91,    0, -91, -128, -91};

  localparam int CORDIC_MAX_ITER = 20;
  localparam logic [ATW-1:0] ATAN_TAB [CORDIC_MAX_ITER] = '{
    24'd2097152, 24'd1238021, 24'd654136, 24'd332050, 24'd166669,
    24'd83416,   24'd41718,   24'd20860,  24'd10430,  24'd5215,
    24'd2608,    24'd1304,    24'd652,    24'd326,    24'd163,
    24'd81,      24'd41,      24'd20,     24'd10,     24'd5
  };

  // Pipeline latencies of the coarse stages, in clock cycles.
  localparam int S0_LAT   = 24;
  localparam int S1_LAT   = 5;
  localparam int E_LAT    = 7;
  localparam int P_LAT    = 27;
  localparam int O_LAT    = 30;
  localparam int S2_LAT   = 30;

endpackage
