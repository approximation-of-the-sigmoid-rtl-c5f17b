// tb_sigmoid_ref_pkg: reference model shared by the testbenches of the
// sigmoid / sigmoid-derivative approximators. It is written independently
// of the RTL: it keeps its own copy of every (function, accuracy, interval,
// c0, c1) row of the published coefficient tables (one row per table line,
// repeats included, c0 and c1 in millionths), finds an argument's interval
// by comparing against the interval ends (the RTL matches bit patterns), and
// rounds coefficients with real arithmetic (the RTL uses integer division).
//
// ref_y() returns the exact output word the hardware must produce;
// true_f() the exact function value, for accuracy checks.
package tb_sigmoid_ref_pkg;

  localparam int NROWS = 103;

  // {function (0 sigmoid, 1 derivative), accurate bits, lo, hi (quarters),
  //  c0 * 1e6, c1 * 1e6}
  localparam int ROWS [NROWS][6] = '{
    '{0,  7,  0,  4,  503526,  231058}, '{0,  7,  4,  8,  587144,  149738}, '{0,  7,  8, 12,  740982,   71777},
    '{0,  7, 12, 16,  865960,   29439}, '{0,  7, 16, 32,  968019,    4412}, '{0,  8,  0,  4,  503526,  231058},
    '{0,  8,  4,  6,  559518,  173031}, '{0,  8,  6,  8,  629290,  126445}, '{0,  8,  8, 12,  740982,   71777},
    '{0,  8, 12, 16,  865960,   29439}, '{0,  8, 16, 32,  968019,    4412}, '{0,  9,  0,  2,  500484,  244918},
    '{0,  9,  2,  4,  515071,  217198}, '{0,  9,  4,  5,  546461,  184965}, '{0,  9,  5,  6,  576301,  161098},
    '{0,  9,  6,  8,  629290,  126445}, '{0,  9,  8, 10,  708509,   86689}, '{0,  9, 10, 12,  782758,   56864},
    '{0,  9, 12, 16,  865960,   29439}, '{0,  9, 16, 24,  952796,    7756}, '{0,  9, 24, 32,  991368,    1068},
    '{0, 10,  0,  2,  500484,  244918}, '{0, 10,  2,  3,  509288,  226877}, '{0, 10,  3,  4,  523872,  207519},
    '{0, 10,  4,  5,  546461,  184965}, '{0, 10,  5,  6,  576301,  161098}, '{0, 10,  6,  7,  611664,  137513},
    '{0, 10,  7,  8,  650373,  115377}, '{0, 10,  8,  9,  690262,   95413}, '{0, 10,  9, 10,  729481,   77965},
    '{0, 10, 10, 12,  782758,   56864}, '{0, 10, 12, 14,  844413,   36227}, '{0, 10, 14, 16,  891742,   22652},
    '{0, 10, 16, 20,  937520,   11293}, '{0, 10, 20, 24,  972463,    4220}, '{0, 10, 24, 32,  991368,    1068},
    '{0, 11,  0,  1,  500062,  248706}, '{0, 11,  1,  2,  502068,  241131}, '{0, 11,  2,  3,  509288,  226877},
    '{0, 11,  3,  4,  523872,  207519}, '{0, 11,  4,  5,  546461,  184965}, '{0, 11,  5,  6,  576301,  161098},
    '{0, 11,  6,  7,  611664,  137513}, '{0, 11,  7,  8,  650373,  115377}, '{0, 11,  8,  9,  690262,   95413},
    '{0, 11,  9, 10,  729481,   77965}, '{0, 11, 10, 11,  766639,   63086}, '{0, 11, 11, 12,  800821,   50643},
    '{0, 11, 12, 13,  831530,   40395}, '{0, 11, 13, 14,  858599,   32058}, '{0, 11, 14, 16,  891742,   22652},
    '{0, 11, 16, 18,  926231,   13998}, '{0, 11, 18, 20,  950497,    8588}, '{0, 11, 20, 24,  972463,    4220},
    '{0, 11, 24, 32,  991368,    1068}, '{1,  7,  0,  4,  255890,  -53388}, '{1,  7,  4,  8,  287292,  -91626},
    '{1,  7,  8, 12,  222136,  -59816}, '{1,  7, 12, 16,  126229,  -27513}, '{1,  7, 16, 32,   31428,   -4331},
    '{1,  8,  0,  2,  251816,  -29992}, '{1,  8,  2,  4,  274444,  -76783}, '{1,  8,  4,  8,  287292,  -91626},
    '{1,  8,  8, 12,  222136,  -59816}, '{1,  8, 12, 16,  126229,  -27513}, '{1,  8, 16, 32,   31428,   -4331},
    '{1,  9,  0,  2,  251816,  -29992}, '{1,  9,  2,  4,  274444,  -76783}, '{1,  9,  4,  8,  287292,  -91626},
    '{1,  9,  8, 10,  243907,  -69779}, '{1,  9, 10, 12,  194156,  -49854}, '{1,  9, 12, 16,  126229,  -27513},
    '{1,  9, 16, 24,   46308,   -7598}, '{1,  9, 24, 32,    8608,   -1065}, '{1, 10,  0,  1,  250479,  -15463},
    '{1, 10,  1,  2,  257686,  -44521}, '{1, 10,  2,  3,  269542,  -68434}, '{1, 10,  3,  4,  281944,  -85132},
    '{1, 10,  4,  6,  291686,  -94933}, '{1, 10,  6,  8,  281132,  -88305}, '{1, 10,  8, 10,  243907,  -69779},
    '{1, 10, 10, 12,  194156,  -49854}, '{1, 10, 12, 14,  145077,  -33447}, '{1, 10, 14, 16,  103680,  -21580},
    '{1, 10, 16, 20,   61073,  -11014}, '{1, 10, 20, 24,   27302,   -4182}, '{1, 10, 24, 32,    8608,   -1065},
    '{1, 11,  0,  1,  250479,  -15463}, '{1, 11,  1,  2,  257686,  -44521}, '{1, 11,  2,  3,  269542,  -68434},
    '{1, 11,  3,  4,  281944,  -85132}, '{1, 11,  4,  6,  291686,  -94933}, '{1, 11,  6,  8,  281132,  -88305},
    '{1, 11,  8,  9,  254719,  -74942}, '{1, 11,  9, 10,  231484,  -64616}, '{1, 11, 10, 11,  206225,  -54509},
    '{1, 11, 11, 12,  180634,  -45198}, '{1, 11, 12, 14,  145077,  -33447}, '{1, 11, 14, 16,  103680,  -21580},
    '{1, 11, 16, 18,   71834,  -13592}, '{1, 11, 18, 20,   48702,   -8436}, '{1, 11, 20, 24,   27302,   -4182},
    '{1, 11, 24, 32,    8608,   -1065}
  };

  function automatic real true_f(bit deriv, real x);
    real s;
    s = 1.0 / (1.0 + $exp(-x));
    return deriv ? s * (1.0 - s) : s;
  endfunction

  // Index into ROWS of the interval holding magnitude m (in units of 1/4
  // after scaling), or -1 if none.
  function automatic int find_row(bit deriv, int k, real m);
    for (int i = 0; i < NROWS; i++) begin
      if (ROWS[i][0] == int'(deriv) && ROWS[i][1] == k &&
          m >= real'(ROWS[i][2]) / 4.0 && m < real'(ROWS[i][3]) / 4.0)
        return i;
    end
    return -1;
  endfunction

  function automatic int num_rows(bit deriv, int k);
    int n;
    n = 0;
    for (int i = 0; i < NROWS; i++)
      if (ROWS[i][0] == int'(deriv) && ROWS[i][1] == k) n++;
    return n;
  endfunction

  // Coefficient in millionths rounded to a multiple of 2^-frac, to nearest,
  // ties away from zero.
  function automatic longint round_coef(int micro, int frac);
    real v;
    v = real'(micro) / 1.0e6 * (2.0 ** frac);
    if (v >= 0.0) return longint'($floor(v + 0.5));
    return -longint'($floor(-v + 0.5));
  endfunction

  // Folded magnitude code of a (k+4)-bit two's complement input code.
  function automatic longint fold(int k, longint xcode);
    longint mask;
    mask = (64'sd1 <<< (k + 3)) - 1;
    if (((xcode >>> (k + 3)) & 1) != 0) return (~xcode) & mask;
    return xcode & mask;
  endfunction

  function automatic bit is_neg(int k, longint xcode);
    return ((xcode >>> (k + 3)) & 1) != 0;
  endfunction

  function automatic real x_value(int k, longint xcode);
    longint v;
    v = xcode;
    if (is_neg(k, xcode)) v = xcode - (64'sd1 <<< (k + 4));
    return real'(v) / (2.0 ** k);
  endfunction

  // Index of the first row of a configuration in ROWS.
  function automatic int first_row(bit deriv, int k);
    for (int i = 0; i < NROWS; i++)
      if (ROWS[i][0] == int'(deriv) && ROWS[i][1] == k) return i;
    return -1;
  endfunction

  // Unclamped multiply-accumulate result (2k+5 fraction bits) for xcode.
  function automatic longint ref_r(bit deriv, int k, longint xcode);
    longint m, c0, c1;
    int row;
    m   = fold(k, xcode);
    row = find_row(deriv, k, real'(m) / (2.0 ** k));
    c0  = round_coef(ROWS[row][4], k + 3);
    c1  = round_coef(ROWS[row][5], k + 5);
    return (c0 <<< (k + 2)) + c1 * m + (64'sd1 <<< (k + 1));
  endfunction

  // True when the multiply-accumulate result for xcode lies outside [0,1),
  // i.e. when the hardware's range clamp acts.
  function automatic bit ref_clamped(bit deriv, int k, longint xcode);
    longint r;
    r = ref_r(deriv, k, xcode);
    return (r < 0) || ((r >>> (2 * k + 5)) != 0);
  endfunction

  // Expected (k+3)-bit output word of the approximator for input code
  // xcode: c0 (k+3 fraction bits) + c1 (k+5 fraction bits) * |x|, rounded to
  // k+3 fraction bits, clamped to [0,1), reflected for a negative sigmoid
  // argument.
  function automatic longint ref_y(bit deriv, int k, longint xcode);
    longint m, c0, c1, r, y, ymask;
    int row;
    m   = fold(k, xcode);
    row = find_row(deriv, k, real'(m) / (2.0 ** k));
    if (row < 0) return -1;
    c0  = round_coef(ROWS[row][4], k + 3);
    c1  = round_coef(ROWS[row][5], k + 5);
    r   = (c0 <<< (k + 2)) + c1 * m + (64'sd1 <<< (k + 1));  // 2k+5 fraction bits
    ymask = (64'sd1 <<< (k + 3)) - 1;
    if (r < 0) y = 0;
    else if ((r >>> (2 * k + 5)) != 0) y = ymask;
    else y = (r >>> (k + 2)) & ymask;
    if (!deriv && is_neg(k, xcode)) y = (~y) & ymask;
    return y;
  endfunction

  // Largest published minimax error of a configuration (the maxima of the
  // published per-interval error tables).
  function automatic real mm_err(bit deriv, int k);
    if (!deriv) begin
      case (k)
        7: return 0.005824;  8: return 0.003740;  9: return 0.001815;
        10: return 0.000778; default: return 0.000374;
      endcase
    end
    case (k)
      7: return 0.005895;  8: return 0.003561;  9: return 0.001816;
      10: return 0.000648; default: return 0.000479;
    endcase
  endfunction

  // Error bound of the hardware: the minimax error plus 2^-k times
  //   1/4   folding a negative x by one's complement (|x| - 2^-k, slope <= 1/4)
  //   1/16  rounding c0 to k+3 fraction bits
  //   1/8   rounding c1 to k+5 fraction bits, times |x| < 8
  //   1/16  rounding the output to k+3 fraction bits
  //   1/8   the one's complement reflection of the sigmoid output
  function automatic real err_bound(bit deriv, int k);
    return mm_err(deriv, k) + 0.625 * (2.0 ** (-k));
  endfunction

  function automatic real y_value(int k, longint y);
    return real'(y) / (2.0 ** (k + 3));
  endfunction

endpackage
