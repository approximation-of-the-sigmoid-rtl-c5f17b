// sigmoid_minimax_pkg: shared types and constants of the partitioned
// first-order minimax approximators of sig(x) = 1/(1+exp(-x)) and of its
// derivative sig'(x) = exp(-x)/(1+exp(-x))^2.
//
// The input range (-8,8) is folded onto [0,8) and [0,8) is cut into
// intervals whose end points are multiples of 1/4. An interval set is
// written here as a 32-bit start mask: bit q is set when an interval starts
// at q/4. Because every interval was obtained by halving a larger one, each
// interval is a power-of-two-wide, aligned block of quarters and is therefore
// recognised by a prefix ("differentiating bits") of the five bits
// x2 x1 x0 x-1 x-2 of the folded input.
//
// The ten interval sets (two functions, 7 to 11 accurate bits) and the
// minimax coefficients c0, c1 of each interval follow the published tables.
// The coefficients are kept here in millionths (six decimals, as published)
// and rounded to the hardware's fixed-point format at elaboration, so that a
// change of accuracy needs no new constants. One published derivative
// coefficient pair, for [5,6), does not match its own published error bound;
// the pair used here (0.027302, -0.004182) is the true minimax line on
// [5,6), whose maximum error 0.000253 matches the published error.
//
// Fixed-point formats, with K accurate bits (ACC):
//   x   : two's complement, 1 sign + 3 integer + K fraction bits (K+4 bits)
//   c0  : unsigned, LSB weight 2^-(K+3), range [0,1)             (K+3 bits)
//   c1  : LSB weight 2^-(K+5); unsigned for the sigmoid (range
//         [0,1/4)), two's complement for the derivative (range
//         [-1/8,1/8))                                           (K+3 bits)
//   y   : K+3 fraction bits, range [0,1)                        (K+3 bits)
// The published design fixes the widths (K+3 bits for x without its sign
// and for both coefficients) but not the binary point of c1. Placing it two
// bits lower than that of c0 uses the two leading bits that |c1| < 1/4
// always leaves zero; this keeps the error of c1*x, with x up to 8, below
// 2^-(K+3).
package sigmoid_minimax_pkg;

  typedef enum logic {
    FN_SIGMOID    = 1'b0,
    FN_DERIVATIVE = 1'b1
  } func_e;

  localparam int MIN_ACC       = 7;
  localparam int MAX_ACC       = 11;
  localparam int SEL_BITS      = 5;   // x2 x1 x0 x-1 x-2
  localparam int QUARTERS      = 32;  // [0,8) in steps of 1/4

  // Word widths for K accurate bits.
  function automatic int x_width(int acc);
    return acc + 4;
  endfunction

  function automatic int coef_width(int acc);
    return acc + 3;
  endfunction

  function automatic int y_width(int acc);
    return acc + 3;
  endfunction

  // Fraction bits of the coefficients.
  function automatic int c0_frac(int acc);
    return acc + 3;
  endfunction

  function automatic int c1_frac(int acc);
    return acc + 5;
  endfunction

  // Start mask of the interval set of one configuration.
  function automatic logic [QUARTERS-1:0] start_mask(func_e fn, int acc);
    logic [QUARTERS-1:0] m;
    if (fn == FN_SIGMOID) begin
      case (acc)
        7:       m = 32'h0001_1111;  // [0,1) [1,2) [2,3) [3,4) [4,8)
        8:       m = 32'h0001_1151;  // [1,2) halved
        9:       m = 32'h0101_1575;
        10:      m = 32'h0111_57fd;
        default: m = 32'h0115_7fff;  // 11 bits
      endcase
    end else begin
      case (acc)
        7:       m = 32'h0001_1111;
        8:       m = 32'h0001_1115;  // [0,1) halved
        9:       m = 32'h0101_1515;
        10:      m = 32'h0111_555f;
        default: m = 32'h0115_5f5f;  // 11 bits
      endcase
    end
    return m;
  endfunction

  function automatic int num_intervals(func_e fn, int acc);
    logic [QUARTERS-1:0] m;
    int n;
    m = start_mask(fn, acc);
    n = 0;
    for (int q = 0; q < QUARTERS; q++) n += int'(m[q]);
    return n;
  endfunction

  // Lower end, in quarters, of interval idx (intervals numbered upward).
  function automatic int interval_lo(func_e fn, int acc, int idx);
    logic [QUARTERS-1:0] m;
    int n;
    int lo;
    m  = start_mask(fn, acc);
    n  = 0;
    lo = 0;
    for (int q = 0; q < QUARTERS; q++) begin
      if (m[q]) begin
        if (n == idx) lo = q;
        n++;
      end
    end
    return lo;
  endfunction

  // Upper end, in quarters (exclusive), of interval idx.
  function automatic int interval_hi(func_e fn, int acc, int idx);
    if (idx + 1 >= num_intervals(fn, acc)) return QUARTERS;
    return interval_lo(fn, acc, idx + 1);
  endfunction

  // log2 of the interval width in quarters: the number of low bits of
  // x2..x-2 that do not take part in the interval's differentiating bits.
  function automatic int interval_free_bits(func_e fn, int acc, int idx);
    int w;
    int b;
    w = interval_hi(fn, acc, idx) - interval_lo(fn, acc, idx);
    b = 0;
    while ((1 << (b + 1)) <= w) b++;
    return b;
  endfunction

  // Minimax coefficient c0, in millionths, of the interval [lo/4, hi/4).
  function automatic int c0_micro(func_e fn, int lo, int hi);
    int key;
    int c;
    key = lo * 64 + hi;
    c   = 0;
    if (fn == FN_SIGMOID) begin
      case (key)
        0*64+1:   c = 500062;   0*64+2:   c = 500484;   0*64+4:   c = 503526;
        1*64+2:   c = 502068;   2*64+3:   c = 509288;   2*64+4:   c = 515071;
        3*64+4:   c = 523872;   4*64+5:   c = 546461;   4*64+6:   c = 559518;
        4*64+8:   c = 587144;   5*64+6:   c = 576301;   6*64+7:   c = 611664;
        6*64+8:   c = 629290;   7*64+8:   c = 650373;   8*64+9:   c = 690262;
        8*64+10:  c = 708509;   8*64+12:  c = 740982;   9*64+10:  c = 729481;
        10*64+11: c = 766639;   10*64+12: c = 782758;   11*64+12: c = 800821;
        12*64+13: c = 831530;   12*64+14: c = 844413;   12*64+16: c = 865960;
        13*64+14: c = 858599;   14*64+16: c = 891742;   16*64+18: c = 926231;
        16*64+20: c = 937520;   16*64+24: c = 952796;   16*64+32: c = 968019;
        18*64+20: c = 950497;   20*64+24: c = 972463;   24*64+32: c = 991368;
        default:  c = 0;
      endcase
    end else begin
      case (key)
        0*64+1:   c = 250479;   0*64+2:   c = 251816;   0*64+4:   c = 255890;
        1*64+2:   c = 257686;   2*64+3:   c = 269542;   2*64+4:   c = 274444;
        3*64+4:   c = 281944;   4*64+6:   c = 291686;   4*64+8:   c = 287292;
        6*64+8:   c = 281132;   8*64+9:   c = 254719;   8*64+10:  c = 243907;
        8*64+12:  c = 222136;   9*64+10:  c = 231484;   10*64+11: c = 206225;
        10*64+12: c = 194156;   11*64+12: c = 180634;   12*64+14: c = 145077;
        12*64+16: c = 126229;   14*64+16: c = 103680;   16*64+18: c = 71834;
        16*64+20: c = 61073;    16*64+24: c = 46308;    16*64+32: c = 31428;
        18*64+20: c = 48702;    20*64+24: c = 27302;    24*64+32: c = 8608;
        default:  c = 0;
      endcase
    end
    return c;
  endfunction

  // Minimax coefficient c1, in millionths, of the interval [lo/4, hi/4).
  function automatic int c1_micro(func_e fn, int lo, int hi);
    int key;
    int c;
    key = lo * 64 + hi;
    c   = 0;
    if (fn == FN_SIGMOID) begin
      case (key)
        0*64+1:   c = 248706;   0*64+2:   c = 244918;   0*64+4:   c = 231058;
        1*64+2:   c = 241131;   2*64+3:   c = 226877;   2*64+4:   c = 217198;
        3*64+4:   c = 207519;   4*64+5:   c = 184965;   4*64+6:   c = 173031;
        4*64+8:   c = 149738;   5*64+6:   c = 161098;   6*64+7:   c = 137513;
        6*64+8:   c = 126445;   7*64+8:   c = 115377;   8*64+9:   c = 95413;
        8*64+10:  c = 86689;    8*64+12:  c = 71777;    9*64+10:  c = 77965;
        10*64+11: c = 63086;    10*64+12: c = 56864;    11*64+12: c = 50643;
        12*64+13: c = 40395;    12*64+14: c = 36227;    12*64+16: c = 29439;
        13*64+14: c = 32058;    14*64+16: c = 22652;    16*64+18: c = 13998;
        16*64+20: c = 11293;    16*64+24: c = 7756;     16*64+32: c = 4412;
        18*64+20: c = 8588;     20*64+24: c = 4220;     24*64+32: c = 1068;
        default:  c = 0;
      endcase
    end else begin
      case (key)
        0*64+1:   c = -15463;   0*64+2:   c = -29992;   0*64+4:   c = -53388;
        1*64+2:   c = -44521;   2*64+3:   c = -68434;   2*64+4:   c = -76783;
        3*64+4:   c = -85132;   4*64+6:   c = -94933;   4*64+8:   c = -91626;
        6*64+8:   c = -88305;   8*64+9:   c = -74942;   8*64+10:  c = -69779;
        8*64+12:  c = -59816;   9*64+10:  c = -64616;   10*64+11: c = -54509;
        10*64+12: c = -49854;   11*64+12: c = -45198;   12*64+14: c = -33447;
        12*64+16: c = -27513;   14*64+16: c = -21580;   16*64+18: c = -13592;
        16*64+20: c = -11014;   16*64+24: c = -7598;    16*64+32: c = -4331;
        18*64+20: c = -8436;    20*64+24: c = -4182;    24*64+32: c = -1065;
        default:  c = 0;
      endcase
    end
    return c;
  endfunction

  // Round a value in millionths to an integer multiple of 2^-frac,
  // to nearest, ties away from zero.
  function automatic longint quantize_micro(int micro, int frac);
    longint mag;
    longint q;
    mag = (micro < 0) ? -longint'(micro) : longint'(micro);
    q   = ((mag << frac) + 64'sd500000) / 64'sd1000000;
    return (micro < 0) ? -q : q;
  endfunction

  // Hard-wired coefficient words of interval idx of a configuration.
  function automatic longint c0_word(func_e fn, int acc, int idx);
    return quantize_micro(c0_micro(fn, interval_lo(fn, acc, idx), interval_hi(fn, acc, idx)),
                          c0_frac(acc));
  endfunction

  function automatic longint c1_word(func_e fn, int acc, int idx);
    return quantize_micro(c1_micro(fn, interval_lo(fn, acc, idx), interval_hi(fn, acc, idx)),
                          c1_frac(acc));
  endfunction

endpackage
