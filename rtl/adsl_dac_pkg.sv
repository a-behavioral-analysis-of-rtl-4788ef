// adsl_dac_pkg: word widths, sample-rate factors and coefficient tables shared by
// the ADSL interpolation filter and sigma-delta DAC.
//
// Data format. Every sample between the stages is a 14-bit two's complement
// fraction (Q1.13, full scale -1 .. +1-2^-13), the word width of all three
// interpolation stages. The modulator emits a 5-bit two's complement code
// (-16 .. +15) that stands for the level code/16.
//
// Halfband tables. A halfband interpolator of TAPS = 4K+3 taps has every second
// tap zero except the centre one. Run at the input rate it splits into two
// phases: a symmetric FIR of (TAPS+1)/2 taps and a pure delay. Only the first
// half of that FIR's taps is stored; the second half mirrors it. The taps are
//   c[i] = round(32768 * 2 * h[2i]),  h[n] = w[n] * sin(pi*(n-C)/2) / (pi*(n-C)),
// with C = (TAPS-1)/2 and w a Kaiser window of beta = 6.0; the factor 2 restores
// the gain lost by zero stuffing. The innermost pair is then nudged so that the
// taps sum to exactly 32768 (unity DC gain). The tap counts (71 and 19) and the
// 14-bit word are the specified ones; the window and the 16-bit Q15 tap format
// are this design's choice. The 71-tap stage is flat within 0.1 dB up to
// 125 kHz and at least 60 dB down from 153 kHz (at 552 kHz); the 19-tap stage is
// flat within 0.01 dB to 138 kHz and at least 60 dB down from 392 kHz
// (at 1104 kHz), below the first image band that starts at 414 kHz.
//
// Modulator coefficients. The loop of the fifth-order modulator is a chain of
// five delaying integrators 1/(z-1) with feed-forward taps a1..a5 and two
// resonator feedbacks b1 (state 3 into stage 2) and b2 (state 5 into stage 4).
// Its noise transfer function is NTF = N(z)/D(z) with
//   N(z) = (z-1) ((z-1)^2 + b1) ((z-1)^2 + b2)
//   D(z) = (z-0.7477)(z^2-1.556z+0.6233)(z^2-1.756z+0.8336)
// b1, b2 are chosen so that the NTF zeros sit at the angles of the roots of
// z^2-1.997z+1 and z^2-1.992z+1 (b = tan^2(acos(c/2))), and a1..a5 solve
// D(z) - N(z) = a1 R1 R2 + a2 (z-1) R2 + a3 R2 + a4 (z-1) + a5, with
// Rk = (z-1)^2 + bk. All of them are stored as integers scaled by 2^16.
package adsl_dac_pkg;

  // ---- word widths ----------------------------------------------------------
  localparam int DATA_W   = 14;  // sample word of all filter stages (Q1.13)
  localparam int COEF_W   = 16;  // halfband tap word (Q1.15)
  localparam int COEF_FRAC = 15;
  localparam int SDM_BITS = 5;   // modulator quantizer word, m

  // ---- interpolation factors (M1, M2, M3) -------------------------------------
  localparam int M1 = 2;
  localparam int M2 = 2;
  localparam int M3 = 8;
  localparam int OSR = M1 * M2 * M3;  // 32

  // ---- halfband taps --------------------------------------------------------
  localparam int HB1_TAPS = 71;
  localparam int HB2_TAPS = 19;

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t HB71_HALF [18] = '{
    -16'sd9,    16'sd21,   -16'sd41,    16'sd70,   -16'sd111,   16'sd167,
    -16'sd241,  16'sd337,  -16'sd461,   16'sd619,  -16'sd822,   16'sd1086,
    -16'sd1438, 16'sd1929, -16'sd2669,  16'sd3945, -16'sd6815,  16'sd20817
  };

  localparam coef_t HB19_HALF [5] = '{
    16'sd34, -16'sd412, 16'sd1674, -16'sd5091, 16'sd20176
  };

  // Tap i (0 <= i < (taps+1)/2) of the FIR phase of a halfband interpolator.
  function automatic coef_t hb_tap(input int taps, input int i);
    int p;
    int k;
    p = (taps + 1) / 2;
    k = (i < p / 2) ? i : p - 1 - i;
    case (taps)
      HB1_TAPS: return HB71_HALF[k];
      HB2_TAPS: return HB19_HALF[k];
      default:  return '0;
    endcase
  endfunction

  // ---- fifth-order modulator ------------------------------------------------
  localparam int SDM_COEF_FRAC = 16;
  localparam int SDM_COEF_W    = 18;
  typedef logic signed [SDM_COEF_W-1:0] sdm_coef_t;

  localparam sdm_coef_t SDM_A [5] = '{
    18'sd61624, 18'sd27248, 18'sd6841, 18'sd963, 18'sd30
  };
  localparam sdm_coef_t SDM_B1 = 18'sd197;  // 0.003006 * 2^16
  localparam sdm_coef_t SDM_B2 = 18'sd527;  // 0.008048 * 2^16

  // ---- comb filter ----------------------------------------------------------
  localparam int CIC_ORDER = 4;

endpackage
