// fir_coeff_pkg -- coefficient set and dynamic quantization for the symmetric FIR filter.
//
// The filter is a 124th-order (125-tap) equiripple low-pass design for a 96 kHz sample
// rate with a 20 kHz passband edge and a 22 kHz stopband edge, as specified for this
// filter. Its impulse response is symmetric, so only the 63 unique coefficients
// b[0] .. b[62] are stored; b[124-k] equals b[k].
//
// The double-precision values below come from a Parks-McClellan design with those band
// edges and a stopband weight of 574 against the passband; that weight is this design's
// choice, picked because the dynamically quantized 16-bit set it gives reproduces the
// published coefficient words and scaling factors (19550, 24457, 28961, ... with
// S = 10, 8, 7, 6, 6, 8, 8, 7, ...; largest S = 15 = MAX_MULT) and, through the
// filter, the published output samples bit for bit. Stopband attenuation is about 80.6 dB.
//
// Dynamic quantization, evaluated at elaboration time by the constant functions below:
//   * S[k] is the number of doublings that bring |b[k]| into [0.5, 1): u = b * 2^S.
//   * The upscaled value u is rounded to a COEFF_WIDTH-bit two's-complement fraction
//     (1 sign bit, COEFF_WIDTH-1 fraction bits), half away from zero, saturating at
//     the largest positive word.
//   * The hardware multiplies by the word and shifts the product left by MAX_MULT - S[k],
//     so every product carries the common weight 2^(COEFF_WIDTH-1+MAX_MULT).
// Classical fixed-point quantization (no upscaling) is not part of this design.
package fir_coeff_pkg;

  // Number of taps of the stored design and of its unique (symmetric) coefficients.
  localparam int unsigned SET_TAPS  = 125;
  localparam int unsigned HALF_TAPS = (SET_TAPS + 1) / 2;

  // One entry per unique coefficient; wide enough for any COEFF_WIDTH up to 32.
  typedef int coeff_set_t [HALF_TAPS];

  localparam real B_FLOAT [HALF_TAPS] = '{
    0.0005815890949653619,  // b[0] = b[124]
    0.00291205584494557,  // b[1] = b[123]
    0.006898354946308168,  // b[2] = b[122]
    0.0101513492980058,  // b[3] = b[121]
    0.009030032750203667,  // b[4] = b[120]
    0.002941349946199223,  // b[5] = b[119]
    -0.0036419730303413867,  // b[6] = b[118]
    -0.00492042656183954,  // b[7] = b[117]
    -0.00044492569450384423,  // b[8] = b[116]
    0.0038342828140430028,  // b[9] = b[115]
    0.0025934689078488484,  // b[10] = b[114]
    -0.002074831654252021,  // b[11] = b[113]
    -0.003516140879081554,  // b[12] = b[112]
    0.00024075252434159822,  // b[13] = b[111]
    0.003608199776617962,  // b[14] = b[110]
    0.0015010521825073227,  // b[15] = b[109]
    -0.003004382978440459,  // b[16] = b[108]
    -0.0030016326774928645,  // b[17] = b[107]
    0.0017583951242282395,  // b[18] = b[106]
    0.004043409900902244,  // b[19] = b[105]
    1.950655934526857e-05,  // b[20] = b[104]
    -0.004375677334690028,  // b[21] = b[103]
    -0.002093846450891066,  // b[22] = b[102]
    0.003795806080205438,  // b[23] = b[101]
    0.004097575967027053,  // b[24] = b[100]
    -0.002234716301070595,  // b[25] = b[99]
    -0.005577548144303432,  // b[26] = b[98]
    -0.00017355779922347204,  // b[27] = b[97]
    0.006089319970660373,  // b[28] = b[96]
    0.0030752877118241013,  // b[29] = b[95]
    -0.0053001770495874415,  // b[30] = b[94]
    -0.005923294415086742,  // b[31] = b[93]
    0.0030923365464887212,  // b[32] = b[92]
    0.008054850198301097,  // b[33] = b[91]
    0.00035750765767259376,  // b[34] = b[90]
    -0.008821635142380227,  // b[35] = b[89]
    -0.004563987254940591,  // b[36] = b[88]
    0.007722103676402483,  // b[37] = b[87]
    0.008762997169554058,  // b[38] = b[86]
    -0.004542906687319924,  // b[39] = b[85]
    -0.012016356684559672,  // b[40] = b[84]
    -0.0005455776134292734,  // b[41] = b[83]
    0.013353637695782187,  // b[42] = b[82]
    0.006938404077079774,  // b[43] = b[81]
    -0.011950218421759758,  // b[44] = b[80]
    -0.013623785041876548,  // b[45] = b[79]
    0.007289400205710895,  // b[46] = b[78]
    0.019265477555266246,  // b[47] = b[77]
    0.0007058920374759455,  // b[48] = b[76]
    -0.02233050123570402,  // b[49] = b[75]
    -0.011608905997591812,  // b[50] = b[74]
    0.021206198029083675,  // b[51] = b[73]
    0.024507405647549507,  // b[52] = b[72]
    -0.014203354011509628,  // b[53] = b[71]
    -0.038104269161844714,  // b[54] = b[70]
    -0.0008124038783637406,  // b[55] = b[69]
    0.050886542432680176,  // b[56] = b[68]
    0.02812820326712933,  // b[57] = b[67]
    -0.06134382511025872,  // b[58] = b[66]
    -0.08321761448428423,  // b[59] = b[65]
    0.06819444122614964,  // b[60] = b[64]
    0.3104086472044259,  // b[61] = b[63]
    0.429421199381196   // b[62] = b[62]
  };

  // Scaling factor S of coefficient k: doublings until |b * 2^S| >= 0.5.
  function automatic int dyn_scale(int unsigned k);
    real u;
    int  s;
    u = (B_FLOAT[k] < 0.0) ? -B_FLOAT[k] : B_FLOAT[k];
    s = 0;
    // A zero coefficient would never reach 0.5; 62 doublings is a safe bound.
    while (u < 0.5 && s < 62) begin
      u = u * 2.0;
      s = s + 1;
    end
    return s;
  endfunction

  // Quantized upscaled coefficient word u'[k] for a given word width.
  function automatic int dyn_coeff(int unsigned k, int unsigned width);
    real u;
    real mag;
    int  q;
    int  qmax;
    u = B_FLOAT[k];
    for (int i = 0; i < dyn_scale(k); i++) u = u * 2.0;
    mag  = (u < 0.0) ? -u : u;
    q    = $rtoi(mag * (2.0 ** (width - 1)) + 0.5);
    qmax = (1 << (width - 1)) - 1;
    if (q > qmax) q = qmax;
    return (u < 0.0) ? -q : q;
  endfunction

  function automatic coeff_set_t dyn_coeff_set(int unsigned width);
    coeff_set_t c;
    for (int unsigned k = 0; k < HALF_TAPS; k++) c[k] = dyn_coeff(k, width);
    return c;
  endfunction

  function automatic coeff_set_t dyn_scale_set();
    coeff_set_t s;
    for (int unsigned k = 0; k < HALF_TAPS; k++) s[k] = dyn_scale(k);
    return s;
  endfunction

  function automatic int max_scale();
    int m;
    m = 0;
    for (int unsigned k = 0; k < HALF_TAPS; k++)
      if (dyn_scale(k) > m) m = dyn_scale(k);
    return m;
  endfunction

endpackage
