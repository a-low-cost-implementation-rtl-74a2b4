// qam_pkg: constants and elaboration-time functions shared by the square M-QAM
// mapper, quantizer and heuristic-decision-region (HDR) detectors.
//
// Conventions used throughout the design:
//  * A square M-QAM constellation has L = sqrt(M) levels per axis. Level index
//    k = 0 is the most negative amplitude, k = L-1 the most positive. Level k
//    sits at amplitude (2k - (L-1)) * d/2, with d the minimum distance.
//  * Each axis carries log2(L) message bits. The label of level k is the
//    bitwise complement of the binary-reflected Gray code of k. For 16-QAM this
//    gives 11, 10, 00, 01 from -3d/2 to +3d/2 on both axes, the 802.16-style
//    map; larger constellations follow the same rule. The in-phase label forms
//    the upper half of the message word, the quadrature label the lower half.
//  * Received components are signed fixed point (IN_W bits, IN_FRAC fraction
//    bits) in the same units as d. The quantizer turns them into N-bit
//    unsigned integers: clamp(floor(z/step) + 2^(N-1), 0, 2^N-1), which is the
//    clip/offset/round rule with offset (2^N-1)/2 and step (L-1)d/(2^N-1).
//    Level k then lands on k(2^N-1)/(L-1).
//  * The HDR boundary between levels k and k+1 is, after quantization, at
//    (2k+1)(2^N-1)/(2(L-1)). That value is never an integer, so the detector
//    compares the quantized sample with its ceiling, THR(k).
//
// Everything here is evaluated at elaboration; nothing is hardware by itself.
package qam_pkg;

  // Widest per-axis label supported (L up to 256, M up to 65536).
  localparam int unsigned MAX_AXIS_BITS = 8;

  typedef logic [127:0] wide_t;

  // Integer square root of M (number of levels per axis).
  function automatic int unsigned levels_of(input int unsigned m);
    int unsigned l;
    l = 1;
    while (l * l < m) l = l + 1;
    return l;
  endfunction

  // True when M is 4, 16, 64, ... (an even power of two, at least 4).
  function automatic bit valid_order(input int unsigned m);
    int unsigned l;
    l = levels_of(m);
    return (m >= 4) && (l * l == m) && ((l & (l - 1)) == 0)
           && ($clog2(l) <= MAX_AXIS_BITS);
  endfunction

  // Label of level k on one axis: complement of the reflected Gray code.
  function automatic logic [MAX_AXIS_BITS-1:0] axis_label(input int unsigned k,
                                                          input int unsigned l);
    logic [MAX_AXIS_BITS-1:0] g;
    logic [MAX_AXIS_BITS-1:0] mask;
    g    = MAX_AXIS_BITS'(k ^ (k >> 1));
    mask = MAX_AXIS_BITS'((1 << $clog2(l)) - 1);
    return ~g & mask;
  endfunction

  // HDR comparator threshold between levels k and k+1 in the N-bit quantized
  // domain: ceil((2k+1)(2^N-1) / (2(L-1))).
  function automatic wide_t hdr_threshold(input int unsigned k, input int unsigned l,
                                          input int unsigned n);
    wide_t num, den;
    int unsigned odd, span;
    odd  = 2 * k + 1;
    span = 2 * (l - 1);
    num  = wide_t'(odd) * ((wide_t'(1) << n) - 1);
    den  = wide_t'(span);
    return (num + den - 1) / den;
  endfunction

  // Denominator of 1/step in input LSBs: (L-1) * d * 2^IN_FRAC.
  function automatic wide_t quant_den(input int unsigned l, input int unsigned d,
                                     input int unsigned in_frac);
    int unsigned steps;
    steps = l - 1;
    return wide_t'(steps) * wide_t'(d) << in_frac;
  endfunction

  // Number of fraction bits of the quantizer's reciprocal constant. With this
  // many bits the product error stays below 1/den, so the floor is exact.
  function automatic int unsigned quant_sf(input int unsigned l, input int unsigned d,
                                           input int unsigned in_frac,
                                           input int unsigned in_w);
    return in_w + 1 + in_frac + $clog2((l - 1) * d + 1);
  endfunction

  // (2^N-1) * 2^SF / den, rounded up (hi = 1) or down (hi = 0).
  function automatic wide_t quant_scale(input int unsigned l, input int unsigned n,
                                        input int unsigned d, input int unsigned in_frac,
                                        input int unsigned sf, input bit hi);
    wide_t num, den;
    num = ((wide_t'(1) << n) - 1) << sf;
    den = quant_den(l, d, in_frac);
    return hi ? (num + den - 1) / den : num / den;
  endfunction

  // Number of bits needed to hold v.
  function automatic int unsigned bit_len(input wide_t v);
    int unsigned b;
    b = 1;
    while (b < 128 && (v >> b) != 0) b = b + 1;
    return b;
  endfunction

endpackage
