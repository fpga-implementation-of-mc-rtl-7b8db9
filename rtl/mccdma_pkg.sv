// mccdma_pkg: types, constants and arithmetic helpers shared by the MC-CDMA
// transmitter and receiver.
//
// Samples are complex fixed-point numbers, DATA_W bits per component, two's
// complement. Twiddle factors are Q1.14 (16384 = 1.0). The OFDM symbol has
// N_SC = 8 subcarriers, as in the 8-point IFFT/FFT of the design; one QPSK
// symbol (two coded bits) rides on each subcarrier.
//
// The word widths, the QPSK amplitude and the Q1.14 twiddle format are this
// design's own choices; the 8-point transform, QPSK and the code are the
// design's defining numbers.
package mccdma_pkg;

  localparam int N_SC     = 8;      // subcarriers = FFT/IFFT points
  localparam int DATA_W   = 16;     // bits per I or Q component
  localparam int TW_FRAC  = 14;     // twiddle fraction bits
  localparam int TW_W     = 16;

  // QPSK constellation amplitude. With per-stage halving in the IFFT a time
  // sample never exceeds this, and the receiver FFT (no scaling) then stays
  // below 8*QPSK_AMP = 2^14, inside a 16-bit word.
  localparam int QPSK_AMP = 2048;

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  typedef cplx_t frame_t [N_SC];

  // cos(2*pi*k/8) and sin(2*pi*k/8) in Q1.14, k = 0..3. round(16384/sqrt(2)) = 11585.
  localparam logic signed [TW_W-1:0] TW_COS [4] = '{16'sd16384, 16'sd11585, 16'sd0, -16'sd11585};
  localparam logic signed [TW_W-1:0] TW_SIN [4] = '{16'sd0, 16'sd11585, 16'sd16384, 16'sd11585};

  // Complex addition and subtraction, wrapping at DATA_W bits.
  function automatic cplx_t c_add(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t c_sub(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // (a + b) / 2 and (a - b) / 2, formed at DATA_W+1 bits so they cannot
  // wrap; the halving (an arithmetic shift) spreads the IFFT's 1/N over its
  // three stages.
  function automatic cplx_t c_add_half(cplx_t a, cplx_t b);
    logic signed [DATA_W:0] sr, si;
    cplx_t r;
    sr = (DATA_W+1)'(a.re) + (DATA_W+1)'(b.re);
    si = (DATA_W+1)'(a.im) + (DATA_W+1)'(b.im);
    r.re = DATA_W'(sr >>> 1);
    r.im = DATA_W'(si >>> 1);
    return r;
  endfunction

  function automatic cplx_t c_sub_half(cplx_t a, cplx_t b);
    logic signed [DATA_W:0] sr, si;
    cplx_t r;
    sr = (DATA_W+1)'(a.re) - (DATA_W+1)'(b.re);
    si = (DATA_W+1)'(a.im) - (DATA_W+1)'(b.im);
    r.re = DATA_W'(sr >>> 1);
    r.im = DATA_W'(si >>> 1);
    return r;
  endfunction

  // Bit reversal of a 3-bit subcarrier index.
  function automatic int bitrev3(int k);
    return ((k & 1) << 2) | (k & 2) | ((k >> 2) & 1);
  endfunction

  // Multiply by W_8^(k) (inverse = 0) or W_8^(-k) (inverse = 1), k = 0..3,
  // where W_8 = exp(-j*2*pi/8). Result rounded to nearest.
  function automatic cplx_t c_twiddle(cplx_t a, logic [1:0] k, logic inverse);
    logic signed [TW_W-1:0]          wr, wi;
    logic signed [DATA_W+TW_W:0]     pr, pi;
    cplx_t r;
    wr = TW_COS[k];
    wi = inverse ? TW_SIN[k] : -TW_SIN[k];
    pr = (DATA_W+TW_W+1)'(a.re) * wr - (DATA_W+TW_W+1)'(a.im) * wi
         + (DATA_W+TW_W+1)'(1 <<< (TW_FRAC-1));
    pi = (DATA_W+TW_W+1)'(a.re) * wi + (DATA_W+TW_W+1)'(a.im) * wr
         + (DATA_W+TW_W+1)'(1 <<< (TW_FRAC-1));
    r.re = DATA_W'(pr >>> TW_FRAC);
    r.im = DATA_W'(pi >>> TW_FRAC);
    return r;
  endfunction

  // Convolutional code of the design: constraint length 3, state {s1,s0}
  // holding the last two input bits (s1 newest). Returns {v1,v2}.
  function automatic logic [1:0] conv_code(logic u, logic [1:0] s);
    return {u ^ s[1] ^ s[0], u ^ s[0]};
  endfunction

endpackage
