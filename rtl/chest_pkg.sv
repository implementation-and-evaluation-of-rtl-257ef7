// chest_pkg: types, constants and arithmetic helpers shared by the channel
// estimation and phase tracking pipeline of an IEEE 802.11p OFDM receiver.
//
// Every complex sample in the pipeline (received bins Y, reconstructed
// constellation points X~, channel estimates H, equalized symbols X) is a
// pair of two's-complement numbers of W bits with F = W-2 fraction bits, so
// each component covers [-2, 2). W = 12 is the bit width of the main
// configuration (8 bits was found to be the cheapest width that keeps the
// packet error rate); the F = W-2 split is this design's own choice.
// The feedback delay table (symbols between the symbol being equalized and the
// newest decoder-based channel estimate) and the long-training sequence are
// IEEE 802.11a/p constants.
package chest_pkg;

  localparam int W    = 12;          // sample bit width per I/Q component
  localparam int F    = W - 2;       // fraction bits of every sample
  localparam int NSC  = 64;          // FFT size = sub-carriers per OFDM symbol
  localparam int BW   = $clog2(NSC); // bin index width
  localparam int PW   = 16;          // phase word: 2*pi = 2**PW

  typedef logic signed [W-1:0] smp_t;

  typedef struct packed {
    smp_t re;
    smp_t im;
  } cpx_t;

  // Full-precision product of two samples (2F fraction bits).
  typedef struct packed {
    logic signed [2*W:0] re;
    logic signed [2*W:0] im;
  } cpx_prod_t;

  // Kind of FFT output symbol entering the pipeline.
  typedef enum logic [1:0] {
    SYM_LTS1 = 2'd0,  // first long-preamble symbol
    SYM_LTS2 = 2'd1,  // second long-preamble symbol
    SYM_DATA = 2'd2   // header or data symbol
  } sym_t;

  // Feedback delay in OFDM symbols per rate index (rates 0..7: BPSK 1/2 ..
  // 64QAM 3/4): de-mapping, de-interleaving, Viterbi decoding with trace-back
  // depth 64, re-encoding, re-interleaving and re-mapping.
  function automatic logic [2:0] feedback_delay(input logic [2:0] rate);
    case (rate)
      3'd0:          return 3'd6;
      3'd1, 3'd2:    return 3'd5;
      default:       return 3'd4;
    endcase
  endfunction

  // Long training sequence L(-26..26) of IEEE 802.11a/p.
  localparam int LTS_SEQ [53] = '{
     1, 1,-1,-1, 1, 1,-1, 1,-1, 1, 1, 1, 1, 1, 1,-1,-1, 1, 1,-1, 1,-1, 1, 1, 1, 1,
     0,
     1,-1,-1, 1, 1,-1, 1,-1, 1,-1,-1,-1,-1,-1, 1, 1,-1,-1, 1,-1, 1,-1, 1, 1, 1, 1};

  // Training value (+1, -1 or 0) on FFT bin b (natural FFT order: bins
  // 0..31 are sub-carriers 0..31, bins 32..63 are sub-carriers -32..-1).
  function automatic int lts_value(input int b);
    int sc;
    sc = (b < NSC/2) ? b : b - NSC;
    if (sc < -26 || sc > 26) return 0;
    return LTS_SEQ[sc + 26];
  endfunction

  // Saturate a wide signed value to a W-bit sample.
  function automatic smp_t sat(input logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (W-1)) - 1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (W-1));
    if (v > MAXV) return smp_t'(MAXV);
    if (v < MINV) return smp_t'(MINV);
    return smp_t'(v);
  endfunction

  // a * conj(b), full precision.
  function automatic cpx_prod_t cmul_conj(input cpx_t a, input cpx_t b);
    cpx_prod_t p;
    p.re = (2*W+1)'(a.re * b.re) + (2*W+1)'(a.im * b.im);
    p.im = (2*W+1)'(a.im * b.re) - (2*W+1)'(a.re * b.im);
    return p;
  endfunction

  // a * b, full precision.
  function automatic cpx_prod_t cmul(input cpx_t a, input cpx_t b);
    cpx_prod_t p;
    p.re = (2*W+1)'(a.re * b.re) - (2*W+1)'(a.im * b.im);
    p.im = (2*W+1)'(a.re * b.im) + (2*W+1)'(a.im * b.re);
    return p;
  endfunction

endpackage
