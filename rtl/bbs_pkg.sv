// Shared types, constants and helper functions of the bank-balanced sparse
// (BBS) LSTM accelerator.
//
// Number format: every datapath word is a signed two's-complement fixed-point
// number with DATA_W bits, FRAC_W of them fractional (Q16.16 by default). The
// reference design computes in 32-bit floating point; a 32-bit fixed-point word
// is this implementation's choice, keeping the word width and making every
// arithmetic unit a plain integer adder or multiplier.
//
// Instruction codes: READ_PARA = 1, NO_READ = 2 and LOAD = 3 follow the
// reference encoding. The reference lumps the three memory loads under one
// code; here LOAD_WEIGHTS keeps code 3 and LOAD_BIAS / LOAD_VECTOR take the
// next two codes, which is this design's choice.
//
// The piecewise-linear activation tables are not stored as data: the constant
// functions at the end compute the chord of the exact curve over each
// interval, y = a*x + b, with the endpoints evaluated by $exp at elaboration.
package bbs_pkg;

  parameter int DATA_W = 32;          // datapath word width
  parameter int FRAC_W = 16;          // fractional bits of a datapath word
  parameter int COEF_W = 32;          // activation coefficient width
  parameter int COEF_FRAC_W = 24;     // fractional bits of a coefficient

  typedef logic signed [DATA_W-1:0] fx_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Host instructions accepted by the controller.
  typedef enum logic [2:0] {
    INS_NOP          = 3'd0,
    INS_READ_PARA    = 3'd1,  // run one time step from the stored vector
    INS_NO_READ      = 3'd2,  // run one time step on the fed-back vector
    INS_LOAD_WEIGHTS = 3'd3,  // stream CSB values and indices in
    INS_LOAD_BIAS    = 3'd4,  // stream the bias vector in
    INS_LOAD_VECTOR  = 3'd5   // stream (part of) the input vector in
  } ins_e;

  localparam fx_t FX_ONE = fx_t'(1) <<< FRAC_W;

  // Fixed-point product, truncated back to the datapath format.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*DATA_W-1:0] p;
    p = (2*DATA_W)'(a) * (2*DATA_W)'(b);
    return fx_t'(p >>> FRAC_W);
  endfunction

  // Real number to datapath format (for testbenches and constants).
  function automatic fx_t real_to_fx(real r);
    return fx_t'($rtoi(r * (2.0 ** FRAC_W)));
  endfunction

  function automatic real fx_to_real(fx_t v);
    return $itor(v) / (2.0 ** FRAC_W);
  endfunction

  // Exact activation functions, evaluated only at elaboration or in testbenches.
  function automatic real sigmoid_real(real x);
    return 1.0 / (1.0 + $exp(-x));
  endfunction

  function automatic real tanh_real(real x);
    return (($exp(x) - $exp(-x)) / ($exp(x) + $exp(-x)));
  endfunction

  // Chord slope and intercept of segment k, which spans
  // [lo + k*step, lo + (k+1)*step].
  function automatic real pwl_a(bit is_tanh, real lo, real step, int k);
    real x0, x1;
    x0 = lo + step * k;
    x1 = x0 + step;
    if (is_tanh) return (tanh_real(x1) - tanh_real(x0)) / step;
    else         return (sigmoid_real(x1) - sigmoid_real(x0)) / step;
  endfunction

  function automatic real pwl_b(bit is_tanh, real lo, real step, int k);
    real x0;
    x0 = lo + step * k;
    if (is_tanh) return tanh_real(x0) - pwl_a(is_tanh, lo, step, k) * x0;
    else         return sigmoid_real(x0) - pwl_a(is_tanh, lo, step, k) * x0;
  endfunction

  function automatic coef_t real_to_coef(real r);
    return coef_t'($rtoi(r * (2.0 ** COEF_FRAC_W)));
  endfunction

  // y = a*x + b with a, b in coefficient format and x, y in datapath format.
  function automatic fx_t pwl_eval(coef_t a, coef_t b, fx_t x);
    logic signed [COEF_W+DATA_W-1:0] ax;
    ax = (COEF_W+DATA_W)'(a) * (COEF_W+DATA_W)'(x);
    return fx_t'((ax >>> COEF_FRAC_W) + ((COEF_W+DATA_W)'(b) >>> (COEF_FRAC_W - FRAC_W)));
  endfunction

endpackage
