// Piecewise-linear hyperbolic tangent, y = tanh(x).
//
// The input range (-RANGE, RANGE] is cut into equal intervals of width
// 1/SLICES_PER_UNIT; interval k = floor((x + RANGE) * SLICES_PER_UNIT) holds a
// straight line y = a[k]*x + b[k]. Below the range the output is -1, above it
// +1. Range 6, interval 0.1 and therefore 120 intervals follow the reference
// design. Its coefficients were fitted offline; here each line is the chord of
// the exact curve over its interval, computed at elaboration (bbs_pkg::pwl_a,
// pwl_b), which keeps the error below 2e-3 for the default table.
//
// Interface: x and y are bbs_pkg::fx_t fixed-point words.
// Timing: purely combinational, one table lookup, one multiply, one add.
module tanh_pwl
  import bbs_pkg::*;
#(
  parameter int RANGE           = 6,
  parameter int SLICES_PER_UNIT = 10
) (
  input  fx_t x,
  output fx_t y
);

  localparam int N_SLICE = 2 * RANGE * SLICES_PER_UNIT;
  localparam int IDX_W   = $clog2(N_SLICE);

  typedef coef_t table_t [N_SLICE];

  function automatic table_t make_table(bit want_b);
    table_t t;
    for (int k = 0; k < N_SLICE; k++) begin
      if (want_b) t[k] = real_to_coef(pwl_b(1'b1, -real'(RANGE), 1.0 / SLICES_PER_UNIT, k));
      else        t[k] = real_to_coef(pwl_a(1'b1, -real'(RANGE), 1.0 / SLICES_PER_UNIT, k));
    end
    return t;
  endfunction

  localparam table_t A_TAB = make_table(1'b0);
  localparam table_t B_TAB = make_table(1'b1);

  localparam fx_t LO = -(fx_t'(RANGE) <<< FRAC_W);
  localparam fx_t HI =  (fx_t'(RANGE) <<< FRAC_W);

  logic signed [DATA_W+7:0] scaled;   // (x + RANGE) * SLICES_PER_UNIT, fixed point
  logic [IDX_W-1:0]         seg;

  always_comb begin
    scaled = (DATA_W+8)'(x - LO) * (DATA_W+8)'(SLICES_PER_UNIT);
    if ((scaled >>> FRAC_W) >= (DATA_W+8)'(N_SLICE)) seg = IDX_W'(N_SLICE - 1);
    else                                seg = IDX_W'(scaled >>> FRAC_W);
    if (x <= LO)      y = -FX_ONE;
    else if (x > HI)  y = FX_ONE;
    else              y = pwl_eval(A_TAB[seg], B_TAB[seg], x);
  end

endmodule
