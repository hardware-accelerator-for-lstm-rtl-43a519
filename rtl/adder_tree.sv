// Balanced adder tree: sum = in[0] + in[1] + ... + in[N-1].
//
// The inputs are added pairwise, level by level, so the depth is ceil(log2 N)
// adders. In each processing element it reduces the per-bank products of one
// CSB slice to a single partial dot product, as in the reference design.
// Sums wrap at the datapath width (no saturation), which is this design's
// choice.
//
// Interface: N fixed-point inputs, one fixed-point output.
// Timing: combinational.
module adder_tree
  import bbs_pkg::*;
#(
  parameter int N = 4
) (
  input  fx_t in [N],
  output fx_t sum
);

  localparam int LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int P      = 1 << LEVELS;   // inputs padded to a power of two

  fx_t lvl [LEVELS+1][P];

  always_comb begin
    for (int i = 0; i < P; i++) lvl[0][i] = (i < N) ? in[i] : '0;
    for (int l = 1; l <= LEVELS; l++) begin
      for (int i = 0; i < P; i++) begin
        if (i < (P >> l)) lvl[l][i] = lvl[l-1][2*i] + lvl[l-1][2*i+1];
        else              lvl[l][i] = '0;
      end
    end
    sum = lvl[LEVELS][0];
  end

endmodule
