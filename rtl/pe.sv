// Processing element (PE) of the sparse matrix-vector unit.
//
// A PE computes the dot product of one weight-matrix row, stored in CSB
// (compressed sparse bank) form, with the dense vector, and adds the row's
// bias. A row holds NNZ_BANK non-zero weights in each of its NUM_BANK banks.
// It is fed one "slice" per cycle: one weight and its bank-internal index from
// every bank. The private vector buffer (pvb) picks the matching vector
// elements, NUM_BANK multipliers form the products, the adder tree sums them
// and an accumulator adds the slices of the row. With the last slice the bias
// is added and the row result is presented. PVB, adder tree and the bias
// addition follow the reference design; the one-slice-per-cycle accumulator
// is this design's choice of schedule.
//
// Interface: in_valid qualifies a slice; in_first marks the first slice of a
// row (the accumulator restarts), in_last the last one (bias is added and
// out_valid is raised). bias is sampled with the last slice.
// Timing: out_valid / out_result appear one clock after the last slice.
module pe
  import bbs_pkg::*;
#(
  parameter int NUM_BANK  = 4,
  parameter int BANK_SIZE = 4,
  localparam int IDX_W    = (BANK_SIZE > 1) ? $clog2(BANK_SIZE) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  fx_t              vec   [NUM_BANK*BANK_SIZE],
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  fx_t              value [NUM_BANK],
  input  logic [IDX_W-1:0] idx   [NUM_BANK],
  input  fx_t              bias,
  output logic             out_valid,
  output fx_t              out_result
);

  fx_t picked [NUM_BANK];
  fx_t prod   [NUM_BANK];
  fx_t slice_sum;
  fx_t acc, acc_next;

  pvb #(.NUM_BANK(NUM_BANK), .BANK_SIZE(BANK_SIZE)) u_pvb (
    .vec (vec),
    .idx (idx),
    .out (picked)
  );

  always_comb begin
    for (int b = 0; b < NUM_BANK; b++) prod[b] = fx_mul(value[b], picked[b]);
  end

  adder_tree #(.N(NUM_BANK)) u_tree (
    .in  (prod),
    .sum (slice_sum)
  );

  assign acc_next = (in_first ? fx_t'(0) : acc) + slice_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      out_valid  <= 1'b0;
      out_result <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        acc <= acc_next;
        if (in_last) out_result <= acc_next + bias;
      end
    end
  end

endmodule
