// Vector memory: the input vector and the bias vector.
//
// VECTOR holds the dense operand of the matrix-vector product, the input x_t
// (INPUT_SIZE elements) followed by the previous hidden output h_(t-1)
// (HIDDEN elements). BIAS holds one bias per weight-matrix row (4*HIDDEN).
// Both arrays and the write-back of the element-wise unit's output follow the
// reference design. The operand actually seen by the SpMxV unit is a working
// copy, `vec_o`, kept apart from the stored VECTOR array:
//   - rd_vector copies the stored VECTOR into the working copy (the start of
//     a sequence, instruction READ PARAMETERS);
//   - wr_vector merges the new hidden output h_t into the hidden part of the
//     working copy, so that the next step (instruction NO READ) uses
//     [x, h_t] without reading the stored array;
//   - a vector load writes both the stored array and the working copy, so the
//     host can replace x between steps.
// The split into stored array and working copy is this design's reading of
// the READ PARAMETERS / NO READ pair.
//
// Timing: loads, copies and the merge act at the clock edge; bias reads are
// registered (data one clock after bias_rd_en); vec_o is the register itself.
module vector_mem
  import bbs_pkg::*;
#(
  parameter int INPUT_SIZE = 8,
  parameter int HIDDEN     = 8,
  parameter int NUM_PE     = 2,
  localparam int VEC       = INPUT_SIZE + HIDDEN,
  localparam int ROWS      = 4 * HIDDEN,
  localparam int VAW       = $clog2(VEC),
  localparam int BAW       = $clog2(ROWS),
  localparam int GW        = (ROWS / NUM_PE > 1) ? $clog2(ROWS / NUM_PE) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // load ports (host side)
  input  logic           ld_vec_en,
  input  logic [VAW-1:0] ld_vec_addr,
  input  logic           ld_bias_en,
  input  logic [BAW-1:0] ld_bias_addr,
  input  fx_t            ld_data,
  // control
  input  logic           rd_vector,          // stored VECTOR -> working copy
  input  logic           wr_vector,          // EWOP h_t -> hidden part
  input  fx_t            ewop_h [HIDDEN],
  // operand to the SpMxV unit
  output fx_t            vec_o  [VEC],
  // bias read port: biases of row group bias_rd_group
  input  logic           bias_rd_en,
  input  logic [GW-1:0]  bias_rd_group,
  output fx_t            bias_o [NUM_PE]
);

  fx_t vector [VEC];
  fx_t bias   [ROWS];

  always_ff @(posedge clk) begin
    if (ld_vec_en)  vector[ld_vec_addr] <= ld_data;
    if (ld_bias_en) bias[ld_bias_addr]  <= ld_data;
    if (bias_rd_en) begin
      for (int p = 0; p < NUM_PE; p++) bias_o[p] <= bias[int'(bias_rd_group) * NUM_PE + p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < VEC; i++) vec_o[i] <= '0;
    end else begin
      if (rd_vector) begin
        for (int i = 0; i < VEC; i++) vec_o[i] <= vector[i];
      end else if (wr_vector) begin
        for (int k = 0; k < HIDDEN; k++) vec_o[INPUT_SIZE + k] <= ewop_h[k];
      end
      if (ld_vec_en) vec_o[ld_vec_addr] <= ld_data;
    end
  end

endmodule
