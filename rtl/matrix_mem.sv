// Matrix memory: the pruned weight matrix in CSB (compressed sparse bank) form.
//
// Two arrays of equal length NNZ, the number of non-zero weights: VALUES holds
// the weights and INDEX the position of each weight inside its bank. The
// order is the CSB order of the reference design: row by row, and inside a
// row slice by slice, where slice p holds the p-th non-zero weight of bank 0,
// bank 1, ... bank NUM_BANK-1. Linear address of (row r, slice p, bank b):
//   r*NUM_BANK*NNZ_BANK + p*NUM_BANK + b.
// The host fills the arrays one entry per clock through the load port, in
// that linear order. The read port serves the sparse matrix-vector unit: one
// request returns slice `rd_pass` of the NUM_PE rows of row group `rd_group`
// (rows rd_group*NUM_PE ... rd_group*NUM_PE+NUM_PE-1), NUM_PE*NUM_BANK entries
// at once. Splitting the arrays so that one read feeds every PE is this
// design's choice; the arrays themselves follow the reference design.
//
// Timing: writes take effect at the clock edge; reads are registered and
// their data is valid one clock after rd_en.
module matrix_mem
  import bbs_pkg::*;
#(
  parameter int ROWS      = 32,
  parameter int NUM_BANK  = 4,
  parameter int BANK_SIZE = 4,
  parameter int NNZ_BANK  = 2,
  parameter int NUM_PE    = 2,
  localparam int NNZ_ROW  = NUM_BANK * NNZ_BANK,
  localparam int NNZ      = ROWS * NNZ_ROW,
  localparam int AW       = $clog2(NNZ),
  localparam int IDX_W    = (BANK_SIZE > 1) ? $clog2(BANK_SIZE) : 1,
  localparam int GW       = (ROWS / NUM_PE > 1) ? $clog2(ROWS / NUM_PE) : 1,
  localparam int PW       = (NNZ_BANK > 1) ? $clog2(NNZ_BANK) : 1
) (
  input  logic             clk,
  // load port (host side)
  input  logic             ld_en,
  input  logic [AW-1:0]    ld_addr,
  input  fx_t              ld_value,
  input  logic [IDX_W-1:0] ld_index,
  // read port (SpMxV side)
  input  logic             rd_en,
  input  logic [GW-1:0]    rd_group,
  input  logic [PW-1:0]    rd_pass,
  output fx_t              rd_value [NUM_PE][NUM_BANK],
  output logic [IDX_W-1:0] rd_index [NUM_PE][NUM_BANK]
);

  fx_t              values [NNZ];
  logic [IDX_W-1:0] index  [NNZ];

  always_ff @(posedge clk) begin
    if (ld_en) begin
      values[ld_addr] <= ld_value;
      index[ld_addr]  <= ld_index;
    end
    if (rd_en) begin
      for (int p = 0; p < NUM_PE; p++) begin
        for (int b = 0; b < NUM_BANK; b++) begin
          rd_value[p][b] <= values[(int'(rd_group) * NUM_PE + p) * NNZ_ROW + int'(rd_pass) * NUM_BANK + b];
          rd_index[p][b] <= index[(int'(rd_group) * NUM_PE + p) * NNZ_ROW + int'(rd_pass) * NUM_BANK + b];
        end
      end
    end
  end

endmodule
