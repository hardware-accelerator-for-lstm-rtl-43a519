// Sparse matrix-vector (SpMxV) unit: y = W * v + bias.
//
// W has 4*HIDDEN rows and INPUT_SIZE+HIDDEN columns and is bank-balanced: each
// row is split into NUM_BANK banks of BANK_SIZE columns and keeps NNZ_BANK
// non-zero weights per bank, stored in CSB order in the matrix memory. NUM_PE
// processing elements work in parallel, each on its own row; a row group is
// the NUM_PE rows g*NUM_PE ... g*NUM_PE+NUM_PE-1. For every group the unit
// requests the NNZ_BANK slices of the group from the matrix memory, one slice
// per clock, together with the group's biases from the vector memory. The PEs
// accumulate the slices and add the bias; their results fill the output
// vector `y`, which is handed to the element-wise unit. PEs, private vector
// buffers and bias addition follow the reference design (two PEs there); the
// one-slice-per-clock schedule is this design's choice.
//
// Interface: a `start` pulse begins a product on the current `vec`; `done`
// pulses once when all of `y` is written. Memory read requests leave on
// mat_rd_* / bias_rd_*; their data must come back one clock later.
// Timing: done follows start by (4*HIDDEN/NUM_PE)*NNZ_BANK + 2 clocks
// (34 at the default size); `vec` must stay unchanged meanwhile.
module spmxv
  import bbs_pkg::*;
#(
  parameter int INPUT_SIZE = 8,
  parameter int HIDDEN     = 8,
  parameter int BANK_SIZE  = 4,
  parameter int NNZ_BANK   = 2,
  parameter int NUM_PE     = 2,
  localparam int VEC       = INPUT_SIZE + HIDDEN,
  localparam int ROWS      = 4 * HIDDEN,
  localparam int NUM_BANK  = VEC / BANK_SIZE,
  localparam int GROUPS    = ROWS / NUM_PE,
  localparam int IDX_W     = (BANK_SIZE > 1) ? $clog2(BANK_SIZE) : 1,
  localparam int GW        = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  localparam int PW        = (NNZ_BANK > 1) ? $clog2(NNZ_BANK) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  fx_t              vec [VEC],
  // matrix memory read port
  output logic             mat_rd_en,
  output logic [GW-1:0]    mat_rd_group,
  output logic [PW-1:0]    mat_rd_pass,
  input  fx_t              mat_value [NUM_PE][NUM_BANK],
  input  logic [IDX_W-1:0] mat_index [NUM_PE][NUM_BANK],
  // bias read port
  output logic             bias_rd_en,
  output logic [GW-1:0]    bias_rd_group,
  input  fx_t              bias [NUM_PE],
  // result
  output fx_t              y [ROWS]
);

  // issue stage
  logic [GW-1:0] grp;
  logic [PW-1:0] pass;
  logic          issuing;

  // stage 1: memory data returns, tag travels with it
  logic          s1_valid, s1_first, s1_last;
  logic [GW-1:0] s1_grp;
  // stage 2: PE results
  logic [GW-1:0] s2_grp;
  logic          pe_valid [NUM_PE];
  fx_t           pe_res   [NUM_PE];

  assign mat_rd_en     = issuing;
  assign mat_rd_group  = grp;
  assign mat_rd_pass   = pass;
  assign bias_rd_en    = issuing;
  assign bias_rd_group = grp;
  assign busy          = issuing || s1_valid || pe_valid[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      grp      <= '0;
      pass     <= '0;
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_grp   <= '0;
      s2_grp   <= '0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      s1_valid <= issuing;
      s1_first <= (pass == '0);
      s1_last  <= (int'(pass) == NNZ_BANK - 1);
      s1_grp   <= grp;
      if (s1_valid && s1_last) s2_grp <= s1_grp;
      if (start && !issuing) begin
        issuing <= 1'b1;
        grp     <= '0;
        pass    <= '0;
      end else if (issuing) begin
        if (int'(pass) == NNZ_BANK - 1) begin
          pass <= '0;
          if (int'(grp) == GROUPS - 1) issuing <= 1'b0;
          else                         grp <= grp + 1'b1;
        end else begin
          pass <= pass + 1'b1;
        end
      end
      if (pe_valid[0] && int'(s2_grp) == GROUPS - 1) done <= 1'b1;
    end
  end

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    pe #(.NUM_BANK(NUM_BANK), .BANK_SIZE(BANK_SIZE)) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .vec        (vec),
      .in_valid   (s1_valid),
      .in_first   (s1_first),
      .in_last    (s1_last),
      .value      (mat_value[p]),
      .idx        (mat_index[p]),
      .bias       (bias[p]),
      .out_valid  (pe_valid[p]),
      .out_result (pe_res[p])
    );
  end

  // The result vector is written as the PE results arrive.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) y[r] <= '0;
    end else begin
      for (int p = 0; p < NUM_PE; p++) begin
        if (pe_valid[p]) y[int'(s2_grp) * NUM_PE + p] <= pe_res[p];
      end
    end
  end

endmodule
