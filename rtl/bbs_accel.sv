// Sparse LSTM accelerator with bank-balanced sparse (BBS) weights.
//
// One LSTM layer step computes the four gate pre-activations as one sparse
// matrix-vector product W * [x_t ; h_(t-1)] + bias, then the element-wise
// cell update. W (4*HIDDEN rows, INPUT_SIZE+HIDDEN columns) is pruned so that
// every bank of BANK_SIZE columns in every row keeps exactly NNZ_BANK weights,
// and is stored in CSB (compressed sparse bank) order, which needs no
// decoding: each processing element takes one weight per bank per clock.
//
// Blocks, as in the reference architecture: controller, matrix memory (CSB
// values and indices), vector memory (vector and bias), SpMxV unit with
// NUM_PE processing elements (private vector buffer, multipliers, adder tree,
// bias addition), and the EWOP unit (piecewise-linear sigmoid and tanh, cell
// state, hidden output), whose h_t goes back into the vector memory.
// Defaults: HIDDEN = INPUT_SIZE = 8 (a 32 x 16 weight matrix), bank size 4,
// 50 % sparsity (2 non-zeros per bank), 2 PEs, as in the reference's smallest
// configuration. Data are 32-bit fixed point (Q16.16) instead of the
// reference's 32-bit float.
//
// Host interface (this design's choice, modelled on the reference's
// stream-based DMA variant):
//   ir_*        instruction port, valid/ready; ir_op is a bbs_pkg::ins_e and
//               ir_len the word count of LOAD_VECTOR (0 = whole vector)
//   para_in_*   input stream, valid/ready; during LOAD_WEIGHTS each word
//               carries a CSB value in tdata and its bank index in tindex,
//               during LOAD_BIAS / LOAD_VECTOR only tdata is used
//   ewop_o_*    output stream, valid/ready; each time step sends h_t
//               (HIDDEN words) then c_t (HIDDEN words), tlast on the last;
//               tkeep and tstrb are all ones (every byte of every word is
//               valid), as a DMA's stream-to-memory port expects
// Timing: a step's first output word appears 49 clocks after READ_PARA or
// NO_READ is accepted at the default size (see controller); the instruction
// port is ready again one clock after the last output word.
module bbs_accel
  import bbs_pkg::*;
#(
  parameter int INPUT_SIZE = 8,
  parameter int HIDDEN     = 8,
  parameter int BANK_SIZE  = 4,
  parameter int NNZ_BANK   = 2,
  parameter int NUM_PE     = 2,
  parameter bit G_TANH     = 1'b0,
  localparam int VEC       = INPUT_SIZE + HIDDEN,
  localparam int ROWS      = 4 * HIDDEN,
  localparam int NUM_BANK  = VEC / BANK_SIZE,
  localparam int NNZ       = ROWS * NUM_BANK * NNZ_BANK,
  localparam int IDX_W     = (BANK_SIZE > 1) ? $clog2(BANK_SIZE) : 1,
  localparam int LW        = $clog2(VEC + 1),
  localparam int CW        = $clog2(NNZ + 1),
  localparam int GROUPS    = ROWS / NUM_PE,
  localparam int GW        = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  localparam int PW        = (NNZ_BANK > 1) ? $clog2(NNZ_BANK) : 1,
  localparam int SW        = $clog2(2 * HIDDEN)
) (
  input  logic             clk,
  input  logic             rst_n,
  // instructions
  input  logic             ir_valid,
  output logic             ir_ready,
  input  ins_e             ir_op,
  input  logic [LW-1:0]    ir_len,
  // parameter input stream
  input  logic             para_in_tvalid,
  output logic             para_in_tready,
  input  fx_t              para_in_tdata,
  input  logic [IDX_W-1:0] para_in_tindex,
  // result output stream
  output logic             ewop_o_tvalid,
  input  logic             ewop_o_tready,
  output fx_t              ewop_o_tdata,
  output logic             ewop_o_tlast,
  output logic [DATA_W/8-1:0] ewop_o_tkeep,
  output logic [DATA_W/8-1:0] ewop_o_tstrb,
  // status
  output logic             busy,
  output logic             step_done
);

  // The sizes must describe a bank-balanced matrix the units can split.
  initial begin
    assert (VEC % BANK_SIZE == 0) else $error("vector length must be a multiple of BANK_SIZE");
    assert (ROWS % NUM_PE == 0)   else $error("4*HIDDEN must be a multiple of NUM_PE");
    assert (NNZ_BANK <= BANK_SIZE) else $error("NNZ_BANK must not exceed BANK_SIZE");
  end

  logic          ld_matrix, ld_vector, ld_bias;
  logic [CW-1:0] ld_addr;
  logic          rd_vector, clr_state, wr_vector;
  logic          spmxv_start, spmxv_done, spmxv_busy;
  logic          ewop_start, en_wr_v, ewop_busy;
  logic [SW-1:0] out_sel;

  logic             mat_rd_en;
  logic [GW-1:0]    mat_rd_group;
  logic [PW-1:0]    mat_rd_pass;
  fx_t              mat_value [NUM_PE][NUM_BANK];
  logic [IDX_W-1:0] mat_index [NUM_PE][NUM_BANK];
  logic             bias_rd_en;
  logic [GW-1:0]    bias_rd_group;
  fx_t              bias [NUM_PE];
  fx_t              vec [VEC];
  fx_t              gates [ROWS];
  fx_t              h [HIDDEN];

  controller #(
    .INPUT_SIZE (INPUT_SIZE),
    .HIDDEN     (HIDDEN),
    .BANK_SIZE  (BANK_SIZE),
    .NNZ_BANK   (NNZ_BANK)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .ir_valid    (ir_valid),
    .ir_ready    (ir_ready),
    .ir_op       (ir_op),
    .ir_len      (ir_len),
    .in_valid    (para_in_tvalid),
    .in_ready    (para_in_tready),
    .ld_matrix   (ld_matrix),
    .ld_vector   (ld_vector),
    .ld_bias     (ld_bias),
    .ld_addr     (ld_addr),
    .rd_vector   (rd_vector),
    .clr_state   (clr_state),
    .spmxv_start (spmxv_start),
    .spmxv_done  (spmxv_done),
    .ewop_start  (ewop_start),
    .en_wr_v     (en_wr_v),
    .wr_vector   (wr_vector),
    .out_valid   (ewop_o_tvalid),
    .out_ready   (ewop_o_tready),
    .out_last    (ewop_o_tlast),
    .out_sel     (out_sel),
    .busy        (busy),
    .step_done   (step_done)
  );

  matrix_mem #(
    .ROWS      (ROWS),
    .NUM_BANK  (NUM_BANK),
    .BANK_SIZE (BANK_SIZE),
    .NNZ_BANK  (NNZ_BANK),
    .NUM_PE    (NUM_PE)
  ) u_mmem (
    .clk      (clk),
    .ld_en    (ld_matrix),
    .ld_addr  ($clog2(NNZ)'(ld_addr)),
    .ld_value (para_in_tdata),
    .ld_index (para_in_tindex),
    .rd_en    (mat_rd_en),
    .rd_group (mat_rd_group),
    .rd_pass  (mat_rd_pass),
    .rd_value (mat_value),
    .rd_index (mat_index)
  );

  vector_mem #(
    .INPUT_SIZE (INPUT_SIZE),
    .HIDDEN     (HIDDEN),
    .NUM_PE     (NUM_PE)
  ) u_vmem (
    .clk           (clk),
    .rst_n         (rst_n),
    .ld_vec_en     (ld_vector),
    .ld_vec_addr   ($clog2(VEC)'(ld_addr)),
    .ld_bias_en    (ld_bias),
    .ld_bias_addr  ($clog2(ROWS)'(ld_addr)),
    .ld_data       (para_in_tdata),
    .rd_vector     (rd_vector),
    .wr_vector     (wr_vector),
    .ewop_h        (h),
    .vec_o         (vec),
    .bias_rd_en    (bias_rd_en),
    .bias_rd_group (bias_rd_group),
    .bias_o        (bias)
  );

  spmxv #(
    .INPUT_SIZE (INPUT_SIZE),
    .HIDDEN     (HIDDEN),
    .BANK_SIZE  (BANK_SIZE),
    .NNZ_BANK   (NNZ_BANK),
    .NUM_PE     (NUM_PE)
  ) u_spmxv (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (spmxv_start),
    .busy          (spmxv_busy),
    .done          (spmxv_done),
    .vec           (vec),
    .mat_rd_en     (mat_rd_en),
    .mat_rd_group  (mat_rd_group),
    .mat_rd_pass   (mat_rd_pass),
    .mat_value     (mat_value),
    .mat_index     (mat_index),
    .bias_rd_en    (bias_rd_en),
    .bias_rd_group (bias_rd_group),
    .bias          (bias),
    .y             (gates)
  );

  ewop #(
    .HIDDEN (HIDDEN),
    .G_TANH (G_TANH)
  ) u_ewop (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (ewop_start),
    .clr_state (clr_state),
    .gate_in   (gates),
    .busy      (ewop_busy),
    .en_wr_v   (en_wr_v),
    .h         (h),
    .c         (),
    .out_sel   (out_sel),
    .out_data  (ewop_o_tdata)
  );

  // Every output word is a full data word.
  assign ewop_o_tkeep = '1;
  assign ewop_o_tstrb = '1;

  // Stream rules: an offered output word stays put until it is taken, and
  // the units never run while the host is loading.
  property p_out_hold;
    @(posedge clk) disable iff (!rst_n)
      ewop_o_tvalid && !ewop_o_tready |=> ewop_o_tvalid && $stable(ewop_o_tdata) && $stable(ewop_o_tlast);
  endproperty
  a_out_hold: assert property (p_out_hold) else $error("output word changed before it was taken");

  a_no_load_while_running: assert property (@(posedge clk) disable iff (!rst_n)
      para_in_tready |-> !spmxv_busy && !ewop_busy)
    else $error("load accepted while a step runs");

endmodule
