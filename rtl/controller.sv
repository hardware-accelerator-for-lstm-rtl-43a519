// Controller: sequences memory loads and LSTM time steps from host instructions.
//
// Instructions (bbs_pkg::ins_e), accepted one at a time when ir_ready is high:
//   LOAD_WEIGHTS  stream NNZ (value, index) pairs into the matrix memory
//   LOAD_BIAS     stream 4*HIDDEN biases into the vector memory
//   LOAD_VECTOR   stream ir_len vector words into vector addresses 0 ...
//                 ir_len-1 (ir_len = 0 loads the whole vector)
//   READ_PARA     start a sequence: copy the stored vector into the SpMxV
//                 operand, clear the cell state, run one time step
//   NO_READ       run the next time step on the operand as it stands, i.e.
//                 with h_(t-1) already merged in; the stored vector is not read
// The instruction set and the rule that the EWOP "output ready" status makes
// the controller enable the write into the vector memory follow the reference
// design. Operand lengths, the streaming data port and the split meaning of
// READ_PARA / NO_READ are this design's choices.
//
// A time step runs: start SpMxV, wait for its done; start EWOP, wait for its
// en_wr_v status; pulse wr_vector (h_t into the vector memory); stream the
// 2*HIDDEN output words (h_t then c_t) on the output port, holding while
// out_ready is low.
//
// Timing: the step's first output word is valid SPMXV + HIDDEN + 7 clocks
// after the instruction is accepted, SPMXV being the SpMxV latency
// (4*HIDDEN/NUM_PE*NNZ_BANK + 2); 49 clocks at the default size. Loads take one
// clock per word that in_valid presents.
module controller
  import bbs_pkg::*;
#(
  parameter int INPUT_SIZE = 8,
  parameter int HIDDEN     = 8,
  parameter int BANK_SIZE  = 4,
  parameter int NNZ_BANK   = 2,
  localparam int VEC       = INPUT_SIZE + HIDDEN,
  localparam int ROWS      = 4 * HIDDEN,
  localparam int NNZ       = ROWS * (VEC / BANK_SIZE) * NNZ_BANK,
  localparam int CW        = $clog2(NNZ + 1),
  localparam int LW        = $clog2(VEC + 1),
  localparam int SW        = $clog2(2 * HIDDEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  // instruction port
  input  logic          ir_valid,
  output logic          ir_ready,
  input  ins_e          ir_op,
  input  logic [LW-1:0] ir_len,
  // input data stream handshake
  input  logic          in_valid,
  output logic          in_ready,
  // memory load controls (address shared)
  output logic          ld_matrix,
  output logic          ld_vector,
  output logic          ld_bias,
  output logic [CW-1:0] ld_addr,
  // datapath control
  output logic          rd_vector,
  output logic          clr_state,
  output logic          spmxv_start,
  input  logic          spmxv_done,
  output logic          ewop_start,
  input  logic          en_wr_v,
  output logic          wr_vector,
  // output stream
  output logic          out_valid,
  input  logic          out_ready,
  output logic          out_last,
  output logic [SW-1:0] out_sel,
  // status
  output logic          busy,
  output logic          step_done
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_SPMXV_START, S_SPMXV_WAIT,
    S_EWOP_START, S_EWOP_WAIT, S_WRITE_BACK, S_OUT
  } state_e;

  typedef enum logic [1:0] {T_WEIGHTS, T_BIAS, T_VECTOR} target_e;

  state_e        state;
  target_e       target;
  logic [CW-1:0] cnt;
  logic [CW-1:0] len;

  assign ir_ready    = (state == S_IDLE);
  assign in_ready    = (state == S_LOAD);
  assign ld_matrix   = (state == S_LOAD) && in_valid && (target == T_WEIGHTS);
  assign ld_bias     = (state == S_LOAD) && in_valid && (target == T_BIAS);
  assign ld_vector   = (state == S_LOAD) && in_valid && (target == T_VECTOR);
  assign ld_addr     = cnt;
  assign rd_vector   = (state == S_IDLE) && ir_valid && (ir_op == INS_READ_PARA);
  assign clr_state   = rd_vector;
  assign spmxv_start = (state == S_SPMXV_START);
  assign ewop_start  = (state == S_EWOP_START);
  assign wr_vector   = (state == S_WRITE_BACK);
  assign out_valid   = (state == S_OUT);
  assign out_sel     = SW'(cnt);
  assign out_last    = (state == S_OUT) && (int'(cnt) == 2 * HIDDEN - 1);
  assign busy        = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      target    <= T_WEIGHTS;
      cnt       <= '0;
      len       <= '0;
      step_done <= 1'b0;
    end else begin
      step_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (ir_valid) begin
            unique case (ir_op)
              INS_LOAD_WEIGHTS: begin
                state  <= S_LOAD;
                target <= T_WEIGHTS;
                len    <= CW'(NNZ);
              end
              INS_LOAD_BIAS: begin
                state  <= S_LOAD;
                target <= T_BIAS;
                len    <= CW'(ROWS);
              end
              INS_LOAD_VECTOR: begin
                state  <= S_LOAD;
                target <= T_VECTOR;
                if (ir_len == '0 || int'(ir_len) > VEC) len <= CW'(VEC);
                else                                     len <= CW'(ir_len);
              end
              INS_READ_PARA, INS_NO_READ: state <= S_SPMXV_START;
              default: ;
            endcase
          end
        end
        S_LOAD: begin
          if (in_valid) begin
            if (cnt == len - 1'b1) begin
              state <= S_IDLE;
              cnt   <= '0;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        S_SPMXV_START: state <= S_SPMXV_WAIT;
        S_SPMXV_WAIT:  if (spmxv_done) state <= S_EWOP_START;
        S_EWOP_START:  state <= S_EWOP_WAIT;
        S_EWOP_WAIT:   if (en_wr_v) state <= S_WRITE_BACK;
        S_WRITE_BACK: begin
          state <= S_OUT;
          cnt   <= '0;
        end
        S_OUT: begin
          if (out_ready) begin
            if (int'(cnt) == 2 * HIDDEN - 1) begin
              state     <= S_IDLE;
              cnt       <= '0;
              step_done <= 1'b1;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
