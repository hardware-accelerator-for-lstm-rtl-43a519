// Runs three more layer sizes on bbs_accel, each with the host model
// tb_bbs_host: hidden size 32 (128 x 64 weight matrix, bank size 8) and
// hidden size 64 (256 x 128 weight matrix, bank size 16), both with input size
// equal to the hidden size, and the reference's small software-test size
// (hidden 4, input 12, 16 x 16 matrix, bank size 4, 128 non-zeros). All use
// 50 % bank-balanced sparsity and 2 PEs. Each runs four time steps (READ_PARA,
// new x + NO_READ, NO_READ, READ_PARA restart) and checks every output word
// against the real-arithmetic reference.
module tb_bbs_workloads;
  import bbs_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // hidden size 32
  logic       rst_a, irv_a, irr_a, inv_a, inr_a, ov_a, or_a, ol_a, busy_a, sd_a, fin_a;
  ins_e       op_a;
  logic [6:0] len_a;
  fx_t        ind_a, od_a;
  logic [2:0] ini_a;
  int         chk_a, fail_a;

  bbs_accel #(.INPUT_SIZE(32), .HIDDEN(32), .BANK_SIZE(8), .NNZ_BANK(4), .NUM_PE(2)) dut32 (
    .clk(clk), .rst_n(rst_a), .ir_valid(irv_a), .ir_ready(irr_a), .ir_op(op_a), .ir_len(len_a),
    .para_in_tvalid(inv_a), .para_in_tready(inr_a), .para_in_tdata(ind_a), .para_in_tindex(ini_a),
    .ewop_o_tvalid(ov_a), .ewop_o_tready(or_a), .ewop_o_tdata(od_a), .ewop_o_tlast(ol_a), .ewop_o_tkeep(), .ewop_o_tstrb(),
    .busy(busy_a), .step_done(sd_a));

  tb_bbs_host #(.IN(32), .H(32), .BS(8), .NZB(4), .NPE(2), .STEPS(4)) host32 (
    .clk(clk), .rst_n(rst_a), .ir_valid(irv_a), .ir_ready(irr_a), .ir_op(op_a), .ir_len(len_a),
    .para_in_tvalid(inv_a), .para_in_tready(inr_a), .para_in_tdata(ind_a), .para_in_tindex(ini_a),
    .ewop_o_tvalid(ov_a), .ewop_o_tready(or_a), .ewop_o_tdata(od_a), .ewop_o_tlast(ol_a),
    .busy(busy_a), .step_done(sd_a), .checks(chk_a), .failures(fail_a), .finished(fin_a));

  // hidden size 64
  logic       rst_b, irv_b, irr_b, inv_b, inr_b, ov_b, or_b, ol_b, busy_b, sd_b, fin_b;
  ins_e       op_b;
  logic [7:0] len_b;
  fx_t        ind_b, od_b;
  logic [3:0] ini_b;
  int         chk_b, fail_b;

  bbs_accel #(.INPUT_SIZE(64), .HIDDEN(64), .BANK_SIZE(16), .NNZ_BANK(8), .NUM_PE(2)) dut64 (
    .clk(clk), .rst_n(rst_b), .ir_valid(irv_b), .ir_ready(irr_b), .ir_op(op_b), .ir_len(len_b),
    .para_in_tvalid(inv_b), .para_in_tready(inr_b), .para_in_tdata(ind_b), .para_in_tindex(ini_b),
    .ewop_o_tvalid(ov_b), .ewop_o_tready(or_b), .ewop_o_tdata(od_b), .ewop_o_tlast(ol_b), .ewop_o_tkeep(), .ewop_o_tstrb(),
    .busy(busy_b), .step_done(sd_b));

  tb_bbs_host #(.IN(64), .H(64), .BS(16), .NZB(8), .NPE(2), .STEPS(4)) host64 (
    .clk(clk), .rst_n(rst_b), .ir_valid(irv_b), .ir_ready(irr_b), .ir_op(op_b), .ir_len(len_b),
    .para_in_tvalid(inv_b), .para_in_tready(inr_b), .para_in_tdata(ind_b), .para_in_tindex(ini_b),
    .ewop_o_tvalid(ov_b), .ewop_o_tready(or_b), .ewop_o_tdata(od_b), .ewop_o_tlast(ol_b),
    .busy(busy_b), .step_done(sd_b), .checks(chk_b), .failures(fail_b), .finished(fin_b));

  // hidden size 4, input size 12
  logic       rst_c, irv_c, irr_c, inv_c, inr_c, ov_c, or_c, ol_c, busy_c, sd_c, fin_c;
  ins_e       op_c;
  logic [4:0] len_c;
  fx_t        ind_c, od_c;
  logic [1:0] ini_c;
  int         chk_c, fail_c;

  bbs_accel #(.INPUT_SIZE(12), .HIDDEN(4), .BANK_SIZE(4), .NNZ_BANK(2), .NUM_PE(2)) dut4 (
    .clk(clk), .rst_n(rst_c), .ir_valid(irv_c), .ir_ready(irr_c), .ir_op(op_c), .ir_len(len_c),
    .para_in_tvalid(inv_c), .para_in_tready(inr_c), .para_in_tdata(ind_c), .para_in_tindex(ini_c),
    .ewop_o_tvalid(ov_c), .ewop_o_tready(or_c), .ewop_o_tdata(od_c), .ewop_o_tlast(ol_c), .ewop_o_tkeep(), .ewop_o_tstrb(),
    .busy(busy_c), .step_done(sd_c));

  tb_bbs_host #(.IN(12), .H(4), .BS(4), .NZB(2), .NPE(2), .STEPS(4)) host4 (
    .clk(clk), .rst_n(rst_c), .ir_valid(irv_c), .ir_ready(irr_c), .ir_op(op_c), .ir_len(len_c),
    .para_in_tvalid(inv_c), .para_in_tready(inr_c), .para_in_tdata(ind_c), .para_in_tindex(ini_c),
    .ewop_o_tvalid(ov_c), .ewop_o_tready(or_c), .ewop_o_tdata(od_c), .ewop_o_tlast(ol_c),
    .busy(busy_c), .step_done(sd_c), .checks(chk_c), .failures(fail_c), .finished(fin_c));

  initial begin
    @(posedge clk);
    wait (fin_a === 1'b1 && fin_b === 1'b1 && fin_c === 1'b1);
    $display("hidden 32: checks=%0d failures=%0d", chk_a, fail_a);
    $display("hidden 64: checks=%0d failures=%0d", chk_b, fail_b);
    $display("hidden 4: checks=%0d failures=%0d", chk_c, fail_c);
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + chk_c, fail_a + fail_b + fail_c);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + chk_c, fail_a + fail_b + fail_c + 1);
    $finish;
  end
endmodule
