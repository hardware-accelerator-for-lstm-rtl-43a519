// End-to-end testbench of bbs_accel at its default size (HIDDEN = 8,
// INPUT_SIZE = 8, bank size 4, 2 non-zeros per bank, 2 PEs). The host model
// tb_bbs_host loads a random bank-balanced LSTM layer and runs six time steps
// (READ_PARA, NO_READ with new x, NO_READ, READ_PARA restart, two more NO_READ
// steps), checking every h_t and c_t against a real-arithmetic reference, the
// step latency (49 clocks to the first output word) and that every mechanism
// of the design was exercised. Every output word must carry full tkeep and
// tstrb.
module tb_bbs_accel;
  import bbs_pkg::*;

  logic       clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n, ir_valid, ir_ready;
  ins_e       ir_op;
  logic [4:0] ir_len;
  logic       para_in_tvalid, para_in_tready;
  fx_t        para_in_tdata;
  logic [1:0] para_in_tindex;
  logic       ewop_o_tvalid, ewop_o_tready, ewop_o_tlast;
  logic [3:0] ewop_o_tkeep, ewop_o_tstrb;
  fx_t        ewop_o_tdata;
  logic       busy, step_done;
  int         checks, failures;
  logic       finished;

  bbs_accel dut (.*);

  tb_bbs_host #(.IN(8), .H(8), .BS(4), .NZB(2), .NPE(2), .STEPS(6)) host (.*);

  int n_step_done = 0, n_side_err = 0;
  always @(posedge clk) begin
    if (step_done) n_step_done++;
    if (ewop_o_tvalid && (ewop_o_tkeep != 4'hF || ewop_o_tstrb != 4'hF)) n_side_err++;
  end

  initial begin
    @(posedge clk);
    wait (finished === 1'b1);
    if (n_step_done != 6) begin
      failures++;
      $display("step_done pulses %0d, expected 6", n_step_done);
    end
    if (n_side_err != 0) begin
      failures++;
      $display("%0d output words without full tkeep / tstrb", n_side_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 2, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
