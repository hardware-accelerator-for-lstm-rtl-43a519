// Self-checking testbench of controller (default size: 256 CSB words, 32
// biases, 16-word vector, HIDDEN = 8). The testbench answers spmxv_start with
// spmxv_done and ewop_start with en_wr_v after random delays, inserts gaps in
// the input stream and holds out_ready low at random. It checks the number of
// load strobes and their addresses for each load instruction (including a
// partial vector load), that READ_PARA alone copies the stored vector and
// clears the cell state, the order start -> done -> start -> status -> one
// wr_vector, and the output stream (2*HIDDEN words, out_sel 0..15 in order,
// out_last on the last word only, one step_done).
module tb_controller;
  import bbs_pkg::*;

  localparam int H = 8, NNZ = 256, ROWS = 32, VEC = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       ir_valid, ir_ready;
  ins_e       ir_op;
  logic [4:0] ir_len;
  logic       in_valid, in_ready;
  logic       ld_matrix, ld_vector, ld_bias;
  logic [8:0] ld_addr;
  logic       rd_vector, clr_state, spmxv_start, spmxv_done, ewop_start, en_wr_v, wr_vector;
  logic       out_valid, out_ready, out_last;
  logic [3:0] out_sel;
  logic       busy, step_done;

  controller dut (.*);

  // event counters, cleared per instruction
  int n_ld_m, n_ld_v, n_ld_b, n_rd, n_clr, n_sstart, n_estart, n_wr, n_out, n_last, n_done;
  int addr_err, order_err, sel_err;
  int phase;   // 0 idle, 1 waiting spmxv, 2 waiting ewop, 3 wrote back
  logic spmxv_pending, ewop_pending;
  int   delay;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (ld_matrix) begin if (int'(ld_addr) != n_ld_m) addr_err++; n_ld_m++; end
      if (ld_vector) begin if (int'(ld_addr) != n_ld_v) addr_err++; n_ld_v++; end
      if (ld_bias)   begin if (int'(ld_addr) != n_ld_b) addr_err++; n_ld_b++; end
      if (rd_vector) n_rd++;
      if (clr_state) n_clr++;
      if (spmxv_start) begin n_sstart++; if (phase != 0) order_err++; end
      if (ewop_start)  begin n_estart++; if (phase != 1) order_err++; end
      if (wr_vector)   begin n_wr++;     if (phase != 2) order_err++; phase <= 3; end
      if (out_valid && out_ready) begin
        if (phase != 3) order_err++;
        if (int'(out_sel) != n_out) sel_err++;
        if (out_last != (n_out == 2*H - 1)) sel_err++;
        if (out_last) n_last++;
        n_out++;
      end
      if (step_done) n_done++;
    end
  end

  // responder for the datapath units
  initial begin
    spmxv_done = 0; en_wr_v = 0;
    forever begin
      @(posedge clk);
      if (spmxv_start) begin
        repeat ($urandom_range(5, 1)) @(posedge clk);
        @(negedge clk); phase = 1; spmxv_done = 1; @(negedge clk); spmxv_done = 0;
      end else if (ewop_start) begin
        repeat ($urandom_range(5, 1)) @(posedge clk);
        @(negedge clk); phase = 2; en_wr_v = 1; @(negedge clk); en_wr_v = 0;
      end
    end
  end

  // random back-pressure on the output stream
  always @(negedge clk) out_ready = ($urandom_range(3) != 0);

  task automatic clear_counts();
    n_ld_m = 0; n_ld_v = 0; n_ld_b = 0; n_rd = 0; n_clr = 0; n_sstart = 0; n_estart = 0;
    n_wr = 0; n_out = 0; n_last = 0; n_done = 0; addr_err = 0; order_err = 0; sel_err = 0; phase = 0;
  endtask

  task automatic issue(ins_e op, int len);
    @(negedge clk);
    while (!ir_ready) @(negedge clk);
    ir_valid = 1; ir_op = op; ir_len = 5'(len);
    @(negedge clk);
    ir_valid = 0;
  endtask

  // Offers up to `words` input words; gives up when in_ready stays low (a
  // load that ends early), so a short load shows as a strobe count error.
  task automatic stream(int words);
    int sent = 0, idle = 0;
    while (sent < words && idle < 20) begin
      in_valid = ($urandom_range(3) != 0);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      idle = in_ready ? 0 : idle + 1;
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("%s: %0d, expected %0d", what, got, want); end
  endtask

  task automatic wait_idle();
    int n = 0;
    @(negedge clk);
    while (!ir_ready && n < 500) begin @(negedge clk); n++; end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    ir_valid = 0; ir_op = INS_NOP; ir_len = '0; in_valid = 0;
    clear_counts();
    repeat (2) @(posedge clk);
    rst_n = 1;

    clear_counts(); issue(INS_LOAD_WEIGHTS, 0); stream(NNZ); wait_idle();
    expect_eq("weights strobes", n_ld_m, NNZ); expect_eq("weights others", n_ld_v + n_ld_b, 0);
    expect_eq("weights addresses", addr_err, 0);

    clear_counts(); issue(INS_LOAD_BIAS, 0); stream(ROWS); wait_idle();
    expect_eq("bias strobes", n_ld_b, ROWS); expect_eq("bias addresses", addr_err, 0);

    clear_counts(); issue(INS_LOAD_VECTOR, 0); stream(VEC); wait_idle();
    expect_eq("vector strobes", n_ld_v, VEC); expect_eq("vector addresses", addr_err, 0);

    clear_counts(); issue(INS_LOAD_VECTOR, 8); stream(8); wait_idle();
    expect_eq("partial vector strobes", n_ld_v, 8); expect_eq("no busy after load", int'(busy), 0);

    for (int t = 0; t < 4; t++) begin
      clear_counts();
      issue((t == 0) ? INS_READ_PARA : INS_NO_READ, 0);
      wait_idle();
      expect_eq("rd_vector pulses", n_rd, (t == 0) ? 1 : 0);
      expect_eq("clr_state pulses", n_clr, (t == 0) ? 1 : 0);
      expect_eq("spmxv starts", n_sstart, 1);
      expect_eq("ewop starts", n_estart, 1);
      expect_eq("write-backs", n_wr, 1);
      expect_eq("output words", n_out, 2 * H);
      expect_eq("tlast", n_last, 1);
      expect_eq("step_done", n_done, 1);
      expect_eq("order errors", order_err, 0);
      expect_eq("out_sel errors", sel_err, 0);
      expect_eq("no load strobes", n_ld_m + n_ld_v + n_ld_b, 0);
    end

    // NOP does nothing
    clear_counts(); issue(INS_NOP, 0); wait_idle();
    expect_eq("nop", n_sstart + n_ld_m + n_rd, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
