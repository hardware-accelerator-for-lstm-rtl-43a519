// Self-checking testbench of pe: random CSB rows of NNZ_BANK = 3 slices over a
// 16-element vector (4 banks of 4). The expected result is worked out from the
// dense row: every slice weight placed at bank*4 + index, then dot product
// plus bias. Also checks that out_valid comes exactly one clock after the
// last slice and stays low otherwise.
module tb_pe;
  import bbs_pkg::*;

  localparam int NB = 4, BS = 4, SL = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fx_t        vec   [NB*BS];
  logic       in_valid, in_first, in_last;
  fx_t        value [NB];
  logic [1:0] idx   [NB];
  fx_t        bias;
  logic       out_valid;
  fx_t        out_result;

  pe #(.NUM_BANK(NB), .BANK_SIZE(BS)) dut (.*);

  fx_t  ref_sum;
  fx_t  sl_val [SL][NB];
  logic [1:0] sl_idx [SL][NB];

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; bias = '0;
    for (int b = 0; b < NB; b++) begin value[b] = '0; idx[b] = '0; end
    for (int i = 0; i < NB*BS; i++) vec[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int row = 0; row < 40; row++) begin
      for (int i = 0; i < NB*BS; i++) vec[i] = real_to_fx(($itor($urandom_range(2000)) - 1000.0) / 250.0);
      bias    = real_to_fx(($itor($urandom_range(2000)) - 1000.0) / 500.0);
      ref_sum = bias;
      for (int s = 0; s < SL; s++) begin
        for (int b = 0; b < NB; b++) begin
          sl_val[s][b] = real_to_fx(($itor($urandom_range(2000)) - 1000.0) / 1000.0);
          sl_idx[s][b] = 2'($urandom);
          ref_sum += fx_mul(sl_val[s][b], vec[b*BS + int'(sl_idx[s][b])]);
        end
      end
      for (int s = 0; s < SL; s++) begin
        @(negedge clk);
        in_valid = 1; in_first = (s == 0); in_last = (s == SL - 1);
        value = sl_val[s]; idx = sl_idx[s];
        @(posedge clk); #1;
        checks++;
        if (out_valid !== (s == SL - 1)) begin failures++; $display("out_valid timing wrong at slice %0d", s); end
      end
      checks++;
      if (out_result !== ref_sum) begin
        failures++;
        $display("row %0d: got %f expected %f", row, fx_to_real(out_result), fx_to_real(ref_sum));
      end
      @(negedge clk);
      in_valid = 0;
      // an idle gap of random length
      repeat ($urandom_range(2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
