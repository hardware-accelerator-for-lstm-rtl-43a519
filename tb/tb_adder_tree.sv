// Self-checking testbench of adder_tree: random inputs for a power-of-two
// tree (N = 4) and an odd one (N = 5, padded inside); the sum is compared
// with a plain loop sum.
module tb_adder_tree;
  import bbs_pkg::*;

  int checks = 0, failures = 0;
  fx_t in4 [4], in5 [5];
  fx_t sum4, sum5, ref4, ref5;

  adder_tree #(.N(4)) dut4 (.in(in4), .sum(sum4));
  adder_tree #(.N(5)) dut5 (.in(in5), .sum(sum5));

  initial begin
    for (int t = 0; t < 200; t++) begin
      ref4 = '0;
      ref5 = '0;
      for (int i = 0; i < 4; i++) begin in4[i] = fx_t'($urandom); ref4 += in4[i]; end
      for (int i = 0; i < 5; i++) begin in5[i] = fx_t'($urandom); ref5 += in5[i]; end
      #1;
      checks += 2;
      if (sum4 !== ref4) begin failures++; $display("N=4 mismatch %0d vs %0d", sum4, ref4); end
      if (sum5 !== ref5) begin failures++; $display("N=5 mismatch %0d vs %0d", sum5, ref5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
