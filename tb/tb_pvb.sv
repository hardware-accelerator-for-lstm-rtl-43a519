// Self-checking testbench of pvb: random vectors and bank indices; each
// output must be element idx[b] of bank b, worked out from the flat index.
// Includes the example of the CSB figure: indices 0, 0, 2, 1 over a 16-element
// vector pick elements 1, 5, 11, 14 (counting from 1).
module tb_pvb;
  import bbs_pkg::*;

  localparam int NB = 4, BS = 4;
  int checks = 0, failures = 0;
  fx_t        vec [NB*BS];
  logic [1:0] idx [NB];
  fx_t        out [NB];

  pvb #(.NUM_BANK(NB), .BANK_SIZE(BS)) dut (.vec(vec), .idx(idx), .out(out));

  initial begin
    // worked example
    for (int i = 0; i < NB*BS; i++) vec[i] = fx_t'(i + 1);
    idx[0] = 2'd0; idx[1] = 2'd0; idx[2] = 2'd2; idx[3] = 2'd1;
    #1;
    checks++;
    if (out[0] != 1 || out[1] != 5 || out[2] != 11 || out[3] != 14) begin
      failures++;
      $display("example mismatch %0d %0d %0d %0d", out[0], out[1], out[2], out[3]);
    end
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < NB*BS; i++) vec[i] = fx_t'($urandom);
      for (int b = 0; b < NB; b++) idx[b] = 2'($urandom);
      #1;
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (out[b] !== vec[4*b + int'(idx[b])]) begin
          failures++;
          $display("bank %0d mismatch", b);
        end
      end
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
