// Self-checking testbench of matrix_mem at its default size (32 rows, 4 banks,
// 2 non-zeros per bank, 2 PEs): loads 256 random (value, index) pairs in CSB
// order, then reads every (row group, slice) and checks that PE p, bank b
// receives linear entry (g*2+p)*8 + slice*4 + b, one clock after the request.
module tb_matrix_mem;
  import bbs_pkg::*;

  localparam int ROWS = 32, NB = 4, BS = 4, NZB = 2, NPE = 2;
  localparam int NNZ = ROWS * NB * NZB;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       ld_en;
  logic [7:0] ld_addr;
  fx_t        ld_value;
  logic [1:0] ld_index;
  logic       rd_en;
  logic [3:0] rd_group;
  logic [0:0] rd_pass;
  fx_t        rd_value [NPE][NB];
  logic [1:0] rd_index [NPE][NB];

  matrix_mem dut (.*);

  fx_t        mval [NNZ];
  logic [1:0] midx [NNZ];

  initial begin
    ld_en = 0; rd_en = 0; ld_addr = '0; ld_value = '0; ld_index = '0; rd_group = '0; rd_pass = '0;
    for (int a = 0; a < NNZ; a++) begin
      mval[a] = fx_t'($urandom);
      midx[a] = 2'($urandom);
    end
    for (int a = 0; a < NNZ; a++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = 8'(a); ld_value = mval[a]; ld_index = midx[a];
    end
    @(negedge clk);
    ld_en = 0;
    for (int g = 0; g < ROWS / NPE; g++) begin
      for (int s = 0; s < NZB; s++) begin
        @(negedge clk);
        rd_en = 1; rd_group = 4'(g); rd_pass = 1'(s);
        @(negedge clk);
        rd_en = 0;
        for (int p = 0; p < NPE; p++) begin
          for (int b = 0; b < NB; b++) begin
            checks++;
            if (rd_value[p][b] !== mval[(g*NPE + p)*NB*NZB + s*NB + b] ||
                rd_index[p][b] !== midx[(g*NPE + p)*NB*NZB + s*NB + b]) begin
              failures++;
              $display("group %0d slice %0d pe %0d bank %0d wrong", g, s, p, b);
            end
          end
        end
      end
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
