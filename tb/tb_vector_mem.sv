// Self-checking testbench of vector_mem at its default size (x: 8, h: 8,
// 32 biases, 2 PEs). Checks: a vector load shows at once in the working copy;
// rd_vector restores the stored vector; wr_vector merges h into elements
// 8..15 only; a partial load replaces x but keeps the merged h; bias reads
// return biases g*2 and g*2+1 one clock later.
module tb_vector_mem;
  import bbs_pkg::*;

  localparam int IN = 8, H = 8, VEC = 16, ROWS = 32, NPE = 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       ld_vec_en, ld_bias_en, rd_vector, wr_vector, bias_rd_en;
  logic [3:0] ld_vec_addr, bias_rd_group;
  logic [4:0] ld_bias_addr;
  fx_t        ld_data;
  fx_t        ewop_h [H];
  fx_t        vec_o  [VEC];
  fx_t        bias_o [NPE];

  vector_mem dut (.*);

  fx_t stored [VEC], expect_v [VEC], bias_ref [ROWS];

  task automatic check_vec(string what);
    for (int i = 0; i < VEC; i++) begin
      checks++;
      if (vec_o[i] !== expect_v[i]) begin failures++; $display("%s: element %0d wrong", what, i); end
    end
  endtask

  initial begin
    ld_vec_en = 0; ld_bias_en = 0; rd_vector = 0; wr_vector = 0; bias_rd_en = 0;
    ld_vec_addr = '0; ld_bias_addr = '0; bias_rd_group = '0; ld_data = '0;
    for (int k = 0; k < H; k++) ewop_h[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // full vector load
    for (int i = 0; i < VEC; i++) begin
      @(negedge clk);
      stored[i] = fx_t'($urandom); expect_v[i] = stored[i];
      ld_vec_en = 1; ld_vec_addr = 4'(i); ld_data = stored[i];
    end
    @(negedge clk); ld_vec_en = 0;
    check_vec("load");
    // bias load
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      bias_ref[r] = fx_t'($urandom);
      ld_bias_en = 1; ld_bias_addr = 5'(r); ld_data = bias_ref[r];
    end
    @(negedge clk); ld_bias_en = 0;
    // merge h
    for (int k = 0; k < H; k++) begin ewop_h[k] = fx_t'($urandom); expect_v[IN + k] = ewop_h[k]; end
    wr_vector = 1; @(negedge clk); wr_vector = 0;
    check_vec("merge");
    // partial load of x keeps h
    for (int i = 0; i < IN; i++) begin
      stored[i] = fx_t'($urandom); expect_v[i] = stored[i];
      ld_vec_en = 1; ld_vec_addr = 4'(i); ld_data = stored[i];
      @(negedge clk);
    end
    ld_vec_en = 0;
    check_vec("partial load");
    // restore from the stored vector
    rd_vector = 1; @(negedge clk); rd_vector = 0;
    for (int i = 0; i < VEC; i++) expect_v[i] = stored[i];
    check_vec("restore");
    // bias reads
    for (int g = 0; g < ROWS / NPE; g++) begin
      bias_rd_en = 1; bias_rd_group = 4'(g);
      @(negedge clk);
      bias_rd_en = 0;
      for (int p = 0; p < NPE; p++) begin
        checks++;
        if (bias_o[p] !== bias_ref[g*NPE + p]) begin failures++; $display("bias group %0d pe %0d wrong", g, p); end
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
