// Self-checking testbench of spmxv at its default size (32 x 16 matrix, 4 banks
// of 4, 2 non-zeros per bank, 2 PEs). The testbench prunes a random dense
// matrix to bank-balanced form, encodes it in CSB order, and answers the
// unit's matrix and bias read requests one clock later like the memories.
// The result is compared with the dense product W*v + bias, and `done` must
// come exactly 34 clocks after `start`. Three products with fresh data run
// back to back.
module tb_spmxv;
  import bbs_pkg::*;

  localparam int IN = 8, H = 8, BS = 4, NZB = 2, NPE = 2;
  localparam int VEC = IN + H, ROWS = 4 * H, NB = VEC / BS, NNZ_ROW = NB * NZB;
  localparam int LATENCY = ROWS / NPE * NZB + 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, busy, done;
  fx_t        vec [VEC];
  logic       mat_rd_en, bias_rd_en;
  logic [3:0] mat_rd_group, bias_rd_group;
  logic [0:0] mat_rd_pass;
  fx_t        mat_value [NPE][NB];
  logic [1:0] mat_index [NPE][NB];
  fx_t        bias [NPE];
  fx_t        y [ROWS];

  spmxv dut (.*);

  fx_t        w [ROWS][VEC];
  fx_t        b_ref [ROWS];
  fx_t        csb_val [ROWS*NNZ_ROW];
  logic [1:0] csb_idx [ROWS*NNZ_ROW];
  fx_t        y_ref [ROWS];

  // memory models with one clock of read latency
  always_ff @(posedge clk) begin
    if (mat_rd_en) begin
      for (int p = 0; p < NPE; p++)
        for (int b = 0; b < NB; b++) begin
          mat_value[p][b] <= csb_val[(int'(mat_rd_group)*NPE + p)*NNZ_ROW + int'(mat_rd_pass)*NB + b];
          mat_index[p][b] <= csb_idx[(int'(mat_rd_group)*NPE + p)*NNZ_ROW + int'(mat_rd_pass)*NB + b];
        end
    end
    if (bias_rd_en) begin
      for (int p = 0; p < NPE; p++) bias[p] <= b_ref[int'(bias_rd_group)*NPE + p];
    end
  end

  // Random bank-balanced matrix, then CSB encoding: slice s of row r holds
  // the s-th kept weight (in column order) of every bank.
  task automatic make_problem();
    int kept [BS];
    int n;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < VEC; c++) w[r][c] = '0;
      for (int bk = 0; bk < NB; bk++) begin
        for (int j = 0; j < BS; j++) kept[j] = 0;
        n = 0;
        while (n < NZB) begin
          int j = $urandom_range(BS - 1);
          if (!kept[j]) begin kept[j] = 1; n++; end
        end
        n = 0;
        for (int j = 0; j < BS; j++) begin
          if (kept[j]) begin
            w[r][bk*BS + j] = real_to_fx(($itor($urandom_range(2000)) - 1000.0) / 1000.0);
            csb_val[r*NNZ_ROW + n*NB + bk] = w[r][bk*BS + j];
            csb_idx[r*NNZ_ROW + n*NB + bk] = 2'(j);
            n++;
          end
        end
      end
      b_ref[r] = real_to_fx(($itor($urandom_range(2000)) - 1000.0) / 1000.0);
    end
    for (int c = 0; c < VEC; c++) vec[c] = real_to_fx(($itor($urandom_range(2000)) - 1000.0) / 500.0);
    for (int r = 0; r < ROWS; r++) begin
      y_ref[r] = b_ref[r];
      for (int c = 0; c < VEC; c++) y_ref[r] += fx_mul(w[r][c], vec[c]);
    end
  endtask

  int cycles;

  initial begin
    start = 0;
    for (int c = 0; c < VEC; c++) vec[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      make_problem();
      @(negedge clk);
      start = 1;
      @(posedge clk);
      cycles = 0;
      @(negedge clk);
      start = 0;
      while (!done) begin @(posedge clk); cycles++; #1; end
      checks++;
      if (cycles != LATENCY) begin failures++; $display("latency %0d, expected %0d", cycles, LATENCY); end
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (y[r] !== y_ref[r]) begin
          failures++;
          $display("row %0d: got %f expected %f", r, fx_to_real(y[r]), fx_to_real(y_ref[r]));
        end
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("still busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
