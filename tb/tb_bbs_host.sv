// Host model and checker for bbs_accel, shared by the end-to-end testbenches.
//
// It builds a random bank-balanced sparse weight matrix (each bank of BS
// columns keeps NZB weights), encodes it in CSB order, streams weights,
// biases and the vector into the accelerator with random gaps, then runs a
// sequence of LSTM time steps while holding the output stream back at
// random. Every step's h_t and c_t are compared with a reference computed in
// real arithmetic from the dense matrix (exact sigmoid and tanh, gate order
// i, g, f, o, sigmoid on all four gates; tolerance TOL).
//
// Step program: READ_PARA; new x (partial vector load) + NO_READ; NO_READ;
// then READ_PARA again, which must restart from the stored vector with a
// cleared cell state. With STEPS > 4 the program continues with NO_READ
// steps, each with a new x. Every mechanism (input stall, output stall, partial
// load, write-back reuse, restart with state clear, tlast) is counted and a
// failure is counted for one that never happened. The latency from accepting
// a step instruction to its first output word is checked against LATENCY.
module tb_bbs_host
  import bbs_pkg::*;
#(
  parameter int  IN      = 8,
  parameter int  H       = 8,
  parameter int  BS      = 4,
  parameter int  NZB     = 2,
  parameter int  NPE     = 2,
  parameter int  STEPS   = 6,
  parameter real TOL     = 0.02,
  localparam int VEC     = IN + H,
  localparam int ROWS    = 4 * H,
  localparam int NB      = VEC / BS,
  localparam int NNZ_ROW = NB * NZB,
  localparam int IDX_W   = (BS > 1) ? $clog2(BS) : 1,
  localparam int LW      = $clog2(VEC + 1),
  localparam int LATENCY = ROWS / NPE * NZB + H + 9
) (
  input  logic             clk,
  output logic             rst_n,
  output logic             ir_valid,
  input  logic             ir_ready,
  output ins_e             ir_op,
  output logic [LW-1:0]    ir_len,
  output logic             para_in_tvalid,
  input  logic             para_in_tready,
  output fx_t              para_in_tdata,
  output logic [IDX_W-1:0] para_in_tindex,
  input  logic             ewop_o_tvalid,
  output logic             ewop_o_tready,
  input  fx_t              ewop_o_tdata,
  input  logic             ewop_o_tlast,
  input  logic             busy,
  input  logic             step_done,
  output int               checks,
  output int               failures,
  output logic             finished
);

  fx_t        w [ROWS][VEC];
  fx_t        bias [ROWS];
  fx_t        csb_val [ROWS*NNZ_ROW];
  logic [IDX_W-1:0] csb_idx [ROWS*NNZ_ROW];
  fx_t        stored [VEC];      // what the stored vector holds
  real        v_ref [VEC];       // operand of the next step
  real        c_ref [H], h_ref [H];

  int n_in_stall, n_out_stall, n_partial, n_reuse, n_restart, n_tlast, n_steps;

  function automatic fx_t rnd(real scale);
    return real_to_fx(($itor($urandom_range(2000)) - 1000.0) / 1000.0 * scale);
  endfunction

  task automatic make_matrix();
    int kept [BS];
    int n;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < VEC; c++) w[r][c] = '0;
      for (int bk = 0; bk < NB; bk++) begin
        for (int j = 0; j < BS; j++) kept[j] = 0;
        n = 0;
        while (n < NZB) begin
          int j = $urandom_range(BS - 1);
          if (kept[j] == 0) begin kept[j] = 1; n++; end
        end
        n = 0;
        for (int j = 0; j < BS; j++) begin
          if (kept[j] != 0) begin
            w[r][bk*BS + j] = rnd(1.0);
            csb_val[r*NNZ_ROW + n*NB + bk] = w[r][bk*BS + j];
            csb_idx[r*NNZ_ROW + n*NB + bk] = IDX_W'(j);
            n++;
          end
        end
      end
      bias[r] = rnd(0.5);
    end
  endtask

  task automatic issue(ins_e op, int len);
    @(negedge clk);
    while (!ir_ready) @(negedge clk);
    ir_valid = 1; ir_op = op; ir_len = LW'(len);
    @(negedge clk);
    ir_valid = 0;
  endtask

  // Sends words[0 .. n-1]; para_in_tvalid drops at random.
  task automatic send(int n, ref fx_t data [], ref logic [IDX_W-1:0] idx []);
    int sent = 0;
    while (sent < n) begin
      para_in_tvalid = ($urandom_range(4) != 0);
      para_in_tdata  = data[sent];
      para_in_tindex = idx[sent];
      @(posedge clk);
      if (para_in_tready && !para_in_tvalid) n_in_stall++;
      if (para_in_tvalid && para_in_tready) sent++;
      @(negedge clk);
    end
    para_in_tvalid = 0;
  endtask

  function automatic real sig(real x); return sigmoid_real(x); endfunction

  // One reference step on v_ref, c_ref.
  task automatic ref_step();
    real acc [ROWS];
    for (int r = 0; r < ROWS; r++) begin
      acc[r] = fx_to_real(bias[r]);
      for (int c = 0; c < VEC; c++) acc[r] += fx_to_real(w[r][c]) * v_ref[c];
    end
    for (int k = 0; k < H; k++) begin
      c_ref[k] = sig(acc[2*H + k]) * c_ref[k] + sig(acc[k]) * sig(acc[H + k]);
      h_ref[k] = sig(acc[3*H + k]) * tanh_real(c_ref[k]);
    end
    for (int k = 0; k < H; k++) v_ref[IN + k] = h_ref[k];
  endtask

  // Issues a step instruction and checks its latency and its output words.
  task automatic run_step(ins_e op);
    int lat, got;
    real d, want;
    fx_t word;
    ref_step();
    @(negedge clk);
    while (!ir_ready) @(negedge clk);
    ir_valid = 1; ir_op = op; ir_len = '0;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    ir_valid = 0;
    while (!ewop_o_tvalid) begin @(posedge clk); lat++; #1; end
    checks++;
    if (lat != LATENCY) begin failures++; $display("step latency %0d, expected %0d", lat, LATENCY); end
    got = 0;
    while (got < 2 * H) begin
      @(negedge clk);
      ewop_o_tready = ($urandom_range(2) != 0);
      @(posedge clk);
      if (ewop_o_tvalid && !ewop_o_tready) n_out_stall++;
      if (ewop_o_tvalid && ewop_o_tready) begin
        word = ewop_o_tdata;
        want = (got < H) ? h_ref[got] : c_ref[got - H];
        d = fx_to_real(word) - want;
        if (d < 0) d = -d;
        checks++;
        if (d > TOL) begin
          failures++;
          $display("step %0d word %0d: got %f expected %f", n_steps, got, fx_to_real(word), want);
        end
        checks++;
        if (ewop_o_tlast != (got == 2*H - 1)) begin failures++; $display("tlast wrong at word %0d", got); end
        if (ewop_o_tlast) n_tlast++;
        got++;
      end
    end
    @(negedge clk);
    ewop_o_tready = 0;
    n_steps++;
  endtask

  task automatic mechanism(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
    else $display("%-28s %0d", what, n);
  endtask

  initial begin
    fx_t              data [];
    logic [IDX_W-1:0] idx  [];
    checks = 0; failures = 0; finished = 0;
    rst_n = 0; ir_valid = 0; ir_op = INS_NOP; ir_len = '0;
    para_in_tvalid = 0; para_in_tdata = '0; para_in_tindex = '0; ewop_o_tready = 0;
    n_in_stall = 0; n_out_stall = 0; n_partial = 0; n_reuse = 0; n_restart = 0; n_tlast = 0; n_steps = 0;
    make_matrix();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // weights
    data = new[ROWS*NNZ_ROW]; idx = new[ROWS*NNZ_ROW];
    for (int a = 0; a < ROWS*NNZ_ROW; a++) begin data[a] = csb_val[a]; idx[a] = csb_idx[a]; end
    issue(INS_LOAD_WEIGHTS, 0);
    send(ROWS*NNZ_ROW, data, idx);
    // biases
    data = new[ROWS]; idx = new[ROWS];
    for (int r = 0; r < ROWS; r++) begin data[r] = bias[r]; idx[r] = '0; end
    issue(INS_LOAD_BIAS, 0);
    send(ROWS, data, idx);
    // whole vector: x_0 and h_0
    data = new[VEC]; idx = new[VEC];
    for (int c = 0; c < VEC; c++) begin stored[c] = rnd(1.0); data[c] = stored[c]; idx[c] = '0; end
    issue(INS_LOAD_VECTOR, 0);
    send(VEC, data, idx);

    // step 1: READ_PARA from the stored vector, cell state cleared
    for (int c = 0; c < VEC; c++) v_ref[c] = fx_to_real(stored[c]);
    for (int k = 0; k < H; k++) c_ref[k] = 0.0;
    run_step(INS_READ_PARA);

    for (int t = 1; t < STEPS; t++) begin
      if (t == 3) begin
        // restart: stored vector is the last loaded x with the original h_0
        for (int c = 0; c < VEC; c++) v_ref[c] = fx_to_real(stored[c]);
        for (int k = 0; k < H; k++) c_ref[k] = 0.0;
        n_restart++;
        run_step(INS_READ_PARA);
      end else begin
        if (t != 2) begin
          // new input x_t, h part untouched
          data = new[IN]; idx = new[IN];
          for (int c = 0; c < IN; c++) begin stored[c] = rnd(1.0); data[c] = stored[c]; idx[c] = '0; v_ref[c] = fx_to_real(stored[c]); end
          issue(INS_LOAD_VECTOR, IN);
          send(IN, data, idx);
          n_partial++;
        end
        n_reuse++;
        run_step(INS_NO_READ);
      end
    end

    repeat (3) @(negedge clk);
    checks++;
    if (busy || !ir_ready) begin failures++; $display("accelerator not idle at the end"); end
    mechanism("input stream stalls", n_in_stall);
    mechanism("output stream stalls", n_out_stall);
    mechanism("partial vector loads", n_partial);
    mechanism("steps on fed-back h (NO_READ)", n_reuse);
    mechanism("restarts (READ_PARA, clear)", n_restart);
    mechanism("tlast words", n_tlast);
    finished = 1;
  end

endmodule
