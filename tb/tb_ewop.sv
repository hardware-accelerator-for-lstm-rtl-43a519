// Self-checking testbench of ewop (HIDDEN = 8). Random gate pre-activations
// in [-5, 5]; the reference uses exact sigmoid and tanh in real arithmetic
// with the gate order i, g, f, o and sigmoid on all four gates:
//   c = f*c_prev + i*g,  h = o*tanh(c)   (tolerance 5e-3).
// Four steps carry the cell state from one to the next, then clr_state must
// zero it and the following step must start from c_prev = 0. en_wr_v must come
// exactly HIDDEN + 2 clocks after start; out_sel must read h then c.
// A second instance with G_TANH = 1 runs on the same inputs and is checked
// against the textbook variant, g = tanh(pre-activation).
module tb_ewop;
  import bbs_pkg::*;

  localparam int H = 8, ROWS = 4 * H;
  localparam int LATENCY = H + 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, clr_state, busy, en_wr_v;
  fx_t        gate_in [ROWS];
  fx_t        h [H], c [H];
  logic [3:0] out_sel;
  fx_t        out_data;

  ewop dut (.*);

  logic busy2, en_wr_v2;
  fx_t  h2 [H], c2 [H];
  fx_t  out_data2;

  ewop #(.HIDDEN(H), .G_TANH(1'b1)) dut_tanh (
    .clk, .rst_n, .start, .clr_state, .gate_in, .busy(busy2), .en_wr_v(en_wr_v2),
    .h(h2), .c(c2), .out_sel, .out_data(out_data2));

  real c_ref [H], h_ref [H];
  real c_ref2 [H], h_ref2 [H];
  int  cycles;

  task automatic check_close(string what, int k, fx_t got, real want);
    real d;
    d = fx_to_real(got) - want;
    if (d < 0) d = -d;
    checks++;
    if (d > 5e-3) begin failures++; $display("%s[%0d]: got %f expected %f", what, k, fx_to_real(got), want); end
  endtask

  task automatic run_step();
    real gi, gg, gf, go;
    for (int r = 0; r < ROWS; r++) gate_in[r] = real_to_fx(($itor($urandom_range(10000)) - 5000.0) / 1000.0);
    for (int k = 0; k < H; k++) begin
      gi = sigmoid_real(fx_to_real(gate_in[k]));
      gg = sigmoid_real(fx_to_real(gate_in[H + k]));
      gf = sigmoid_real(fx_to_real(gate_in[2*H + k]));
      go = sigmoid_real(fx_to_real(gate_in[3*H + k]));
      c_ref[k] = gf * c_ref[k] + gi * gg;
      h_ref[k] = go * tanh_real(c_ref[k]);
      c_ref2[k] = gf * c_ref2[k] + gi * tanh_real(fx_to_real(gate_in[H + k]));
      h_ref2[k] = go * tanh_real(c_ref2[k]);
    end
    @(negedge clk);
    start = 1;
    @(posedge clk);
    cycles = 0;
    @(negedge clk);
    start = 0;
    while (!en_wr_v) begin @(posedge clk); cycles++; #1; end
    checks++;
    if (cycles != LATENCY) begin failures++; $display("latency %0d, expected %0d", cycles, LATENCY); end
    checks++;
    if (!en_wr_v2) begin failures++; $display("G_TANH instance: en_wr_v not in step"); end
    for (int k = 0; k < H; k++) begin
      check_close("h", k, h[k], h_ref[k]);
      check_close("c", k, c[k], c_ref[k]);
      check_close("h (g tanh)", k, h2[k], h_ref2[k]);
      check_close("c (g tanh)", k, c2[k], c_ref2[k]);
    end
    for (int s = 0; s < 2 * H; s++) begin
      out_sel = 4'(s);
      #1;
      checks++;
      if (out_data !== ((s < H) ? h[s] : c[s - H])) begin failures++; $display("out_sel %0d wrong", s); end
      checks++;
      if (out_data2 !== ((s < H) ? h2[s] : c2[s - H])) begin failures++; $display("out_sel %0d wrong (g tanh)", s); end
    end
  endtask

  initial begin
    start = 0; clr_state = 0; out_sel = '0;
    for (int r = 0; r < ROWS; r++) gate_in[r] = '0;
    for (int k = 0; k < H; k++) begin c_ref[k] = 0.0; c_ref2[k] = 0.0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) run_step();
    @(negedge clk);
    clr_state = 1;
    @(negedge clk);
    clr_state = 0;
    for (int k = 0; k < H; k++) begin
      c_ref[k] = 0.0;
      c_ref2[k] = 0.0;
      checks++;
      if (c[k] !== '0 || h[k] !== '0 || c2[k] !== '0 || h2[k] !== '0) begin failures++; $display("state not cleared at %0d", k); end
    end
    run_step();
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
