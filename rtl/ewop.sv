// Element-wise operation (EWOP) unit: the LSTM cell update.
//
// Input is the 4*HIDDEN result vector of the SpMxV unit. It is read as four
// gate vectors of HIDDEN elements in the order input gate i, cell input g,
// forget gate f, output gate o (the order of the reference design's code). All
// four go through the sigmoid, as in the reference architecture; setting
// G_TANH = 1 passes g through tanh instead, as in the textbook LSTM equations.
// Then, per element k:
//   c_t[k] = f[k] * c_(t-1)[k] + i[k] * g[k]
//   h_t[k] = o[k] * tanh(c_t[k])
// The cell state c lives in this unit and is carried from step to step; a
// `clr_state` pulse sets c (and h) to zero at the start of a sequence. The
// output vector holds h_t and c_t; h_t is also sent back to the vector memory.
//
// The unit handles one element per clock in a three-stage pipeline: sigmoid
// of the four gate values; cell update; tanh and output product. The
// pipeline is this design's choice.
//
// Interface: `start` begins a pass over gate_in (which must stay unchanged
// meanwhile); `en_wr_v` pulses when h and c are complete (the status signal
// the controller waits for). `out_sel` reads the output vector: 0 ... HIDDEN-1
// give h, HIDDEN ... 2*HIDDEN-1 give c.
// Timing: en_wr_v follows start by HIDDEN + 2 clocks.
module ewop
  import bbs_pkg::*;
#(
  parameter int HIDDEN = 8,
  parameter bit G_TANH = 1'b0,
  localparam int ROWS  = 4 * HIDDEN,
  localparam int KW    = (HIDDEN > 1) ? $clog2(HIDDEN) : 1,
  localparam int SW    = $clog2(2 * HIDDEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          clr_state,
  input  fx_t           gate_in [ROWS],
  output logic          busy,
  output logic          en_wr_v,
  output fx_t           h [HIDDEN],
  output fx_t           c [HIDDEN],
  input  logic [SW-1:0] out_sel,
  output fx_t           out_data
);

  // element counter
  logic          run;
  logic [KW-1:0] k;

  // activations of element k
  fx_t act_i, act_g, act_f, act_o, tanh_g;

  sigmoid_pwl u_sig_i (.x(gate_in[int'(k)]),              .y(act_i));
  sigmoid_pwl u_sig_f (.x(gate_in[2*HIDDEN + int'(k)]),   .y(act_f));
  sigmoid_pwl u_sig_o (.x(gate_in[3*HIDDEN + int'(k)]),   .y(act_o));
  if (G_TANH) begin : g_cell_tanh
    tanh_pwl    u_act_g (.x(gate_in[HIDDEN + int'(k)]),   .y(tanh_g));
  end else begin : g_cell_sig
    sigmoid_pwl u_act_g (.x(gate_in[HIDDEN + int'(k)]),   .y(tanh_g));
  end
  assign act_g = tanh_g;

  // stage 1
  logic          s1_valid;
  logic [KW-1:0] s1_k;
  fx_t           s1_i, s1_g, s1_f, s1_o;
  // stage 2
  logic          s2_valid;
  logic [KW-1:0] s2_k;
  fx_t           s2_c, s2_o;
  fx_t           s2_tanh;

  tanh_pwl u_tanh_c (.x(s2_c), .y(s2_tanh));

  assign busy = run || s1_valid || s2_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      k        <= '0;
      s1_valid <= 1'b0;
      s1_k     <= '0;
      s1_i     <= '0;
      s1_g     <= '0;
      s1_f     <= '0;
      s1_o     <= '0;
      s2_valid <= 1'b0;
      s2_k     <= '0;
      s2_c     <= '0;
      s2_o     <= '0;
      en_wr_v  <= 1'b0;
      for (int j = 0; j < HIDDEN; j++) begin
        h[j] <= '0;
        c[j] <= '0;
      end
    end else begin
      en_wr_v <= 1'b0;
      // element counter
      if (start && !run) begin
        run <= 1'b1;
        k   <= '0;
      end else if (run) begin
        if (int'(k) == HIDDEN - 1) run <= 1'b0;
        else                       k   <= k + 1'b1;
      end
      // stage 1: gate activations
      s1_valid <= run;
      s1_k     <= k;
      s1_i     <= act_i;
      s1_g     <= act_g;
      s1_f     <= act_f;
      s1_o     <= act_o;
      // stage 2: cell update
      s2_valid <= s1_valid;
      s2_k     <= s1_k;
      s2_o     <= s1_o;
      if (s1_valid) begin
        s2_c          <= fx_mul(s1_f, c[s1_k]) + fx_mul(s1_i, s1_g);
        c[s1_k]       <= fx_mul(s1_f, c[s1_k]) + fx_mul(s1_i, s1_g);
      end
      // stage 3: hidden output
      if (s2_valid) begin
        h[s2_k] <= fx_mul(s2_o, s2_tanh);
        if (int'(s2_k) == HIDDEN - 1) en_wr_v <= 1'b1;
      end
      if (clr_state) begin
        for (int j = 0; j < HIDDEN; j++) begin
          h[j] <= '0;
          c[j] <= '0;
        end
      end
    end
  end

  always_comb begin
    if (int'(out_sel) < HIDDEN) out_data = h[int'(out_sel)];
    else                        out_data = c[int'(out_sel) - HIDDEN];
  end

endmodule
