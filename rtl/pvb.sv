// Private vector buffer (PVB) of one processing element.
//
// The dense input vector is split into NUM_BANK equal banks of BANK_SIZE
// elements, the same split as the weight-matrix rows. For each bank the PVB
// takes the bank-internal index that the CSB (compressed sparse bank) format
// stores next to every non-zero weight and returns the vector element at that
// position: out[b] = vec[b*BANK_SIZE + idx[b]]. Because every bank is read
// through its own selector, all banks are served in the same cycle, which is
// the inter-bank parallelism the CSB layout is built for. This follows the
// reference design; the buffer here is a set of multiplexers over the vector
// register, one set per processing element.
//
// Interface: vec is the whole vector, idx one bank-internal index per bank.
// Timing: combinational.
module pvb
  import bbs_pkg::*;
#(
  parameter int NUM_BANK  = 4,
  parameter int BANK_SIZE = 4,
  localparam int IDX_W    = (BANK_SIZE > 1) ? $clog2(BANK_SIZE) : 1
) (
  input  fx_t              vec [NUM_BANK*BANK_SIZE],
  input  logic [IDX_W-1:0] idx [NUM_BANK],
  output fx_t              out [NUM_BANK]
);

  always_comb begin
    for (int b = 0; b < NUM_BANK; b++) begin
      out[b] = vec[b*BANK_SIZE + int'(idx[b])];
    end
  end

endmodule
