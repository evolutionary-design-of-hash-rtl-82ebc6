// input_sequencer: skews the bits of each address in time for the hash
// pipeline.
//
// Stage k+1 of a hash function processes address bit I_k, and an address
// reaches that stage k cycles after it entered. Bit k of the address
// therefore leaves through a k-deep shift register: seq[0] is the current
// input bit 0 (no delay), seq[1] is bit 1 of the address presented one
// cycle ago, ..., seq[IN_BITS-1] is bit IN_BITS-1 presented IN_BITS-1
// cycles ago. A new address can enter every cycle; the delay line shifts
// every cycle. Only the triangle of flip-flops that is needed is built
// (IN_BITS*(IN_BITS-1)/2 of them). Structure as published.
//
// No reset: the pipeline contents are qualified by a separate valid chain.
module input_sequencer #(
  parameter int unsigned IN_BITS = 32
) (
  input  logic               clk,
  input  logic [IN_BITS-1:0] addr_in,  // address entering this cycle
  output logic [IN_BITS-1:0] seq       // seq[k] = addr_in[k] delayed k cycles
);

  assign seq[0] = addr_in[0];

  for (genvar k = 1; k < IN_BITS; k++) begin : g_bit
    logic [k-1:0] dly;  // dly[0] is 1 cycle old, dly[k-1] is k cycles old
    always_ff @(posedge clk) begin
      dly[0] <= addr_in[k];
      for (int unsigned t = 1; t < k; t++) dly[t] <= dly[t-1];
    end
    assign seq[k] = dly[k-1];
  end

endmodule
