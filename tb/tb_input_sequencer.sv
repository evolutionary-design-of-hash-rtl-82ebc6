// tb_input_sequencer: drives a new random address every cycle and checks
// that output bit k equals bit k of the address presented k cycles earlier.
module tb_input_sequencer;
  localparam int unsigned IN_BITS = 32;
  logic clk = 0;
  logic [IN_BITS-1:0] addr_in, seq;
  logic [IN_BITS-1:0] hist [$];
  int checks = 0, failures = 0;

  input_sequencer #(.IN_BITS(IN_BITS)) dut (.clk, .addr_in, .seq);

  always #5 clk = ~clk;

  initial begin
    addr_in = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      addr_in = $urandom;
      hist.push_front(addr_in);   // hist[k] = address presented k cycles ago
      if (hist.size() > IN_BITS) void'(hist.pop_back());
      #1;
      if (hist.size() == IN_BITS)
        for (int k = 0; k < IN_BITS; k++) begin
          checks++;
          if (seq[k] !== hist[k][k]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d k=%0d seq=%0b exp=%0b", t, k, seq[k], hist[k][k]);
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
