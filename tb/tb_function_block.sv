// tb_function_block: checks the reconfigurable function block against the
// bit-by-bit reference (tb_hash_ref_pkg::fb_eval) for random states, input
// bits and configurations, including each AND term on its own.
module tb_function_block;
  import hash_pkg::*;
  import tb_hash_ref_pkg::*;

  localparam int unsigned HB = 12;
  localparam int unsigned CW = fb_cfg_w(HB);

  logic [HB-1:0] state;
  logic          in_bit;
  logic [CW-1:0] cfg;
  logic          f;
  int checks = 0, failures = 0;

  function_block #(.HASH_BITS(HB)) dut (.state, .in_bit, .cfg, .f);

  task automatic check_one(input fb_t c, input int unsigned s, input bit b);
    cfg = CW'(pack_fb(c, HB)); state = HB'(s); in_bit = b;
    #1;
    checks++;
    if (f !== fb_eval(s, b, c, HB)) begin
      failures++;
      if (failures < 10) $display("FAIL state=%h in=%0b mask=%h sel=%0d,%0d,%0d,%0d en=%0b f=%0b",
                                  s, b, c.mask, c.sel[0], c.sel[1], c.sel[2], c.sel[3], c.en, f);
    end
  endtask

  initial begin
    fb_t c;
    // Products alone: mask 0, input 0; f must equal S[a]&S[b] (^ S[c]&S[d]).
    for (int a = 0; a < HB; a++)
      for (int b = 0; b < HB; b++) begin
        c.mask = 0; c.sel[0] = a; c.sel[1] = b; c.sel[2] = b; c.sel[3] = a; c.en = 0;
        check_one(c, $urandom & hmask(HB), 0);
        c.en = 1;
        check_one(c, $urandom & hmask(HB), 1);
      end
    // Mask alone: single bits.
    for (int j = 0; j < HB; j++) begin
      c.mask = 1 << j; c.sel[0] = 0; c.sel[1] = 1; c.en = 0; c.sel[2] = 0; c.sel[3] = 0;
      check_one(c, 1 << j, 0);   // S[j]=1 through mask, S0&S1 = 0 unless j<2
    end
    // Random.
    for (int n = 0; n < 5000; n++) check_one(rand_fb(HB), $urandom & hmask(HB), bit'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
