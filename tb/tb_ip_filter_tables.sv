// tb_ip_filter_tables: the larger table sizes, 16k, 32k, 64k and 128k
// records (HASH_BITS 13 to 16, 44 to 47 stages), one after another. Each
// is filled with random addresses until the first unresolvable collision
// and then looked up in full (tb_table_fill); the load reached is printed.
module tb_ip_filter_tables;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 4;
  logic start [N];
  logic done  [N];
  int   c [N], f [N], s [N];

  tb_table_fill #(.HB(13)) u13 (.clk, .start(start[0]), .done(done[0]), .checks(c[0]), .failures(f[0]), .n_stored(s[0]));
  tb_table_fill #(.HB(14)) u14 (.clk, .start(start[1]), .done(done[1]), .checks(c[1]), .failures(f[1]), .n_stored(s[1]));
  tb_table_fill #(.HB(15)) u15 (.clk, .start(start[2]), .done(done[2]), .checks(c[2]), .failures(f[2]), .n_stored(s[2]));
  tb_table_fill #(.HB(16)) u16 (.clk, .start(start[3]), .done(done[3]), .checks(c[3]), .failures(f[3]), .n_stored(s[3]));

  function automatic void report(input int extra);
    int checks, failures;
    checks = 0; failures = extra;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    for (int i = 0; i < N; i++) start[i] = 0;
    #5;                       // every helper has cleared its done flag
    for (int i = 0; i < N; i++) begin
      start[i] = 1;
      wait (done[i]);
    end
    report(0);
    $finish;
  end

  initial begin
    repeat (60000000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end
endmodule
