// tb_ddr2_refresh_timer: checks the refresh interval and the owed-refresh
// bookkeeping.
//
// With T_REFI = 10 it checks that the first request rises exactly 10 cycles
// after enabling, that an acknowledged request drops, that unserved requests
// accumulate in `pending` one per interval, that `overflow` is raised only
// when more than MAX_PEND are owed, and that nothing counts while disabled.
module tb_ddr2_refresh_timer;
  localparam int unsigned T_REFI = 10, MAX_PEND = 3;

  logic clk = 0, rst_n = 0, en = 0, ack = 0;
  logic req, overflow;
  logic [1:0] pending;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddr2_refresh_timer #(.T_REFI(T_REFI), .MAX_PEND(MAX_PEND)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    check(!req && pending == 0, "no request while disabled");
    en = 1;
    n = 0;
    while (!req) begin @(negedge clk); n++; end
    check(n == T_REFI, $sformatf("first request after %0d cycles, want %0d", n, T_REFI));
    ack = 1; @(negedge clk); ack = 0;
    check(!req, "request dropped after ack");
    // the interval runs on regardless of ack: next request T_REFI after the first
    n = 1;
    while (!req) begin @(negedge clk); n++; end
    check(n == T_REFI, $sformatf("second request after %0d cycles", n));
    // let two more intervals pass unserved
    repeat (2 * T_REFI) @(negedge clk);
    check(pending == 3 && req && !overflow, $sformatf("three owed, got %0d", pending));
    repeat (T_REFI) @(negedge clk);
    check(overflow && pending == 3, "overflow when a fourth is owed");
    for (int i = 0; i < 3; i++) begin ack = 1; @(negedge clk); end
    ack = 0;
    check(!req && pending == 0, "all owed refreshes paid back");
    en = 0;
    repeat (3 * T_REFI) @(negedge clk);
    check(!req, "disabled timer stays quiet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
