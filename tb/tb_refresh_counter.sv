// tb_refresh_counter: checks the refresh interval and backlog counters.
// A reference backlog is computed in the testbench from the cycle count: the
// interval is REFI cycles, so after n enabled cycles floor(n / REFI) refresh
// ticks have occurred. ref_done pulses are subtracted and saturation at 0 and
// at the counter maximum is checked.
module tb_refresh_counter;
  localparam int REFI = 10;
  logic clk = 0, rst_n = 0, enable = 0, ref_done = 0;
  logic [3:0] backlog;
  logic tick;
  int checks = 0, failures = 0, cyc = 0, expect_bl = 0;

  refresh_counter #(.REFI(REFI), .BACKLOG_W(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (backlog=%0d expect=%0d)", what, backlog, expect_bl); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    check(backlog == 0, "reset backlog");
    enable = 1;
    // run 5 intervals without refresh; check the backlog every cycle
    for (int n = 1; n <= 5 * REFI; n++) begin
      @(negedge clk);
      expect_bl = n / REFI;
      check(32'(backlog) == expect_bl, $sformatf("backlog after %0d cycles", n));
    end
    // one refresh issued away from a tick: backlog drops by one
    @(negedge clk); ref_done = 1; @(negedge clk); ref_done = 0;
    expect_bl = 4;
    check(backlog == 4, "ref_done decrements");
    // drain to zero and try one more: stays at zero
    repeat (6) begin @(negedge clk); ref_done = 1; end
    @(negedge clk); ref_done = 0;
    check(backlog <= 1, "drained");
    // disable freezes the counter
    enable = 0;
    begin
      logic [3:0] hold; hold = backlog;
      repeat (3 * REFI) @(negedge clk);
      check(backlog == hold, "disable freezes");
    end
    // saturation: run 20 intervals, backlog stops at 15
    enable = 1;
    repeat (20 * REFI) @(negedge clk);
    check(backlog == 4'd15, "saturates at 15");
    // tick and ref_done in the same cycle keep the value
    while (!tick) @(negedge clk);
    ref_done = 1; @(negedge clk); ref_done = 0;
    check(backlog == 4'd15, "tick with ref_done keeps backlog");
    // interval length: cycles between ticks equal REFI
    begin
      int c = 0;
      @(negedge clk); while (!tick) @(negedge clk);
      @(negedge clk); c = 1; while (!tick) begin @(negedge clk); c++; end
      check(c == REFI, $sformatf("tick period %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
