// tb_refresh_priority: sweeps the backlog and checks the four urgency levels
// against the thresholds 0, 3, 7 and 11, then checks that the MUST hold
// stays up while the backlog drains from 12 to 4 and drops at 3.
module tb_refresh_priority;
  import memctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] backlog = 0;
  refresh_urgency_t urgency;
  logic must_hold;
  int checks = 0, failures = 0;

  refresh_priority dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk); backlog = 4'(v); #1;
      check(urgency.may == (v > 0),          $sformatf("may at %0d", v));
      check(urgency.release_lvl == (v > 3),  $sformatf("release at %0d", v));
      check(urgency.need == (v > 7),         $sformatf("need at %0d", v));
      check(urgency.must == (v > 11),        $sformatf("must at %0d", v));
    end
    // drain from 15 downwards: hold stays until backlog <= 3
    for (int v = 15; v >= 0; v--) begin
      @(negedge clk); backlog = 4'(v); #1;
      check(must_hold == (v > 3), $sformatf("must_hold while draining at %0d", v));
    end
    // rising again without reaching MUST: no hold
    for (int v = 0; v <= 11; v++) begin
      @(negedge clk); backlog = 4'(v); #1;
      check(must_hold == 1'b0, $sformatf("no hold rising at %0d", v));
    end
    @(negedge clk); backlog = 12; #1;
    check(must_hold, "hold at 12");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
