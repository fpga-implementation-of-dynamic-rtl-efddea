// tb_auto_refresh_gen: grants refreshes with and without open banks. Checks
// that an open bank is closed by PRECHARGE ALL tRP before the REFRESH, that
// ref_done pulses once with the REFRESH, that busy covers tRFC, that a
// grant while busy is ignored, and that the PRECHARGE ALL and a REFRESH
// without one both wait for pre_ok.
module tb_auto_refresh_gen;
  import memctrl_pkg::*;
  localparam int T_RP = 2, T_RFC = 7;
  logic clk = 0, rst_n = 0, grant = 0, any_open = 0, pre_ok = 1, pre_ok_last = 1;
  logic busy, drive_bus, ref_done, close_all;
  sdram_bus_t bus;
  int checks = 0, failures = 0, cyc = 0;

  auto_refresh_gen #(.T_RP(T_RP), .T_RFC(T_RFC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(bit open, int hold);
    int t_pre = -1, t_ref = -1, n_done = 0, n_close = 0, t_idle = -1, c = 0, c_ok = -1;
    @(negedge clk); any_open = open; grant = 1; pre_ok = (hold == 0);
    fork
      begin repeat (hold) @(negedge clk); pre_ok = 1; end
    join_none
    @(negedge clk); grant = 0;
    check(busy && drive_bus, "busy after grant");
    // extra grant while busy must not restart anything
    grant = 1; @(negedge clk); grant = 0;
    t_pre = -1; t_ref = -1; n_done = 0; n_close = 0; t_idle = -1; c = 1;
    if (bus.cmd == CMD_PRE) t_pre = 0;
    for (int i = 0; i < 40 && t_idle < 0; i++) begin
      // samples at negedge show what was registered at the last posedge
      if (i == 0 && dut.bus.cmd == CMD_PRE) t_pre = 0;
      if (bus.cmd == CMD_REF) t_ref = c;
      if (pre_ok && c_ok < 0) c_ok = c;
      if (ref_done) n_done++;
      if (close_all) n_close++;
      if (!busy) t_idle = c;
      @(negedge clk); c++;
    end
    check(n_done == 1, "one ref_done");
    check(t_ref > 0, "REFRESH issued");
    check(hold == 0 || t_ref > c_ok, $sformatf("REFRESH after pre_ok (%0d, %0d)", t_ref, c_ok));
    check(n_close == ((open && hold > 0) ? 1 : 0), "close_all only with the PRECHARGE ALL");
    check(t_idle - t_ref >= T_RFC, $sformatf("tRFC respected (%0d)", t_idle - t_ref));
  endtask

  int pre_seen = 0, pre_cyc = -1, ref_cyc = -1, close_seen = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (bus.cmd == CMD_PRE) begin
      pre_seen++; pre_cyc = cyc;
      check(bus.a[10], "precharge all");
      check(pre_ok_last, "precharge all only with pre_ok");
    end
    if (bus.cmd == CMD_REF) begin
      ref_cyc = cyc;
      if (pre_cyc > 0) check(ref_cyc - pre_cyc >= T_RP, "tRP before REFRESH");
      pre_cyc = -1;
    end
    if (close_all) close_seen++;
    pre_ok_last = pre_ok;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    one(1'b0, 0);
    check(pre_seen == 0 && close_seen == 0, "no precharge when all banks closed");
    one(1'b1, 0);
    check(pre_seen == 1 && close_seen == 1, "one precharge-all with an open bank");
    one(1'b1, 4);
    check(pre_seen == 2 && close_seen == 2, "precharge-all after pre_ok rises");
    one(1'b0, 5);
    check(pre_seen == 2 && close_seen == 2, "no precharge-all for a bank still auto-precharging");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
