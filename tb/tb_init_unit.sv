// tb_init_unit: records the command sequence the initialisation unit puts on
// the bus and checks it against the expected power-up sequence and its
// timing: T_INIT cycles of NOP with CKE, PRECHARGE ALL, tRP, REFRESH, tRFC,
// REFRESH, tRFC, MODE REGISTER SET with CAS latency 2, then done.
module tb_init_unit;
  import memctrl_pkg::*;
  localparam int T_INIT = 50, T_RP = 2, T_RFC = 7, T_MRD = 2;
  logic clk = 0, rst_n = 0;
  sdram_bus_t bus;
  logic done;
  int checks = 0, failures = 0, cyc = 0;
  sdram_cmd_e cmds [$];
  int         times [$];
  logic [ROW_W-1:0] args [$];
  int t_done = -1;

  init_unit #(.T_INIT(T_INIT), .T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD)) dut (.*);

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

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (bus.cmd != CMD_NOP) begin cmds.push_back(bus.cmd); times.push_back(cyc); args.push_back(bus.a); end
    if (done && t_done < 0) t_done = cyc;
  end

  initial begin
    repeat (2) @(posedge clk);
    check(!bus.cke && !done, "CKE low and not done in reset");
    #1 rst_n = 1;
    repeat (T_INIT + 40) @(posedge clk);
    check(cmds.size() == 4, $sformatf("4 commands, got %0d", cmds.size()));
    if (cmds.size() == 4) begin
      check(cmds[0] == CMD_PRE && args[0][10], "first PRECHARGE ALL");
      check(times[0] >= T_INIT, "power-up wait");
      check(cmds[1] == CMD_REF && times[1] - times[0] >= T_RP, "REFRESH after tRP");
      check(cmds[2] == CMD_REF && times[2] - times[1] >= T_RFC, "second REFRESH after tRFC");
      check(cmds[3] == CMD_MRS && times[3] - times[2] >= T_RFC, "MRS after tRFC");
      check(args[3][6:4] == 3'd2 && args[3][2:0] == 3'd0, "mode word CL=2 BL=1");
      check(t_done - times[3] >= T_MRD, "done after tMRD");
    end
    check(done && bus.cke, "done with CKE high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
