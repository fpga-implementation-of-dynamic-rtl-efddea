// tb_sdram_cmd_gen: runs random read and write bursts (open- and close-page,
// hits, empty banks and row conflicts) through the command generator into
// the SDRAM model. Read data is compared with a word-level reference memory
// kept in the testbench; the model flags any protocol or timing error. Also
// checks the read latency of a row hit (CL + 2 cycles from start to the
// first word), a power-down entry/exit, close_all, and that pre_ok rises
// only once tRAS and tWR are met.
module tb_sdram_cmd_gen;
  import memctrl_pkg::*;
  localparam int CL = 2;
  logic clk = 0, rst_n = 0, start = 0, pd_req = 0, close_all = 0;
  packet_t pkt = '0;
  logic ready, any_open, pre_ok, in_pd, rd_valid, ev_hit, ev_conflict;
  int n_since_act = 100, n_since_wr = 100, n_pre_ok = 0;
  sdram_bus_t bus;
  logic [DW-1:0] dq_in, rd_data;
  logic [NBANKS-1:0] row_open;
  logic [ROW_W-1:0] open_row [NBANKS];
  logic [ID_W-1:0] rd_id;
  int errors, n_ref, n_act, n_pre, n_rd, n_wr, pd_cycles;
  logic mode_set;
  int checks = 0, failures = 0, cyc = 0;
  int n_hits = 0, n_conf = 0, n_words = 0;
  logic [DW-1:0] ref_mem [logic [BANK_W+ROW_W+COL_W-1:0]];
  logic [DW-1:0] exp_q [$];
  int            exp_id [$];

  sdram_cmd_gen #(.CL(CL)) dut (.clk, .rst_n, .start, .pkt, .ready, .pd_req, .close_all,
                                .bus, .dq_in, .row_open, .open_row, .any_open, .pre_ok, .in_pd,
                                .rd_valid, .rd_data, .rd_id, .ev_hit, .ev_conflict);
  sdram_model #(.CL(CL)) mem (.clk, .rst_n, .bus, .dq(dq_in), .errors, .n_ref, .n_act, .n_pre,
                              .n_rd, .n_wr, .pd_cycles, .mode_set);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pre_ok: a PRECHARGE registered at the next edge would meet tRAS and tWR
  always @(negedge clk) if (rst_n) begin
    n_since_act++; n_since_wr++;
    if (bus.cmd == CMD_ACT) n_since_act = 0;
    if (bus.cmd == CMD_WR)  n_since_wr  = 0;
    if (pre_ok) begin
      n_pre_ok++;
      check(n_since_act + 1 >= 5 && n_since_wr + 1 >= 2, "pre_ok only after tRAS and tWR");
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_hit) n_hits++;
    if (ev_conflict) n_conf++;
    if (rd_valid) begin
      n_words++;
      check(exp_q.size() > 0, "unexpected read data");
      if (exp_q.size() > 0) begin
        logic [DW-1:0] e; int i;
        e = exp_q.pop_front(); i = exp_id.pop_front();
        check(rd_data == e && int'(rd_id) == i,
              $sformatf("read data %h expected %h (id %0d/%0d)", rd_data, e, rd_id, i));
      end
    end
  end

  task automatic issue(packet_t p);
    while (!ready) @(negedge clk);
    pkt = p; start = 1;
    for (int i = 0; i < int'(p.blen); i++) begin
      logic [BANK_W+ROW_W+COL_W-1:0] k;
      k = {p.addr.bank, p.addr.row, p.addr.col + COL_W'(i)};
      if (p.we) ref_mem[k] = p.wdata[i];
      else begin
        exp_q.push_back(ref_mem.exists(k) ? ref_mem[k] : '0);
        exp_id.push_back(int'(p.id));
      end
    end
    @(negedge clk); start = 0;
  endtask

  function automatic packet_t rnd(bit we);
    packet_t p = '0;
    p.we = we;
    p.addr.bank = 2'($urandom_range(0, 3));
    p.addr.row  = 13'($urandom_range(0, 2));
    p.addr.col  = 9'($urandom_range(0, 3) * 8);
    p.blen      = 4'($urandom_range(1, 8));
    p.auto_pre  = ($urandom_range(0, 3) == 0);
    p.id        = 6'($urandom);
    for (int i = 0; i < MAX_BL; i++) p.wdata[i] = 16'($urandom);
    return p;
  endfunction

  initial begin
    packet_t p;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    // fill memory, then mix
    for (int n = 0; n < 60; n++) issue(rnd(1'b1));
    for (int n = 0; n < 400; n++) issue(rnd($urandom_range(0, 1) == 0));
    // row-hit read latency
    p = rnd(1'b0); p.auto_pre = 0; issue(p);
    while (!ready) @(negedge clk);
    repeat (6) @(negedge clk);
    begin
      int t0, t1;
      p.blen = 1; p.id = 6'd33;
      check(row_open[p.addr.bank] && open_row[p.addr.bank] == p.addr.row, "row still open");
      issue(p); t0 = cyc;
      while (!rd_valid) @(negedge clk);
      t1 = cyc;
      check(t1 - t0 == CL + 2, $sformatf("row-hit read latency %0d", t1 - t0));
    end
    // power-down entry and exit
    while (!ready) @(negedge clk);
    pd_req = 1; repeat (10) @(negedge clk);
    check(in_pd && !bus.cke && !ready, "in power-down");
    pd_req = 0; repeat (5) @(negedge clk);
    check(!in_pd && bus.cke && ready, "left power-down");
    issue(rnd(1'b0));
    // close_all clears the open-row table
    while (!ready) @(negedge clk);
    repeat (10) @(negedge clk);
    close_all = 1; @(negedge clk); close_all = 0;
    check(row_open == '0 && !any_open, "close_all");
    repeat (30) @(negedge clk);
    check(exp_q.size() == 0, "all reads returned");
    check(errors == 0, $sformatf("SDRAM protocol errors: %0d", errors));
    check(n_hits > 0 && n_conf > 0 && pd_cycles > 0, "hits, conflicts and power-down seen");
    $display("words read %0d, hits %0d, conflicts %0d, act %0d, pre %0d", n_words, n_hits, n_conf, n_act, n_pre);
    check(n_pre_ok > 0, "pre_ok seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
