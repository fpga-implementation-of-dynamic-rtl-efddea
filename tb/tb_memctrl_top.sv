// tb_memctrl_top: end-to-end test of the memory controller at its default
// parameters, connected to the SDRAM model. Phases:
//   A. power-up initialisation, then dense random reads and writes of
//      macroblock data (row hits, row conflicts, read-after-write redirects);
//   B. sparse traffic (the monitor drops to close-page mode, power-down);
//   C. a long idle stretch (power-down, refresh at MAY urgency wakes it);
//   D. current-macroblock fetch of two B-frames interleaved by the order
//      generator: a continuous read stream that pushes refresh to MUST;
//   E. a continuous write stream that pushes refresh to NEED.
// Every read word of a host request is checked against a memory image kept
// in request order; every word returned is also checked against an image
// kept in execution order. The SDRAM model checks protocol and timing, and
// the refresh count is checked against the elapsed refresh intervals. Each
// mechanism is counted and must occur at least once.
module tb_memctrl_top;
  import memctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [2:0] req_frame = 0, seq_frame_a = 0, seq_frame_b = 0;
  logic [12:0] req_mb = 0, seq_mb_count = 0;
  logic [7:0] req_offset = 0;
  logic [BLEN_W-1:0] req_blen = 1;
  logic [ID_W-1:0] req_id = 0, rd_id;
  logic [MAX_BL-1:0][DW-1:0] req_wdata = '0;
  logic seq_start = 0, seq_pair = 0, seq_busy, seq_done;
  logic rd_valid, init_done, page_open, in_pd, raw_redirect, ev_hit, ev_conflict;
  logic [DW-1:0] rd_data, dq_in;
  sdram_bus_t sdram;
  sel_kind_e sel_kind;
  logic [3:0] ref_backlog;
  int errors, n_ref, n_act, n_pre, n_rd, n_wr, pd_cycles;
  logic mode_set;

  int checks = 0, failures = 0;
  int cnt_redirect = 0, cnt_hit = 0, cnt_conflict = 0, cnt_pd_entry = 0, cnt_close_page = 0;
  int cnt_open_page = 0, cnt_autopre = 0, cnt_seq_done = 0, cnt_ticks = 0, words = 0;
  int cnt_kind [sel_kind_e];
  int cnt_wq_full = 0, cnt_release_hold = 0, cnt_ref_wait = 0;

  // program-order image and expected words per host read id
  logic [DW-1:0] prog_mem [int];
  logic [DW-1:0] exp_by_id [int][$];
  int            out_addr [int];   // id -> first word address of an outstanding read
  int            out_len  [int];
  // execution-order image
  logic [DW-1:0] exec_mem [int];
  logic [DW-1:0] exec_q [$];

  memctrl_top dut (.*);
  sdram_model mem (.clk, .rst_n, .bus(sdram), .dq(dq_in), .errors, .n_ref, .n_act, .n_pre,
                   .n_rd, .n_wr, .pd_cycles, .mode_set);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int waddr(int f, int m, int o);
    return (f << 16) | (m << 8) | o;   // word address in testbench terms
  endfunction

  // ---------------- monitors ----------------
  logic in_pd_q = 0, page_q = 1;
  always @(posedge clk) if (rst_n) begin
    if (raw_redirect) cnt_redirect++;
    if (ev_hit) cnt_hit++;
    if (ev_conflict) cnt_conflict++;
    if (in_pd && !in_pd_q) cnt_pd_entry++;
    if (!page_open && page_q) cnt_close_page++;
    if (page_open && !page_q) cnt_open_page++;
    in_pd_q <= in_pd; page_q <= page_open;
    if ((sdram.cmd == CMD_RD || sdram.cmd == CMD_WR) && sdram.a[10]) cnt_autopre++;
    if (seq_done) cnt_seq_done++;
    if (dut.u_sched.wq_full != '0) cnt_wq_full++;
    if (dut.must_hold && !dut.urg.must) cnt_release_hold++;
    if (dut.ref_busy && dut.any_open && !dut.pre_ok) cnt_ref_wait++;
    if (dut.u_rcnt.tick) cnt_ticks++;
    if (sel_kind != SEL_NONE) cnt_kind[sel_kind]++;
    // execution-order image: packets as the command generator starts them
    if (dut.u_cmd.start) begin
      automatic packet_t p = dut.u_cmd.pkt;
      for (int i = 0; i < int'(p.blen); i++) begin
        automatic int k = int'({p.addr.bank, p.addr.row, p.addr.col}) + i;
        if (p.we) exec_mem[k] = p.wdata[i];
        else exec_q.push_back(exec_mem.exists(k) ? exec_mem[k] : '0);
      end
    end
    if (rd_valid) begin
      words++;
      check(exec_q.size() > 0, "read word without a read command");
      if (exec_q.size() > 0) check(rd_data == exec_q.pop_front(), "read word vs execution-order image");
      if (!seq_busy && exp_by_id.exists(int'(rd_id))) begin
        logic [DW-1:0] e;
        e = exp_by_id[int'(rd_id)].pop_front();
        check(rd_data == e, $sformatf("host read id %0d: %h expected %h", rd_id, rd_data, e));
        if (exp_by_id[int'(rd_id)].size() == 0) begin
          exp_by_id.delete(int'(rd_id)); out_addr.delete(int'(rd_id)); out_len.delete(int'(rd_id));
        end
      end
    end
  end

  // ---------------- host driver ----------------
  int next_id = 0;

  function automatic bit war_conflict(int a, int len);
    foreach (out_addr[i])
      if (a < out_addr[i] + out_len[i] && out_addr[i] < a + len) return 1;
    return 0;
  endfunction

  task automatic send(bit we, int f, int m, int o, int len);
    automatic int a = waddr(f, m, o);
    if (!we) begin
      while (exp_by_id.exists(next_id)) begin next_id = (next_id + 1) % 64; @(negedge clk); end
    end
    req_valid = 1; req_we = we; req_frame = 3'(f); req_mb = 13'(m); req_offset = 8'(o);
    req_blen = BLEN_W'(len); req_id = 6'(next_id);
    for (int i = 0; i < MAX_BL; i++) req_wdata[i] = 16'($urandom);
    forever begin #1; if (req_ready) break; @(negedge clk); end
    @(posedge clk);
    for (int i = 0; i < len; i++) begin
      if (we) prog_mem[a + i] = req_wdata[i];
      else exp_by_id[next_id].push_back(prog_mem.exists(a + i) ? prog_mem[a + i] : '0);
    end
    if (!we) begin out_addr[next_id] = a; out_len[next_id] = len; next_id = (next_id + 1) % 64; end
    @(negedge clk); req_valid = 0;
  endtask

  task automatic random_req(int nframes, int nmbs);
    bit we; int f, m, o, len;
    do begin
      we  = 1'($urandom);
      f   = $urandom_range(0, nframes - 1);
      m   = $urandom_range(0, nmbs - 1);
      o   = $urandom_range(0, 23) * 8;
      len = $urandom_range(1, 8);
    end while (we && war_conflict(waddr(f, m, o), len));
    send(we, f, m, o, len);
  endtask

  task automatic drain();
    int guard = 0;
    while ((exp_by_id.num() > 0 || dut.sched_pending) && guard < 20000) begin
      @(negedge clk); guard++;
    end
    check(exp_by_id.num() == 0, "all host reads answered");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (init_done);
    @(negedge clk);
    check(mode_set, "mode register programmed by the initialisation unit");
    // A: dense traffic over 2 frames x 8 macroblocks
    for (int n = 0; n < 1500; n++) random_req(2, 8);
    drain();
    // B: sparse traffic
    for (int n = 0; n < 150; n++) begin
      random_req(2, 8);
      repeat ($urandom_range(10, 90)) @(negedge clk);
    end
    drain();
    // C: idle
    repeat (3000) @(negedge clk);
    // D: B-frame pair fetch of 30 macroblocks (frames 0 and 1)
    @(negedge clk);
    seq_pair = 1; seq_frame_a = 0; seq_frame_b = 1; seq_mb_count = 30; seq_start = 1;
    @(negedge clk); seq_start = 0;
    wait (!seq_busy);
    repeat (200) @(negedge clk);
    // E: continuous writes of whole macroblocks to frame 2
    for (int m = 0; m < 60; m++)
      for (int o = 0; o < 192; o += 8) send(1, 2, m, o, 8);
    drain();
    repeat (200) @(negedge clk);
    // read a few of them back
    for (int m = 0; m < 60; m += 7) send(0, 2, m, 16, 8);
    drain();
    repeat (100) @(negedge clk);

    check(errors == 0, $sformatf("SDRAM model protocol errors: %0d", errors));
    check(exec_q.size() == 0, "all read words returned");
    check(n_ref - 2 + int'(ref_backlog) == cnt_ticks,
          $sformatf("refresh count %0d + backlog %0d vs intervals %0d", n_ref - 2, ref_backlog, cnt_ticks));
    check(cnt_redirect > 0, "read-after-write redirect");
    check(cnt_hit > 0, "row hit");
    check(cnt_conflict > 0, "row conflict");
    check(cnt_pd_entry > 0, "power-down entry");
    check(cnt_close_page > 0 && cnt_open_page > 0, "page policy switched both ways");
    check(cnt_autopre > 0, "auto-precharge in close-page mode");
    check(cnt_wq_full > 0, "write queue full (forced write drain)");
    check(cnt_release_hold > 0, "refresh held at top priority down to the RELEASE level");
    check(cnt_ref_wait > 0, "precharge-all of a refresh waited for tRAS/tWR");
    check(cnt_seq_done == 1, "B-pair fetch finished");
    check(cnt_kind.exists(SEL_REF_MUST), "refresh at MUST urgency");
    check(cnt_kind.exists(SEL_REF_NEED), "refresh at NEED urgency");
    check(cnt_kind.exists(SEL_REF_MAY), "refresh at MAY urgency");
    check(cnt_kind.exists(SEL_READ) && cnt_kind.exists(SEL_WRITE), "reads and writes selected");
    $display("words %0d redirect %0d hit %0d conflict %0d pd %0d (%0d cycles) close %0d open %0d autopre %0d",
             words, cnt_redirect, cnt_hit, cnt_conflict, cnt_pd_entry, pd_cycles, cnt_close_page,
             cnt_open_page, cnt_autopre);
    $display("write-queue-full cycles %0d, release-hold cycles %0d, refresh tRAS/tWR wait cycles %0d",
             cnt_wq_full, cnt_release_hold, cnt_ref_wait);
    foreach (cnt_kind[k]) $display("  %s: %0d", k.name(), cnt_kind[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
