// tb_dyn_scheduler: random reads and writes to a small address space flow
// into the scheduler while the testbench grants random banks in place of the
// final burst selection. The testbench keeps its own per-bank read and write
// queues (with waiting-cycle counts) and checks: req_ready, the
// read-after-write redirect, and each bank's proposal against the policy
// (full write queue, open-row hit, X*W_T + Y*BL + P). End to end it checks
// that every granted read sees the data of the last write that was requested
// before it (no RAW or WAW reordering), using a memory image updated in
// grant order.
module tb_dyn_scheduler;
  import memctrl_pkg::*;
  localparam int QD = 4;
  logic clk = 0, rst_n = 0, req_valid = 0, grant = 0;
  packet_t req_pkt = '0;
  logic req_ready, raw_redirect, pending;
  logic [NBANKS-1:0] row_open = '0, win_valid, win_is_read;
  logic [ROW_W-1:0] open_row [NBANKS];
  logic [13:0] win_key [NBANKS];
  packet_t win_pkt [NBANKS];
  logic [BANK_W-1:0] grant_bank = '0;
  int checks = 0, failures = 0, n_redirect = 0, n_reads_checked = 0, n_forced = 0;

  typedef struct { packet_t p; int age; int exp; } ent_t;
  ent_t rq [NBANKS][$];
  ent_t wq [NBANKS][$];
  logic [DW-1:0] prog_mem [int];   // memory as seen in request order
  logic [DW-1:0] sched_mem [int];  // memory as updated in grant order

  dyn_scheduler #(.QDEPTH(QD)) dut (.*);

  always #5 clk = ~clk;

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

  function automatic bit ovl(packet_t a, packet_t b);
    return a.addr.bank == b.addr.bank && a.addr.row == b.addr.row &&
           int'(a.addr.col) < int'(b.addr.col) + int'(b.blen) &&
           int'(b.addr.col) < int'(a.addr.col) + int'(a.blen);
  endfunction

  function automatic int key(packet_t p, int age, bit forced, int b);
    int pr = (age > 255 ? 255 : age) + 2 * int'(p.blen) + (p.we ? 0 : 16);
    bit hit = row_open[b] && open_row[b] == p.addr.row;
    return (int'(forced) << 13) | (int'(hit) << 12) | pr;
  endfunction

  function automatic int addr_of(packet_t p);
    return int'({p.addr.bank, p.addr.row, p.addr.col});
  endfunction

  initial begin
    for (int b = 0; b < NBANKS; b++) open_row[b] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int b; bit to_w, exp_ready, exp_from_wq; int gb;
      @(negedge clk);
      // random open-row state
      if ($urandom_range(0, 15) == 0) begin
        int k = $urandom_range(0, NBANKS - 1);
        row_open[k] = 1'($urandom); open_row[k] = 13'($urandom_range(0, 1));
      end
      // new request: short bursts in a small space to force overlaps
      req_valid = ($urandom_range(0, 2) != 0);
      req_pkt = '0;
      req_pkt.we = 1'($urandom);
      req_pkt.addr.bank = 2'($urandom_range(0, NBANKS - 1));
      req_pkt.addr.row  = 13'($urandom_range(0, 1));
      req_pkt.addr.col  = 9'($urandom_range(0, 3));
      req_pkt.blen      = 1;
      req_pkt.id        = 6'(cyc);
      req_pkt.wdata[0]  = 16'($urandom);
      #1;
      b = req_pkt.addr.bank;
      to_w = req_pkt.we;
      foreach (wq[b][i]) if (ovl(wq[b][i].p, req_pkt)) to_w = 1;
      exp_ready = to_w ? (wq[b].size() < QD) : (rq[b].size() < QD);
      check(req_ready == exp_ready, "req_ready");
      check(raw_redirect == (req_valid && exp_ready && !req_pkt.we && to_w), "raw_redirect");
      // proposals
      for (int k = 0; k < NBANKS; k++) begin
        automatic bit rv = rq[k].size() > 0, wv = wq[k].size() > 0;
        check(win_valid[k] == (rv || wv), "win_valid");
        if (rv || wv) begin
          automatic int rk = rv ? key(rq[k][0].p, rq[k][0].age, 0, k) : -1;
          automatic int wk = wv ? key(wq[k][0].p, wq[k][0].age, wq[k].size() == QD, k) : -1;
          exp_from_wq = wv && (!rv || wk > rk);
          if (wv && wq[k].size() == QD && rv) n_forced++;
          check(win_pkt[k] == (exp_from_wq ? wq[k][0].p : rq[k][0].p),
                $sformatf("bank %0d proposal", k));
          check(32'(win_key[k]) == (exp_from_wq ? wk : rk), "proposal key");
        end
      end
      // grant a random proposing bank
      grant = 0; gb = -1;
      if (win_valid != '0 && $urandom_range(0, 2) != 0) begin
        do gb = $urandom_range(0, NBANKS - 1); while (!win_valid[gb]);
        grant = 1; grant_bank = 2'(gb);
      end
      @(posedge clk);
      // model update: age, grant, push
      for (int k = 0; k < NBANKS; k++) begin
        foreach (rq[k][i]) rq[k][i].age++;
        foreach (wq[k][i]) wq[k][i].age++;
      end
      if (gb >= 0) begin
        ent_t e; bit from_w;
        automatic int rk = rq[gb].size() > 0 ? key(rq[gb][0].p, rq[gb][0].age - 1, 0, gb) : -1;
        automatic int wk = wq[gb].size() > 0 ? key(wq[gb][0].p, wq[gb][0].age - 1, wq[gb].size() == QD, gb) : -1;
        from_w = wq[gb].size() > 0 && (rq[gb].size() == 0 || wk > rk);
        e = from_w ? wq[gb].pop_front() : rq[gb].pop_front();
        if (e.p.we) sched_mem[addr_of(e.p)] = e.p.wdata[0];
        else begin
          automatic logic [DW-1:0] got = sched_mem.exists(addr_of(e.p)) ? sched_mem[addr_of(e.p)] : '0;
          // a read may legally see a later write only if it was not redirected
          if (from_w) begin
            check(got == DW'(e.exp), "redirected read sees the write before it");
            n_reads_checked++;
          end
        end
      end
      if (req_valid && exp_ready) begin
        ent_t e;
        e.p = req_pkt; e.age = 0;
        e.exp = prog_mem.exists(addr_of(req_pkt)) ? int'(prog_mem[addr_of(req_pkt)]) : 0;
        if (req_pkt.we) prog_mem[addr_of(req_pkt)] = req_pkt.wdata[0];
        if (to_w) wq[b].push_back(e); else rq[b].push_back(e);
        if (!req_pkt.we && to_w) n_redirect++;
      end
    end
    check(n_redirect > 0 && n_reads_checked > 0 && n_forced > 0, "redirects and forced drains occurred");
    $display("redirects %0d, checked reads %0d, forced %0d", n_redirect, n_reads_checked, n_forced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
