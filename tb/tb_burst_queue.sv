// tb_burst_queue: drives random pushes and pops into one burst queue and
// compares head packet, head age, count, full/empty and the address search
// with a queue model kept in the testbench (arrival order, per-entry age
// incremented every cycle, saturating at 255).
module tb_burst_queue;
  import memctrl_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  packet_t push_pkt = '0, head_pkt;
  logic head_valid, full, empty, search_hit;
  logic [AGE_W-1:0] head_age;
  logic [$clog2(DEPTH+1)-1:0] count;
  phys_addr_t search_addr = '0;
  logic [BLEN_W-1:0] search_blen = 1;
  int checks = 0, failures = 0;

  packet_t mq [$];
  int      ma [$];

  burst_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit ovl(phys_addr_t a, int al, phys_addr_t b, int bl);
    return a.bank == b.bank && a.row == b.row &&
           int'(a.col) < int'(b.col) + bl && int'(b.col) < int'(a.col) + al;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit exp_hit;
      @(negedge clk);
      // compare state
      check(head_valid == (mq.size() > 0), "head_valid");
      check(32'(count) == mq.size(), "count");
      check(full == (mq.size() == DEPTH), "full");
      check(empty == (mq.size() == 0), "empty");
      if (mq.size() > 0) begin
        check(head_pkt == mq[0], "head packet");
        check(32'(head_age) == ma[0], $sformatf("head age %0d vs %0d", head_age, ma[0]));
      end
      // search
      search_addr.bank = 2'($urandom_range(0, 1));
      search_addr.row  = 13'($urandom_range(0, 1));
      search_addr.col  = 9'($urandom_range(0, 15));
      search_blen      = 4'($urandom_range(1, 4));
      #1;
      exp_hit = 0;
      foreach (mq[i]) if (ovl(mq[i].addr, int'(mq[i].blen), search_addr, int'(search_blen))) exp_hit = 1;
      check(search_hit == exp_hit, "search hit");
      // stimulus (long idle stretches let ages saturate)
      push = (cyc % 700 < 600) && ($urandom_range(0, 2) != 0);
      pop  = (cyc % 700 < 600) && ($urandom_range(0, 2) == 0);
      push_pkt = '0;
      push_pkt.we        = 1'($urandom);
      push_pkt.addr.bank = 2'($urandom_range(0, 1));
      push_pkt.addr.row  = 13'($urandom_range(0, 1));
      push_pkt.addr.col  = 9'($urandom_range(0, 15));
      push_pkt.blen      = 4'($urandom_range(1, 4));
      push_pkt.id        = 6'($urandom);
      push_pkt.wdata[0]  = 16'($urandom);
      @(posedge clk);
      begin
        bit dpop, dpush;
        dpop  = pop && mq.size() > 0;
        dpush = push && (mq.size() < DEPTH || dpop);
        foreach (ma[i]) if (ma[i] < 255) ma[i]++;
        if (dpop) begin void'(mq.pop_front()); void'(ma.pop_front()); end
        if (dpush) begin mq.push_back(push_pkt); ma.push_back(0); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
