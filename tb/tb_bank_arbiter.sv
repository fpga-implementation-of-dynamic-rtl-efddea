// tb_bank_arbiter: random heads for the read and write queue of one bank.
// The expected winner is computed in the testbench from the policy: a full
// write queue first, then an open-row hit, then the larger
// X*W_T + Y*BL + P (X=1, Y=2, P_read=16, P_write=0), read on a tie.
module tb_bank_arbiter;
  import memctrl_pkg::*;
  logic rd_valid, wr_valid, wr_full, row_open;
  packet_t rd_pkt, wr_pkt, win_pkt;
  logic [AGE_W-1:0] rd_age, wr_age;
  logic [ROW_W-1:0] open_row;
  logic win_valid, win_from_wq;
  logic [13:0] win_key;
  logic [11:0] rd_prio, wr_prio;
  int checks = 0, failures = 0;
  int n_hit_decided = 0, n_prio_decided = 0, n_forced = 0;

  bank_arbiter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int rp, wp; bit rh, wh, exp_wq;
      rd_valid = ($urandom_range(0, 5) != 0);
      wr_valid = ($urandom_range(0, 5) != 0);
      wr_full  = wr_valid && ($urandom_range(0, 9) == 0);
      row_open = 1'($urandom);
      open_row = 13'($urandom_range(0, 3));
      rd_pkt = '0; wr_pkt = '0;
      rd_pkt.we = ($urandom_range(0, 9) == 0);   // mostly reads
      wr_pkt.we = ($urandom_range(0, 4) != 0);   // some redirected reads
      rd_pkt.addr.row = 13'($urandom_range(0, 3));
      wr_pkt.addr.row = 13'($urandom_range(0, 3));
      rd_pkt.blen = 4'($urandom_range(1, 8));
      wr_pkt.blen = 4'($urandom_range(1, 8));
      rd_pkt.id = 6'(t); wr_pkt.id = 6'(t + 1);
      rd_age = 8'($urandom_range(0, 40));
      wr_age = 8'($urandom_range(0, 40));
      #1;
      rp = rd_age + 2 * rd_pkt.blen + (rd_pkt.we ? 0 : 16);
      wp = wr_age + 2 * wr_pkt.blen + (wr_pkt.we ? 0 : 16);
      rh = row_open && rd_pkt.addr.row == open_row;
      wh = row_open && wr_pkt.addr.row == open_row;
      if (!rd_valid) exp_wq = 1;
      else if (!wr_valid) exp_wq = 0;
      else if (wr_full) begin exp_wq = 1; n_forced++; end
      else if (rh != wh) begin exp_wq = wh; n_hit_decided++; end
      else begin exp_wq = wp > rp; n_prio_decided++; end
      check(32'(rd_prio) == rp, "read priority formula");
      check(32'(wr_prio) == wp, "write priority formula");
      check(win_valid == (rd_valid || wr_valid), "win_valid");
      if (rd_valid || wr_valid) begin
        check(win_from_wq == exp_wq, $sformatf("winner t=%0d", t));
        check(win_pkt == (exp_wq ? wr_pkt : rd_pkt), "winner packet");
        check(win_key[12] == (exp_wq ? wh : rh), "key hit bit");
      end
      #9;
    end
    check(n_forced > 0 && n_hit_decided > 0 && n_prio_decided > 0, "all rules exercised");
    $display("forced=%0d hit=%0d prio=%0d", n_forced, n_hit_decided, n_prio_decided);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
