// tb_bus_activity_monitor: drives bus activity and burst starts of known
// density and row locality, and checks the page mode chosen at each window
// end against a reference computed in the testbench (utilisation threshold
// and per-bank row-locality hit percentage), and that pd_req rises exactly
// IDLE_THRESH idle cycles after the last activity and falls with pending.
// Four phases repeat: busy with good locality (open page), sparse (close),
// silent (power-down), busy with random rows (close on hit rate alone).
module tb_bus_activity_monitor;
  import memctrl_pkg::*;
  localparam int WINDOW = 16, UTIL = 4, HIT = 50, IDLE = 6;
  logic clk = 0, rst_n = 0, bus_active = 0, pending = 0, acc_valid = 0;
  phys_addr_t acc_addr = '0;
  logic page_open, pd_req, window_end;
  int checks = 0, failures = 0, busy_in_win = 0, idle_run = 0;
  int acc_in_win = 0, hit_in_win = 0;
  int n_open = 0, n_close = 0, n_pd = 0, n_hit_close = 0;
  logic [ROW_W-1:0] ref_row [NBANKS];
  bit ref_vld [NBANKS];

  bus_activity_monitor #(.WINDOW(WINDOW), .UTIL_THRESH(UTIL), .HIT_PCT(HIT),
                         .IDLE_THRESH(IDLE)) dut (
    .*, .acc_bank(acc_addr.bank), .acc_row(acc_addr.row));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit exp_open = 1;
    automatic int wcnt = 0;
    for (int b = 0; b < NBANKS; b++) begin ref_vld[b] = 0; ref_row[b] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 6400; cyc++) begin
      int phase;
      bit hit;
      phase = (cyc / 400) % 4;
      @(negedge clk);
      check(page_open == exp_open, $sformatf("page mode at cycle %0d", cyc));
      check(pd_req == (idle_run >= IDLE && !pending) , $sformatf("pd_req at cycle %0d", cyc));
      // phase 0: busy, local; 1: sparse; 2: silent; 3: busy, random rows
      bus_active = (phase == 0 || phase == 3) ? ($urandom_range(0, 1) == 0) :
                   (phase == 1) ? ($urandom_range(0, 15) == 0) : 1'b0;
      pending    = (phase == 2) ? ($urandom_range(0, 63) == 0) : ($urandom_range(0, 3) == 0);
      acc_valid  = bus_active && ($urandom_range(0, 2) == 0);
      acc_addr.bank = BANK_W'($urandom_range(0, NBANKS - 1));
      acc_addr.col  = COL_W'($urandom);
      acc_addr.row  = (phase == 3) ? ROW_W'($urandom) :
                      ROW_W'({acc_addr.bank, 2'b00} + ($urandom_range(0, 7) == 0 ? 1 : 0));
      #1;
      check(pd_req == (idle_run >= IDLE && !pending), "pd_req drops with pending");
      if (pd_req) n_pd++;
      @(posedge clk);
      // reference model
      hit = acc_valid && ref_vld[acc_addr.bank] && ref_row[acc_addr.bank] == acc_addr.row;
      if (wcnt == WINDOW - 1) begin
        int u, a, h;
        u = busy_in_win + bus_active;
        a = acc_in_win + acc_valid;
        h = hit_in_win + hit;
        exp_open = (u >= UTIL) && (h * 100 >= HIT * a);
        if (exp_open) n_open++; else n_close++;
        if (u >= UTIL && !exp_open) n_hit_close++;
        busy_in_win = 0; acc_in_win = 0; hit_in_win = 0; wcnt = 0;
      end else begin
        busy_in_win += bus_active; acc_in_win += acc_valid; hit_in_win += hit; wcnt++;
      end
      if (acc_valid) begin ref_row[acc_addr.bank] = acc_addr.row; ref_vld[acc_addr.bank] = 1; end
      if (bus_active || pending) idle_run = 0; else if (idle_run < IDLE) idle_run++;
    end
    check(n_open > 0 && n_close > 0 && n_pd > 0, "both page modes and power-down occurred");
    check(n_hit_close > 0, "close page chosen on a low hit rate alone");
    $display("open %0d close %0d (hit rate %0d) pd %0d", n_open, n_close, n_hit_close, n_pd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
