// tb_addr_gen: checks the macroblock-to-SDRAM mapping. For random and corner
// macroblocks of an 8160-macroblock frame the testbench computes
// bank = (mb/2) mod 4, row = frame*1020 + mb/8, col = (mb mod 2)*256 + offset
// and checks that two macroblocks share each row, that no two
// (frame, mb) pairs map to the same row slot, and the page-policy flag.
module tb_addr_gen;
  import memctrl_pkg::*;
  logic [2:0] frame;
  logic [12:0] mb;
  logic [7:0] offset;
  logic page_open, auto_pre, in_range;
  phys_addr_t addr;
  int checks = 0, failures = 0;
  bit used [logic [BANK_W+ROW_W:0]];

  addr_gen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive over one frame store (offset 0) plus the last frame store
    for (int f = 0; f < 8; f += 7) begin
      for (int m = 0; m < 8160; m++) begin
        frame = 3'(f); mb = 13'(m); offset = 8'($urandom_range(0, 191));
        page_open = 1'($urandom);
        #1;
        check(int'(addr.bank) == (m / 2) % 4, "bank");
        check(int'(addr.row) == f * 1020 + m / 8, "row");
        check(int'(addr.col) == (m % 2) * 256 + int'(offset), "col");
        check(auto_pre == !page_open, "auto_pre");
        check(in_range, "in range");
        begin
          logic [BANK_W+ROW_W:0] slot;
          slot = {addr.bank, addr.row, addr.col[8]};
          check(!used.exists(slot), "slot used twice");
          used[slot] = 1;
        end
      end
    end
    mb = 13'd8160; frame = 0; #1;
    check(!in_range, "mb past the frame is out of range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
