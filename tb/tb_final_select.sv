// tb_final_select: random refresh urgencies and per-bank proposals. The
// expected decision is the five-level order MUST > read (unless a write key
// is larger) > NEED > write > MAY, computed in the testbench; the chosen bank
// must hold the largest key of its kind (lowest bank on a tie).
module tb_final_select;
  import memctrl_pkg::*;
  logic ready, ref_must, ref_need, ref_may;
  logic [NBANKS-1:0] win_valid, win_is_read;
  logic [13:0] win_key [NBANKS];
  sel_kind_e kind;
  logic [BANK_W-1:0] bank;
  logic grant_access, grant_refresh;
  int checks = 0, failures = 0;
  int seen [sel_kind_e];

  final_select dut (.*);

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
      int rb, wb, rk, wk; sel_kind_e ek; int eb;
      ready    = ($urandom_range(0, 7) != 0);
      ref_must = ($urandom_range(0, 9) == 0);
      ref_need = ($urandom_range(0, 4) == 0);
      ref_may  = 1'($urandom);
      for (int b = 0; b < NBANKS; b++) begin
        win_valid[b]   = ($urandom_range(0, 2) == 0);
        win_is_read[b] = 1'($urandom);
        win_key[b]     = 14'($urandom_range(0, 12));
      end
      #1;
      rb = -1; wb = -1; rk = -1; wk = -1;
      for (int b = 0; b < NBANKS; b++) if (win_valid[b]) begin
        if (win_is_read[b] && int'(win_key[b]) > rk) begin rk = win_key[b]; rb = b; end
        if (!win_is_read[b] && int'(win_key[b]) > wk) begin wk = win_key[b]; wb = b; end
      end
      eb = 0;
      if (!ready) ek = SEL_NONE;
      else if (ref_must) ek = SEL_REF_MUST;
      else if (rb >= 0 && rk >= wk) begin ek = SEL_READ; eb = rb; end
      else if (ref_need) ek = SEL_REF_NEED;
      else if (wb >= 0) begin ek = SEL_WRITE; eb = wb; end
      else if (ref_may) ek = SEL_REF_MAY;
      else ek = SEL_NONE;
      check(kind == ek, $sformatf("kind %s expected %s", kind.name(), ek.name()));
      if (ek == SEL_READ || ek == SEL_WRITE) check(32'(bank) == eb, "bank");
      check(grant_access == (ek == SEL_READ || ek == SEL_WRITE), "grant_access");
      check(grant_refresh == (ek == SEL_REF_MUST || ek == SEL_REF_NEED || ek == SEL_REF_MAY),
            "grant_refresh");
      seen[ek]++;
      #9;
    end
    check(seen.num() == 6, "every decision kind occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
