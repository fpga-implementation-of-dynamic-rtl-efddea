// tb_hdtv_workload: HDTV encoder traffic through the controller at its
// default parameters, with throughput measured.
// For each current macroblock the encoder model issues, as 8-word bursts:
//   - the current-macroblock store:        192 words written to frame 0,
//   - the motion-estimation reference fetch with level-C reuse:
//     2*Pv/N + 1 = 3 reference macroblocks (Pv = 16, N = 16) read from
//     frame 1 (macroblocks m-1, m, m+1 of the row above, clamped),
//   - the loop-filtered reconstruction:    192 words written to frame 2.
// Reference frame 1 is written first (not timed). Every read word is checked
// against a memory image; the SDRAM model checks protocol and timing. The
// bus efficiency (words moved / cycles) must be at least 60 %. The derived
// 1080p frame rate at 100 MHz is printed; at 960 words per macroblock and a
// 16-bit bus it stays well below 30 frames/s.
module tb_hdtv_workload;
  import memctrl_pkg::*;
  localparam int NMB = 48;            // current macroblocks timed
  localparam int MB_PER_ROW = 120;    // 1920 / 16
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [2:0] req_frame = 0;
  logic [12:0] req_mb = 0;
  logic [7:0] req_offset = 0;
  logic [BLEN_W-1:0] req_blen = 8;
  logic [ID_W-1:0] req_id = 0, rd_id;
  logic [MAX_BL-1:0][DW-1:0] req_wdata = '0;
  logic seq_busy, seq_done, rd_valid, init_done, page_open, in_pd, raw_redirect, ev_hit, ev_conflict;
  logic [DW-1:0] rd_data, dq_in;
  sdram_bus_t sdram;
  sel_kind_e sel_kind;
  logic [3:0] ref_backlog;
  int errors, n_ref, n_act, n_pre, n_rd, n_wr, pd_cycles;
  logic mode_set;
  int checks = 0, failures = 0, next_id = 0;
  longint cyc = 0;

  logic [DW-1:0] img [int];
  logic [DW-1:0] exp_by_id [int][$];

  memctrl_top dut (.clk, .rst_n, .req_valid, .req_ready, .req_we, .req_frame, .req_mb,
                   .req_offset, .req_blen, .req_id, .req_wdata,
                   .seq_start(1'b0), .seq_pair(1'b0), .seq_frame_a(3'd0), .seq_frame_b(3'd0),
                   .seq_mb_count(13'd0), .seq_busy, .seq_done, .rd_valid, .rd_data, .rd_id,
                   .sdram, .dq_in, .init_done, .page_open, .in_pd, .sel_kind, .ref_backlog,
                   .raw_redirect, .ev_hit, .ev_conflict);
  sdram_model mem (.clk, .rst_n, .bus(sdram), .dq(dq_in), .errors, .n_ref, .n_act, .n_pre,
                   .n_rd, .n_wr, .pd_cycles, .mode_set);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && rd_valid) begin
    check(exp_by_id.exists(int'(rd_id)) && exp_by_id[int'(rd_id)].size() > 0, "unexpected read word");
    if (exp_by_id.exists(int'(rd_id)) && exp_by_id[int'(rd_id)].size() > 0) begin
      check(rd_data == exp_by_id[int'(rd_id)].pop_front(), "read word");
      if (exp_by_id[int'(rd_id)].size() == 0) exp_by_id.delete(int'(rd_id));
    end
  end

  task automatic burst(bit we, int f, int m, int o);
    automatic int a = (f << 16) | (m << 8) | o;
    if (!we) while (exp_by_id.exists(next_id)) @(negedge clk);
    req_valid = 1; req_we = we; req_frame = 3'(f); req_mb = 13'(m); req_offset = 8'(o);
    req_blen = 8; req_id = 6'(next_id);
    for (int i = 0; i < 8; i++) req_wdata[i] = 16'($urandom);
    forever begin #1; if (req_ready) break; @(negedge clk); end
    @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      if (we) img[a + i] = req_wdata[i];
      else exp_by_id[next_id].push_back(img.exists(a + i) ? img[a + i] : '0);
    end
    if (!we) next_id = (next_id + 1) % 64;
    @(negedge clk); req_valid = 0;
  endtask

  task automatic whole_mb(bit we, int f, int m);
    for (int o = 0; o < 192; o += 8) burst(we, f, m, o);
  endtask

  initial begin
    longint t0, t1; int words; real eff, fps;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (init_done);
    @(negedge clk);
    // reference frame: the macroblock row above the timed ones
    for (int m = 0; m < NMB + 1; m++) whole_mb(1, 1, m);
    while (exp_by_id.num() > 0 || dut.sched_pending) @(negedge clk);
    repeat (50) @(negedge clk);
    t0 = cyc;
    for (int m = 0; m < NMB; m++) begin
      whole_mb(1, 0, MB_PER_ROW + m);                         // current MB store
      for (int k = -1; k <= 1; k++) whole_mb(0, 1, (m + k < 0) ? 0 : m + k);  // 2Pv/N+1 = 3
      whole_mb(1, 2, MB_PER_ROW + m);                         // reconstruction
    end
    while (exp_by_id.num() > 0 || dut.sched_pending || !dut.cmd_ready) @(negedge clk);
    t1 = cyc;
    words = NMB * 5 * 192;
    eff  = real'(words) / real'(t1 - t0);
    fps  = 100.0e6 / (real'(t1 - t0) / NMB * 8160.0);
    $display("%0d words in %0d cycles: efficiency %0.3f, %0.1f cycles per macroblock, %0.1f frames/s of 1080p at 100 MHz",
             words, t1 - t0, eff, real'(t1 - t0) / NMB, fps);
    check(eff >= 0.60, "bus efficiency at least 60 %");
    check(errors == 0, $sformatf("SDRAM model protocol errors: %0d", errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
