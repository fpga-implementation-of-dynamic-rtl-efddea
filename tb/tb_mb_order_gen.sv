// tb_mb_order_gen: runs a B-pair job and a single-frame job and compares the
// request stream, with random back-pressure, against the expected order:
// for each macroblock, all bursts of frame_a then all bursts of frame_b,
// 192 words per macroblock in bursts of 8 words.
module tb_mb_order_gen;
  import memctrl_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, pair_mode = 0;
  logic [2:0] frame_a = 0, frame_b = 0, req_frame;
  logic [12:0] mb_count = 0, req_mb;
  logic busy, done, req_valid, req_ready = 0;
  logic [7:0] req_offset;
  logic [BLEN_W-1:0] req_blen;
  logic [ID_W-1:0] req_id;
  int checks = 0, failures = 0;

  mb_order_gen dut (.*);

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

  task automatic run(bit pm, int fa, int fb, int n);
    int exp_f [$], exp_m [$], exp_o [$];
    int got = 0, ndone = 0;
    for (int m = 0; m < n; m++)
      for (int k = 0; k < (pm ? 2 : 1); k++)
        for (int o = 0; o < 192; o += 8) begin
          exp_f.push_back(k ? fb : fa); exp_m.push_back(m); exp_o.push_back(o);
        end
    @(negedge clk);
    pair_mode = pm; frame_a = 3'(fa); frame_b = 3'(fb); mb_count = 13'(n); start = 1;
    @(negedge clk); start = 0;
    while (busy || done) begin
      req_ready = 1'($urandom);
      if (done) ndone++;
      if (req_valid && req_ready) begin
        check(got < exp_f.size(), "too many requests");
        if (got < exp_f.size()) begin
          check(int'(req_frame) == exp_f[got] && int'(req_mb) == exp_m[got] &&
                int'(req_offset) == exp_o[got],
                $sformatf("request %0d: f%0d mb%0d off%0d", got, req_frame, req_mb, req_offset));
          check(req_blen == 8, "burst length");
        end
        got++;
      end
      @(negedge clk);
    end
    check(got == exp_f.size(), $sformatf("request count %0d", got));
    check(ndone == 1, "one done pulse");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(1, 2, 3, 5);
    run(0, 6, 0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
