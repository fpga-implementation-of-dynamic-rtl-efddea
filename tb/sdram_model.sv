// sdram_model: behavioural model of a single-data-rate SDRAM for simulation.
//
// Not synthesizable logic: a checking model of the memory device. It samples
// the command bus on every rising edge, keeps per-bank open-row state and
// the time of the last ACTIVATE/PRECHARGE, and stores written words in a
// sparse array. Read data is driven on dq CL cycles after the READ command is
// sampled, for one cycle. Protocol errors (column access to a closed bank or
// to the wrong row, ACTIVATE on an open bank, tRCD/tRP/tRAS/tWR/tRFC
// violations, commands during power-down, DQ contention) are counted in
// errors. A write with auto-precharge starts its precharge tWR after the
// write. Nothing is checked while rst_n is low. Counters report refreshes,
// activates, precharges and power-down cycles.
module sdram_model
  import memctrl_pkg::*;
#(
  parameter int unsigned CL    = 2,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RAS = 5,
  parameter int unsigned T_WR  = 2,
  parameter int unsigned T_RFC = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  sdram_bus_t bus,
  output logic [DW-1:0] dq,
  output int         errors,
  output int         n_ref,
  output int         n_act,
  output int         n_pre,
  output int         n_rd,
  output int         n_wr,
  output int         pd_cycles,
  output logic       mode_set
);
  logic [DW-1:0]     mem [logic [BANK_W+ROW_W+COL_W-1:0]];
  logic [NBANKS-1:0] open_q;
  logic [ROW_W-1:0]  row_q [NBANKS];
  longint            t_act [NBANKS];
  longint            t_pre [NBANKS];
  longint            t_wr  [NBANKS];
  longint            t_ref, now;
  logic [CL-1:0]     rv;
  logic [DW-1:0]     rdat [CL];

  initial begin
    errors = 0; n_ref = 0; n_act = 0; n_pre = 0; n_rd = 0; n_wr = 0;
    pd_cycles = 0; mode_set = 1'b0; open_q = '0; now = 0; t_ref = -100; rv = '0;
    for (int b = 0; b < NBANKS; b++) begin t_act[b] = -100; t_pre[b] = -100; t_wr[b] = -100; row_q[b] = '0; end
    for (int i = 0; i < CL; i++) rdat[i] = '0;
  end

  assign dq = rdat[CL-1];

  task automatic err(string what);
    errors++;
    $display("SDRAM model error at cycle %0d: %s", now, what);
  endtask

  always @(posedge clk) if (rst_n) begin
    logic [BANK_W+ROW_W+COL_W-1:0] key;
    now++;
    // read pipeline
    for (int i = CL-1; i > 0; i--) begin rv[i] <= rv[i-1]; rdat[i] <= rdat[i-1]; end
    rv[0] <= 1'b0;
    if (!bus.cke) pd_cycles++;
    if (bus.dq_oe && rv[CL-1]) err("DQ contention");
    if (!bus.cke && bus.cmd != CMD_NOP) err("command during power-down");
    if (bus.cmd != CMD_NOP && bus.cmd != CMD_DESL && now - t_ref < longint'(T_RFC) && bus.cmd != CMD_MRS)
      err("command inside tRFC");
    key = {bus.ba, row_q[bus.ba], bus.a[COL_W-1:0]};
    unique case (bus.cmd)
      CMD_ACT: begin
        n_act++;
        if (open_q[bus.ba]) err("ACTIVATE to open bank");
        if (now - t_pre[bus.ba] < longint'(T_RP)) err("tRP violated");
        open_q[bus.ba] = 1'b1; row_q[bus.ba] = bus.a; t_act[bus.ba] = now;
      end
      CMD_PRE: begin
        n_pre++;
        for (int b = 0; b < NBANKS; b++)
          if (bus.a[10] || bus.ba == BANK_W'(b)) begin
            if (open_q[b] && now - t_act[b] < longint'(T_RAS)) err("tRAS violated");
            if (open_q[b] && now - t_wr[b] < longint'(T_WR)) err("tWR violated");
            open_q[b] = 1'b0; t_pre[b] = now;
          end
      end
      CMD_RD, CMD_WR: begin
        if (!open_q[bus.ba]) err("column access to closed bank");
        if (now - t_act[bus.ba] < longint'(T_RCD)) err("tRCD violated");
        key = {bus.ba, row_q[bus.ba], bus.a[COL_W-1:0]};
        if (bus.cmd == CMD_WR) begin
          n_wr++;
          if (!bus.dq_oe) err("write without data");
          mem[key] = bus.dq_out;
          t_wr[bus.ba] = now;
        end else begin
          n_rd++;
          rv[0]   <= 1'b1;
          rdat[0] <= mem.exists(key) ? mem[key] : '0;
        end
        if (bus.a[10]) begin
          open_q[bus.ba] = 1'b0;
          t_pre[bus.ba]  = now + ((bus.cmd == CMD_WR) ? longint'(T_WR) : 0);
        end
      end
      CMD_REF: begin
        n_ref++;
        if (open_q != '0) err("REFRESH with open bank");
        for (int b = 0; b < NBANKS; b++)
          if (now - t_pre[b] < longint'(T_RP)) err("tRP violated before REFRESH");
        t_ref = now;
      end
      CMD_MRS: mode_set = 1'b1;
      default: ;
    endcase
    if (bus.cmd != CMD_RD) rdat[0] <= '0;
  end
endmodule
