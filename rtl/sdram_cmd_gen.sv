// sdram_cmd_gen: command generator behind the final burst selection.
//
// Executes one selected burst packet at a time on the SDRAM command, address
// and data buses, and keeps the open-row state of every bank:
//   row hit      -> column commands only,
//   row empty    -> ACTIVATE, wait tRCD, column commands,
//   row conflict -> PRECHARGE (after tRAS and tWR), wait tRP, ACTIVATE, ...
// A burst of BL words is BL consecutive column commands in one row, one word
// each. In close-page mode (auto_pre set by the address generator) the last
// column command carries auto-precharge (a[10]) and the bank is marked
// closed. The block also owns the clock-enable pin: while it is idle and
// pd_req is high it drops CKE (power-down) and raises it again, with a tXP
// wait, when pd_req falls. Read data is captured CAS-latency cycles after the
// column command and returned with the packet's tag. Every burst returns to
// idle right after its last column command. Write recovery and tRAS are
// tracked by counters and checked before any precharge; a per-bank timer
// holds the next ACTIVATE of a bank until its precharge (explicit, or auto
// precharge tWR after a write) has had tRP, so a packet for another bank can
// start at once. pre_ok tells the refresh generator when a precharge-all or
// refresh is allowed: tRAS and tWR met and no bank still precharging.
// Power-down entry waits for it too.
//
// The command sequence follows the precharge/activate/column description of
// DRAM accesses; the one-packet-at-a-time execution, the timing values (at an
// assumed 100 MHz) and the single-data-rate bus are this design's choices.
//
// Interface: start is accepted when ready is high (one-cycle pulse). Bus
// outputs are registered. close_all marks every bank closed (a precharge-all
// issued elsewhere). Read data: rd_valid pulses once per word, in order.
module sdram_cmd_gen
  import memctrl_pkg::*;
#(
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RAS = 5,
  parameter int unsigned T_WR  = 2,
  parameter int unsigned CL    = 2,
  parameter int unsigned T_XP  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  packet_t           pkt,
  output logic              ready,
  input  logic              pd_req,
  input  logic              close_all,
  output sdram_bus_t        bus,
  input  logic [DW-1:0]     dq_in,
  output logic [NBANKS-1:0] row_open,
  output logic [ROW_W-1:0]  open_row [NBANKS],
  output logic              any_open,
  output logic              pre_ok,      // tRAS and tWR met: precharge allowed
  output logic              in_pd,
  output logic              rd_valid,
  output logic [DW-1:0]     rd_data,
  output logic [ID_W-1:0]   rd_id,
  // event strobes
  output logic              ev_hit,       // burst started on an open row
  output logic              ev_conflict   // burst needed a precharge first
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_ACT, S_TRCD, S_COL, S_PD, S_XP} state_e;

  localparam int unsigned CW = 4;

  state_e            state;
  packet_t           cur;
  logic [BLEN_W-1:0] idx;
  logic [CW-1:0]     wait_cnt;
  logic [CW-1:0]     since_act, since_wr, since_rd;
  logic [CW-1:0]     bank_cnt [NBANKS];  // cycles until the bank may be activated
  logic              rw_ok, banks_idle;
  logic [CL:0]       rd_pipe_v;
  logic [ID_W-1:0]   rd_pipe_id [CL+1];

  assign ready    = (state == S_IDLE) && bus.cke;
  assign in_pd    = (state == S_PD);
  assign any_open = |row_open;
  assign rw_ok    = (32'(since_act) >= T_RAS) && (32'(since_wr) >= T_WR);
  always_comb begin
    banks_idle = 1'b1;
    for (int b = 0; b < NBANKS; b++) if (bank_cnt[b] != '0) banks_idle = 1'b0;
  end
  assign pre_ok   = rw_ok && banks_idle;

  function automatic logic [CW-1:0] sat_inc(logic [CW-1:0] v);
    return (v == '1) ? v : v + 1'b1;
  endfunction

  wire pkt_hit       = row_open[pkt.addr.bank] && (open_row[pkt.addr.bank] == pkt.addr.row);
  wire last_col      = (idx == cur.blen - 1'b1);
  // a write may not put data on DQ while read data is still returning
  wire wr_blocked    = cur.we && (32'(since_rd) < CL + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      idx       <= '0;
      wait_cnt  <= '0;
      since_act <= '1;
      since_wr  <= '1;
      since_rd  <= '1;
      bus       <= SDRAM_BUS_IDLE;
      row_open  <= '0;
      for (int b = 0; b < NBANKS; b++) open_row[b] <= '0;
      for (int b = 0; b < NBANKS; b++) bank_cnt[b] <= '0;
      ev_hit      <= 1'b0;
      ev_conflict <= 1'b0;
    end else begin
      bus.cmd    <= CMD_NOP;
      bus.dq_oe  <= 1'b0;
      ev_hit      <= 1'b0;
      ev_conflict <= 1'b0;
      since_act  <= sat_inc(since_act);
      since_wr   <= sat_inc(since_wr);
      since_rd   <= sat_inc(since_rd);
      if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
      for (int b = 0; b < NBANKS; b++)
        if (bank_cnt[b] != '0) bank_cnt[b] <= bank_cnt[b] - 1'b1;
      if (close_all) row_open <= '0;

      unique case (state)
        S_IDLE: begin
          if (start && bus.cke) begin
            cur <= pkt;
            idx <= '0;
            ev_hit      <= pkt_hit;
            ev_conflict <= row_open[pkt.addr.bank] && !pkt_hit;
            if (pkt_hit)                      state <= S_COL;
            else if (row_open[pkt.addr.bank]) state <= S_PRE;
            else                              state <= S_ACT;
          end else if (pd_req && pre_ok) begin
            bus.cke <= 1'b0;
            state   <= S_PD;
          end
        end
        S_PRE: if (rw_ok) begin
          bus.cmd   <= CMD_PRE;
          bus.ba    <= cur.addr.bank;
          bus.a     <= '0;
          row_open[cur.addr.bank] <= 1'b0;
          bank_cnt[cur.addr.bank] <= CW'(T_RP - 1);
          state     <= S_ACT;
        end
        S_ACT: if (bank_cnt[cur.addr.bank] == '0) begin
          bus.cmd   <= CMD_ACT;
          bus.ba    <= cur.addr.bank;
          bus.a     <= cur.addr.row;
          row_open[cur.addr.bank] <= 1'b1;
          open_row[cur.addr.bank] <= cur.addr.row;
          since_act <= '0;
          wait_cnt  <= CW'(T_RCD - 1);
          state     <= S_TRCD;
        end
        S_TRCD: if (wait_cnt == '0) state <= S_COL;
        S_COL: if (!wr_blocked) begin
          bus.cmd    <= cur.we ? CMD_WR : CMD_RD;
          bus.ba     <= cur.addr.bank;
          bus.a      <= ROW_W'(cur.addr.col + COL_W'(idx));
          bus.a[10]  <= last_col && cur.auto_pre;
          bus.dq_oe  <= cur.we;
          bus.dq_out <= cur.wdata[idx];
          if (cur.we) since_wr <= '0;
          else        since_rd <= '0;
          idx <= idx + 1'b1;
          if (last_col) begin
            if (cur.auto_pre) begin
              row_open[cur.addr.bank] <= 1'b0;
              // the device precharges after the write recovery time
              bank_cnt[cur.addr.bank] <= CW'((cur.we ? T_WR : 0) + T_RP - 1);
            end
            state <= S_IDLE;
          end
        end
        S_PD: if (!pd_req) begin
          bus.cke  <= 1'b1;
          wait_cnt <= CW'(T_XP);
          state    <= S_XP;
        end
        S_XP: if (wait_cnt == '0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // read return: a tag travels CL+1 stages, then the word on DQ is captured
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pipe_v <= '0;
      for (int i = 0; i <= CL; i++) rd_pipe_id[i] <= '0;
      rd_valid  <= 1'b0;
      rd_data   <= '0;
      rd_id     <= '0;
    end else begin
      rd_pipe_v[0]  <= (state == S_COL) && !cur.we;
      rd_pipe_id[0] <= cur.id;
      for (int i = 1; i <= CL; i++) begin
        rd_pipe_v[i]  <= rd_pipe_v[i-1];
        rd_pipe_id[i] <= rd_pipe_id[i-1];
      end
      rd_valid <= rd_pipe_v[CL];
      rd_data  <= dq_in;
      rd_id    <= rd_pipe_id[CL];
    end
  end

  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                       start |-> ready);
endmodule
