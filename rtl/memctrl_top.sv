// memctrl_top: energy-aware SDRAM memory controller for an H.264/AVC encoder.
//
// Requests from the encoder (frame store, macroblock number, word offset,
// burst length, write data) pass through the address generator, which turns
// them into SDRAM bank/row/column packets, into the dynamic memory access
// scheduler: a read and a write burst queue plus a bank arbiter per bank.
// Each cycle the command path is free, the final burst selection picks a
// refresh or the best read/write proposal by the five-level precedence of
// refresh MUST > read > refresh NEED > write > refresh MAY. Accesses are
// executed by the command generator, refreshes by the auto refresh
// generator; the refresh counter and refresh priority generator decide how
// urgent refresh is. The bus activity monitor chooses open- or close-page
// operation from the bus utilisation and the row hit rate, and requests
// power-down after a run of idle cycles. The initialisation unit owns the
// SDRAM bus after reset. A built-in macroblock order generator can replace
// the encoder port and stream current-macroblock reads, two B-frames
// interleaved.
//
// This block structure is the document's; how the blocks hand over the SDRAM
// bus, and every width, depth and timing value, are this design's.
//
// Interface: req_valid/req_ready handshake (ready is low while the
// macroblock order generator runs). Read data returns on rd_valid with the
// request tag, in issue order. sdram is registered; dq_in is sampled
// CL+1 cycles after a read command is registered.
module memctrl_top
  import memctrl_pkg::*;
#(
  parameter int unsigned FRAME_W = 3,
  parameter int unsigned MB_W    = 13,
  parameter int unsigned OFF_W   = COL_W - 1,
  parameter int unsigned QDEPTH  = 8,
  parameter int unsigned T_INIT  = 20000,
  parameter int unsigned REFI    = 780,
  parameter int unsigned T_RFC   = 7,
  parameter int unsigned WINDOW      = 64,
  parameter int unsigned UTIL_THRESH = 8,
  parameter int unsigned HIT_PCT     = 50,
  parameter int unsigned IDLE_THRESH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // encoder request port
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic                     req_we,
  input  logic [FRAME_W-1:0]       req_frame,
  input  logic [MB_W-1:0]          req_mb,
  input  logic [OFF_W-1:0]         req_offset,
  input  logic [BLEN_W-1:0]        req_blen,
  input  logic [ID_W-1:0]          req_id,
  input  logic [MAX_BL-1:0][DW-1:0] req_wdata,
  // macroblock order generator
  input  logic                     seq_start,
  input  logic                     seq_pair,
  input  logic [FRAME_W-1:0]       seq_frame_a,
  input  logic [FRAME_W-1:0]       seq_frame_b,
  input  logic [MB_W-1:0]          seq_mb_count,
  output logic                     seq_busy,
  output logic                     seq_done,
  // read data
  output logic                     rd_valid,
  output logic [DW-1:0]            rd_data,
  output logic [ID_W-1:0]          rd_id,
  // SDRAM pins
  output sdram_bus_t               sdram,
  input  logic [DW-1:0]            dq_in,
  // status
  output logic                     init_done,
  output logic                     page_open,
  output logic                     in_pd,
  output sel_kind_e                sel_kind,
  output logic [3:0]               ref_backlog,
  output logic                     raw_redirect,
  output logic                     ev_hit,
  output logic                     ev_conflict
);
  localparam int unsigned PRIO_W = 12;

  // ---------------- request path ----------------
  logic               s_valid, s_ready;
  logic [FRAME_W-1:0] s_frame;
  logic [MB_W-1:0]    s_mb;
  logic [OFF_W-1:0]   s_off;
  logic [BLEN_W-1:0]  s_blen;
  logic [ID_W-1:0]    s_id;

  logic               in_valid;
  logic [FRAME_W-1:0] in_frame;
  logic [MB_W-1:0]    in_mb;
  logic [OFF_W-1:0]   in_off;
  packet_t            in_pkt;
  logic               in_ready, in_range;
  phys_addr_t         in_addr;
  logic               in_auto_pre;

  mb_order_gen #(.FRAME_W(FRAME_W), .MB_W(MB_W), .OFF_W(OFF_W)) u_order (
    .clk, .rst_n,
    .start(seq_start), .pair_mode(seq_pair), .frame_a(seq_frame_a),
    .frame_b(seq_frame_b), .mb_count(seq_mb_count),
    .busy(seq_busy), .done(seq_done),
    .req_valid(s_valid), .req_ready(s_ready),
    .req_frame(s_frame), .req_mb(s_mb), .req_offset(s_off),
    .req_blen(s_blen), .req_id(s_id)
  );

  always_comb begin
    in_valid = seq_busy ? s_valid  : req_valid;
    in_frame = seq_busy ? s_frame  : req_frame;
    in_mb    = seq_busy ? s_mb     : req_mb;
    in_off   = seq_busy ? s_off    : req_offset;
    in_pkt.we       = seq_busy ? 1'b0   : req_we;
    in_pkt.blen     = seq_busy ? s_blen : req_blen;
    in_pkt.id       = seq_busy ? s_id   : req_id;
    in_pkt.wdata    = seq_busy ? '0     : req_wdata;
    in_pkt.addr     = in_addr;
    in_pkt.auto_pre = in_auto_pre;
  end

  assign req_ready = !seq_busy && in_ready && init_done;
  assign s_ready   = in_ready && init_done;

  addr_gen #(.FRAME_W(FRAME_W), .MB_W(MB_W), .OFF_W(OFF_W)) u_agen (
    .frame(in_frame), .mb(in_mb), .offset(in_off), .page_open,
    .addr(in_addr), .auto_pre(in_auto_pre), .in_range
  );

  // ---------------- scheduler ----------------
  logic [NBANKS-1:0] row_open, win_valid, win_is_read;
  logic [ROW_W-1:0]  open_row [NBANKS];
  logic [PRIO_W+1:0] win_key  [NBANKS];
  packet_t           win_pkt  [NBANKS];
  logic              grant_access, grant_refresh, sched_pending;
  logic [BANK_W-1:0] sel_bank;

  dyn_scheduler #(.QDEPTH(QDEPTH), .PRIO_W(PRIO_W)) u_sched (
    .clk, .rst_n,
    .req_valid(in_valid && init_done), .req_ready(in_ready), .req_pkt(in_pkt),
    .row_open, .open_row,
    .win_valid, .win_is_read, .win_key, .win_pkt,
    .grant(grant_access), .grant_bank(sel_bank),
    .raw_redirect, .pending(sched_pending)
  );

  // ---------------- refresh ----------------
  refresh_urgency_t urg;
  logic             must_hold, ref_done, ref_busy, ref_drive, close_all, any_open, pre_ok;
  sdram_bus_t       ref_bus, cmd_bus, init_bus;

  refresh_counter #(.REFI(REFI), .BACKLOG_W(4)) u_rcnt (
    .clk, .rst_n, .enable(init_done), .ref_done, .backlog(ref_backlog), .tick()
  );

  refresh_priority #(.BACKLOG_W(4)) u_rprio (
    .clk, .rst_n, .backlog(ref_backlog), .urgency(urg), .must_hold
  );

  auto_refresh_gen #(.T_RFC(T_RFC)) u_aref (
    .clk, .rst_n, .grant(grant_refresh), .any_open, .pre_ok, .busy(ref_busy),
    .drive_bus(ref_drive), .bus(ref_bus), .ref_done, .close_all
  );

  // ---------------- final burst selection ----------------
  logic cmd_ready;

  final_select #(.PRIO_W(PRIO_W)) u_sel (
    .ready(init_done && cmd_ready && !ref_busy),
    .ref_must(must_hold), .ref_need(urg.need), .ref_may(urg.may),
    .win_valid, .win_is_read, .win_key,
    .kind(sel_kind), .bank(sel_bank),
    .grant_access, .grant_refresh
  );

  // ---------------- power and page mode ----------------
  logic pd_req;

  bus_activity_monitor #(.WINDOW(WINDOW), .UTIL_THRESH(UTIL_THRESH), .HIT_PCT(HIT_PCT),
                         .IDLE_THRESH(IDLE_THRESH)) u_bsam (
    .clk, .rst_n,
    .bus_active(sdram.cmd != CMD_NOP),
    .pending(sched_pending || in_valid || urg.may || ref_busy || !init_done),
    .acc_valid(grant_access), .acc_bank(win_pkt[sel_bank].addr.bank),
    .acc_row(win_pkt[sel_bank].addr.row),
    .page_open, .pd_req, .window_end()
  );

  // ---------------- command generation ----------------
  sdram_cmd_gen u_cmd (
    .clk, .rst_n,
    .start(grant_access), .pkt(win_pkt[sel_bank]), .ready(cmd_ready),
    .pd_req, .close_all,
    .bus(cmd_bus), .dq_in,
    .row_open, .open_row, .any_open, .pre_ok, .in_pd,
    .rd_valid, .rd_data, .rd_id,
    .ev_hit, .ev_conflict
  );

  init_unit #(.T_INIT(T_INIT), .T_RFC(T_RFC)) u_init (
    .clk, .rst_n, .bus(init_bus), .done(init_done)
  );

  // SDRAM bus ownership: initialisation, then refresh or access commands.
  always_comb begin
    if (!init_done)     sdram = init_bus;
    else if (ref_drive) sdram = '{cke: cmd_bus.cke, cmd: ref_bus.cmd, ba: ref_bus.ba,
                                  a: ref_bus.a, dq_oe: 1'b0, dq_out: '0};
    else                sdram = cmd_bus;
  end

  a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                               (in_valid && in_ready && init_done) |-> in_range);
endmodule
