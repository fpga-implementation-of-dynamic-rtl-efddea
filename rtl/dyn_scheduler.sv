// dyn_scheduler: dynamic memory access scheduler (queues and bank arbiters).
//
// Every bank has a read burst queue, a write burst queue and a bank arbiter.
// An incoming packet is steered by its bank address: a write joins the
// bank's write queue. A read first searches that write queue for a queued
// packet to the same physical address; if there is one the read joins the
// write queue behind it, so it is served after the write and returns the new
// data (read-after-write hazard). Otherwise it joins the read queue. Because
// each queue is served strictly in arrival order, two writes to one address
// are never reordered (write-after-write). Each bank arbiter proposes one
// packet per cycle; the final burst selection picks among the banks and
// answers with grant, which pops the proposed packet from its queue.
//
// The structure (queues per bank, arbiter per bank, redirect of hazardous
// reads) is the document's. "Same physical address" is taken as "column
// ranges of the two bursts overlap in the same row", which includes equal
// start addresses. Queue depth and the number of banks are this design's.
//
// Interface: req_valid/req_ready handshake, a packet is taken on a clock edge
// with both high. req_ready depends combinationally on req_pkt (it looks at
// the target queue). Proposals (win_*) are combinational from queue state.
module dyn_scheduler
  import memctrl_pkg::*;
#(
  parameter int unsigned QDEPTH = 8,
  parameter int unsigned PRIO_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  // new accesses
  input  logic              req_valid,
  output logic              req_ready,
  input  packet_t           req_pkt,
  // open-row state from the command generator
  input  logic [NBANKS-1:0] row_open,
  input  logic [ROW_W-1:0]  open_row [NBANKS],
  // per-bank proposals
  output logic [NBANKS-1:0] win_valid,
  output logic [NBANKS-1:0] win_is_read,
  output logic [PRIO_W+1:0] win_key [NBANKS],
  output packet_t           win_pkt [NBANKS],
  // grant of one bank's proposal
  input  logic              grant,
  input  logic [BANK_W-1:0] grant_bank,
  // status
  output logic              raw_redirect,   // a read joined a write queue this cycle
  output logic              pending         // any packet queued
);
  logic [NBANKS-1:0] rq_valid, wq_valid, wq_full, rq_full, wq_hit, rq_empty, wq_empty;
  packet_t           rq_pkt [NBANKS];
  packet_t           wq_pkt [NBANKS];
  logic [AGE_W-1:0]  rq_age [NBANKS];
  logic [AGE_W-1:0]  wq_age [NBANKS];
  logic [NBANKS-1:0] from_wq;
  logic [NBANKS-1:0] rq_push, wq_push, rq_pop, wq_pop;

  wire [BANK_W-1:0] tgt     = req_pkt.addr.bank;
  wire              to_wq   = req_pkt.we || wq_hit[tgt];

  assign req_ready    = to_wq ? !wq_full[tgt] : !rq_full[tgt];
  assign raw_redirect = req_valid && req_ready && !req_pkt.we && wq_hit[tgt];
  assign pending      = !(&rq_empty) || !(&wq_empty);

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    assign rq_push[b] = req_valid && req_ready && (tgt == BANK_W'(b)) && !to_wq;
    assign wq_push[b] = req_valid && req_ready && (tgt == BANK_W'(b)) &&  to_wq;
    assign rq_pop[b]  = grant && (grant_bank == BANK_W'(b)) && !from_wq[b];
    assign wq_pop[b]  = grant && (grant_bank == BANK_W'(b)) &&  from_wq[b];

    burst_queue #(.DEPTH(QDEPTH)) u_rq (
      .clk, .rst_n,
      .push(rq_push[b]), .push_pkt(req_pkt), .pop(rq_pop[b]),
      .head_valid(rq_valid[b]), .head_pkt(rq_pkt[b]), .head_age(rq_age[b]),
      .full(rq_full[b]), .empty(rq_empty[b]), .count(),
      .search_addr(req_pkt.addr), .search_blen(req_pkt.blen), .search_hit()
    );

    burst_queue #(.DEPTH(QDEPTH)) u_wq (
      .clk, .rst_n,
      .push(wq_push[b]), .push_pkt(req_pkt), .pop(wq_pop[b]),
      .head_valid(wq_valid[b]), .head_pkt(wq_pkt[b]), .head_age(wq_age[b]),
      .full(wq_full[b]), .empty(wq_empty[b]), .count(),
      .search_addr(req_pkt.addr), .search_blen(req_pkt.blen), .search_hit(wq_hit[b])
    );

    bank_arbiter #(.PRIO_W(PRIO_W)) u_arb (
      .rd_valid(rq_valid[b]), .rd_pkt(rq_pkt[b]), .rd_age(rq_age[b]),
      .wr_valid(wq_valid[b]), .wr_pkt(wq_pkt[b]), .wr_age(wq_age[b]),
      .wr_full(wq_full[b]),
      .row_open(row_open[b]), .open_row(open_row[b]),
      .win_valid(win_valid[b]), .win_from_wq(from_wq[b]),
      .win_pkt(win_pkt[b]), .win_key(win_key[b]),
      .rd_prio(), .wr_prio()
    );

    assign win_is_read[b] = !win_pkt[b].we;
  end

  a_grant_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                  grant |-> win_valid[grant_bank]);
endmodule
