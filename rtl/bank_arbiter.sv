// bank_arbiter: chooses the next burst of one bank.
//
// Looks at the heads of the bank's read and write burst queues and picks one
// of them. The order of the tests follows the scheduling policy:
//   1. a full write queue is drained first, so writes can still be accepted
//      (this design's reading of the "queue full" rule, see below);
//   2. a burst to the row already open in the bank beats one that is not;
//   3. otherwise the higher Priority = X*W_T + Y*BL + P wins, where W_T is
//      the cycles the packet has waited, BL its burst length and P the
//      read/write priority (reads above writes). Ties go to the read queue.
// The winner is reported with a sort key {forced, row_hit, priority} that the
// final burst selection uses to compare winners of different banks. The
// formula and its terms are the document's; the coefficient values and the
// key layout are this design's. A read that was redirected into the write
// queue (read-after-write) is scored with the read priority.
//
// Interface: purely combinational.
module bank_arbiter
  import memctrl_pkg::*;
#(
  parameter int unsigned X_COEF  = 1,
  parameter int unsigned Y_COEF  = 2,
  parameter int unsigned P_READ  = 16,
  parameter int unsigned P_WRITE = 0,
  parameter int unsigned PRIO_W  = 12
) (
  input  logic              rd_valid,
  input  packet_t           rd_pkt,
  input  logic [AGE_W-1:0]  rd_age,
  input  logic              wr_valid,
  input  packet_t           wr_pkt,
  input  logic [AGE_W-1:0]  wr_age,
  input  logic              wr_full,
  input  logic              row_open,
  input  logic [ROW_W-1:0]  open_row,
  output logic              win_valid,
  output logic              win_from_wq,     // 1: winner is the write-queue head
  output packet_t           win_pkt,
  output logic [PRIO_W+1:0] win_key,         // {forced, row_hit, priority}
  output logic [PRIO_W-1:0] rd_prio,
  output logic [PRIO_W-1:0] wr_prio
);
  function automatic logic [PRIO_W-1:0] prio(packet_t p, logic [AGE_W-1:0] age);
    return PRIO_W'(X_COEF * 32'(age) + Y_COEF * 32'(p.blen) +
                   (p.we ? P_WRITE : P_READ));
  endfunction

  logic [PRIO_W+1:0] rd_key, wr_key;

  always_comb begin
    rd_prio = prio(rd_pkt, rd_age);
    wr_prio = prio(wr_pkt, wr_age);
    rd_key  = {1'b0, row_open && (rd_pkt.addr.row == open_row), rd_prio};
    wr_key  = {wr_full, row_open && (wr_pkt.addr.row == open_row), wr_prio};

    win_valid   = rd_valid || wr_valid;
    win_from_wq = wr_valid && (!rd_valid || wr_key > rd_key);
    win_pkt     = win_from_wq ? wr_pkt : rd_pkt;
    win_key     = win_from_wq ? wr_key : rd_key;
  end
endmodule
