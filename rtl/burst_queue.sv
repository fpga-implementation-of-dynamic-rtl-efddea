// burst_queue: read or write burst queue of one bank.
//
// Holds memory access packets in order of arrival: entry 0 is always the
// oldest, a push fills the first free slot and a pop shifts every entry one
// slot toward the head. Keeping arrival order inside a queue is what makes
// writes to the same address reach the memory in program order. Each entry
// carries a saturating count of the cycles it has waited (W_T in the
// priority formula); only the head's count leaves the block because only the
// head can be served. For the read-after-write check the queue compares a
// search address with every valid entry and reports whether any packet
// touches the same row columns. Depth and age width are this design's
// choices; the document gives neither.
//
// Interface: push/pop are honoured on the clock edge (pop of an empty queue
// and push into a full one are ignored; simultaneous push and pop on a full
// queue is allowed). head_*, full, count and search_hit are combinational
// from the registered state.
module burst_queue
  import memctrl_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  packet_t                  push_pkt,
  input  logic                     pop,
  output logic                     head_valid,
  output packet_t                  head_pkt,
  output logic [AGE_W-1:0]         head_age,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  // physical-address search over all queued packets
  input  phys_addr_t               search_addr,
  input  logic [BLEN_W-1:0]        search_blen,
  output logic                     search_hit
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  packet_t          pkt [DEPTH];
  logic [AGE_W-1:0] age [DEPTH];
  logic [DEPTH-1:0] vld;

  assign count      = CW'($countones(vld));
  assign full       = vld[DEPTH-1];
  assign empty      = !vld[0];
  assign head_valid = vld[0];
  assign head_pkt   = pkt[0];
  assign head_age   = age[0];

  wire do_pop  = pop && vld[0];
  wire do_push = push && (!full || do_pop);

  // Two bursts of the same bank and row overlap when their column ranges meet.
  function automatic logic overlaps(phys_addr_t a, logic [BLEN_W-1:0] alen,
                                    phys_addr_t b, logic [BLEN_W-1:0] blen);
    logic [COL_W:0] a_end, b_end;
    a_end = {1'b0, a.col} + (COL_W+1)'(alen);
    b_end = {1'b0, b.col} + (COL_W+1)'(blen);
    return (a.bank == b.bank) && (a.row == b.row) &&
           ({1'b0, a.col} < b_end) && ({1'b0, b.col} < a_end);
  endfunction

  always_comb begin
    search_hit = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (vld[i] && overlaps(pkt[i].addr, pkt[i].blen, search_addr, search_blen))
        search_hit = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        pkt[i] <= '0;
        age[i] <= '0;
      end
    end else begin
      // age every waiting packet, then shift on pop
      for (int i = 0; i < DEPTH; i++) begin
        packet_t          p;
        logic [AGE_W-1:0] a;
        logic             v;
        if (do_pop) begin
          p = (i < DEPTH-1) ? pkt[(i+1) % DEPTH] : '0;
          a = (i < DEPTH-1) ? age[(i+1) % DEPTH] : '0;
          v = (i < DEPTH-1) ? vld[(i+1) % DEPTH] : 1'b0;
        end else begin
          p = pkt[i];
          a = age[i];
          v = vld[i];
        end
        if (v && a != '1) a = a + 1'b1;
        pkt[i] <= p;
        age[i] <= a;
        vld[i] <= v;
      end
      // new packet goes into the first free slot after the shift
      if (do_push) begin
        for (int i = 0; i < DEPTH; i++) begin
          if (32'(i) == 32'(count) - (do_pop ? 32'd1 : 32'd0)) begin
            pkt[i] <= push_pkt;
            age[i] <= '0;
            vld[i] <= 1'b1;
          end
        end
      end
    end
  end

  // vld is a thermometer code: entries fill from the head
  a_thermo: assert property (@(posedge clk) disable iff (!rst_n)
                             ((vld & (vld + 1'b1)) == '0));
endmodule
