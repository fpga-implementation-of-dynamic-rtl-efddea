// final_select: selection of the final burst (DRAM transaction select).
//
// Decides, each cycle the command path is free, what the SDRAM does next.
// The order of precedence is the document's five-level scheme:
//   1. refresh at MUST urgency (held until the backlog falls to RELEASE),
//   2. a read, provided no write proposal outranks it,
//   3. refresh at NEED urgency,
//   4. a write (or a read that a write outranked: the write goes first),
//   5. refresh at MAY urgency, only when nothing else is pending.
// "Best read" and "best write" are the largest sort keys among the per-bank
// proposals of each kind; keys come from the bank arbiters and rank forced
// drains, then open-row hits, then the priority formula. Equal keys go to
// the lower bank and a read wins a tie with a write; both tie rules are this
// design's.
//
// Interface: purely combinational. kind is SEL_NONE while ready is low.
module final_select
  import memctrl_pkg::*;
#(
  parameter int unsigned PRIO_W = 12
) (
  input  logic              ready,        // command path can take a transaction
  input  logic              ref_must,     // MUST level (with hold)
  input  logic              ref_need,
  input  logic              ref_may,
  input  logic [NBANKS-1:0] win_valid,
  input  logic [NBANKS-1:0] win_is_read,
  input  logic [PRIO_W+1:0] win_key [NBANKS],
  output sel_kind_e         kind,
  output logic [BANK_W-1:0] bank,
  output logic              grant_access,  // pop the chosen bank proposal
  output logic              grant_refresh
);
  logic              rd_any, wr_any;
  logic [BANK_W-1:0] rd_bank, wr_bank;
  logic [PRIO_W+1:0] rd_key, wr_key;

  always_comb begin
    rd_any = 1'b0; wr_any = 1'b0;
    rd_bank = '0;  wr_bank = '0;
    rd_key  = '0;  wr_key  = '0;
    for (int b = 0; b < NBANKS; b++) begin
      if (win_valid[b] && win_is_read[b] && (!rd_any || win_key[b] > rd_key)) begin
        rd_any = 1'b1; rd_bank = BANK_W'(b); rd_key = win_key[b];
      end
      if (win_valid[b] && !win_is_read[b] && (!wr_any || win_key[b] > wr_key)) begin
        wr_any = 1'b1; wr_bank = BANK_W'(b); wr_key = win_key[b];
      end
    end

    kind = SEL_NONE;
    bank = '0;
    if (ready) begin
      if (ref_must)                                    kind = SEL_REF_MUST;
      else if (rd_any && (!wr_any || rd_key >= wr_key)) begin
        kind = SEL_READ;  bank = rd_bank;
      end
      else if (ref_need)                               kind = SEL_REF_NEED;
      else if (wr_any) begin
        kind = SEL_WRITE; bank = wr_bank;
      end
      else if (ref_may)                                kind = SEL_REF_MAY;
    end
    grant_access  = (kind == SEL_READ) || (kind == SEL_WRITE);
    grant_refresh = (kind == SEL_REF_MUST) || (kind == SEL_REF_NEED) ||
                    (kind == SEL_REF_MAY);
  end
endmodule
