// refresh_priority: refresh priority generator.
//
// Turns the refresh backlog into the four urgency levels of the refresh
// policy: MAY (backlog > 0: refresh when the scheduler is idle), RELEASE
// (backlog > 3), NEED (backlog > 7: refresh ranks above writes) and MUST
// (backlog > 11: refresh before any new access). The thresholds are the
// document's. RELEASE is the level the backlog has to fall back to before
// accesses are served again, so once MUST has fired this block keeps
// must_hold raised until the backlog is no longer above the RELEASE level;
// that hysteresis is how this design reads the RELEASE level.
//
// Interface: urgency is combinational from backlog; must_hold is registered.
module refresh_priority
  import memctrl_pkg::*;
#(
  parameter int unsigned BACKLOG_W   = 4,
  parameter int unsigned LVL_MAY     = 0,
  parameter int unsigned LVL_RELEASE = 3,
  parameter int unsigned LVL_NEED    = 7,
  parameter int unsigned LVL_MUST    = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [BACKLOG_W-1:0] backlog,
  output refresh_urgency_t     urgency,
  output logic                 must_hold   // MUST level, held until RELEASE clears
);
  logic hold_q;

  always_comb begin
    urgency.may         = 32'(backlog) > LVL_MAY;
    urgency.release_lvl = 32'(backlog) > LVL_RELEASE;
    urgency.need        = 32'(backlog) > LVL_NEED;
    urgency.must        = 32'(backlog) > LVL_MUST;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   hold_q <= 1'b0;
    else if (urgency.must)        hold_q <= 1'b1;
    else if (!urgency.release_lvl) hold_q <= 1'b0;
  end

  assign must_hold = urgency.must || (hold_q && urgency.release_lvl);
endmodule
