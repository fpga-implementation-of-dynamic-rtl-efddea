// refresh_counter: refresh interval counter and refresh backlog counter.
//
// The interval counter is loaded with the refresh rate REFI and counts down
// one step per clock. Each time it reaches zero it reloads and the backlog
// counter goes up by one; each refresh command that is issued (ref_done)
// takes one off the backlog. The backlog therefore holds the number of
// refresh commands owed to the SDRAM, and the refresh priority logic decides
// from it how urgent the next refresh is. Both counters follow the document;
// REFI (7.8 us at an assumed 100 MHz clock), the backlog width and
// saturation at its maximum are this design's choices.
//
// Interface: enable starts counting (after SDRAM initialisation); ref_done is
// a one-cycle pulse per issued refresh command. backlog is registered and
// changes one clock after the event that moves it; if a tick and a ref_done
// fall in the same cycle the backlog keeps its value.
module refresh_counter #(
  parameter int unsigned REFI      = 780,  // cycles between refresh commands
  parameter int unsigned BACKLOG_W = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 ref_done,
  output logic [BACKLOG_W-1:0] backlog,
  output logic                 tick      // interval counter reached zero
);
  localparam int unsigned CNT_W = $clog2(REFI + 1);
  localparam logic [BACKLOG_W-1:0] BL_MAX = '1;

  logic [CNT_W-1:0] interval;

  assign tick = enable && (interval == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      interval <= CNT_W'(REFI - 1);
      backlog  <= '0;
    end else if (enable) begin
      interval <= tick ? CNT_W'(REFI - 1) : interval - 1'b1;
      if (tick && !ref_done) begin
        if (backlog != BL_MAX) backlog <= backlog + 1'b1;
      end else if (!tick && ref_done) begin
        if (backlog != '0) backlog <= backlog - 1'b1;
      end
    end
  end
endmodule
