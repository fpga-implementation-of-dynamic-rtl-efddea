// bus_activity_monitor: bus switching activity monitor with idleness predictor.
//
// Watches the SDRAM command bus and makes two power decisions.
// Page mode: it counts the cycles with a command on the bus over a window of
// WINDOW cycles, and the bursts started in that window together with how many
// of them went to the row last used in their bank (a row-locality hit, counted
// whether or not the row was still open, so that close-page mode can measure
// what open-page mode would gain). At the end of each window the controller
// runs open-page (rows stay open for later hits) when the utilisation is at or
// above UTIL_THRESH and at least HIT_PCT percent of the window's bursts were
// locality hits; otherwise it runs close-page (each burst ends with
// auto-precharge). A window with no bursts does not fail the hit test.
// Power-down: a constant-threshold idleness predictor counts consecutive
// cycles with no command and nothing pending; when the count reaches
// IDLE_THRESH it raises pd_req, and the command generator drops CKE. Any
// pending work clears pd_req in the same cycle.
// That power-down follows a constant-threshold idle predictor and that open
// page is chosen when utilisation reaches a threshold and the hit rate is
// high are the document's; the window, the thresholds, counting locality hits
// per bank and open-page as the reset state are this design's.
//
// Interface: bus_active, pending and acc_valid/acc_bank/acc_row are
// sampled every cycle; the cycle at a window end still counts in that
// window. page_open is registered and changes only at window ends; pd_req is
// combinational in pending.
module bus_activity_monitor
  import memctrl_pkg::*;
#(
  parameter int unsigned WINDOW      = 64,
  parameter int unsigned UTIL_THRESH = 8,
  parameter int unsigned HIT_PCT     = 50,
  parameter int unsigned IDLE_THRESH = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bus_active,   // a command was put on the bus this cycle
  input  logic pending,      // work waiting for the SDRAM
  input  logic acc_valid,    // a burst starts this cycle
  input  logic [BANK_W-1:0] acc_bank, // its bank
  input  logic [ROW_W-1:0]  acc_row,  // and row
  output logic page_open,    // 1: open-page policy, 0: close-page policy
  output logic pd_req,       // request SDRAM power-down
  output logic window_end    // one-cycle strobe at each window boundary
);
  localparam int unsigned WW = $clog2(WINDOW + 1);
  localparam int unsigned IW = $clog2(IDLE_THRESH + 1);

  logic [WW-1:0] win_cnt, busy_cnt;
  logic [IW-1:0] idle_cnt;
  logic [WW-1:0] acc_cnt, hit_cnt;
  logic [ROW_W-1:0] last_row [NBANKS];
  logic [NBANKS-1:0] last_vld;
  logic          acc_hit;
  logic [31:0]   util_now, acc_now, hit_now;

  assign acc_hit  = acc_valid && last_vld[acc_bank] &&
                    (last_row[acc_bank] == acc_row);
  assign util_now = 32'(busy_cnt) + (bus_active ? 32'd1 : 32'd0);
  assign acc_now  = 32'(acc_cnt)  + (acc_valid  ? 32'd1 : 32'd0);
  assign hit_now  = 32'(hit_cnt)  + (acc_hit    ? 32'd1 : 32'd0);

  assign window_end = (32'(win_cnt) == WINDOW - 1);
  assign pd_req     = (32'(idle_cnt) >= IDLE_THRESH) && !pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_cnt   <= '0;
      busy_cnt  <= '0;
      idle_cnt  <= '0;
      acc_cnt   <= '0;
      hit_cnt   <= '0;
      last_vld  <= '0;
      for (int b = 0; b < NBANKS; b++) last_row[b] <= '0;
      page_open <= 1'b1;
    end else begin
      if (window_end) begin
        page_open <= (util_now >= UTIL_THRESH) && (hit_now * 100 >= HIT_PCT * acc_now);
        win_cnt   <= '0;
        busy_cnt  <= '0;
        acc_cnt   <= '0;
        hit_cnt   <= '0;
      end else begin
        win_cnt  <= win_cnt + 1'b1;
        if (bus_active) busy_cnt <= busy_cnt + 1'b1;
        if (acc_valid)  acc_cnt  <= acc_cnt + 1'b1;
        if (acc_hit)    hit_cnt  <= hit_cnt + 1'b1;
      end
      if (acc_valid) begin
        last_row[acc_bank] <= acc_row;
        last_vld[acc_bank] <= 1'b1;
      end

      if (bus_active || pending)           idle_cnt <= '0;
      else if (32'(idle_cnt) < IDLE_THRESH) idle_cnt <= idle_cnt + 1'b1;
    end
  end
endmodule
