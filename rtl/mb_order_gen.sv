// mb_order_gen: current-macroblock fetch order for IBBP coding.
//
// Produces the stream of burst read requests that fetches current
// macroblocks from the frame stores. In single-frame mode it walks
// macroblocks 0..mb_count-1 of frame_a. In B-pair mode the two consecutive
// B-frames that use the same reference data are interleaved macroblock by
// macroblock: (frame_a, 0), (frame_b, 0), (frame_a, 1), (frame_b, 1), ...
// so the reference data fetched for one is still at hand for the other.
// Every macroblock is read as WORDS_PER_MB words in bursts of BURST words.
// The alternation of the two B-frames is the document's; the burst split,
// the request tags (a running count) and the interface are this design's.
//
// Interface: start (while idle) latches the job. One request is offered at a
// time on req_valid/req_ready; done pulses after the last one is accepted.
module mb_order_gen
  import memctrl_pkg::*;
#(
  parameter int unsigned FRAME_W      = 3,
  parameter int unsigned MB_W         = 13,
  parameter int unsigned OFF_W        = COL_W - 1,
  parameter int unsigned WORDS_PER_MB = 192,
  parameter int unsigned BURST        = MAX_BL
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               pair_mode,
  input  logic [FRAME_W-1:0] frame_a,
  input  logic [FRAME_W-1:0] frame_b,
  input  logic [MB_W-1:0]    mb_count,
  output logic               busy,
  output logic               done,
  output logic               req_valid,
  input  logic               req_ready,
  output logic [FRAME_W-1:0] req_frame,
  output logic [MB_W-1:0]    req_mb,
  output logic [OFF_W-1:0]   req_offset,
  output logic [BLEN_W-1:0]  req_blen,
  output logic [ID_W-1:0]    req_id
);
  logic               pair_q, second;
  logic [FRAME_W-1:0] fa, fb;
  logic [MB_W-1:0]    cnt, mb;
  logic [OFF_W-1:0]   off;

  localparam int unsigned LAST_OFF = ((WORDS_PER_MB + BURST - 1) / BURST - 1) * BURST;

  assign req_valid  = busy;
  assign req_frame  = second ? fb : fa;
  assign req_mb     = mb;
  assign req_offset = off;
  assign req_blen   = BLEN_W'((32'(off) + BURST > WORDS_PER_MB) ?
                              WORDS_PER_MB - 32'(off) : BURST);

  wire last_burst = (32'(off) == LAST_OFF);
  wire last_frame = !pair_q || second;
  wire last_mb    = (mb == cnt - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; pair_q <= 1'b0; second <= 1'b0;
      fa <= '0; fb <= '0; cnt <= '0; mb <= '0; off <= '0; req_id <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && mb_count != '0) begin
          busy <= 1'b1; pair_q <= pair_mode; fa <= frame_a; fb <= frame_b;
          cnt <= mb_count; mb <= '0; off <= '0; second <= 1'b0;
        end
      end else if (req_ready) begin
        req_id <= req_id + 1'b1;
        if (!last_burst) begin
          off <= off + OFF_W'(BURST);
        end else begin
          off <= '0;
          if (!last_frame) begin
            second <= 1'b1;
          end else begin
            second <= 1'b0;
            if (last_mb) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              mb <= mb + 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
