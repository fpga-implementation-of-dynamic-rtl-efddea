// addr_gen: macroblock address generator.
//
// Places the macroblocks of each frame store so that one macroblock is read
// from a single SDRAM row. A 512-column x 16-bit row holds two macroblocks:
// the column address is {mb[0], word offset} (256 columns per macroblock, of
// which 192 are used by 16x16 luma plus two 8x8 chroma blocks of 8-bit
// samples). Macroblock pairs are spread over the banks in turn, so that
// neighbouring pairs sit in different banks and their rows can be open at
// once:
//   pair = mb >> 1,  bank = pair mod NBANKS,
//   row  = frame * ROWS_PER_FRAME + pair / NBANKS.
// Two macroblocks per row and the lookup of a macroblock by its number are
// the document's; the bank interleave, the 256-column slots and the frame
// store layout are this design's. The page policy chosen by the bus activity
// monitor is applied here: in close-page mode the packet asks for
// auto-precharge.
//
// Interface: purely combinational.
module addr_gen
  import memctrl_pkg::*;
#(
  parameter int unsigned MBS_PER_FRAME = 8160,  // 120 x 68 macroblocks (1920x1088)
  parameter int unsigned FRAME_W       = 3,     // 8 frame stores
  parameter int unsigned MB_W          = 13,
  parameter int unsigned OFF_W         = COL_W - 1
) (
  input  logic [FRAME_W-1:0] frame,
  input  logic [MB_W-1:0]    mb,
  input  logic [OFF_W-1:0]   offset,     // word offset inside the macroblock
  input  logic               page_open,
  output phys_addr_t         addr,
  output logic               auto_pre,
  output logic               in_range    // mb and frame fit in the SDRAM
);
  localparam int unsigned PAIRS          = (MBS_PER_FRAME + 1) / 2;
  localparam int unsigned ROWS_PER_FRAME = (PAIRS + NBANKS - 1) / NBANKS;

  logic [MB_W-1:0] pair;
  logic [31:0]     row_full;

  always_comb begin
    pair      = mb >> 1;
    addr.bank = BANK_W'(pair % NBANKS);
    row_full  = 32'(frame) * ROWS_PER_FRAME + 32'(pair / NBANKS);
    addr.row  = ROW_W'(row_full);
    addr.col  = {mb[0], offset};
    auto_pre  = !page_open;
    in_range  = (32'(mb) < MBS_PER_FRAME) && (row_full < (32'd1 << ROW_W));
  end
endmodule
