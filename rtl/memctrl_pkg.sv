// memctrl_pkg: types and constants shared by the SDRAM memory controller.
//
// The controller talks to a single-data-rate SDRAM with a 16-bit data bus and
// 512 columns per row, the geometry used for the macroblock address mapping.
// Every column command moves one 16-bit word; a "burst" in this design is a
// packet of 1..MAX_BL column accesses to the same row of the same bank, which
// is how the scheduling policy uses the word. Bank count, row width and the
// timing constants are this design's choices for a generic SDRAM part.
package memctrl_pkg;

  // ---- SDRAM geometry -----------------------------------------------------
  localparam int unsigned DW     = 16;  // data width (document: data width of 16)
  localparam int unsigned COL_W  = 9;   // 512 columns per row (document)
  localparam int unsigned ROW_W  = 13;  // 8192 rows per bank (assumed)
  localparam int unsigned BANK_W = 2;   // 4 banks (assumed)
  localparam int unsigned NBANKS = 1 << BANK_W;

  // ---- packets ------------------------------------------------------------
  localparam int unsigned MAX_BL = 8;   // longest burst packet, in column accesses
  localparam int unsigned BLEN_W = $clog2(MAX_BL + 1);
  localparam int unsigned ID_W   = 6;   // request tag returned with read data
  localparam int unsigned AGE_W  = 8;   // saturating waiting-cycle counter

  typedef struct packed {
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
  } phys_addr_t;

  // A memory access packet: address, data and the attributes the scheduler
  // weighs. A read that was redirected into a write queue keeps we = 0.
  typedef struct packed {
    logic                       we;        // 1 = write, 0 = read
    phys_addr_t                 addr;      // first column of the burst
    logic [BLEN_W-1:0]          blen;      // number of column accesses, 1..MAX_BL
    logic                       auto_pre;  // close the row after this burst
    logic [ID_W-1:0]            id;        // tag for read data
    logic [MAX_BL-1:0][DW-1:0]  wdata;     // write data, word i at index i
  } packet_t;

  // SDRAM command encoding on {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    CMD_NOP  = 4'b0111,
    CMD_ACT  = 4'b0011,
    CMD_RD   = 4'b0101,
    CMD_WR   = 4'b0100,
    CMD_PRE  = 4'b0010,   // a10 = 1 selects all banks
    CMD_REF  = 4'b0001,
    CMD_MRS  = 4'b0000,
    CMD_DESL = 4'b1111
  } sdram_cmd_e;

  // Bus driven toward the SDRAM pins
  typedef struct packed {
    logic            cke;
    sdram_cmd_e      cmd;
    logic [BANK_W-1:0] ba;
    logic [ROW_W-1:0]  a;      // a[10] is the auto-precharge / all-banks bit
    logic            dq_oe;
    logic [DW-1:0]   dq_out;
  } sdram_bus_t;

  localparam sdram_bus_t SDRAM_BUS_IDLE = '{cke: 1'b1, cmd: CMD_NOP, ba: '0, a: '0,
                                            dq_oe: 1'b0, dq_out: '0};

  // Refresh urgency levels (Table of refresh urgency levels)
  typedef struct packed {
    logic must;
    logic need;
    logic release_lvl;
    logic may;
  } refresh_urgency_t;

  // Decision made by the final burst selection
  typedef enum logic [2:0] {
    SEL_NONE,
    SEL_REF_MUST,
    SEL_READ,
    SEL_REF_NEED,
    SEL_WRITE,
    SEL_REF_MAY
  } sel_kind_e;

endpackage
