// m3_pkg: types and constants shared by the memory-cube controller.
//
// The cube stacks 14 DDR3 x16 dies: 8 carry the 128-bit data word, 5 carry
// the SEC-DED check bits and 1 is a cold spare. Each 13-bit Hsiao code word
// takes one bit from each of the 13 active dies, so 16 code words (one per
// DQ bit position) protect a 128-bit word and a whole failed die is a
// single-bit error in every code word. Die counts, the x16 die width, the
// 8-bank DDR3 organisation and the (13,8) code follow the document; the
// address split (row-bank-column) and the one-beat-per-column-command
// abstraction of the internal data path are this design's own choices.
package m3_pkg;

  // ---- cube organisation ----
  localparam int unsigned NUM_DIES  = 14;  // 8 data + 5 ECC + 1 spare
  localparam int unsigned DATA_DIES = 8;
  localparam int unsigned ECC_DIES  = 5;
  localparam int unsigned ACT_DIES  = DATA_DIES + ECC_DIES;  // 13 active dies
  localparam int unsigned DIE_W     = 16;  // x16 DDR3 die
  localparam int unsigned WORD_W    = DATA_DIES * DIE_W;  // 128-bit host word
  localparam int unsigned DIE_IDX_W = 4;

  // ---- DDR3 8 Gb x16 die geometry ----
  localparam int unsigned BA_W   = 3;   // 8 banks
  localparam int unsigned NBANKS = 8;
  localparam int unsigned ROW_W  = 16;  // 64K rows
  localparam int unsigned COL_W  = 10;  // 1K columns
  localparam int unsigned ADDR_W = 16;  // DDR address pins A[15:0]
  localparam int unsigned LADDR_W = ROW_W + BA_W + COL_W;  // linear word address

  // ---- raw DDR3 command on the pins (active-low strobes) ----
  typedef struct packed {
    logic              cke;
    logic              cs_n;
    logic              ras_n;
    logic              cas_n;
    logic              we_n;
    logic [BA_W-1:0]   ba;
    logic [ADDR_W-1:0] addr;
  } ddr_cmd_t;

  // Decoded command, as seen by the idle detector and the DRAM model.
  typedef enum logic [3:0] {
    DC_DES, DC_NOP, DC_ACT, DC_RD, DC_WR, DC_PRE, DC_REF, DC_MRS, DC_ZQ, DC_PD
  } dcmd_e;

  // Command encodings (JEDEC DDR3 truth table, CKE high).
  function automatic ddr_cmd_t mk_cmd(input logic [2:0] rcw, input logic [BA_W-1:0] ba,
                                      input logic [ADDR_W-1:0] addr);
    ddr_cmd_t c;
    c.cke   = 1'b1;
    c.cs_n  = 1'b0;
    c.ras_n = rcw[2];
    c.cas_n = rcw[1];
    c.we_n  = rcw[0];
    c.ba    = ba;
    c.addr  = addr;
    return c;
  endfunction

  localparam logic [2:0] RCW_NOP = 3'b111;
  localparam logic [2:0] RCW_ACT = 3'b011;
  localparam logic [2:0] RCW_RD  = 3'b101;
  localparam logic [2:0] RCW_WR  = 3'b100;
  localparam logic [2:0] RCW_PRE = 3'b010;
  localparam logic [2:0] RCW_REF = 3'b001;
  localparam logic [2:0] RCW_MRS = 3'b000;
  localparam logic [2:0] RCW_ZQ  = 3'b110;

  function automatic ddr_cmd_t cmd_nop();
    return mk_cmd(RCW_NOP, '0, '0);
  endfunction

  function automatic dcmd_e decode_cmd(input ddr_cmd_t c);
    if (!c.cke) return DC_PD;
    if (c.cs_n) return DC_DES;
    case ({c.ras_n, c.cas_n, c.we_n})
      RCW_ACT: return DC_ACT;
      RCW_RD:  return DC_RD;
      RCW_WR:  return DC_WR;
      RCW_PRE: return DC_PRE;
      RCW_REF: return DC_REF;
      RCW_MRS: return DC_MRS;
      RCW_ZQ:  return DC_ZQ;
      default: return DC_NOP;
    endcase
  endfunction

  // ---- requests into the memory controller ----
  typedef enum logic [1:0] { OP_RD, OP_WR } mop_e;

  // Requester identity carried as the request tag.
  typedef enum logic [1:0] { SRC_BIST, SRC_SCRUB, SRC_REBUILD, SRC_NONE } src_e;

  typedef struct packed {
    mop_e              op;
    src_e              src;
    logic [LADDR_W-1:0] laddr;
    logic [WORD_W-1:0] wdata;
  } mreq_t;

  // Special (mode/maintenance) commands that are not bank accesses.
  typedef enum logic [1:0] { SP_MRS, SP_ZQCL, SP_PREA } spop_e;

  typedef struct packed {
    spop_e             op;
    logic [BA_W-1:0]   ba;       // MRS register select
    logic [ADDR_W-1:0] addr;     // MRS value
    logic [NUM_DIES-1:0] die_mask; // physical dies addressed
  } spreq_t;

  // Read response delivered to a requester once the data passed the EDAC.
  typedef struct packed {
    src_e              src;
    logic [LADDR_W-1:0] laddr;
    logic [WORD_W-1:0] rdata;
    logic              ce;   // a correctable error was corrected
    logic              ue;   // an uncorrectable error was detected
  } mrsp_t;

  // Linear word address -> DDR coordinates (row | bank | column).
  function automatic logic [COL_W-1:0] la_col(input logic [LADDR_W-1:0] a);
    return a[COL_W-1:0];
  endfunction
  function automatic logic [BA_W-1:0] la_ba(input logic [LADDR_W-1:0] a);
    return a[COL_W +: BA_W];
  endfunction
  function automatic logic [ROW_W-1:0] la_row(input logic [LADDR_W-1:0] a);
    return a[COL_W+BA_W +: ROW_W];
  endfunction

  // Controller operating mode (the document's waveform shows a 3-bit mode).
  typedef enum logic [2:0] {
    MD_POWERUP, MD_INIT, MD_BIST, MD_NORMAL, MD_SCRUB, MD_REBUILD, MD_COND
  } mode_e;

  // BIST patterns.
  typedef enum logic [2:0] {
    PAT_ZERO, PAT_ONES, PAT_CHECKER, PAT_ADDR, PAT_MARCHX
  } bist_pat_e;

  // ---- Hsiao (13,8) SEC-DED code ----
  // Column j of the parity-check matrix for data bit j: distinct weight-3
  // 5-bit columns (the check bits use the unit columns). Odd column weight is
  // what lets the decoder tell single (odd syndrome) from double (even,
  // non-zero syndrome) errors.
  localparam int unsigned HD_W = DATA_DIES;  // data bits per code word
  localparam int unsigned HC_W = ECC_DIES;   // check bits per code word
  localparam logic [HC_W-1:0] HCOL [HD_W] = '{
    5'b00111, 5'b01011, 5'b01101, 5'b01110,
    5'b10011, 5'b10101, 5'b10110, 5'b11001
  };

  function automatic logic [HC_W-1:0] hsiao_check(input logic [HD_W-1:0] d);
    logic [HC_W-1:0] c;
    c = '0;
    for (int j = 0; j < HD_W; j++)
      if (d[j]) c ^= HCOL[j];
    return c;
  endfunction

endpackage
