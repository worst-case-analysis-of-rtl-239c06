// Shared types and constants of the predictable DDR3 memory controller.
//
// The controller serves NUM_REQ requestors, each of which owns one DRAM bank
// (private-bank mapping) and keeps its rows open (open-row policy). Commands
// travel between blocks as dram_cmd_t; device timing is one timing_t record so
// that a different speed grade is a single parameter override.
//
// The DDR3-1333H numbers of DDR3_1333H are the JEDEC values the analysis uses,
// in memory-clock cycles. tRFC (160 ns) and tREFI (7.8 us) are given in time;
// they are converted here with the 1.5 ns clock period of DDR3-1333 (a design
// choice: the clock period itself is standard knowledge, not part of the table).
package mc_pkg;

  // Device geometry of one rank: a 2 Gb x8 DDR3 part (eight banks, 32K rows,
  // 1K columns). Eight such chips side by side form the 64-bit data bus.
  localparam int unsigned NUM_BANKS = 8;
  localparam int unsigned BANK_BITS = 3;
  localparam int unsigned ROW_BITS  = 15;
  localparam int unsigned COL_BITS  = 10;

  // Data bus and burst: BL beats of W_BUS bits move in BL/2 clock cycles.
  // Inside the controller both beats of one clock cycle travel together, so
  // one clock of data is DQ_BITS = 2*W_BUS bits wide.
  localparam int unsigned W_BUS     = 64;
  localparam int unsigned BL        = 8;
  localparam int unsigned DQ_BITS   = 2 * W_BUS;
  localparam int unsigned LINE_BITS = BL * W_BUS;            // 512 bits, one request
  localparam int unsigned LINE_BYTES_LOG2 = 6;               // 64-byte request

  // Physical address: byte offset | column burst | row | bank.
  localparam int unsigned ADDR_BITS = LINE_BYTES_LOG2 + (COL_BITS - 3) + ROW_BITS + BANK_BITS;

  typedef logic [BANK_BITS-1:0] bank_t;
  typedef logic [ROW_BITS-1:0]  row_t;
  typedef logic [COL_BITS-1:0]  col_t;
  typedef logic [ADDR_BITS-1:0] addr_t;
  typedef logic [LINE_BITS-1:0] line_t;
  typedef logic [DQ_BITS-1:0]   dq_t;

  // Commands on the command bus. PREA (precharge all) and REF are issued only
  // by the refresh controller.
  typedef enum logic [2:0] {
    CMD_NOP  = 3'd0,
    CMD_PRE  = 3'd1,
    CMD_ACT  = 3'd2,
    CMD_RD   = 3'd3,
    CMD_WR   = 3'd4,
    CMD_PREA = 3'd5,
    CMD_REF  = 3'd6
  } cmd_e;

  typedef struct packed {
    cmd_e  cmd;
    bank_t bank;
    row_t  row;
    col_t  col;
  } dram_cmd_t;

  // JEDEC timing constraints, in clock cycles.
  typedef struct packed {
    int unsigned RCD;   // ACT to READ/WRITE
    int unsigned RL;    // READ to data start
    int unsigned WL;    // WRITE to data start
    int unsigned BUS;   // data bus transfer (BL/2)
    int unsigned RP;    // PRE to ACT
    int unsigned WR;    // end of write data to PRE
    int unsigned RTP;   // READ to PRE
    int unsigned RAS;   // ACT to PRE
    int unsigned RC;    // ACT to ACT, same bank
    int unsigned RRD;   // ACT to ACT, different bank
    int unsigned FAW;   // window holding at most four ACTs
    int unsigned RTW;   // READ to WRITE
    int unsigned WTR;   // end of write data to READ
    int unsigned RFC;   // REF to next command
    int unsigned REFI;  // refresh period
  } timing_t;

  localparam timing_t DDR3_1333H = '{
    RCD: 9, RL: 8, WL: 7, BUS: 4, RP: 9, WR: 10, RTP: 5, RAS: 24, RC: 33,
    RRD: 4, FAW: 20, RTW: 6, WTR: 5, RFC: 107, REFI: 5200
  };

  // The older DDR2-800E part of the same comparison table (2.5 ns clock:
  // tRFC 195 ns -> 78 cycles, tREFI 7.8 us -> 3120 cycles). Selecting it is a
  // parameter override of T.
  localparam timing_t DDR2_800E = '{
    RCD: 6, RL: 6, WL: 5, BUS: 4, RP: 6, WR: 6, RTP: 3, RAS: 18, RC: 24,
    RRD: 3, FAW: 14, RTW: 6, WTR: 3, RFC: 78, REFI: 3120
  };

  // Width of the small down-counters that time the constraints.
  localparam int unsigned CNT_BITS = 8;
  typedef logic [CNT_BITS-1:0] cnt_t;

  function automatic logic is_cas(cmd_e c);
    return (c == CMD_RD) || (c == CMD_WR);
  endfunction

endpackage
