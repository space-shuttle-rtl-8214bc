// ss_pkg: constants and types shared by the Space Shuttle reliability test design.
//
// The design stores 32 words of 32 bits in flip-flops, organised as 8 banks of
// 4 registers. Register address r maps to bank r[2:0] and row r[4:3], so the 8
// registers of a row sit in 8 different banks and can all be written in one
// cycle. A protected register keeps its redundant copies (or its ECC check
// bits) in the next banks of the same row, wrapping from bank 7 to bank 0.
// The 32x32 size, the 8 banks, the five storage mechanisms and the four
// 32-bit event counters per register follow the published design; the
// address mapping, the encodings and the command set are this design's own.
package ss_pkg;

  localparam int unsigned NUM_REGS      = 32;
  localparam int unsigned DATA_W        = 32;
  localparam int unsigned NUM_BANKS     = 8;
  localparam int unsigned REGS_PER_BANK = NUM_REGS / NUM_BANKS;
  localparam int unsigned ADDR_W        = $clog2(NUM_REGS);
  localparam int unsigned BANK_W        = $clog2(NUM_BANKS);
  localparam int unsigned IDX_W         = $clog2(REGS_PER_BANK);
  // Extended Hamming code: 6 Hamming parity bits plus one overall parity bit.
  localparam int unsigned ECC_W         = 7;
  localparam int unsigned CW_LAST       = DATA_W + ECC_W - 1;  // last Hamming position (38)
  localparam int unsigned CNT_W         = 32;
  localparam int unsigned NUM_CNT       = 4;
  localparam int unsigned NUM_GPIO      = 38;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [BANK_W-1:0] bank_t;
  typedef logic [IDX_W-1:0]  idx_t;
  typedef logic [ECC_W-1:0]  ecc_t;
  typedef logic [CNT_W-1:0]  cnt_t;

  // Storage mechanism of one register.
  typedef enum logic [2:0] {
    MODE_NONE       = 3'd0,  // one copy, no checking
    MODE_ECC        = 3'd1,  // data + SECDED check bits in the next bank
    MODE_TMR        = 3'd2,  // three copies, bitwise majority vote
    MODE_SHADOW     = 3'd3,  // two copies, compare (detection only)
    MODE_ECC_SHADOW = 3'd4   // two copies, the shadow protected by SECDED
  } prot_mode_e;

  typedef enum logic [2:0] {
    OP_NOP       = 3'd0,
    OP_WRITE     = 3'd1,  // protected write with the given mode
    OP_READ      = 3'd2,  // protected read: check, correct, count
    OP_RAW_WRITE = 3'd3,  // overwrite one physical register (inspection / error injection)
    OP_RAW_READ  = 3'd4,  // read one physical register unchecked
    OP_CNT_READ  = 3'd5   // read one RMU counter
  } op_e;

  typedef enum logic [1:0] {
    CNT_WRITES    = 2'd0,
    CNT_READS     = 2'd1,
    CNT_DETECTED  = 2'd2,
    CNT_CORRECTED = 2'd3
  } cnt_sel_e;

  typedef struct packed {
    op_e        op;
    addr_t      addr;
    prot_mode_e mode;     // used by OP_WRITE
    cnt_sel_e   cnt_sel;  // used by OP_CNT_READ
    word_t      wdata;    // used by OP_WRITE and OP_RAW_WRITE
  } cmd_t;

  typedef struct packed {
    logic  valid;          // one-cycle pulse, one cycle after a read command
    word_t data;
    logic  detected;       // an error was seen on a protected read
    logic  corrected;      // ... and the returned data is corrected
    logic  uncorrectable;  // ... and it could not be corrected
    logic  rmu_mismatch;   // the two RMU copies disagree on the counter read
  } rsp_t;

  // Write port of one bank.
  typedef struct packed {
    logic  we;
    idx_t  idx;
    word_t data;
  } bank_wr_t;

  // Events of one protected access, counted by the RMU.
  typedef struct packed {
    logic  wr;
    logic  rd;
    logic  det;
    logic  cor;
    addr_t addr;
  } rmu_evt_t;

  // Hamming position (1-based, powers of two reserved for parity) of data bit
  // i: the 32 data bits fill positions 3, 5-7, 9-15, 17-31 and 33-38.
  function automatic int unsigned ecc_data_pos(int unsigned i);
    if (i < 1)       return i + 3;
    else if (i < 4)  return i + 4;
    else if (i < 11) return i + 5;
    else if (i < 26) return i + 6;
    else             return i + 7;
  endfunction

endpackage
