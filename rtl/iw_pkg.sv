// iw_pkg: types and constants shared by the instruction-window modules.
//
// The window holds up to 32 decoded instructions in a FIFO whose rows are
// numbered from the top (row 0, where a block of four new instructions
// shifts in) to the bottom (row N-1, the oldest). Each row carries an
// opcode, a destination tag, two source operands (tag, ready bit, data)
// and the instruction-type bits used by the scheduler.
//
// Issue happens on four ports. Port 4 is split into two slots, 4a for a
// control transfer (which needs only src1) and 4b for a load (which needs
// only src2), so five instructions can leave in one cycle. Results come
// back on four write-back ports that carry a tag, the data and, on the
// load port, a cache-miss flag.
//
// The five-bit tag, the 32 rows, the block of four, the port assignment and
// the five type bits follow the source design. Data and opcode widths are
// this design's own choice.
package iw_pkg;

  localparam int unsigned N_ENTRIES = 32;  // rows in the window
  localparam int unsigned BLOCK     = 4;   // instructions decoded per cycle
  localparam int unsigned TAG_W     = 5;   // reorder-buffer tag
  localparam int unsigned DATA_W    = 32;  // operand width
  localparam int unsigned OPC_W     = 8;   // opcode width
  localparam int unsigned N_WB      = 4;   // write-back (result) ports
  localparam int unsigned N_RD      = 4;   // read ports of one source data field
  localparam int unsigned N_SLOT    = 5;   // issue slots: ports 1, 2, 3, 4a, 4b

  // Issue slots. Port 1: ALU1. Port 2: ALU2 or multiplier. Port 3: ALU3 or
  // store unit. Port 4a: control transfer. Port 4b: load.
  typedef enum logic [2:0] {
    SLOT_P1  = 3'd0,
    SLOT_P2  = 3'd1,
    SLOT_P3  = 3'd2,
    SLOT_P4A = 3'd3,
    SLOT_P4B = 3'd4
  } slot_e;

  // Write-back port that carries load results (and the miss flag).
  localparam int unsigned WB_LOAD = 3;

  // One-hot instruction type, one scheduler storage bit each.
  typedef struct packed {
    logic alu;
    logic mul;
    logic load;
    logic store;
    logic cntrl;
  } itype_t;

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
  } tagbus_t;

  // A result returning from a functional unit.
  typedef struct packed {
    logic              valid;
    logic              miss;   // load port only: cache miss, no data
    logic [TAG_W-1:0]  tag;
    logic [DATA_W-1:0] data;
  } wb_t;

  // Source operand as delivered by the reorder buffer at decode.
  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic              ready;  // data is valid
    logic [DATA_W-1:0] data;
  } src_t;

  // One decoded instruction entering the window.
  typedef struct packed {
    logic              valid;
    itype_t            itype;
    logic [OPC_W-1:0]  opcode;
    logic [TAG_W-1:0]  dest;
    logic              pred;   // branch prediction bit (taken = 1)
    src_t              src1;
    src_t              src2;
  } inst_t;

  // Source-control bits of one new row.
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic             ready;
    logic             branch;
    logic             pred;
  } src_in_t;

  // One issued instruction, as handed to a functional unit.
  typedef struct packed {
    logic              valid;
    logic              operand_invalid;  // false issue: discard
    itype_t            itype;
    logic [OPC_W-1:0]  opcode;
    logic [TAG_W-1:0]  dest;
    logic [DATA_W-1:0] src1;
    logic [DATA_W-1:0] src2;
  } issue_t;

endpackage
