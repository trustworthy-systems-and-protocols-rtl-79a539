// mon_pkg: types and constants shared by the instruction-level hardware
// monitors (single-core multi-task monitor and multi-core monitor).
// Each module uses only part of this package, so a lint run on one module
// alone reports the rest of the constants as unused.
//
// A monitoring graph is a DFA over instruction hashes. Every graph-memory
// row is 32 bits. Rows 0..7 of a graph hold the sixteen 16-bit group base
// addresses, two per row (odd group number in the upper half). Every other
// row is a graph entry {next_state[15:0], valid_hash[15:0]}: valid_hash is the
// one-hot set of hashes the next instruction may have, next_state selects the
// block of successor entries. The 32-bit row, the 16/16 split, the 4-bit hash
// and the 14-bit graph address follow the document's figures; the header row
// order and the start rows below are this design's own choice.
package mon_pkg;

  localparam int unsigned HASH_W   = 4;
  localparam int unsigned ONEHOT_W = 16;
  localparam int unsigned NGROUP   = 16;
  localparam int unsigned ROW_W    = 32;
  localparam int unsigned GADDR_W  = 16;   // width of a group base / next state

  // Graph layout (relative to the start of a graph)
  localparam int unsigned HDR_ROWS      = NGROUP / 2;  // rows 0..7: group bases
  localparam int unsigned MT_START_ROW  = 8;   // single-core monitor: start entry
  localparam int unsigned MC_PC_ROW     = 8;   // multi-core monitor: start PC
  localparam int unsigned MC_START_ROW  = 9;   // multi-core monitor: start entry

  typedef struct packed {
    logic [GADDR_W-1:0]  next_state;
    logic [ONEHOT_W-1:0] valid_hash;
  } graph_entry_t;

  // Single-core monitor: processor interface register map (word addresses)
  localparam logic [2:0] REG_ENABLE = 3'd0;
  localparam logic [2:0] REG_PID    = 3'd1;
  localparam logic [2:0] REG_GID    = 3'd2;
  localparam logic [2:0] REG_OP     = 3'd3;
  localparam logic [2:0] REG_STATUS = 3'd4;
  localparam logic [2:0] REG_IRQ    = 3'd5;  // bit 0 follow IRQ, [12:8] ISR GID

  // Operation codes (create = 1 and context switch = 2 as printed in the
  // document's waveforms; terminate = 3 is this design's choice). OP_ENTER
  // is raised by the monitor itself on an interrupt: switch to a resident
  // graph from its start entry, keeping the interrupted process's pointer.
  typedef enum logic [2:0] {
    OP_NONE   = 3'd0,
    OP_CREATE = 3'd1,
    OP_SWITCH = 3'd2,
    OP_KILL   = 3'd3,
    OP_ENTER  = 3'd4
  } mt_op_e;

  // Multi-core monitor: commands from the CPU cores to the coordinator
  typedef enum logic [1:0] {
    CMD_NONE      = 2'd0,
    CMD_TASK_INIT = 2'd1,
    CMD_CTX_SW    = 2'd2,
    CMD_TERMINATE = 2'd3
  } cpu_cmd_e;

  // Commands on the monitor-internal bus, coordinator to IVSLs
  typedef enum logic [2:0] {
    IB_NONE      = 3'd0,
    IB_TASK_INIT = 3'd1,
    IB_CTX_SW    = 3'd2,
    IB_STOP      = 3'd3,
    IB_RETRIEVE  = 3'd4,
    IB_FREE      = 3'd5
  } ib_cmd_e;

  localparam int unsigned CORE_W = 4;
  localparam int unsigned PID_W  = 32;
  localparam logic [PID_W-1:0] PID_VACANT = '1;  // marks a free table entry

  // Command word of the monitor-internal bus: 51 bits as in the document's
  // waveform (data [31:0], source [35:32], destination [39:36]; command and graph ID above).
  typedef struct packed {
    logic [7:0]        gid;    // graph ID (task init)
    ib_cmd_e           cmd;
    logic [CORE_W-1:0] dst;
    logic [CORE_W-1:0] src;
    logic [31:0]       data;   // PID
  } ib_word_t;

  // IVSL monitoring state, grouped as in the document's three categories
  typedef enum logic [1:0] {
    MON_STOPPED = 2'd0,
    MON_PAUSED  = 2'd1,
    MON_ACTIVE  = 2'd2
  } mon_state_e;

endpackage
