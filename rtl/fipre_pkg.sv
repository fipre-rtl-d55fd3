// fipre_pkg: types and constants shared by the R82R system.
//
// The system is a fixed-instruction-set 16-bit processor (R8R) with a
// hardware configuration controller that loads coprocessors into
// partially reconfigurable areas on demand.  This package holds the
// word width, the system-bus request/response structs, the encoding of
// the five reconfiguration instructions, the coprocessor identifiers and
// the address map of the system bus.
//
// The five instructions (SELR, DISR, INTR, WRR, RDR) and the existence of
// a multiplier, a divider and a square-root coprocessor follow the
// design description.  The 16-bit word, the bus structs, the address map
// and the numeric coprocessor identifiers are this implementation's own
// choices.
package fipre_pkg;

  // Processor word width (R8 is a 16-bit processor; the coprocessors
  // operate on 16/32-bit quantities).
  localparam int unsigned WORD_W    = 16;
  // Width of the coprocessor address carried on IOaddress.
  localparam int unsigned COPRO_ID_W = 4;
  // Number of coprocessor identifiers the configuration controller keeps
  // a bitstream directory entry for.
  localparam int unsigned NUM_COPRO_IDS = 8;

  typedef logic [WORD_W-1:0]     word_t;
  typedef logic [COPRO_ID_W-1:0] copro_id_t;

  // Coprocessor identifiers.  Id 0 marks an empty reconfigurable area.
  localparam copro_id_t COPRO_NONE = 4'd0;
  localparam copro_id_t COPRO_MULT = 4'd1;
  localparam copro_id_t COPRO_DIV  = 4'd2;
  localparam copro_id_t COPRO_SQRT = 4'd3;

  // Reconfiguration instructions added to the R8 core.
  typedef enum logic [2:0] {
    OP_SELR = 3'd0,  // select coprocessor, load it if absent
    OP_DISR = 3'd1,  // dismiss coprocessor
    OP_INTR = 3'd2,  // reset coprocessor
    OP_WRR  = 3'd3,  // write command (RS1) and data (RS2)
    OP_RDR  = 3'd4   // write command (RS), read result into RT
  } reconf_op_e;

  // System bus.  A master holds valid (with its fields stable) until the
  // cycle in which ready is returned; rdata is valid in that cycle.
  typedef struct packed {
    logic  valid;
    logic  we;
    word_t addr;
    word_t wdata;
  } bus_req_t;

  typedef struct packed {
    logic  ready;
    word_t rdata;
  } bus_rsp_t;

  // System bus address map (word addresses).
  //   0x0000-0x7FFF  local memory (second port)
  //   0x8000-0x803F  configuration controller registers
  //   anything else  answered at once, reads return 0
  localparam word_t MEM_BASE  = 16'h0000;
  localparam word_t CC_BASE   = 16'h8000;
  localparam int unsigned CC_SPAN_W = 6;

  // Configuration controller register offsets.
  localparam int unsigned CC_REG_PTR_LO = 0;  // config memory write pointer [15:0]
  localparam int unsigned CC_REG_PTR_HI = 1;  // config memory write pointer [31:16]
  localparam int unsigned CC_REG_DATA   = 2;  // write: store byte [7:0] at pointer, pointer++
  localparam int unsigned CC_REG_STATUS = 3;  // read: status, write 1s: clear error bits
  localparam int unsigned CC_REG_LOADS  = 4;  // read: number of completed reconfigurations
  localparam int unsigned CC_REG_DIR    = 8;  // 8 + 4*id + {0:base lo,1:base hi,2:len lo,3:len hi}

endpackage
