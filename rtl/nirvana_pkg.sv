// nirvana_pkg: types and constants shared by the anomaly-detection blocks.
//
// The detector watches a RISC-V core through two plain debug signals, the
// program counter and the instruction word, and stamps each retired
// instruction with a clock count. A debug frame carries those three values.
// A feature sample is the 4-D point handed to the self-organizing map:
//   dim 0  average PC of memory load/store instructions
//   dim 1  average interval (cycles) between neighbouring load/stores
//   dim 2  average PC of unconditional jumps
//   dim 3  average interval (cycles) between neighbouring jumps
// The choice of four features follows the published method; the widths are
// this design's own (32-bit PCs for an RV32 core, 48-bit clock count).
package nirvana_pkg;

  localparam int unsigned XLEN   = 32;  // PC and instruction width
  localparam int unsigned CNT_W  = 48;  // clock count since reset
  localparam int unsigned FEAT_W = 32;  // one feature dimension
  localparam int unsigned NDIM   = 4;   // feature dimensions

  typedef struct packed {
    logic [XLEN-1:0]  instr;
    logic [XLEN-1:0]  pc;
    logic [CNT_W-1:0] cnt;
  } frame_t;

  typedef logic [FEAT_W-1:0] feat_t;
  typedef feat_t [NDIM-1:0]  sample_t;

  // Instruction classes the two filters select.
  typedef enum logic [0:0] {
    CLASS_MEMIO = 1'b0,  // loads and stores
    CLASS_JUMP  = 1'b1   // unconditional jumps (JAL, JALR and compressed forms)
  } insn_class_e;

  // RV32 major opcodes used by the filters.
  localparam logic [6:0] OPC_LOAD     = 7'b0000011;
  localparam logic [6:0] OPC_LOAD_FP  = 7'b0000111;
  localparam logic [6:0] OPC_STORE    = 7'b0100011;
  localparam logic [6:0] OPC_STORE_FP = 7'b0100111;
  localparam logic [6:0] OPC_AMO      = 7'b0101111;
  localparam logic [6:0] OPC_JAL      = 7'b1101111;
  localparam logic [6:0] OPC_JALR     = 7'b1100111;

endpackage
