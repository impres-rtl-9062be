// impres_pkg: types and constants shared by the IMPRES code-integrity monitor.
//
// The monitor watches the instruction stream of a processor running the
// SimpleScalar PISA instruction set, whose instructions are 64 bits wide: a
// 16-bit annotation field, a 16-bit opcode and a 32-bit field word holding
// register numbers, an immediate or a jump target. Instrumented code starts
// every basic block with a "chk" instruction that carries the block's
// encrypted checksum in that 32-bit field word, and ends every block with a
// control-flow instruction (CFI).
//
// The basic-block scheme (chk, CFI, non-boundary instruction, eChkSum,
// iChkSum, fBB) follows the IMPRES architecture. The opcode given to chk, the
// list of PISA opcodes taken as CFIs, the 32-bit checksum and the 64-bit key
// are this design's own choices.
package impres_pkg;

  localparam int unsigned INSTR_W = 64;  // PISA instruction width
  localparam int unsigned CHK_W   = 32;  // checksum and encrypted checksum width
  localparam int unsigned KEY_W   = 64;  // secret hardware key width

  // One PISA instruction as it sits in memory (annotation and opcode in the
  // first word, operand fields in the second).
  typedef struct packed {
    logic [15:0] annote;
    logic [15:0] opcode;
    logic [31:0] fields;
  } pisa_instr_t;

  // Instruction classes seen by the monitor.
  typedef enum logic [1:0] {
    IC_NONBI = 2'd0,  // non-boundary instruction: folded into the checksum
    IC_CHK   = 2'd1,  // chk: opens a basic block, carries eChkSum
    IC_CFI   = 2'd2   // control-flow instruction: closes a basic block
  } instr_class_e;

  // Opcode of the added chk instruction (a code point PISA leaves unused).
  localparam logic [15:0] OPC_CHK = 16'h00F0;

  // PISA control-flow opcodes: J, JAL, JR, JALR, BEQ, BNE, BLEZ, BGTZ, BLTZ,
  // BGEZ, BC1F, BC1T occupy 0x01 to 0x0C.
  localparam logic [15:0] OPC_CFI_FIRST = 16'h0001;
  localparam logic [15:0] OPC_CFI_LAST  = 16'h000C;
  localparam logic [15:0] OPC_J         = 16'h0001;
  localparam logic [15:0] OPC_BNE       = 16'h0006;

  // Value iChkSum starts a basic block with.
  localparam logic [CHK_W-1:0] CHK_INIT = '0;

endpackage
