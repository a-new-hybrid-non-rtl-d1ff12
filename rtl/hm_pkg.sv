// hm_pkg: types, constants and SPARC V8 decode helpers shared by the
// hardware monitor blocks.
//
// The monitor sees instructions at two points: the fetch bus (address and
// instruction word as the processor loads them) and the trace port (every
// executed instruction with its PC, opcode, time tag and trap/error-mode
// flags). Both are carried as packed structs defined here. PCs are word
// addresses (bits 31:2), as SPARC V8 instructions are always 32-bit aligned.
//
// The SPARC V8 field positions used by the decode helpers come from the SPARC
// V8 architecture, not from the monitor's own description; the trace entry
// layout follows the 128-bit LEON3 instruction trace entry.
package hm_pkg;

  // Width of the processor time tag carried on the trace port.
  localparam int unsigned TTAG_W = 30;

  // One fetched instruction: the word address it was fetched from and its code.
  typedef struct packed {
    logic [31:2] pc;
    logic [31:0] inst;
  } fetch_t;

  // One executed instruction as seen on the trace port.
  typedef struct packed {
    logic [31:2]       pc;
    logic [31:0]       inst;
    logic              trap;     // instruction caused a trap
    logic              errmode;  // processor entered error mode
    logic [TTAG_W-1:0] ttag;     // time tag when it executed
  } trace_t;

  // Error causes, one bit per checking block (the four inputs of the Error OR).
  typedef struct packed {
    logic trap;      // unexpected trap or error mode
    logic timeout;   // time tag advanced without new instructions
    logic predict;   // PC prediction mismatch
    logic compare;   // fetch/trace instruction mismatch
  } cause_t;

  // Bit positions in a 128-bit LEON3 instruction trace entry.
  localparam int unsigned TE_MULTI    = 126;  // set on 2nd/3rd entry of a multi-cycle instruction
  localparam int unsigned TE_TTAG_HI  = 125;
  localparam int unsigned TE_TTAG_LO  = 96;
  localparam int unsigned TE_PC_HI    = 63;
  localparam int unsigned TE_PC_LO    = 34;
  localparam int unsigned TE_TRAP     = 33;
  localparam int unsigned TE_ERRMODE  = 32;

  // SPARC V8 control-transfer classes relevant to next-PC prediction.
  typedef enum logic [2:0] {
    CT_NONE,    // ordinary instruction: next PC = PC + 4
    CT_BRANCH,  // Bicc / FBfcc / CBccc with 22-bit displacement
    CT_CALL,    // CALL with 30-bit displacement
    CT_INDIRECT // JMPL / RETT: register-indirect target
  } ctrl_e;

  function automatic ctrl_e classify(input logic [31:0] inst);
    logic [1:0] op;
    logic [2:0] op2;
    logic [5:0] op3;
    op  = inst[31:30];
    op2 = inst[24:22];
    op3 = inst[24:19];
    if (op == 2'b01) return CT_CALL;
    if (op == 2'b00 && (op2 == 3'b010 || op2 == 3'b110 || op2 == 3'b111)) return CT_BRANCH;
    if (op == 2'b10 && (op3 == 6'b111000 || op3 == 6'b111001)) return CT_INDIRECT;
    return CT_NONE;
  endfunction

  // Target word address of a branch (disp22) or CALL (disp30) at word address pc.
  function automatic logic [31:2] branch_target(input logic [31:2] pc, input logic [31:0] inst);
    logic [29:0] disp;
    if (inst[31:30] == 2'b01) disp = inst[29:0];
    else                      disp = {{8{inst[21]}}, inst[21:0]};
    return pc + disp;
  endfunction

endpackage
