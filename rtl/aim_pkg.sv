// aim_pkg: types and constants shared by the autonomous instruction memory
// system.
//
// The system splits branch handling from the CPU: the branch target buffer
// (BTB) sits beside the instruction memory and produces every fetch address
// itself. The CPU only tells it where a program starts, which decoded
// instruction is a branch (B, with its target on the address bus) and how the
// branch resolved (TK). The memory side answers with each instruction and a
// prediction flag (PRED). ECPT is a shared exception line that either side
// may raise.
//
// Instruction and address widths are 32 bits and addresses count
// instructions (the next sequential address is address+1), as in the
// algorithms this design follows. The instruction format below is this
// design's own: the only things the flow control needs from it are "is this
// a branch", "what is its PC-relative target", "is it undefined" and "is it
// the program exit".
package aim_pkg;

  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned INSTR_W = 32;

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [INSTR_W-1:0] instr_t;

  // Two-bit saturating predictor states. Bit 1 set means "predict taken".
  typedef enum logic [1:0] {
    CTR_SNT = 2'b00,  // strongly not taken
    CTR_WNT = 2'b01,  // weakly not taken
    CTR_WT  = 2'b10,  // weakly taken
    CTR_ST  = 2'b11   // strongly taken
  } ctr_t;

  // Opcode in instruction bits [31:28].
  //   OP_ALU    : any non-control instruction (bits [27:0] belong to the datapath)
  //   OP_BRANCH : conditional branch, target = PC + sign-extended bits [15:0];
  //               bits [27:16] select the condition and belong to the datapath
  //   OP_EXIT   : end of program; the CPU stops when it reaches EXE
  //   any other : undefined instruction, raises ECPT in ID
  typedef enum logic [3:0] {
    OP_ALU    = 4'h0,
    OP_BRANCH = 4'h1,
    OP_EXIT   = 4'h2
  } opcode_e;

  localparam int unsigned OFFSET_W = 16;

  // CPU -> [BTB+IM] half of the bus.
  typedef struct packed {
    addr_t addr;       // address bus: start/restart PC or branch target
    logic  addr_drv;   // the CPU drives the address bus this cycle
    logic  b;          // the instruction now in EXE is a branch
    logic  tk;         // that branch is taken
    logic  ecpt;       // CPU raises an exception
  } cpu2mem_t;

  // [BTB+IM] -> CPU half of the bus.
  typedef struct packed {
    instr_t instr;     // instruction delivered this cycle (CPU IF stage)
    logic   pred;      // BTB predicted that instruction as a taken branch
    logic   ecpt;      // instruction memory exception
  } mem2cpu_t;

  function automatic logic is_defined(logic [3:0] op);
    return op inside {OP_ALU, OP_BRANCH, OP_EXIT};
  endfunction

  function automatic addr_t branch_target(addr_t pc, instr_t i);
    return pc + addr_t'({{(ADDR_W-OFFSET_W){i[OFFSET_W-1]}}, i[OFFSET_W-1:0]});
  endfunction

endpackage
