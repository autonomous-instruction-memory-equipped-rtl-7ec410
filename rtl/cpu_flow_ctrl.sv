// cpu_flow_ctrl: the CPU's side of the autonomous instruction memory
// protocol, for a five-stage pipeline (IF, ID, EXE, MEM, WB).
//
// The CPU no longer sends fetch addresses. It accepts one instruction per
// cycle from the [BTB+IM] module with its PRED flag and works out itself
// which PC that instruction has: the PC after the instruction in ID (its
// target if it was predicted taken, else PC+1), or, right after a start or a
// recovery, the PC it has just sent or computed. The instructions in ID and
// EXE are held with their PC and prediction.
//
//  * ID: decodes whether the instruction is a branch and computes its
//    target (PC-relative); an undefined opcode raises ECPT.
//  * EXE: for a branch, drives B, the target on the address bus, and TK
//    (the branch condition from the datapath). If TK differs from the
//    prediction made for the branch, the instructions in IF and ID are
//    flushed (two-cycle penalty) and the next PC becomes the target (taken)
//    or the branch PC+1 (not taken) - the same choice the memory side makes.
//    An EXIT instruction in EXE stops the CPU (halted).
//  * ECPT: an undefined instruction, an execution exception (ex_fault), a
//    data memory exception (dmem_fault), an external interrupt (irq) or the
//    memory's exception flushes the pipeline. In the next cycle (restart)
//    the CPU drives EXC_VECTOR on the address bus; after reset it drives
//    START_PC the same way.
//  * Counters: cycles until halt, resolved branches, mispredictions.
//
// The information sent (start PC, B, target, TK, ECPT), the stage in which
// each is produced, the PC/prediction tracking up to EXE, the flush and the
// recovery PCs follow the algorithm this design implements. Driving B and
// the target together at the start of EXE, restarting at a vector instead of
// halting on an exception, the EXIT opcode, counting branches in EXE and the
// 32-bit counters are this design's choices. MEM and WB hold nothing the
// protocol needs; their exception sources come in as ports.
module cpu_flow_ctrl
  import aim_pkg::*;
#(
  parameter addr_t START_PC   = '0,
  parameter addr_t EXC_VECTOR = addr_t'(32'h0000_0100)
) (
  input  logic     clk,
  input  logic     rst_n,
  // bus
  input  mem2cpu_t bus_in,
  input  logic     ecpt_line,
  output cpu2mem_t bus_out,
  // datapath
  input  logic     ex_taken,    // branch condition of the instruction in EXE
  input  logic     ex_fault,    // execution exception in EXE
  input  logic     dmem_fault,  // data memory exception in MEM
  input  logic     irq,         // external interrupt
  // pipeline state
  output logic     if_valid,
  output addr_t    if_pc,
  output logic     id_valid,
  output addr_t    id_pc,
  output logic     ex_valid,
  output addr_t    ex_pc,
  output instr_t   ex_instr,
  output logic     flush,
  output logic     halted,
  // statistics
  output logic [31:0] cycle_cnt,
  output logic [31:0] branch_cnt,
  output logic [31:0] mispredict_cnt
);

  typedef struct packed {
    logic   valid;
    addr_t  pc;
    instr_t instr;
    logic   pred;
  } id_stage_t;

  typedef struct packed {
    logic   valid;
    addr_t  pc;
    instr_t instr;
    logic   pred;
    logic   is_branch;
    addr_t  target;
  } ex_stage_t;

  id_stage_t id_q;
  ex_stage_t ex_q;
  logic  restart_q, dval_q, halted_q;
  addr_t rs_pc_q, pc_next_q;

  // ID decode
  logic  id_is_branch, id_undef;
  addr_t id_target;
  assign id_is_branch = (id_q.instr[31:28] == OP_BRANCH);
  assign id_target    = branch_target(id_q.pc, id_q.instr);

  // EXE resolution
  logic  b, tk, mispred;
  assign b       = ex_q.valid && ex_q.is_branch && !ex_fault;
  assign tk      = b && ex_taken;
  assign mispred = b && (tk != ex_q.pred);


  logic ex_exit;
  assign ex_exit  = ex_q.valid && (ex_q.instr[31:28] == OP_EXIT);
  // an instruction in ID that is being flushed raises nothing
  assign id_undef = id_q.valid && !is_defined(id_q.instr[31:28]) && !mispred && !ex_exit;

  // PC of the instruction delivered this cycle
  assign if_valid = dval_q && !restart_q && !halted_q;
  assign if_pc    = id_q.valid ? (id_q.pred ? id_target : id_q.pc + addr_t'(1))
                               : pc_next_q;

  // Bus outputs
  assign bus_out.addr     = restart_q ? rs_pc_q : ex_q.target;
  assign bus_out.addr_drv = restart_q || b;
  assign bus_out.b        = b;
  assign bus_out.tk       = tk;
  assign bus_out.ecpt     = !halted_q &&
                            (id_undef || (ex_q.valid && ex_fault) || dmem_fault || irq);


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      restart_q <= 1'b1;
      rs_pc_q   <= START_PC;
      dval_q    <= 1'b0;
      halted_q  <= 1'b0;
      pc_next_q <= START_PC;
      id_q      <= '0;
      ex_q      <= '0;
    end else begin
      dval_q <= !ecpt_line;
      if (ecpt_line && !halted_q) begin
        restart_q <= 1'b1;
        rs_pc_q   <= EXC_VECTOR;
        id_q.valid <= 1'b0;
        ex_q.valid <= 1'b0;
      end else begin
        restart_q <= 1'b0;
        if (restart_q) pc_next_q <= rs_pc_q;
        else if (mispred) pc_next_q <= tk ? ex_q.target : ex_q.pc + addr_t'(1);
        if (ex_exit) halted_q <= 1'b1;
        // IF -> ID
        id_q.valid <= if_valid && !mispred && !ex_exit;
        id_q.pc    <= if_pc;
        id_q.instr <= bus_in.instr;
        id_q.pred  <= bus_in.pred;
        // ID -> EXE
        ex_q.valid     <= id_q.valid && !mispred && !ex_exit && !halted_q;
        ex_q.pc        <= id_q.pc;
        ex_q.instr     <= id_q.instr;
        ex_q.pred      <= id_q.pred;
        ex_q.is_branch <= id_is_branch;
        ex_q.target    <= id_target;
      end
    end
  end

  // Statistics
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle_cnt      <= '0;
      branch_cnt     <= '0;
      mispredict_cnt <= '0;
    end else if (!halted_q) begin
      cycle_cnt <= cycle_cnt + 32'd1;
      if (b)       branch_cnt     <= branch_cnt + 32'd1;
      if (mispred) mispredict_cnt <= mispredict_cnt + 32'd1;
    end
  end

  assign id_valid = id_q.valid;
  assign id_pc    = id_q.pc;
  assign ex_valid = ex_q.valid;
  assign ex_pc    = ex_q.pc;
  assign ex_instr = ex_q.instr;
  assign flush    = mispred;
  assign halted   = halted_q;

  // the memory's ECPT share arrives through ecpt_line
  logic unused;
  assign unused = bus_in.ecpt;

endmodule
