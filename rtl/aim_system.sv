// aim_system: a CPU and an autonomous instruction memory joined by a bus.
//
// The branch target buffer is not in the CPU but in the instruction memory's
// bus module ([BTB+IM], auto_imem). That module streams one instruction per
// cycle to the CPU, choosing each next address itself, so the instruction
// address bus is used only to start the program, after an exception, and to
// carry a branch target while the branch is in EXE. The CPU's half of the
// protocol is cpu_flow_ctrl.
//
// The bus is the pair of structs cpu2mem_t / mem2cpu_t from aim_pkg; its
// ECPT line is the OR of both sides' exception outputs. Both halves are
// brought out (bus_c2m, bus_m2c) so the address bus traffic can be observed.
// The CPU datapath (register file, ALU, data memory) is outside this RTL:
// its branch condition and exception sources enter as ports, and the
// instruction in EXE is brought out so that a datapath can act on it.
// prog_* loads the program into the instruction memory while rst_n is low
// or before the program starts.
//
// Timing: after rst_n rises the first cycle sends START_PC, the first
// instruction is delivered in the second and reaches EXE in the fourth; a
// program of N instructions with M mispredictions and no exception has its
// last instruction in EXE N+2+2M cycles after reset.
module aim_system
  import aim_pkg::*;
#(
  parameter int unsigned BTB_ENTRIES = 64,
  parameter int unsigned IMEM_WORDS  = 16384,
  parameter addr_t       START_PC    = '0,
  parameter addr_t       EXC_VECTOR  = addr_t'(32'h0000_0100)
) (
  input  logic        clk,
  input  logic        rst_n,
  // program load into the instruction memory
  input  logic        prog_we,
  input  addr_t       prog_addr,
  input  instr_t      prog_data,
  // datapath interface
  input  logic        ex_taken,
  input  logic        ex_fault,
  input  logic        dmem_fault,
  input  logic        irq,
  output logic        ex_valid,
  output addr_t       ex_pc,
  output instr_t      ex_instr,
  output logic        halted,
  // bus observation
  output cpu2mem_t    bus_c2m,
  output mem2cpu_t    bus_m2c,
  output logic        ecpt_line,
  output logic        flush,
  output logic        btb_alloc,
  // statistics
  output logic [31:0] cycle_cnt,
  output logic [31:0] branch_cnt,
  output logic [31:0] mispredict_cnt
);

  logic  if_valid, id_valid, fetch_valid, recover;
  addr_t if_pc, id_pc, fetch_pc;

  assign ecpt_line = bus_c2m.ecpt || bus_m2c.ecpt;

  cpu_flow_ctrl #(.START_PC(START_PC), .EXC_VECTOR(EXC_VECTOR)) u_cpu (
    .clk, .rst_n,
    .bus_in    (bus_m2c),
    .ecpt_line,
    .bus_out   (bus_c2m),
    .ex_taken, .ex_fault, .dmem_fault, .irq,
    .if_valid, .if_pc, .id_valid, .id_pc,
    .ex_valid, .ex_pc, .ex_instr,
    .flush, .halted,
    .cycle_cnt, .branch_cnt, .mispredict_cnt
  );

  auto_imem #(.BTB_ENTRIES(BTB_ENTRIES), .IMEM_WORDS(IMEM_WORDS)) u_mem (
    .clk, .rst_n,
    .bus_in    (bus_c2m),
    .ecpt_line,
    .bus_out   (bus_m2c),
    .ld_we     (prog_we),
    .ld_addr   (prog_addr),
    .ld_data   (prog_data),
    .fetch_pc, .fetch_valid,
    .btb_alloc,
    .recover
  );

  // Both sides track the PC of the instruction in IF independently; they
  // must agree whenever a real instruction is on the bus.
  a_if_pc: assert property (@(posedge clk) disable iff (!rst_n)
                             (fetch_valid && if_valid) |-> (fetch_pc == if_pc))
    else $error("IF PC mismatch: memory %h, CPU %h", fetch_pc, if_pc);
  a_recover: assert property (@(posedge clk) disable iff (!rst_n) recover == flush)
    else $error("memory and CPU disagree on a misprediction");

  logic unused;
  assign unused = id_valid ^ (|id_pc);

endmodule
