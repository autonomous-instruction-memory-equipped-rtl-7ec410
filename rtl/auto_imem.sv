// auto_imem: the [BTB+IM] bus module, an instruction memory that follows the
// program flow by itself.
//
// It joins the BTB fetch unit, the BTB table and the instruction memory.
// Every cycle it delivers one instruction to the CPU with the PRED flag,
// without an address from the CPU: the fetch unit computes the next address
// from its own PC, the BTB prediction and, when the CPU resolves a branch,
// the B/TK lines and the target on the address bus. The CPU drives the
// address bus only to start the program, after an exception, and while a
// branch is in EXE.
//
// bus_in/bus_out are the two halves of the bus (aim_pkg::cpu2mem_t and
// mem2cpu_t). bus_out.ecpt is this module's share of the ECPT line: an
// instruction memory exception (fetch beyond the memory), raised when the
// failed fetch reaches the CPU's EXE stage without being flushed. ecpt_line is the whole line as seen on the bus, used
// for this module's own restart. The ld_* port writes the program into the
// memory. Latency: the instruction for an address chosen in cycle t is on
// bus_out in cycle t+1; after a misprediction the correct instruction
// follows in the next cycle; after ECPT one cycle is taken to read the
// restart address from the bus.
//
// The structure (BTB bound to the instruction memory in one bus module) and
// its behaviour follow the design this RTL implements; the sizes, the
// synchronous memory and the load port are this design's choices.
module auto_imem
  import aim_pkg::*;
#(
  parameter int unsigned BTB_ENTRIES = 64,
  parameter int unsigned IMEM_WORDS  = 16384
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cpu2mem_t bus_in,
  input  logic     ecpt_line,
  output mem2cpu_t bus_out,
  // program load
  input  logic     ld_we,
  input  addr_t    ld_addr,
  input  instr_t   ld_data,
  // observation
  output addr_t    fetch_pc,
  output logic     fetch_valid,
  output logic     btb_alloc,
  output logic     recover
);

  addr_t lk_pc, lk_target, upd_pc, upd_target, next_pc, pc_if;
  logic  lk_hit, lk_pred_taken, upd_en, upd_taken;
  logic  pred, inst_valid, mispredict, restart;
  instr_t rd_data;
  logic  rd_fault, mem_fault;

  btb_fetch_unit u_fetch (
    .clk, .rst_n,
    .abus          (bus_in.addr),
    .b             (bus_in.b),
    .tk            (bus_in.tk),
    .ecpt          (ecpt_line),
    .lk_pc, .lk_hit, .lk_pred_taken, .lk_target,
    .upd_en, .upd_pc, .upd_target, .upd_taken,
    .next_pc, .pc_if, .pred, .inst_valid, .mispredict, .restart,
    .if_fault (rd_fault),
    .ex_fault (mem_fault)
  );

  btb_table #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n,
    .lk_pc, .lk_hit, .lk_pred_taken, .lk_target,
    .upd_en, .upd_pc, .upd_target, .upd_taken,
    .alloc (btb_alloc)
  );

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk,
    .rd_addr  (next_pc),
    .rd_data,
    .rd_fault,
    .we       (ld_we),
    .waddr    (ld_addr),
    .wdata    (ld_data)
  );

  assign bus_out.instr = rd_data;
  assign bus_out.pred  = pred;
  assign bus_out.ecpt  = mem_fault;

  assign fetch_pc    = pc_if;
  assign fetch_valid = inst_valid;
  assign recover     = mispredict;

  logic unused;
  assign unused = restart ^ bus_in.addr_drv ^ bus_in.ecpt;

endmodule
