// imem: the instruction memory inside the [BTB+IM] bus module.
//
// WORDS instructions of 32 bits, addressed by instruction (address+1 is the
// next instruction). Reads are synchronous, like an SRAM: rd_addr presented
// in one cycle gives rd_data in the next. The read address always comes from
// the BTB fetch unit, never directly from the CPU. rd_fault is registered
// with the data and flags an address beyond the last word; the data is then
// zero. A write port (we, waddr, wdata) loads the program.
//
// Only the memory's existence and its place next to the BTB are given; the
// size, the synchronous read, the load port and the out-of-range fault as
// the "instruction memory exception" are this design's choices.
module imem
  import aim_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic   clk,
  input  addr_t  rd_addr,
  output instr_t rd_data,
  output logic   rd_fault,
  input  logic   we,
  input  addr_t  waddr,
  input  instr_t wdata
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  instr_t mem [WORDS];

  logic in_range, w_in_range;
  assign in_range   = (rd_addr  < addr_t'(WORDS));
  assign w_in_range = (waddr    < addr_t'(WORDS));

  always_ff @(posedge clk) begin
    if (we && w_in_range) mem[waddr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    rd_data  <= in_range ? mem[rd_addr[AW-1:0]] : '0;
    rd_fault <= !in_range;
  end

endmodule
