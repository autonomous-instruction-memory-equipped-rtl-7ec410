// btb_fetch_unit: the control of the [BTB+IM] module, which decides on its
// own which instruction to read next.
//
// Three registers follow the PCs of the instructions in the CPU's IF, ID
// and EXE stages (pc_if, pc_id, pc_ex), with the prediction made for each
// (pred in IF is combinational; tp_id, tp_ex registered). Every cycle the
// next fetch address is chosen, in priority order:
//
//   1. restart cycle (after reset or after ECPT): the address bus value,
//      which the CPU drives with the start or restart PC;
//   2. misprediction of the branch in EXE (B and TK differ from the
//      prediction tracked for it): the target from the address bus if the
//      branch was taken, pc_ex+1 if it was not;
//   3. BTB hit with a taken prediction for pc_if: the stored target
//      (PRED=1 goes to the CPU with the instruction);
//   4. otherwise the fall-through pc_if+1.
//
// The chosen address goes straight to the synchronous instruction memory,
// so the instruction for pc_if is on the bus in the cycle pc_if is current.
// In the cycle the CPU drives B, the unit hands pc_ex, the target on the
// address bus and TK to the BTB table for entry creation and predictor
// update. The misprediction check is qualified by B: only a branch that the
// CPU actually resolves can mispredict.
//
// A failed fetch (address beyond the memory) is not reported at once: it
// may be on a wrong path. Its fault bit travels with the tracked PCs and is
// raised on ECPT (ex_fault) only when the instruction reaches EXE without
// having been flushed by a misprediction or an exception.
//
// The PC tracking, the four cases and the recovery addresses follow the
// algorithm this design implements. Qualifying the check by B, the
// restart-cycle handshake and the "inst_valid" flag (low in the restart
// cycle and the cycle after an exception, when no real instruction is
// delivered) are this design's.
module btb_fetch_unit
  import aim_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // bus from the CPU
  input  addr_t    abus,
  input  logic     b,
  input  logic     tk,
  input  logic     ecpt,        // the whole ECPT line (CPU or memory)
  // BTB table lookup for pc_if
  output addr_t    lk_pc,
  input  logic     lk_hit,
  input  logic     lk_pred_taken,
  input  addr_t    lk_target,
  // BTB table update
  output logic     upd_en,
  output addr_t    upd_pc,
  output addr_t    upd_target,
  output logic     upd_taken,
  // instruction memory read address (for the next cycle)
  output addr_t    next_pc,
  // state seen by the rest of the module
  output addr_t    pc_if,
  output logic     pred,        // PRED line for the instruction at pc_if
  output logic     inst_valid,  // a real instruction is delivered this cycle
  output logic     mispredict,  // recovery taken this cycle
  output logic     restart,     // restart cycle: next_pc taken from the bus
  // instruction memory exception, tracked to EXE
  input  logic     if_fault,    // the fetch delivered this cycle failed
  output logic     ex_fault     // a failed fetch that was not flushed is in EXE
);

  addr_t pc_if_q, pc_id_q, pc_ex_q;
  logic  tp_id_q, tp_ex_q;
  logic  restart_q, valid_q;
  logic  vld_id_q, vld_ex_q, flt_id_q, flt_ex_q;

  assign pc_if      = pc_if_q;
  assign lk_pc      = pc_if_q;
  assign restart    = restart_q;
  assign inst_valid = valid_q && !restart_q;
  assign pred       = inst_valid && lk_hit && lk_pred_taken;
  assign mispredict = !restart_q && b && (tk != tp_ex_q);

  assign ex_fault   = vld_ex_q && flt_ex_q;

  assign upd_en     = !restart_q && b;
  assign upd_pc     = pc_ex_q;
  assign upd_target = abus;
  assign upd_taken  = tk;

  always_comb begin
    if (restart_q)                     next_pc = abus;
    else if (mispredict)               next_pc = tk ? abus : pc_ex_q + addr_t'(1);
    else if (lk_hit && lk_pred_taken)  next_pc = lk_target;
    else                               next_pc = pc_if_q + addr_t'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      restart_q <= 1'b1;
      valid_q   <= 1'b0;
      pc_if_q   <= '0;
      pc_id_q   <= '0;
      pc_ex_q   <= '0;
      tp_id_q   <= 1'b0;
      tp_ex_q   <= 1'b0;
      vld_id_q  <= 1'b0;
      vld_ex_q  <= 1'b0;
      flt_id_q  <= 1'b0;
      flt_ex_q  <= 1'b0;
    end else begin
      restart_q <= ecpt;
      valid_q   <= !ecpt;
      pc_if_q   <= next_pc;
      pc_id_q   <= pc_if_q;
      pc_ex_q   <= pc_id_q;
      tp_id_q   <= pred;
      tp_ex_q   <= tp_id_q;
      // which of the instructions now in ID/EXE survive (not flushed)
      vld_id_q  <= inst_valid && !mispredict && !ecpt;
      vld_ex_q  <= vld_id_q   && !mispredict && !ecpt;
      flt_id_q  <= if_fault;
      flt_ex_q  <= flt_id_q;
    end
  end

endmodule
