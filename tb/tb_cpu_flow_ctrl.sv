// tb_cpu_flow_ctrl: the CPU side of the protocol, driven by a memory model
// written in the testbench.
//
// A random 64-word program (ALU operations, PC-relative branches,
// undefined opcodes in words 0..7, a back branch in word 62 that is taken
// until the last phase, EXIT in word 63) is served by a model of
// the [BTB+IM] module that predicts branches at random, so both kinds of
// misprediction occur often. The testbench also plays the datapath (random
// branch outcomes, occasional execution and data memory exceptions and
// interrupts). It checks:
//  * restart cycles: the address bus carries START_PC after reset and
//    EXC_VECTOR after ECPT, with addr_drv set;
//  * the CPU's PC for every delivered instruction equals the memory model's;
//  * B, TK and the target for each branch in EXE, and addr_drv only for
//    restarts and branches;
//  * the flush (misprediction) signal against the model's own bookkeeping;
//  * ECPT for undefined instructions and the exception inputs;
//  * instructions reach EXE in program order with gaps of 1, 3 (after a
//    flush) or 4 (after ECPT) cycles;
//  * EXIT halts the CPU and the counters match the observed events.
module tb_cpu_flow_ctrl;
  import aim_pkg::*;

  localparam addr_t START = addr_t'(3);
  localparam addr_t VEC   = addr_t'(8);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem2cpu_t bus_in;
  cpu2mem_t bus_out;
  logic  ecpt_line, ex_taken, ex_fault, dmem_fault, irq;
  logic  if_valid, id_valid, ex_valid, flush, halted;
  addr_t if_pc, id_pc, ex_pc;
  instr_t ex_instr;
  logic [31:0] cycle_cnt, branch_cnt, mispredict_cnt;
  int checks = 0, failures = 0;

  cpu_flow_ctrl #(.START_PC(START), .EXC_VECTOR(VEC)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  instr_t prog [64];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model state
  bit    m_rs, m_val, tp_id, tp_ex, v_id, v_ex;
  addr_t fpc, pc_id, pc_ex;
  // reference
  addr_t exp_pc;
  int    last_ex, exp_gap, cyc;
  int    n_b = 0, n_mp = 0, n_mpt = 0, n_mpnt = 0, n_ecpt = 0, n_undef = 0;
  bit    calm;

  function automatic bit isbr(addr_t pc);
    return prog[pc[5:0]][31:28] == OP_BRANCH;
  endfunction

  initial begin
    bit pred, e_b, e_tk, e_mp, e_undef, e_ecpt, e_halt_now, ex_retire;
    addr_t tgt;
    for (int i = 0; i < 64; i++) begin
      int r, t;
      r = $urandom_range(99);
      t = $urandom_range(8, 62);
      if (i == 63)      prog[i] = {4'h2, 28'h0};
      else if (i < 8 && r < 40) prog[i] = {4'h7, 28'(i)};
      else if (r < 30)  prog[i] = {4'h1, 12'h0, 16'(t - i)};
      else if (r < 35 && i < 8) prog[i] = {4'h1, 12'h0, 16'(-i)};
      else              prog[i] = {4'h0, 28'($urandom)};
    end
    prog[20] = {4'h1, 12'h0, 16'(2 - 20)};   // one way into the undefined words
    prog[62] = {4'h1, 12'h0, 16'(8 - 62)};   // taken until the calm phase
    bus_in = '0; ecpt_line = 0; ex_taken = 0; ex_fault = 0; dmem_fault = 0; irq = 0;
    m_rs = 1; m_val = 0; tp_id = 0; tp_ex = 0; v_id = 0; v_ex = 0;
    fpc = '0; pc_id = '0; pc_ex = '0; exp_pc = START; last_ex = 0; exp_gap = 4; cyc = 0; calm = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!halted && cyc < 15000) begin
      cyc++;
      if (cyc == 6000) calm = 1;   // no more taken branches / exceptions: run to EXIT
      // memory model output for this cycle
      pred = m_val && !m_rs && isbr(fpc) && !calm && $urandom_range(1);
      bus_in.instr = (m_val && !m_rs) ? prog[fpc[5:0]] : 32'hF0F0_F0F0;
      bus_in.pred  = pred;
      bus_in.ecpt  = 0;
      // datapath
      ex_taken   = !calm && (pc_ex == 62 || $urandom_range(1) == 1);
      ex_fault   = !calm && ($urandom_range(300) == 0);
      dmem_fault = !calm && ($urandom_range(300) == 0);
      irq        = !calm && ($urandom_range(300) == 0);
      #1;
      ecpt_line = bus_out.ecpt;
      #1;
      // expected behaviour
      e_b   = v_ex && isbr(pc_ex) && !ex_fault;
      e_tk  = e_b && ex_taken;
      e_mp  = e_b && (e_tk != tp_ex);
      e_halt_now = v_ex && prog[pc_ex[5:0]][31:28] == OP_EXIT;
      e_undef = v_id && !is_defined(prog[pc_id[5:0]][31:28]) && !e_mp && !e_halt_now;
      e_ecpt  = e_undef || (v_ex && ex_fault) || dmem_fault || irq;
      tgt = branch_target(pc_ex, prog[pc_ex[5:0]]);
      if (m_rs) begin
        check(bus_out.addr_drv && bus_out.addr == ((cyc == 1) ? START : VEC), "restart address");
        check(!bus_out.b, "B during restart");
      end else begin
        check(bus_out.b == e_b, $sformatf("B at EXE PC %0d", pc_ex));
        check(bus_out.tk == e_tk, "TK");
        check(bus_out.addr_drv == e_b, "addr_drv");
        if (e_b) check(bus_out.addr == tgt, "target on address bus");
      end
      check(flush == e_mp, "flush");
      check(bus_out.ecpt == e_ecpt, $sformatf("ECPT expected %0d", e_ecpt));
      check(ex_valid == v_ex && (!v_ex || ex_pc == pc_ex), "EXE stage");
      if (m_val && !m_rs) check(if_valid && if_pc == fpc, $sformatf("IF PC %0d vs %0d", if_pc, fpc));
      if (e_b) n_b++;
      if (e_mp) begin n_mp++; if (e_tk) n_mpt++; else n_mpnt++; end
      if (e_ecpt) n_ecpt++;
      if (e_undef) n_undef++;
      // program order and timing at EXE
      if (v_ex) begin
        check(ex_pc == exp_pc, $sformatf("EXE PC %0d expected %0d", ex_pc, exp_pc));
        check(cyc - last_ex == exp_gap, $sformatf("EXE gap %0d expected %0d", cyc - last_ex, exp_gap));
        last_ex = cyc;
        if (!e_ecpt) begin
          exp_pc  = e_tk ? tgt : pc_ex + 1;
          exp_gap = e_mp ? 3 : 1;
        end
      end
      if (e_ecpt) begin exp_pc = VEC; exp_gap = 4; last_ex = cyc; end
      @(posedge clk);
      // memory model state update
      if (e_ecpt) begin
        m_rs = 1; m_val = 0; v_id = 0; v_ex = 0;
      end else begin
        addr_t nf;
        if (m_rs) nf = bus_out.addr;
        else if (e_mp) nf = e_tk ? tgt : pc_ex + 1;
        else nf = pred ? branch_target(fpc, prog[fpc[5:0]]) : fpc + 1;
        v_ex = v_id && !e_mp && !e_halt_now; pc_ex = pc_id; tp_ex = tp_id;
        v_id = m_val && !m_rs && !e_mp && !e_halt_now; pc_id = fpc; tp_id = pred;
        fpc = nf;
        m_rs = 0; m_val = 1;
      end
      @(negedge clk);
    end
    check(halted, "EXIT reached");
    check(branch_cnt == 32'(n_b), "branch counter");
    check(mispredict_cnt == 32'(n_mp), "mispredict counter");
    check(n_mpt > 10 && n_mpnt > 10 && n_ecpt > 10 && n_undef > 2,
          $sformatf("coverage mpt=%0d mpnt=%0d ecpt=%0d undef=%0d", n_mpt, n_mpnt, n_ecpt, n_undef));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
