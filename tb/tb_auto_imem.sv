// tb_auto_imem: the [BTB+IM] module with a 4-entry BTB and a 64-word memory,
// driven by a CPU model written in the testbench.
//
// Each memory word carries its own address in bits [31:16] and a branch
// flag in bit 15, so the testbench can tell which instruction arrived
// without trusting the module. The CPU model keeps IF/ID/EXE, sends the
// start PC, and for a branch in EXE drives B, TK and the target; on a
// misprediction it flushes IF and ID, on ECPT it restarts at the vector.
// Checks:
//  * the first instruction arrives in the second cycle after reset;
//  * every instruction the CPU model keeps is the one program order asks
//    for (predicted target after PRED, PC+1 otherwise, recovery address in
//    the cycle after a misprediction);
//  * the sequence of instructions completing EXE equals the reference
//    program order;
//  * a branch beyond the memory raises ECPT when the failed fetch reaches
//    EXE, and not for a failed fetch on a flushed path;
//  * PRED, BTB creation, both kinds of misprediction were seen.
module tb_auto_imem;
  import aim_pkg::*;

  localparam int unsigned WORDS = 64;
  localparam addr_t       VEC   = addr_t'(20);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cpu2mem_t bus_in;
  mem2cpu_t bus_out;
  logic     ecpt_line, ld_we, fetch_valid, btb_alloc, recover;
  addr_t    ld_addr, fetch_pc;
  instr_t   ld_data;
  int checks = 0, failures = 0;

  auto_imem #(.BTB_ENTRIES(4), .IMEM_WORDS(WORDS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // program: branch kind 0 loop(trip), 1 always, 3 irregular (fixed pattern), 4 once
  int    br_kind [WORDS];
  int    br_trip [WORDS];
  addr_t br_tgt  [WORDS];
  bit    is_br   [WORDS];
  int    loopc   [WORDS];
  bit    onced   [WORDS];

  function automatic instr_t word(int pc);
    return {16'(pc), is_br[pc], 15'h0};
  endfunction

  task automatic mk_br(int pc, int kind, int trip, int tgt);
    is_br[pc] = 1; br_kind[pc] = kind; br_trip[pc] = trip; br_tgt[pc] = addr_t'(tgt);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CPU model state
  bit    c_rs, c_dval, id_v, id_pred, ex_v, ex_pred;
  addr_t c_rspc, c_pcnext, id_pc, ex_pc;
  localparam logic [31:0] PAT = 32'hA5C3_96E1;  // outcomes of the irregular branch
  addr_t ref_q [$];
  int    n_pred = 0, n_alloc = 0, n_mpt = 0, n_mpnt = 0, n_memf = 0, cyc = 0, first_cyc = -1;

  initial begin
    addr_t if_pc, got_pc;
    bit b, tk, mp, cpu_ecpt, if_v, taken, done;
    for (int i = 0; i < WORDS; i++) begin
      is_br[i] = 0; br_kind[i] = 0; br_trip[i] = 0; br_tgt[i] = '0; loopc[i] = 0; onced[i] = 0;
    end
    mk_br(5, 0, 3, 2);     // inner loop
    mk_br(9, 3, 0, 12);    // irregular skip
    mk_br(14, 0, 5, 0);    // outer loop
    mk_br(15, 4, 0, 100);  // once: beyond the memory
    mk_br(25, 1, 0, 30);   // always
    mk_br(31, 0, 8, 29);   // tight loop
    // load
    ld_we = 0; ld_addr = '0; ld_data = '0;
    bus_in = '0; ecpt_line = 0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      ld_we = 1; ld_addr = addr_t'(i); ld_data = word(i);
      @(negedge clk);
    end
    ld_we = 0;
    // reference program order (expected EXE sequence)
    begin
      int pc = 0; int lc [WORDS]; bit od [WORDS]; bit r;
      for (int i = 0; i < WORDS; i++) begin lc[i] = 0; od[i] = 0; end
      while (pc != 33) begin
        ref_q.push_back(addr_t'(pc));
        if (pc < WORDS && is_br[pc]) begin
          case (br_kind[pc])
            0: begin r = lc[pc] < br_trip[pc]; lc[pc] = r ? lc[pc] + 1 : 0; end
            1: r = 1;
            4: begin r = !od[pc]; od[pc] = 1; end
            default: r = 0;
          endcase
          if (br_kind[pc] == 3) begin r = PAT[lc[pc] % 32]; lc[pc]++; end
          pc = r ? int'(br_tgt[pc]) : pc + 1;
          if (pc >= WORDS) pc = int'(VEC);  // failed fetch -> vector
        end else pc++;
      end
    end
    c_rs = 1; c_rspc = '0; c_dval = 0; id_v = 0; ex_v = 0; c_pcnext = '0;
    id_pc = '0; ex_pc = '0; id_pred = 0; ex_pred = 0; done = 0;
    rst_n = 1;
    while (!done) begin
      // ---- combinational part of cycle ----
      cyc++;
      if_v  = c_dval && !c_rs;
      if_pc = id_v ? (id_pred ? br_tgt[id_pc] : id_pc + 1) : c_pcnext;
      b  = ex_v && is_br[ex_pc];
      taken = 0;
      if (b) case (br_kind[ex_pc])
        0: taken = loopc[ex_pc] < br_trip[ex_pc];
        1: taken = 1;
        3: taken = PAT[loopc[ex_pc] % 32];
        4: taken = !onced[ex_pc];
        default: taken = 0;
      endcase
      tk = b && taken;
      mp = b && (tk != ex_pred);
      bus_in.addr     = c_rs ? c_rspc : br_tgt[ex_pc];
      bus_in.addr_drv = c_rs || b;
      bus_in.b        = b;
      bus_in.tk       = tk;
      bus_in.ecpt     = 0;
      #1;
      ecpt_line = bus_out.ecpt;
      #1;
      if (if_v) begin
        got_pc = addr_t'(bus_out.instr[31:16]);
        if (first_cyc < 0) begin
          first_cyc = cyc;
          check(cyc == 2, $sformatf("first instruction in cycle %0d", cyc));
        end
        if (if_pc < WORDS) check(got_pc == if_pc, $sformatf("delivered %0d expected %0d", got_pc, if_pc));
        if (bus_out.pred) n_pred++;
      end
      if (btb_alloc) n_alloc++;
      if (mp && tk) n_mpt++;
      if (mp && !tk) n_mpnt++;
      check(recover == (mp && !c_rs), "recover flag");
      if (ecpt_line) begin
        n_memf++;
        check(ex_v && ex_pc >= WORDS, $sformatf("memory exception for EXE PC %0d", ex_pc));
      end
      // retire
      if (ex_v && !ecpt_line) begin
        if (ref_q.size() > 0) begin
          check(ex_pc == ref_q.pop_front(), $sformatf("EXE order at %0d", ex_pc));
        end
        if (ex_pc == 33) done = 1;
        if (b) begin
          if (br_kind[ex_pc] == 0) loopc[ex_pc] = taken ? loopc[ex_pc] + 1 : 0;
          if (br_kind[ex_pc] == 3) loopc[ex_pc]++;
          if (br_kind[ex_pc] == 4) onced[ex_pc] = 1;
        end
      end
      @(posedge clk);
      // ---- state update ----
      c_dval = !ecpt_line;
      if (ecpt_line) begin
        c_rs = 1; c_rspc = VEC; id_v = 0; ex_v = 0;
      end else begin
        if (c_rs) c_pcnext = c_rspc;
        else if (mp) c_pcnext = tk ? br_tgt[ex_pc] : ex_pc + 1;
        c_rs = 0;
        ex_v = id_v && !mp; ex_pc = id_pc; ex_pred = id_pred;
        id_v = if_v && !mp; id_pc = if_pc; id_pred = bus_out.pred;
      end
      @(negedge clk);
    end
    check(ref_q.size() == 0, "reference sequence not finished");
    check(n_pred > 5 && n_alloc > 3 && n_mpt > 2 && n_mpnt > 2,
          $sformatf("coverage pred=%0d alloc=%0d mpt=%0d mpnt=%0d", n_pred, n_alloc, n_mpt, n_mpnt));
    check(n_memf == 1, $sformatf("memory exceptions %0d", n_memf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
