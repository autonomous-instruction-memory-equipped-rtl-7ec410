// tb_aim_system: end-to-end test of the CPU + autonomous instruction memory
// system at its default sizes (64-entry BTB, 16384-word memory).
//
// The testbench loads a small program with nested loops, data-dependent
// (random) branches, an always-taken and a never-taken branch, an undefined
// instruction, and an exception handler at the exception vector. It plays
// the CPU datapath: it decides each branch condition from the instruction's
// condition field and its own per-branch state, and raises an execution
// exception, a data memory exception and an external interrupt once each.
// One handler branch jumps beyond the memory once, to cause an instruction
// memory exception.
//
// Checks, all against the testbench's own program-order model:
//  * every instruction that completes EXE has the PC and the instruction
//    word the program order predicts (taken ? target : PC+1, or the vector
//    after an exception);
//  * timing: the next instruction reaches EXE 1 cycle later, 3 cycles after
//    a misprediction flush and 4 cycles after an exception;
//  * the address bus is driven only in restart cycles and for branches;
//  * the branch and misprediction counters match the observed events;
//  * every mechanism happened at least once: BTB entry creation, taken
//    prediction, both kinds of misprediction, each exception source, the
//    program exit.
// It also prints the address bus traffic compared with a memory that needs
// a 32-bit address for every instruction.
module tb_aim_system;
  import aim_pkg::*;

  localparam int unsigned WORDS  = 16384;
  localparam addr_t       VECTOR = addr_t'(32'h100);
  localparam int unsigned PROG_N = 512;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        prog_we;
  addr_t       prog_addr;
  instr_t      prog_data;
  logic        ex_taken, ex_fault, dmem_fault, irq;
  logic        ex_valid, halted, ecpt_line, flush, btb_alloc;
  addr_t       ex_pc;
  instr_t      ex_instr;
  cpu2mem_t    bus_c2m;
  mem2cpu_t    bus_m2c;
  logic [31:0] cycle_cnt, branch_cnt, mispredict_cnt;

  aim_system dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .ex_taken, .ex_fault, .dmem_fault, .irq,
    .ex_valid, .ex_pc, .ex_instr, .halted,
    .bus_c2m, .bus_m2c, .ecpt_line, .flush, .btb_alloc,
    .cycle_cnt, .branch_cnt, .mispredict_cnt
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- program ----------------
  // Branch condition field [27:24]: 0 loop (taken trip times, then not
  // taken once), 1 always, 2 never, 3 random, 4 taken the first time only.
  instr_t prog [PROG_N];

  function automatic instr_t alu(logic [7:0] tag);
    return {4'h0, tag, 20'h0};
  endfunction
  function automatic instr_t br(logic [3:0] kind, logic [7:0] trip, int off);
    return {4'h1, kind, trip, 16'(off)};
  endfunction

  localparam logic [7:0] TAG_EXF = 8'hEF;  // execution exception, once
  localparam logic [7:0] TAG_DMF = 8'hDF;  // data memory exception, once

  initial begin
    for (int i = 0; i < PROG_N; i++) prog[i] = alu(8'(i));
    prog[0]  = alu(8'h01);
    prog[1]  = alu(8'h02);
    prog[2]  = alu(8'h03);                 // outer loop head
    prog[3]  = alu(8'h04);                 // inner loop head
    prog[4]  = alu(8'h05);
    prog[5]  = br(4'd0, 8'd6, -2);         // inner loop, 6 extra trips
    prog[6]  = br(4'd3, 8'd0, 2);          // random skip of 7
    prog[7]  = alu(8'h07);
    prog[8]  = alu(8'h08);
    prog[9]  = br(4'd0, 8'd24, -7);        // outer loop
    prog[10] = br(4'd1, 8'd0, 3);          // always taken, skips undefined ops
    prog[11] = 32'hF000_0011;              // undefined (wrong path only)
    prog[12] = 32'hF000_0012;              // undefined (wrong path only)
    prog[13] = br(4'd2, 8'd0, -13);        // never taken
    prog[14] = alu(8'h0E);
    prog[15] = 32'hF000_0015;              // undefined: exception -> vector
    // handler at the vector
    prog[256] = alu(8'h10);
    prog[257] = br(4'd4, 8'd0, 16384);     // first time: beyond memory
    prog[258] = alu(TAG_EXF);
    prog[259] = alu(TAG_DMF);
    prog[260] = alu(8'h11);                // loop head
    prog[261] = alu(8'h12);
    prog[262] = br(4'd0, 8'd20, -2);
    prog[263] = {4'h2, 28'h0};             // exit
  end

  // ---------------- datapath model ----------------
  int unsigned loop_cnt [addr_t];
  bit          once     [addr_t];
  bit          rnd_bit  = 1'b0;

  function automatic bit cond_of(addr_t pc, instr_t i);
    case (i[27:24])
      4'd0: return (loop_cnt.exists(pc) ? loop_cnt[pc] : 0) < int'(i[23:16]);
      4'd1: return 1'b1;
      4'd2: return 1'b0;
      4'd3: return rnd_bit;
      4'd4: return !once.exists(pc);
      default: return 1'b0;
    endcase
  endfunction

  logic ex_is_branch;
  assign ex_is_branch = ex_valid && (ex_instr[31:28] == OP_BRANCH);
  assign ex_taken = ex_is_branch && cond_of(ex_pc, ex_instr);

  // one-shot exception markers
  bit exf_done = 0, dmf_done = 0, irq_done = 0, dmf_pend = 0;
  int loop_passes = 0;
  assign ex_fault = ex_valid && (ex_instr[27:20] == TAG_EXF) &&
                    (ex_instr[31:28] == OP_ALU) && !exf_done;

  // ---------------- reference model and checks ----------------
  addr_t exp_pc;
  bit    exp_known = 0;
  int    last_ex_cycle = 0, exp_gap = 0, cyc = 0;
  int    n_retired = 0, n_branch = 0, n_flush = 0, n_ecpt = 0;
  int    n_alloc = 0, n_pred = 0, n_mp_taken = 0, n_mp_nt = 0;
  int    n_undef = 0, n_imemf = 0, n_exf = 0, n_dmf = 0, n_irq = 0;
  int    n_addr_drv = 0, n_restart_drv = 0;
  addr_t last_ret_pc = '0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (!halted) begin
      if (bus_m2c.pred && dut.u_mem.fetch_valid) n_pred++;
      if (btb_alloc) n_alloc++;
      if (bus_c2m.addr_drv) begin
        n_addr_drv++;
        if (dut.u_cpu.restart_q) n_restart_drv++;
        else check(bus_c2m.b, "address bus driven without B or restart");
      end
      if (bus_c2m.b) n_branch++;
      if (flush) begin
        n_flush++;
        if (bus_c2m.tk) n_mp_taken++; else n_mp_nt++;
      end
    end
    if (ex_valid && !halted) begin
      // PC, instruction and timing of every instruction reaching EXE
      if (exp_known) begin
        check(ex_pc == exp_pc, $sformatf("EXE PC %0h expected %0h", ex_pc, exp_pc));
        check(cyc - last_ex_cycle == exp_gap,
              $sformatf("EXE gap %0d expected %0d at PC %0h",
                        cyc - last_ex_cycle, exp_gap, ex_pc));
      end
      if (ex_pc < WORDS)
        check(ex_instr == prog[ex_pc], $sformatf("instruction at %0h", ex_pc));
      last_ex_cycle = cyc;
      exp_known = 1;
      if (!ecpt_line) begin
        n_retired++;
        last_ret_pc = ex_pc;
        if (ex_is_branch) begin
          exp_pc = ex_taken ? branch_target(ex_pc, ex_instr) : ex_pc + 1;
          exp_gap = flush ? 3 : 1;
          case (ex_instr[27:24])
            4'd0: loop_cnt[ex_pc] = ex_taken ? (loop_cnt.exists(ex_pc) ? loop_cnt[ex_pc] : 0) + 1 : 0;
            4'd3: rnd_bit = 1'($urandom);
            4'd4: once[ex_pc] = 1'b1;
            default: ;
          endcase
        end else begin
          exp_pc = ex_pc + 1;
          exp_gap = 1;
        end
      end
    end
    if (ecpt_line && !halted) begin
      n_ecpt++;
      exp_pc = VECTOR;
      exp_known = 1;
      exp_gap = 4;
      last_ex_cycle = cyc;
      if (bus_m2c.ecpt) n_imemf++;
      if (ex_fault) begin n_exf++; exf_done = 1; end
      if (dmem_fault) begin n_dmf++; end
      if (irq) begin n_irq++; end
      if (dut.u_cpu.id_undef) n_undef++;
    end
  end

  // MEM-stage fault: one cycle after the marked instruction left EXE
  always @(posedge clk) if (rst_n) begin
    dmem_fault <= 1'b0;
    irq        <= 1'b0;
    if (ex_valid && !ecpt_line && ex_instr[31:28] == OP_ALU &&
        ex_instr[27:20] == TAG_DMF && !dmf_done) begin
      dmem_fault <= 1'b1;
      dmf_done = 1;
    end
    if (ex_valid && !ecpt_line && ex_pc == 32'd261) begin
      loop_passes++;
      if (loop_passes == 5 && !irq_done) begin
        irq <= 1'b1;
        irq_done = 1;
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    prog_we = 0; prog_addr = '0; prog_data = '0;
    dmem_fault = 0; irq = 0;
    @(negedge clk);
    for (int i = 0; i < PROG_N; i++) begin
      prog_we = 1; prog_addr = addr_t'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    @(negedge clk);
    rst_n = 1;
    wait (halted);
    repeat (3) @(posedge clk);
    check(last_ret_pc == 32'd263, $sformatf("halted after PC %0h", last_ret_pc));
    check(branch_cnt == 32'(n_branch), $sformatf("branch counter %0d vs %0d", branch_cnt, n_branch));
    check(mispredict_cnt == 32'(n_flush), $sformatf("mispredict counter %0d vs %0d", mispredict_cnt, n_flush));
    check(n_addr_drv == n_branch + n_restart_drv, "address bus use");
    check(n_restart_drv == n_ecpt + 1, $sformatf("restarts %0d vs exceptions %0d + start", n_restart_drv, n_ecpt));
    // every mechanism must have happened
    check(n_alloc > 0,    "BTB entry creation never happened");
    check(n_pred > 0,     "taken prediction never happened");
    check(n_mp_taken > 0, "mispredicted taken branch never happened");
    check(n_mp_nt > 0,    "mispredicted not-taken branch never happened");
    check(n_undef == 1,   "undefined-instruction exception count");
    check(n_imemf == 1,   "instruction memory exception count");
    check(n_exf == 1,     "execution exception count");
    check(n_dmf == 1,     "data memory exception count");
    check(n_irq == 1,     "interrupt count");
    check(n_branch > 100, "too few branches");
    $display("events: retired=%0d branches=%0d mispredicts=%0d btb_alloc=%0d pred_taken=%0d mp_taken=%0d mp_not_taken=%0d exceptions=%0d cycles=%0d",
             n_retired, n_branch, n_flush, n_alloc, n_pred, n_mp_taken, n_mp_nt, n_ecpt, cycle_cnt);
    $display("address bus: %0d transfers (%0d bits with B/TK) vs %0d addresses (%0d bits) without the BTB in memory",
             n_addr_drv, n_addr_drv*32 + n_branch*2, n_retired, n_retired*32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
