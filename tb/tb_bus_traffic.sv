// tb_bus_traffic: address bus traffic of the whole system on synthetic
// programs shaped like six media benchmarks, and over a range of BTB
// accuracies.
//
// For each benchmark the program has the same branch density as the
// benchmark's dynamic instruction mix (branches per instruction, given in
// per mille below: adpcm 91, epic 152, g721 180, gsm 63, jpeg 133, mpeg2
// 179). A program is a chain of loops; each loop body is a run of ALU
// operations of random length, averaging one branch per 1000/density
// instructions, closed by a loop branch with a random trip count. Some of
// the bodies also hold a data-dependent branch that is taken with
// probability one half: the share of those sets the BTB accuracy. A first
// series runs the six densities with few such branches; a second series runs
// one density with a growing share of them, so accuracy falls.
//
// Per run it counts:
//  * address bus use: 32 bits per value driven, plus B and TK (2 bits) per
//    branch resolved in EXE;
//  * a conventional system's address traffic for the same run: one 32-bit
//    address per instruction fetched.
// Checks: the address bus carries exactly one value per resolved branch
// plus the start address, whatever the accuracy (so its traffic is
// 34 bits x branches + 32); every run ends at its EXIT with the program
// order intact (checked by the top's own assertions and a program-order
// model here); accuracy really falls over the second series; and the
// external saving is above 50 % in every run.
module tb_bus_traffic;
  import aim_pkg::*;

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
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program and datapath model
  localparam int MAXW = 4096;
  instr_t prog [MAXW];
  int     plen;
  int     trip  [MAXW];
  int     lcnt  [MAXW];

  assign ex_fault = 1'b0;
  assign dmem_fault = 1'b0;
  assign irq = 1'b0;

  // condition field [27:24]: 0 loop (trip in table), 3 coin flip
  bit coin = 1'b0;
  always_comb begin
    ex_taken = 1'b0;
    if (ex_valid && ex_instr[31:28] == OP_BRANCH && ex_pc < MAXW) begin
      if (ex_instr[27:24] == 4'd0) ex_taken = lcnt[ex_pc] < trip[ex_pc];
      else                         ex_taken = coin;
    end
  end

  // counters of one run
  int n_drv, n_b, n_instr, n_fetch;
  addr_t exp_pc;

  always @(posedge clk) if (rst_n && !halted) begin
    n_fetch++;
    if (bus_c2m.addr_drv) n_drv++;
    if (bus_c2m.b) n_b++;
    if (ex_valid) begin
      n_instr++;
      check(ex_pc == exp_pc, $sformatf("EXE PC %0d expected %0d", ex_pc, exp_pc));
      if (ex_instr[31:28] == OP_BRANCH) begin
        exp_pc = ex_taken ? branch_target(ex_pc, ex_instr) : ex_pc + 1;
        if (ex_instr[27:24] == 4'd0)
          lcnt[ex_pc] = ex_taken ? lcnt[ex_pc] + 1 : 0;
        else
          coin = 1'($urandom);
      end else exp_pc = ex_pc + 1;
    end
  end

  // Build a program: loops with mean body length so that one instruction
  // in (1000 / dens_pm) is a branch; coin_pct of the bodies hold a
  // coin-flip branch.
  task automatic build(int dens_pm, int coin_pct, int n_loops);
    int pc = 0;
    int mean_body = (1000 + dens_pm / 2) / dens_pm - 1;  // non-branch words per branch
    for (int l = 0; l < n_loops; l++) begin
      int head = pc;
      int body = $urandom_range(mean_body * 2 - 1, 1);
      bit has_coin = ($urandom_range(99) < coin_pct);
      int first_half;
      if (has_coin) body = body * 2 + 1;   // two branches in this loop: keep the density
      first_half = body / 2;
      for (int k = 0; k < body; k++) begin
        if (has_coin && k == first_half) begin
          prog[pc] = {4'h1, 4'd3, 8'h0, 16'd2};   // skip one word on heads
        end else begin
          prog[pc] = {4'h0, 28'($urandom)};
        end
        trip[pc] = 0; lcnt[pc] = 0;
        pc++;
      end
      prog[pc] = {4'h1, 4'd0, 8'h0, 16'(head - pc)};
      trip[pc] = $urandom_range(30, 8);
      lcnt[pc] = 0;
      pc++;
    end
    prog[pc] = {4'h2, 28'h0};
    trip[pc] = 0; lcnt[pc] = 0;
    plen = pc + 1;
  endtask

  task automatic run(string name, int dens_pm, int coin_pct, output real acc, output real saving);
    real conv, ours;
    build(dens_pm, coin_pct, 60);
    rst_n = 0;
    @(negedge clk);
    for (int i = 0; i < plen; i++) begin
      prog_we = 1; prog_addr = addr_t'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    n_drv = 0; n_b = 0; n_instr = 0; n_fetch = 0; exp_pc = '0;
    rst_n = 1;
    wait (halted);
    @(negedge clk);
    check(n_drv == n_b + 1, $sformatf("%s: address bus values %0d, branches %0d", name, n_drv, n_b));
    check(branch_cnt == 32'(n_b), "branch counter");
    acc  = 1.0 - real'(mispredict_cnt) / real'(n_b);
    conv = real'(n_instr) * 32.0;
    ours = real'(n_drv) * 32.0 + real'(n_b) * 2.0;
    saving = 100.0 * (1.0 - ours / conv);
    $display("%-6s instr=%6d branches=%5d (%4.1f%%) accuracy=%5.1f%% addr-bus bits: conventional=%7d this design=%6d saving=%4.1f%% fetches=%0d",
             name, n_instr, n_b, 100.0 * n_b / n_instr, 100.0 * acc, longint'(conv), longint'(ours),
             saving, n_fetch);
    check(saving > 50.0, $sformatf("%s: saving %f", name, saving));
  endtask

  initial begin
    real acc, sav, acc_first, acc_last;
    string names [6] = '{"adpcm", "epic", "g721", "gsm", "jpeg", "mpeg2"};
    int    dens  [6] = '{91, 152, 180, 63, 133, 179};
    int    coins [5] = '{0, 20, 40, 70, 100};
    prog_we = 0; prog_addr = '0; prog_data = '0;
    $display("-- branch densities of the six benchmarks, mostly loop branches");
    for (int i = 0; i < 6; i++) run(names[i], dens[i], 10, acc, sav);
    $display("-- one density (mpeg2), growing share of data-dependent branches");
    for (int i = 0; i < 5; i++) begin
      run($sformatf("c%0d", coins[i]), 179, coins[i], acc, sav);
      if (i == 0) acc_first = acc;
      acc_last = acc;
    end
    check(acc_last < acc_first - 0.05, $sformatf("accuracy did not fall: %f -> %f", acc_first, acc_last));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
