// tb_btb_table: branch target buffer storage with 8 entries.
//
// A reference model in the testbench (direct-mapped: index = low 3 PC bits,
// full tag) is updated with every random create/update. Each cycle a random
// PC, drawn from a small set so that hits, misses and index conflicts all
// occur, is looked up and hit, target and prediction are compared with the
// model. Checked rules: a new entry starts weakly taken and is stepped by TK
// in the same cycle (so a first taken outcome gives strongly taken, a first
// not-taken outcome weakly not taken); an existing entry keeps its target
// and its counter saturates; alloc pulses only for a missing entry; reset
// empties the table.
module tb_btb_table;
  import aim_pkg::*;

  localparam int unsigned N = 8;

  logic  clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t lk_pc, lk_target, upd_pc, upd_target;
  logic  lk_hit, lk_pred_taken, upd_en, upd_taken, alloc;
  int checks = 0, failures = 0;

  btb_table #(.ENTRIES(N)) dut (.*);

  bit    m_valid [N];
  addr_t m_pc    [N];
  addr_t m_tgt   [N];
  int    m_ctr   [N];
  addr_t pcs     [12];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic bit m_hit(addr_t pc);
    return m_valid[pc % N] && m_pc[pc % N] == pc;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_alloc = 0, n_hit = 0;

  initial begin
    for (int i = 0; i < N; i++) begin m_valid[i] = 0; m_ctr[i] = 0; end
    for (int i = 0; i < 12; i++) pcs[i] = addr_t'($urandom) & ~addr_t'(7) | addr_t'(i % N);
    pcs[11] = pcs[3] ^ addr_t'(32'h100);   // same index, other tag
    upd_en = 0; lk_pc = '0; upd_pc = '0; upd_target = '0; upd_taken = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // lookup check (state from previous writes)
      lk_pc = pcs[$urandom_range(11)];
      #1;
      check(lk_hit == m_hit(lk_pc), $sformatf("hit for %h: dut %0d model %0d", lk_pc, lk_hit, m_hit(lk_pc)));
      if (m_hit(lk_pc)) begin
        n_hit++;
        check(lk_target == m_tgt[lk_pc % N], "target");
        check(lk_pred_taken == (m_ctr[lk_pc % N] >= 2), "prediction");
      end else
        check(!lk_pred_taken, "prediction without hit");
      // random update
      upd_en     = ($urandom_range(2) != 0);
      upd_pc     = pcs[$urandom_range(11)];
      upd_target = $urandom;
      upd_taken  = $urandom_range(1);
      #1;
      check(alloc == (upd_en && !m_hit(upd_pc)), "alloc");
      if (upd_en) begin
        int k; k = upd_pc % N;
        if (!m_hit(upd_pc)) begin
          n_alloc++;
          m_valid[k] = 1; m_pc[k] = upd_pc; m_tgt[k] = upd_target;
          m_ctr[k] = upd_taken ? 3 : 1;
        end else
          m_ctr[k] = upd_taken ? ((m_ctr[k] == 3) ? 3 : m_ctr[k] + 1)
                               : ((m_ctr[k] == 0) ? 0 : m_ctr[k] - 1);
      end
      @(posedge clk);
    end
    @(negedge clk); upd_en = 0;
    check(n_alloc > 10 && n_hit > 100, "coverage of creation and hits");
    // reset clears
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      lk_pc = pcs[i]; #1;
      check(!lk_hit, "hit after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
