// tb_btb_fetch_unit: next-fetch-address control of the [BTB+IM] module.
//
// The BTB table is replaced by a fixed rule in the testbench (PCs ending in
// 3'b101 hit; bit 3 gives the prediction; target = PC + 0x40). Bus inputs
// (address, B, TK, ECPT) and the memory fault are random. The testbench
// keeps its own copy of the tracked state (PCs of IF/ID/EXE, predictions,
// restart and validity flags) and each cycle checks the chosen next
// address against the priority restart > misprediction > taken prediction
// > PC+1, the recovery address (target if taken, EXE PC+1 if not), PRED,
// the BTB update outputs and the memory exception raised in EXE.
module tb_btb_fetch_unit;
  import aim_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t abus, lk_pc, lk_target, upd_pc, upd_target, next_pc, pc_if;
  logic  b, tk, ecpt, lk_hit, lk_pred_taken, upd_en, upd_taken;
  logic  pred, inst_valid, mispredict, restart, if_fault, ex_fault;
  int checks = 0, failures = 0;

  btb_fetch_unit dut (.*);

  assign lk_hit        = (lk_pc[2:0] == 3'b101);
  assign lk_pred_taken = lk_hit && lk_pc[3];
  assign lk_target     = lk_pc + addr_t'(32'h40);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // model state
  addr_t m_if, m_id, m_ex;
  bit    m_tpid, m_tpex, m_rs, m_val, m_vid, m_vex, m_fid, m_fex;
  int    n_rs = 0, n_mp_t = 0, n_mp_nt = 0, n_pt = 0, n_fault = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t e_next;
    bit e_pred, e_mp, e_hit, e_pt, e_valid;
    abus = '0; b = 0; tk = 0; ecpt = 0; if_fault = 0;
    m_if = '0; m_id = '0; m_ex = '0; m_tpid = 0; m_tpex = 0;
    m_rs = 1; m_val = 0; m_vid = 0; m_vex = 0; m_fid = 0; m_fex = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      abus = $urandom;
      b    = ($urandom_range(3) == 0);
      tk   = b && $urandom_range(1);
      ecpt = ($urandom_range(40) == 0);
      if_fault = ($urandom_range(6) == 0);
      #1;
      e_hit   = (m_if[2:0] == 3'b101);
      e_pt    = e_hit && m_if[3];
      e_valid = m_val && !m_rs;
      e_pred  = e_valid && e_pt;
      e_mp    = !m_rs && b && (tk != m_tpex);
      if (m_rs)       e_next = abus;
      else if (e_mp)  e_next = tk ? abus : m_ex + 1;
      else if (e_pt)  e_next = m_if + 32'h40;
      else            e_next = m_if + 1;
      check(pc_if == m_if, "pc_if");
      check(next_pc == e_next, $sformatf("next_pc %h expected %h", next_pc, e_next));
      check(pred == e_pred, "PRED");
      check(inst_valid == e_valid, "inst_valid");
      check(mispredict == e_mp, "mispredict");
      check(restart == m_rs, "restart");
      check(upd_en == (!m_rs && b) && upd_pc == m_ex && upd_target == abus &&
            upd_taken == tk, "BTB update outputs");
      check(ex_fault == (m_vex && m_fex), "memory exception in EXE");
      if (m_rs) n_rs++;
      if (e_mp && tk) n_mp_t++;
      if (e_mp && !tk) n_mp_nt++;
      if (e_pred) n_pt++;
      if (ex_fault) n_fault++;
      @(posedge clk);
      m_vex = m_vid && !e_mp && !ecpt;
      m_vid = e_valid && !e_mp && !ecpt;
      m_fex = m_fid; m_fid = if_fault;
      m_tpex = m_tpid; m_tpid = e_pred;
      m_ex = m_id; m_id = m_if; m_if = e_next;
      m_rs = ecpt; m_val = !ecpt;
      @(negedge clk);
    end
    check(n_rs > 10 && n_mp_t > 10 && n_mp_nt > 10 && n_pt > 10 && n_fault > 10,
          $sformatf("coverage rs=%0d mpt=%0d mpnt=%0d pt=%0d fault=%0d", n_rs, n_mp_t, n_mp_nt, n_pt, n_fault));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
