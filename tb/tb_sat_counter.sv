// tb_sat_counter: exhaustive test of the two-bit saturating predictor.
// All four states are driven with taken and not taken; the expected next
// state is the saturating +1/-1 of the state number, the prediction is
// "state >= 2". A walk of taken/not-taken runs then checks hysteresis:
// from strongly taken it takes two not-taken outcomes to flip the
// prediction.
module tb_sat_counter;
  import aim_pkg::*;

  ctr_t cur, nxt;
  logic taken, pred_taken;
  int checks = 0, failures = 0;

  sat_counter dut (.cur, .taken, .nxt, .pred_taken);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, e;
    for (s = 0; s < 4; s++) begin
      for (int t = 0; t < 2; t++) begin
        cur = ctr_t'(s); taken = 1'(t);
        #1;
        e = t ? ((s == 3) ? 3 : s + 1) : ((s == 0) ? 0 : s - 1);
        check(int'(nxt) == e, $sformatf("state %0d taken %0d -> %0d, expected %0d", s, t, nxt, e));
        check(pred_taken == (s >= 2), $sformatf("prediction of state %0d", s));
      end
    end
    // hysteresis walk
    s = 3;
    for (int k = 0; k < 2; k++) begin
      cur = ctr_t'(s); taken = 1'b0; #1;
      s = int'(nxt);
    end
    cur = ctr_t'(s); #1;
    check(!pred_taken && s == 1, "two not-taken outcomes flip a strongly taken prediction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
