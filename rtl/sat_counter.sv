// sat_counter: next state of the BTB's two-bit saturating branch predictor.
//
// Each BTB entry holds one of four states: strongly not taken, weakly not
// taken, weakly taken, strongly taken (encoded 0..3, see aim_pkg::ctr_t). A
// resolved taken branch moves the state one step towards "strongly taken", a
// not-taken branch one step towards "strongly not taken"; the end states
// saturate. The upper bit is the prediction.
//
// The four states and the up/down update on the taken signal TK follow the
// algorithm this design implements, which leaves the transitions free; the
// plain saturating up/down counter chosen here is this design's choice.
//
// Purely combinational: cur and taken in, nxt and pred_taken out.
module sat_counter
  import aim_pkg::*;
(
  input  ctr_t cur,
  input  logic taken,
  output ctr_t nxt,
  output logic pred_taken
);

  always_comb begin
    if (taken) nxt = (cur == CTR_ST)  ? CTR_ST  : ctr_t'(cur + 2'd1);
    else       nxt = (cur == CTR_SNT) ? CTR_SNT : ctr_t'(cur - 2'd1);
  end

  assign pred_taken = cur[1];

endmodule
