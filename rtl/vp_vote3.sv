// vp_vote3: the vote circuit of the vote predictor.
//
// Three component predictors each give a direction (1 = taken). The circuit
// outputs the majority: taken when two or more predictors say taken, not-taken
// when two or more say not-taken. With three voters there is never a tie.
// Besides the majority it reports whether the vote was unanimous and which
// predictors were outvoted; these flags are this design's addition, used for
// statistics and testing, and do not affect the prediction.
// Purely combinational, no clock.
module vp_vote3 (
  input  logic [2:0] votes,      // direction of predictor 1..3 (bit 0..2), 1 = taken
  output logic       taken,      // majority decision
  output logic       unanimous,  // all three agreed
  output logic [2:0] outvoted    // predictors whose vote lost
);
  always_comb begin
    taken     = (votes[0] & votes[1]) | (votes[0] & votes[2]) | (votes[1] & votes[2]);
    unanimous = (votes == 3'b000) || (votes == 3'b111);
    outvoted  = votes ^ {3{taken}};
  end
endmodule
