// tb_vp_vote3: exhaustive check of the three-input vote circuit. For all eight
// input patterns the majority, the unanimity flag and the outvoted mask are
// compared with values computed by counting the taken votes.
module tb_vp_vote3;
  logic [2:0] votes;
  logic       taken, unanimous;
  logic [2:0] outvoted;
  int checks = 0, failures = 0;

  vp_vote3 dut (.votes(votes), .taken(taken), .unanimous(unanimous), .outvoted(outvoted));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      logic exp_taken;
      logic [2:0] exp_out;
      votes = 3'(v);
      #1;
      ones = int'(votes[0]) + int'(votes[1]) + int'(votes[2]);
      exp_taken = (ones >= 2);
      for (int i = 0; i < 3; i++) exp_out[i] = (votes[i] != exp_taken);
      checks += 3;
      if (taken !== exp_taken) begin failures++; $display("votes=%b taken=%b exp=%b", votes, taken, exp_taken); end
      if (unanimous !== (ones == 0 || ones == 3)) begin failures++; $display("votes=%b unanimous=%b", votes, unanimous); end
      if (outvoted !== exp_out) begin failures++; $display("votes=%b outvoted=%b exp=%b", votes, outvoted, exp_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
