// tb_vote_configs: runs the synthetic workload on the four vote predictor
// models (VOTE1..VOTE4) with a 4K-entry PHT, and on VOTE1 with 2K, 8K and 16K
// entries, each against the reference model.
module tb_vote_configs;
  import vp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NI = 7;
  logic [NI-1:0] done;
  int chk [NI], fail [NI], corr [NI];

  vp_e2e_harness #(.CFG(VOTE1), .PHT_ENTRIES(4096))  h0 (.clk(clk), .done(done[0]), .checks(chk[0]), .failures(fail[0]), .correct(corr[0]));
  vp_e2e_harness #(.CFG(VOTE2), .PHT_ENTRIES(4096))  h1 (.clk(clk), .done(done[1]), .checks(chk[1]), .failures(fail[1]), .correct(corr[1]));
  vp_e2e_harness #(.CFG(VOTE3), .PHT_ENTRIES(4096))  h2 (.clk(clk), .done(done[2]), .checks(chk[2]), .failures(fail[2]), .correct(corr[2]));
  vp_e2e_harness #(.CFG(VOTE4), .PHT_ENTRIES(4096))  h3 (.clk(clk), .done(done[3]), .checks(chk[3]), .failures(fail[3]), .correct(corr[3]));
  vp_e2e_harness #(.CFG(VOTE1), .PHT_ENTRIES(2048))  h4 (.clk(clk), .done(done[4]), .checks(chk[4]), .failures(fail[4]), .correct(corr[4]));
  vp_e2e_harness #(.CFG(VOTE1), .PHT_ENTRIES(8192))  h5 (.clk(clk), .done(done[5]), .checks(chk[5]), .failures(fail[5]), .correct(corr[5]));
  vp_e2e_harness #(.CFG(VOTE1), .PHT_ENTRIES(16384)) h6 (.clk(clk), .done(done[6]), .checks(chk[6]), .failures(fail[6]), .correct(corr[6]));

  int checks, failures;

  initial begin
    #5000000;
    checks = 0; failures = 1;
    for (int i = 0; i < NI; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NI; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
