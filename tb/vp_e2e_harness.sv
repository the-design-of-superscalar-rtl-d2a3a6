// vp_e2e_harness: drives one vote predictor with the synthetic branch workload
// and checks every response against the reference model.
//
// Each branch is looked up, its response (one cycle later) is compared with
// the model's indices, component directions, vote and vote flags, and the
// branch is later resolved with the indices it was predicted with. The driver
// mixes three patterns: lookup then update in separate cycles, the next lookup
// in the same cycle as the previous branch's update, and idle cycles. It
// counts how often each mechanism of the design occurs and reports a failure
// for any that never does. done rises at the end; checks/failures hold totals.
module vp_e2e_harness
  import vp_pkg::*;
  import vp_ref_pkg::*;
#(
  parameter vote_cfg_e   CFG         = VOTE1,
  parameter int unsigned PHT_ENTRIES = 4096,
  parameter int unsigned N_BRANCH    = 4000,
  parameter int unsigned SEED_PC     = 32'h0040_1000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   correct
);
  localparam int unsigned IDX_W = $clog2(PHT_ENTRIES);

  logic rst_n = 0;
  logic ready, pred_valid, resp_valid, resp_taken, resp_unanimous;
  logic [31:0] pred_pc, upd_pc, upd_next_pc;
  logic [2:0] resp_comp_taken, resp_outvoted;
  logic [2:0][IDX_W-1:0] resp_idx, upd_idx;
  logic upd_valid, upd_taken;

  vote_predictor #(.CFG(CFG), .PHT_ENTRIES(PHT_ENTRIES)) dut (
    .clk(clk), .rst_n(rst_n), .ready(ready),
    .pred_valid(pred_valid), .pred_pc(pred_pc),
    .resp_valid(resp_valid), .resp_taken(resp_taken), .resp_comp_taken(resp_comp_taken),
    .resp_idx(resp_idx), .resp_unanimous(resp_unanimous), .resp_outvoted(resp_outvoted),
    .upd_valid(upd_valid), .upd_pc(upd_pc), .upd_taken(upd_taken),
    .upd_next_pc(upd_next_pc), .upd_idx(upd_idx));

  // mechanism counters
  int n_outvoted = 0, n_unanimous = 0, n_vote_fixes = 0, n_collide = 0;
  int n_overlap = 0, n_saturated = 0, n_idle = 0;

  initial begin
    vote_ref        m;
    branch_workload w;
    bit [31:0] pc, npc, p_pc, p_npc;
    bit        tk, p_tk, have_pending;
    int unsigned e_idx [3], p_idx [3];
    bit [2:0]  e_comp;
    bit        e_taken;
    int        cycles;

    done = 0; checks = 0; failures = 0; correct = 0;
    pred_valid = 0; upd_valid = 0; pred_pc = 0; upd_pc = 0; upd_next_pc = 0;
    upd_taken = 0; upd_idx = '0;
    m = new(int'(CFG), PHT_ENTRIES);
    w = new(SEED_PC);
    have_pending = 0;
    p_pc = 0; p_npc = 0; p_tk = 0; p_idx = '{0, 0, 0};

    repeat (2) @(negedge clk);
    rst_n = 1;
    cycles = 0;
    while (!ready) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != PHT_ENTRIES) begin failures++; $display("ready after %0d cycles, expected %0d", cycles, PHT_ENTRIES); end

    for (int n = 0; n < N_BRANCH; n++) begin
      int mode;
      mode = $urandom % 4;
      w.next(pc, tk, npc);
      // resolve the previous branch now, or together with this lookup
      if (have_pending && mode != 0) begin
        upd_valid = 1; upd_pc = p_pc; upd_taken = p_tk; upd_next_pc = p_npc;
        for (int s = 0; s < 3; s++) upd_idx[s] = IDX_W'(p_idx[s]);
        m.update(p_pc, p_tk, p_npc, p_idx);
        have_pending = 0;
        @(negedge clk);
        upd_valid = 0;
        if (mode == 1) begin n_idle++; @(negedge clk); end
      end
      // lookup, expectations from the model state before any same-cycle update
      for (int s = 0; s < 3; s++) begin
        e_idx[s]  = m.index(s, pc);
        e_comp[s] = m.comp_taken(e_idx[s]);
        if (m.pht[e_idx[s]] == 0 || m.pht[e_idx[s]] == 3) n_saturated++;
      end
      e_taken = (e_comp[0] + e_comp[1] + e_comp[2]) >= 2;
      if (e_idx[0] == e_idx[1] || e_idx[0] == e_idx[2] || e_idx[1] == e_idx[2]) n_collide++;
      pred_valid = 1; pred_pc = pc;
      if (have_pending) begin
        upd_valid = 1; upd_pc = p_pc; upd_taken = p_tk; upd_next_pc = p_npc;
        for (int s = 0; s < 3; s++) upd_idx[s] = IDX_W'(p_idx[s]);
        m.update(p_pc, p_tk, p_npc, p_idx);
        have_pending = 0;
        n_overlap++;
      end
      @(posedge clk);
      #1;
      checks += 5;
      if (!resp_valid) begin failures++; $display("branch %0d: no response after one cycle", n); end
      for (int s = 0; s < 3; s++)
        if (32'(resp_idx[s]) != e_idx[s]) begin
          failures++; $display("branch %0d slot %0d: idx %h expected %h", n, s, resp_idx[s], e_idx[s]);
        end
      if (resp_comp_taken != e_comp) begin failures++; $display("branch %0d: comp %b expected %b", n, resp_comp_taken, e_comp); end
      if (resp_taken != e_taken) begin failures++; $display("branch %0d: vote %b expected %b", n, resp_taken, e_taken); end
      if (resp_unanimous != (e_comp == 3'b000 || e_comp == 3'b111)) begin failures++; $display("branch %0d: unanimous flag", n); end
      if (resp_outvoted != (e_comp ^ {3{e_taken}})) begin failures++; $display("branch %0d: outvoted flag", n); end
      if (resp_unanimous) n_unanimous++;
      if (resp_outvoted != 0) n_outvoted++;
      if (resp_outvoted != 0 && resp_taken == tk) n_vote_fixes++;
      if (resp_taken == tk) correct++;
      @(negedge clk);
      pred_valid = 0; upd_valid = 0;
      have_pending = 1; p_pc = pc; p_tk = tk; p_npc = npc; p_idx = e_idx;
    end
    // mechanisms that must have occurred
    checks += 7;
    if (n_outvoted == 0)   begin failures++; $display("no component was ever outvoted"); end
    if (n_unanimous == 0)  begin failures++; $display("no unanimous vote"); end
    if (n_vote_fixes == 0) begin failures++; $display("vote never corrected a wrong component"); end
    if (n_collide == 0)    begin failures++; $display("no shared-PHT index collision"); end
    if (n_overlap == 0)    begin failures++; $display("no lookup in the cycle of an update"); end
    if (n_saturated == 0)  begin failures++; $display("no saturated counter read"); end
    if (n_idle == 0)       begin failures++; $display("no idle cycle"); end
    $display("cfg %s pht %0d: %0d branches, %0d predicted correctly; outvoted %0d unanimous %0d vote-fixes %0d collisions %0d overlaps %0d saturated %0d idle %0d",
             CFG.name(), PHT_ENTRIES, N_BRANCH, correct, n_outvoted, n_unanimous, n_vote_fixes,
             n_collide, n_overlap, n_saturated, n_idle);
    done = 1;
  end
endmodule
