// vp_pkg: types and helpers shared by the vote branch predictor.
//
// The vote predictor combines three component predictors that all index one
// shared pattern history table (PHT) of 2-bit saturating counters. A
// component is one of four well-known schemes (bimod, gshare, PAg, path-based);
// the four combinations evaluated for this design are VOTE1..VOTE4, with VOTE1
// (bimod + gshare + path-based) as the main, most cost-effective one.
// The counter encoding (0..1 predict not-taken, 2..3 predict taken) is the
// usual 2-bit saturating counter; the reset value is this design's choice.
package vp_pkg;

  // Kind of a component predictor.
  typedef enum logic [1:0] {
    PK_BIMOD  = 2'd0,  // PC-indexed counters, no history
    PK_GSHARE = 2'd1,  // global history XOR branch address
    PK_PAG    = 2'd2,  // per-branch history (BHT) XOR branch address
    PK_PATH   = 2'd3   // path history (bits of recent branch targets) XOR branch address
  } pred_kind_e;

  // The four vote predictor models.
  typedef enum logic [1:0] {
    VOTE1 = 2'd0,  // bimod, gshare, path-based
    VOTE2 = 2'd1,  // bimod, PAg, path-based
    VOTE3 = 2'd2,  // bimod, PAg, gshare
    VOTE4 = 2'd3   // PAg, gshare, path-based
  } vote_cfg_e;

  localparam int unsigned NUM_COMP = 3;  // predictors combined by the vote circuit

  typedef logic [1:0] ctr2_t;            // 2-bit saturating counter
  localparam ctr2_t CTR_RESET = 2'b01;   // weakly not-taken

  // Component kind in slot 0..2 of a vote predictor model.
  function automatic pred_kind_e comp_kind(vote_cfg_e cfg, int unsigned slot);
    pred_kind_e k;
    unique case (cfg)
      VOTE1:   k = (slot == 0) ? PK_BIMOD : (slot == 1) ? PK_GSHARE : PK_PATH;
      VOTE2:   k = (slot == 0) ? PK_BIMOD : (slot == 1) ? PK_PAG    : PK_PATH;
      VOTE3:   k = (slot == 0) ? PK_BIMOD : (slot == 1) ? PK_PAG    : PK_GSHARE;
      default: k = (slot == 0) ? PK_PAG   : (slot == 1) ? PK_GSHARE : PK_PATH;
    endcase
    return k;
  endfunction

  // Next state of a 2-bit saturating counter after a resolved branch.
  function automatic ctr2_t ctr_next(ctr2_t c, logic taken);
    ctr2_t n;
    if (taken) n = (c == 2'b11) ? c : c + 2'b01;
    else       n = (c == 2'b00) ? c : c - 2'b01;
    return n;
  endfunction

  // Direction a counter predicts.
  function automatic logic ctr_taken(ctr2_t c);
    return c[1];
  endfunction

endpackage
