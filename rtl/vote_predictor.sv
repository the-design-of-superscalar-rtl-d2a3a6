// vote_predictor: branch direction predictor built from three component
// predictors and a majority vote.
//
// Main idea: no single well-known predictor is best on every program, so three
// different ones (Predictor 1..3) predict every conditional branch at once and
// a vote circuit takes the majority: taken if two or more say taken, otherwise
// not-taken. The three components share one pattern history table (PHT) of
// PHT_ENTRIES 2-bit counters; each component only contributes its own way of
// indexing that table (see vp_component). CFG picks the combination:
//   VOTE1 bimod + gshare + path-based  (default; 8 + 0 + 9 history bits
//         plus a 4096 x 2-bit PHT = 8209 bits of state)
//   VOTE2 bimod + PAg + path-based, VOTE3 bimod + PAg + gshare,
//   VOTE4 PAg + gshare + path-based   (PAg adds a 2048 x 8-bit BHT).
//
// Interface and timing (this design's choices):
//   After reset the tables clear themselves one entry per cycle; ready rises
//   after PHT_ENTRIES cycles and no lookup or update may come before it.
//   Lookup: pred_valid with pred_pc in cycle t. In cycle t+1 resp_valid is high
//   with resp_taken (the vote), resp_comp_taken (the three component
//   directions) and resp_idx (the three PHT indices used). One lookup per cycle.
//   Update: when the branch resolves, upd_valid with its address, direction,
//   next address (target if taken, fall-through otherwise) and the resp_idx it
//   was predicted with. All three PHT counters move toward the outcome and the
//   histories advance; lookups from the next cycle see the new state. Passing
//   the indices back keeps the counters that made a prediction the ones that
//   are trained, however many branches are in flight.
module vote_predictor
  import vp_pkg::*;
#(
  parameter vote_cfg_e   CFG         = VOTE1,
  parameter int unsigned PC_W        = 32,
  parameter int unsigned PC_SHIFT    = 2,
  parameter int unsigned PHT_ENTRIES = 4096,
  parameter int unsigned GHR_W       = 8,
  parameter int unsigned PATH_W      = 9,
  parameter int unsigned PATH_STEP   = 3,
  parameter int unsigned BHT_ENTRIES = 2048,
  parameter int unsigned BHR_W       = 8,
  localparam int unsigned IDX_W      = $clog2(PHT_ENTRIES)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  output logic                           ready,  // tables initialised, lookups allowed
  // lookup
  input  logic                           pred_valid,
  input  logic [PC_W-1:0]                pred_pc,
  output logic                           resp_valid,
  output logic                           resp_taken,
  output logic [NUM_COMP-1:0]            resp_comp_taken,
  output logic [NUM_COMP-1:0][IDX_W-1:0] resp_idx,
  output logic                           resp_unanimous,  // all three components agreed
  output logic [NUM_COMP-1:0]            resp_outvoted,   // components the vote overruled
  // resolved branch
  input  logic                           upd_valid,
  input  logic [PC_W-1:0]                upd_pc,
  input  logic                           upd_taken,
  input  logic [PC_W-1:0]                upd_next_pc,
  input  logic [NUM_COMP-1:0][IDX_W-1:0] upd_idx
);
  logic [NUM_COMP-1:0][IDX_W-1:0] lookup_idx;
  logic [NUM_COMP-1:0]            comp_ready;
  logic                           pht_ready;
  ctr2_t [NUM_COMP-1:0]           ctr;

  for (genvar s = 0; s < NUM_COMP; s++) begin : g_comp
    vp_component #(
      .KIND        (comp_kind(CFG, s)),
      .PC_W        (PC_W),
      .PC_SHIFT    (PC_SHIFT),
      .IDX_W       (IDX_W),
      .GHR_W       (GHR_W),
      .PATH_W      (PATH_W),
      .PATH_STEP   (PATH_STEP),
      .BHT_ENTRIES (BHT_ENTRIES),
      .BHR_W       (BHR_W)
    ) u_comp (
      .clk         (clk),
      .rst_n       (rst_n),
      .ready       (comp_ready[s]),
      .pc          (pred_pc),
      .idx         (lookup_idx[s]),
      .upd_en      (upd_valid),
      .upd_pc      (upd_pc),
      .upd_taken   (upd_taken),
      .upd_next_pc (upd_next_pc)
    );
  end

  vp_pht #(.ENTRIES(PHT_ENTRIES)) u_pht (
    .clk       (clk),
    .rst_n     (rst_n),
    .init_done (pht_ready),
    .rd_en     (pred_valid),
    .rd_idx    (lookup_idx),
    .rd_ctr    (ctr),
    .upd_en    (upd_valid),
    .upd_idx   (upd_idx),
    .upd_taken (upd_taken)
  );

  assign ready = pht_ready & (&comp_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      resp_idx   <= '0;
    end else begin
      resp_valid <= pred_valid;
      if (pred_valid) resp_idx <= lookup_idx;
    end
  end

  always_comb begin
    for (int unsigned s = 0; s < NUM_COMP; s++) resp_comp_taken[s] = ctr_taken(ctr[s]);
  end

  vp_vote3 u_vote (
    .votes     (resp_comp_taken),
    .taken     (resp_taken),
    .unanimous (resp_unanimous),
    .outvoted  (resp_outvoted)
  );
endmodule
