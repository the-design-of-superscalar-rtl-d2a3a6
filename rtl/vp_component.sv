// vp_component: one component predictor of the vote predictor (one of the
// "Predictor 1/2/3" boxes).
//
// All components share one PHT, so a component consists only of its history
// state and the function that turns a branch address into a PHT index. KIND
// selects the scheme:
//   PK_BIMOD  index = branch address bits; no history (0 extra bits).
//   PK_GSHARE index = branch address XOR a GHR_W-bit global history register
//             holding the outcomes of the most recent branches (8 bits).
//   PK_PAG    index = branch address XOR the branch's own history register,
//             read from a BHT of BHT_ENTRIES x BHR_W bits (2048 x 8). XOR rather
//             than concatenation is the variant this design uses.
//   PK_PATH   index = branch address XOR a PATH_W-bit path history register
//             (9 bits) built from PATH_STEP low bits of the addresses the most
//             recent branches went to.
// The branch address is pc[PC_SHIFT +: IDX_W]. A history longer than IDX_W is
// folded onto the index by XOR; a shorter one is zero-extended.
//
// Timing: idx is a combinational function of pc and the current history.
// Histories are updated when a branch resolves (upd_en): the direction is
// shifted into the GHR or the branch's BHT entry, and next_pc[PC_SHIFT +:
// PATH_STEP] (target if taken, fall-through otherwise) into the path register.
// History widths and table sizes follow the design description; updating at
// resolution, the address bits used and the path-history construction are this
// design's choices. ready is low only while a PAg BHT is being cleared after
// reset.
module vp_component
  import vp_pkg::*;
#(
  parameter pred_kind_e  KIND        = PK_PAG,
  parameter int unsigned PC_W        = 32,
  parameter int unsigned PC_SHIFT    = 2,
  parameter int unsigned IDX_W       = 12,
  parameter int unsigned GHR_W       = 8,
  parameter int unsigned PATH_W      = 9,
  parameter int unsigned PATH_STEP   = 3,
  parameter int unsigned BHT_ENTRIES = 2048,
  parameter int unsigned BHR_W       = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             ready,        // history state initialised
  // index for a lookup
  input  logic [PC_W-1:0]  pc,
  output logic [IDX_W-1:0] idx,
  // resolved branch
  input  logic             upd_en,
  input  logic [PC_W-1:0]  upd_pc,
  input  logic             upd_taken,
  input  logic [PC_W-1:0]  upd_next_pc
);
  localparam int unsigned BHT_IDX_W = $clog2(BHT_ENTRIES);

  // XOR-fold a history of any width onto IDX_W bits.
  function automatic logic [IDX_W-1:0] fold(logic [31:0] h, int unsigned w);
    logic [IDX_W-1:0] f = '0;
    for (int unsigned i = 0; i < w; i++) f[i % IDX_W] ^= h[i];
    return f;
  endfunction

  logic [IDX_W-1:0] addr_bits;
  assign addr_bits = pc[PC_SHIFT +: IDX_W];

  if (KIND == PK_GSHARE) begin : g_gshare
    logic [GHR_W-1:0] ghr_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      ghr_q <= '0;
      else if (upd_en) ghr_q <= {ghr_q[GHR_W-2:0], upd_taken};
    end
    assign idx   = addr_bits ^ fold(32'(ghr_q), GHR_W);
    assign ready = 1'b1;

  end else if (KIND == PK_PATH) begin : g_path
    logic [PATH_W-1:0] path_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      path_q <= '0;
      else if (upd_en) path_q <= PATH_W'({path_q, upd_next_pc[PC_SHIFT +: PATH_STEP]});
    end
    assign idx   = addr_bits ^ fold(32'(path_q), PATH_W);
    assign ready = 1'b1;

  end else if (KIND == PK_PAG) begin : g_pag
    logic [BHR_W-1:0] bhr;
    vp_bht #(.ENTRIES(BHT_ENTRIES), .HIST_W(BHR_W)) u_bht (
      .clk       (clk),
      .rst_n     (rst_n),
      .init_done (ready),
      .rd_idx    (pc[PC_SHIFT +: BHT_IDX_W]),
      .rd_hist   (bhr),
      .upd_en    (upd_en),
      .upd_idx   (upd_pc[PC_SHIFT +: BHT_IDX_W]),
      .upd_taken (upd_taken)
    );
    assign idx = addr_bits ^ fold(32'(bhr), BHR_W);

  end else begin : g_bimod
    assign idx   = addr_bits;
    assign ready = 1'b1;
  end
endmodule
