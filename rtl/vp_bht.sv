// vp_bht: branch history table of the PAg component predictor.
//
// ENTRIES per-branch history registers of HIST_W bits (2048 x 8 bits in the
// design), selected by low branch-address bits. Each register holds the last
// HIST_W outcomes of the branches that map to it, newest in bit 0.
//
// Timing: the read is combinational, so the PAg predictor can XOR the history
// with the branch address and index the PHT in the same cycle. An update
// (upd_en in cycle t) shifts the resolved direction into the selected register
// at the clock edge ending cycle t. After reset the table clears one register
// per cycle (ENTRIES cycles) and then raises init_done; updates must wait for
// it. Read timing, shift direction and initialisation are this design's
// choices.
module vp_bht #(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned HIST_W  = 8,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  input  logic [IDX_W-1:0]  rd_idx,
  output logic [HIST_W-1:0] rd_hist,
  input  logic              upd_en,
  input  logic [IDX_W-1:0]  upd_idx,
  input  logic              upd_taken
);
  logic [HIST_W-1:0] hist_q [ENTRIES];
  logic [IDX_W-1:0]  init_ptr_q;
  logic              init_done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_ptr_q  <= '0;
      init_done_q <= 1'b0;
    end else if (!init_done_q) begin
      init_ptr_q  <= init_ptr_q + 1'b1;
      init_done_q <= (32'(init_ptr_q) == ENTRIES - 1);
    end
  end
  assign init_done = init_done_q;

  always_ff @(posedge clk) begin
    if (!init_done_q) begin
      hist_q[init_ptr_q] <= '0;
    end else if (upd_en) begin
      hist_q[upd_idx] <= {hist_q[upd_idx][HIST_W-2:0], upd_taken};
    end
  end

  assign rd_hist = hist_q[rd_idx];

  a_update_after_init: assert property (@(posedge clk) disable iff (!rst_n) upd_en |-> init_done_q)
    else $error("BHT update before initialisation finished");
endmodule
