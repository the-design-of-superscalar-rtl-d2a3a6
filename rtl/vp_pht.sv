// vp_pht: the pattern history table shared by the three component predictors.
//
// ENTRIES 2-bit saturating counters (4096 in the main configuration, 4096*2
// bits). Every component predictor forms its own index, so the table has one
// read port and one update port per component (NUM_COMP = 3).
//
// Timing: a lookup presented with rd_en in cycle t returns the three counters
// in cycle t+1 (synchronous read, as from an SRAM). An update in cycle t moves
// the counter at each of the three update indices one step toward the resolved
// direction; the new values are visible to lookups from cycle t+1 (a lookup
// in the same cycle as an update reads the old value). When two update indices
// coincide the counter still moves only one step, because both ports write the
// same value computed from the old counter.
//
// Reset: like an SRAM, the table cannot be cleared in one cycle. After reset it
// writes weakly not-taken into one entry per cycle, ENTRIES cycles in all, and
// then raises init_done; lookups and updates must wait for init_done (checked
// by assertions). The port structure, timing and initialisation are this
// design's choices; the table size and counter width follow the design
// description.
module vp_pht
  import vp_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  output logic                            init_done,
  // lookup
  input  logic                            rd_en,
  input  logic [NUM_COMP-1:0][IDX_W-1:0]  rd_idx,
  output ctr2_t [NUM_COMP-1:0]            rd_ctr,
  // update with the resolved direction
  input  logic                            upd_en,
  input  logic [NUM_COMP-1:0][IDX_W-1:0]  upd_idx,
  input  logic                            upd_taken
);
  ctr2_t            table_q [ENTRIES];
  logic [IDX_W-1:0] init_ptr_q;
  logic             init_done_q;

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
      table_q[init_ptr_q] <= CTR_RESET;
    end else if (upd_en) begin
      for (int unsigned p = 0; p < NUM_COMP; p++)
        table_q[upd_idx[p]] <= ctr_next(table_q[upd_idx[p]], upd_taken);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ctr <= '{default: CTR_RESET};
    end else if (rd_en) begin
      for (int unsigned p = 0; p < NUM_COMP; p++) rd_ctr[p] <= table_q[rd_idx[p]];
    end
  end

  a_lookup_after_init: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> init_done_q)
    else $error("PHT lookup before initialisation finished");
  a_update_after_init: assert property (@(posedge clk) disable iff (!rst_n) upd_en |-> init_done_q)
    else $error("PHT update before initialisation finished");
endmodule
