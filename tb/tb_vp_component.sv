// tb_vp_component: checks the index functions and history updates of all four
// component kinds (bimod, gshare, PAg, path-based) against software models.
// The four instances share the stimulus; before each update the index each
// produces for a random branch address is compared with the model's. The PAg
// table is shortened to 64 entries to keep initialisation short.
module tb_vp_component;
  import vp_pkg::*;
  localparam int unsigned IDX_W = 12, GHR_W = 8, PATH_W = 9, PATH_STEP = 3;
  localparam int unsigned BHT_N = 64, BHR_W = 8, PC_SHIFT = 2;

  logic clk = 0, rst_n = 0;
  logic [31:0] pc, upd_pc, upd_next_pc;
  logic upd_en, upd_taken;
  logic [3:0][IDX_W-1:0] idx;
  logic [3:0] ready;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 4; k++) begin : g_dut
    vp_component #(
      .KIND(pred_kind_e'(k)), .IDX_W(IDX_W), .GHR_W(GHR_W), .PATH_W(PATH_W),
      .PATH_STEP(PATH_STEP), .BHT_ENTRIES(BHT_N), .BHR_W(BHR_W), .PC_SHIFT(PC_SHIFT)
    ) dut (
      .clk(clk), .rst_n(rst_n), .ready(ready[k]), .pc(pc), .idx(idx[k]),
      .upd_en(upd_en), .upd_pc(upd_pc), .upd_taken(upd_taken), .upd_next_pc(upd_next_pc));
  end

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int unsigned ghr = 0, path = 0;
  int unsigned bht [BHT_N];

  function automatic int unsigned exp_idx(int k, logic [31:0] a);
    int unsigned base = (a >> PC_SHIFT) % (1 << IDX_W);
    case (k)
      0: return base;
      1: return base ^ ghr;
      2: return base ^ bht[(a >> PC_SHIFT) % BHT_N];
      default: return base ^ path;
    endcase
  endfunction

  initial begin
    logic [31:0] pcs [8];
    int nonzero_hist = 0;
    upd_en = 0; upd_taken = 0; pc = 0; upd_pc = 0; upd_next_pc = 0;
    for (int e = 0; e < BHT_N; e++) bht[e] = 0;
    for (int i = 0; i < 8; i++) pcs[i] = $urandom & 32'h0000_fffc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (ready != 4'hf) @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      pc = ($urandom % 2) ? pcs[$urandom % 8] : $urandom;
      upd_en = ($urandom % 5) != 0;
      upd_pc = pcs[$urandom % 8];
      upd_taken = 1'($urandom);
      upd_next_pc = upd_taken ? $urandom : upd_pc + 4;
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (32'(idx[k]) != exp_idx(k, pc)) begin
          failures++;
          $display("it %0d kind %0d pc %h: idx %h expected %h", it, k, pc, idx[k], exp_idx(k, pc));
        end
      end
      if (ghr != 0 && path != 0) nonzero_hist++;
      if (upd_en) begin
        ghr  = ((ghr << 1) | 32'(upd_taken)) % (1 << GHR_W);
        path = ((path << PATH_STEP) | ((upd_next_pc >> PC_SHIFT) % (1 << PATH_STEP))) % (1 << PATH_W);
        bht[(upd_pc >> PC_SHIFT) % BHT_N] = ((bht[(upd_pc >> PC_SHIFT) % BHT_N] << 1) | 32'(upd_taken)) % (1 << BHR_W);
      end
      @(negedge clk);
    end
    checks++;
    if (nonzero_hist == 0) begin failures++; $display("histories never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
