// tb_vp_bht: checks the PAg branch history table against a software model:
// initialisation length and clearing, then random updates with combinational
// reads of the same and other entries compared every cycle.
module tb_vp_bht;
  localparam int unsigned ENTRIES = 32;
  localparam int unsigned HIST_W  = 8;
  localparam int unsigned IDX_W   = $clog2(ENTRIES);

  logic clk = 0, rst_n = 0;
  logic init_done, upd_en, upd_taken;
  logic [IDX_W-1:0] rd_idx, upd_idx;
  logic [HIST_W-1:0] rd_hist;
  int checks = 0, failures = 0;
  int unsigned model [ENTRIES];

  vp_bht #(.ENTRIES(ENTRIES), .HIST_W(HIST_W)) dut (
    .clk(clk), .rst_n(rst_n), .init_done(init_done), .rd_idx(rd_idx), .rd_hist(rd_hist),
    .upd_en(upd_en), .upd_idx(upd_idx), .upd_taken(upd_taken));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    upd_en = 0; upd_taken = 0; rd_idx = '0; upd_idx = '0;
    for (int e = 0; e < ENTRIES; e++) model[e] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cycles = 0;
    while (!init_done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != ENTRIES) begin failures++; $display("init took %0d cycles", cycles); end
    for (int e = 0; e < ENTRIES; e++) begin
      rd_idx = IDX_W'(e); #1;
      checks++;
      if (rd_hist != 0) begin failures++; $display("entry %0d not cleared", e); end
    end
    for (int it = 0; it < 3000; it++) begin
      upd_en    = ($urandom % 4) != 0;
      upd_taken = 1'($urandom);
      upd_idx   = IDX_W'($urandom % 6);
      rd_idx    = ($urandom % 2) ? upd_idx : IDX_W'($urandom % 6);
      #1;
      checks++;
      if (rd_hist != HIST_W'(model[rd_idx])) begin
        failures++; $display("it %0d entry %0d: %h expected %h", it, rd_idx, rd_hist, model[rd_idx]);
      end
      if (upd_en) model[upd_idx] = ((model[upd_idx] * 2) + int'(upd_taken)) % (1 << HIST_W);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
