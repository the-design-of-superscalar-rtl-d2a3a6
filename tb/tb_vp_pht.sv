// tb_vp_pht: checks the shared pattern history table against a software model.
// It checks that initialisation takes exactly ENTRIES cycles and leaves every
// counter weakly not-taken, then applies random lookups and three-port
// updates (often with coinciding indices, and aimed at few entries so that
// counters saturate) and compares each lookup result one cycle later.
module tb_vp_pht;
  import vp_pkg::*;
  localparam int unsigned ENTRIES = 64;
  localparam int unsigned IDX_W   = $clog2(ENTRIES);

  logic clk = 0, rst_n = 0;
  logic init_done;
  logic rd_en, upd_en, upd_taken;
  logic [2:0][IDX_W-1:0] rd_idx, upd_idx;
  ctr2_t [2:0] rd_ctr;
  int checks = 0, failures = 0;
  int model [ENTRIES];
  int exp_rd [3];
  int sat_hi = 0, sat_lo = 0, same_idx = 0;

  vp_pht #(.ENTRIES(ENTRIES)) dut (
    .clk(clk), .rst_n(rst_n), .init_done(init_done),
    .rd_en(rd_en), .rd_idx(rd_idx), .rd_ctr(rd_ctr),
    .upd_en(upd_en), .upd_idx(upd_idx), .upd_taken(upd_taken));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int step(int c, bit t);
    if (t) return (c < 3) ? c + 1 : 3;
    return (c > 0) ? c - 1 : 0;
  endfunction

  initial begin
    int cycles;
    rd_en = 0; upd_en = 0; upd_taken = 0; rd_idx = '0; upd_idx = '0;
    for (int e = 0; e < ENTRIES; e++) model[e] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cycles = 0;
    while (!init_done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != ENTRIES) begin failures++; $display("init took %0d cycles", cycles); end

    // read every entry once: all weakly not-taken
    for (int e = 0; e < ENTRIES; e += 3) begin
      rd_en = 1;
      for (int p = 0; p < 3; p++) rd_idx[p] = IDX_W'((e + p) % ENTRIES);
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rd_ctr[p] != 2'd1) begin failures++; $display("entry %0d not initialised: %0d", e + p, rd_ctr[p]); end
      end
    end

    exp_rd = '{1, 1, 1};
    for (int it = 0; it < 4000; it++) begin
      int old [ENTRIES];
      rd_en  = ($urandom % 4) != 0;
      upd_en = ($urandom % 3) != 0;
      upd_taken = (it / 200) % 2 == 0 ? (($urandom % 8) != 0) : (($urandom % 8) == 0);
      for (int p = 0; p < 3; p++) begin
        rd_idx[p]  = IDX_W'($urandom % 8);
        upd_idx[p] = IDX_W'($urandom % 8);
      end
      if ($urandom % 4 == 0) upd_idx[2] = upd_idx[0];
      if (rd_en) for (int p = 0; p < 3; p++) exp_rd[p] = model[rd_idx[p]];
      if (upd_en) begin
        old = model;
        if (upd_idx[0] == upd_idx[1] || upd_idx[0] == upd_idx[2] || upd_idx[1] == upd_idx[2]) same_idx++;
        for (int p = 0; p < 3; p++) model[upd_idx[p]] = step(old[upd_idx[p]], upd_taken);
      end
      @(posedge clk);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (int'(rd_ctr[p]) != exp_rd[p]) begin
          failures++;
          $display("it %0d port %0d: rd_ctr=%0d expected %0d", it, p, rd_ctr[p], exp_rd[p]);
        end
        if (exp_rd[p] == 3) sat_hi++;
        if (exp_rd[p] == 0) sat_lo++;
      end
      @(negedge clk);
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0 || same_idx == 0) begin
      failures++;
      $display("coverage: sat_hi=%0d sat_lo=%0d same_idx=%0d", sat_hi, sat_lo, same_idx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
