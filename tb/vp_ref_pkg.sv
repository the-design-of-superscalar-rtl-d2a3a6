// vp_ref_pkg: software reference model of the vote predictor and a synthetic
// branch workload, shared by the end-to-end testbenches.
//
// vote_ref keeps its own PHT, global history, path history and per-branch
// history table and computes, for a branch address, the three PHT indices, the
// component directions and the majority vote, independently of the RTL.
// branch_workload produces a stream of conditional branches from a small
// synthetic program: a loop branch (taken 7 times, then not), an alternating
// branch, a branch that repeats the previous branch's direction, a 90 % taken
// random branch and an always not-taken branch.
package vp_ref_pkg;

  class vote_ref;
    int unsigned kinds [3];  // 0 bimod, 1 gshare, 2 PAg, 3 path
    int unsigned idx_w, pc_shift, ghr_w, path_w, path_step, bht_n, bhr_w;
    int unsigned pht [];
    int unsigned bht [];
    int unsigned ghr, path;

    function new(int unsigned cfg, int unsigned pht_entries,
                 int unsigned ghr_w = 8, int unsigned path_w = 9, int unsigned path_step = 3,
                 int unsigned bht_n = 2048, int unsigned bhr_w = 8, int unsigned pc_shift = 2);
      case (cfg)
        0: kinds = '{0, 1, 3};
        1: kinds = '{0, 2, 3};
        2: kinds = '{0, 2, 1};
        default: kinds = '{2, 1, 3};
      endcase
      idx_w = $clog2(pht_entries);
      this.pc_shift = pc_shift; this.ghr_w = ghr_w; this.path_w = path_w;
      this.path_step = path_step; this.bht_n = bht_n; this.bhr_w = bhr_w;
      pht = new[pht_entries];
      foreach (pht[i]) pht[i] = 1;
      bht = new[bht_n];
      foreach (bht[i]) bht[i] = 0;
      ghr = 0; path = 0;
    endfunction

    function int unsigned fold(int unsigned h);
      int unsigned r = 0;
      while (h != 0) begin
        r ^= h % (1 << idx_w);
        h = h >> idx_w;
      end
      return r;
    endfunction

    function int unsigned index(int unsigned slot, bit [31:0] pc);
      int unsigned base = (pc >> pc_shift) % (1 << idx_w);
      case (kinds[slot])
        0: return base;
        1: return base ^ fold(ghr);
        2: return base ^ fold(bht[(pc >> pc_shift) % bht_n]);
        default: return base ^ fold(path);
      endcase
    endfunction

    function bit comp_taken(int unsigned i);
      return pht[i] >= 2;
    endfunction

    function void update(bit [31:0] pc, bit taken, bit [31:0] next_pc, int unsigned idx [3]);
      int unsigned old [3];
      int unsigned b;
      for (int s = 0; s < 3; s++) old[s] = pht[idx[s]];
      for (int s = 0; s < 3; s++)
        pht[idx[s]] = taken ? ((old[s] == 3) ? 3 : old[s] + 1) : ((old[s] == 0) ? 0 : old[s] - 1);
      ghr  = ((ghr << 1) | 32'(taken)) % (1 << ghr_w);
      path = ((path << path_step) | ((next_pc >> pc_shift) % (1 << path_step))) % (1 << path_w);
      b = (pc >> pc_shift) % bht_n;
      bht[b] = ((bht[b] << 1) | 32'(taken)) % (1 << bhr_w);
    endfunction
  endclass

  class branch_workload;
    bit [31:0] pcs [5];
    bit [31:0] tgts [5];
    int unsigned pos, loop_cnt, alt;
    bit last;

    function new(int unsigned seed_pc);
      for (int i = 0; i < 5; i++) begin
        pcs[i]  = seed_pc + 32'(i * 68);
        tgts[i] = seed_pc + 32'(i * 68) - 32'h40 + 32'(i * 4);
      end
      pos = 0; loop_cnt = 0; alt = 0; last = 0;
    endfunction

    // Next branch of the stream: its address, direction and next address.
    function void next(output bit [31:0] pc, output bit taken, output bit [31:0] next_pc);
      int unsigned k = pos;
      pos = (pos + 1) % 5;
      case (k)
        0: begin taken = (loop_cnt != 7); loop_cnt = (loop_cnt + 1) % 8; end
        1: begin taken = alt[0]; alt++; end
        2: taken = last;
        3: taken = ($urandom % 10) != 0;
        default: taken = 0;
      endcase
      last = taken;
      pc = pcs[k];
      next_pc = taken ? tgts[k] : pcs[k] + 4;
    endfunction
  endclass

endpackage
