// tb_load_queue: random self-checking test of one LQ partition (6 entries,
// 3 allocation slots, 2 execution ports, 2 search ports, 4-entry SQ
// partition). The testbench keeps its own list of in-flight loads and, every
// cycle, applies random allocations, executions, D- and M-searches, commits
// (including commits of loads that already left early), early-removal
// conditions and squashes (also squashes whose pointer lies behind the head,
// from a load that left early in the cycle a search hit it). It checks occupancy, pointers, the per-port hit
// flags, the oldest violating load reported one cycle after each search,
// commit and early-removal pops, and the sync-load counts for num-sync.
// Store ages are modelled as unbounded integers, so the age test of the
// D-search is checked independently of the pointer arithmetic.
module tb_load_queue;
  import cello_pkg::*;
  localparam int D = 6, AW = 3, EW = 2, NP = 2, ADDR_W = 16, TAG_W = 8, SQD = 4;
  localparam int PW = $clog2(2 * D), SPW = $clog2(2 * SQD);

  typedef struct {
    int    ptr;
    int    tag;
    mode_e mode;
    int    sqp;     // unbounded SQ position
    bit    perf;
    int    addr;
  } ld_t;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] al_v;
  mode_e al_m;
  logic [AW-1:0][TAG_W-1:0] al_tag;
  logic [AW-1:0][SPW-1:0] al_sqp;
  logic [PW-1:0] tail, viol_ptr, sq_ptr;
  logic [PW:0] free, cnt, ndec;
  logic [EW-1:0] ex_v;
  logic [EW-1:0][PW-1:0] ex_ptr;
  logic [EW-1:0][TAG_W-1:0] ex_tag;
  logic [EW-1:0][ADDR_W-1:0] ex_addr;
  logic cm_v, cm_pop, er_en, nds, h_v, er_v, viol_v, sqv;
  logic [TAG_W-1:0] cm_tag, er_tag, viol_tag;
  logic [SPW-1:0] h_sqp, sq_head;
  logic [NP-1:0] s_v, s_hit;
  srch_kind_e s_kind [NP];
  logic [NP-1:0][ADDR_W-1:0] s_addr;
  logic [NP-1:0][SPW-1:0] s_sqp;
  logic [1:0] ninc;

  int checks = 0, failures = 0;
  int n_viol = 0, n_er = 0, n_cm = 0, n_sq = 0, n_stale = 0, n_stale_sq = 0;
  ld_t q[$];
  int head_ptr = 0, tail_ptr = 0, next_tag = 1, sq_head_int = 0, last_sqp = 0;
  bit exp_viol_v = 0;
  int exp_viol_ptr = 0, exp_viol_tag = 0;

  load_queue #(.DEPTH(D), .ALLOC_W(AW), .EX_W(EW), .NPORTS(NP), .ADDR_W(ADDR_W), .TAG_W(TAG_W),
               .SQ_DEPTH(SQD), .LINE_OFF(6), .WORD_OFF(3)) dut (
    .clk, .rst_n, .alloc_valid_i(al_v), .alloc_mode_i(al_m), .alloc_tag_i(al_tag),
    .alloc_sq_ptr_i(al_sqp), .tail_ptr_o(tail), .free_o(free), .count_o(cnt),
    .ex_valid_i(ex_v), .ex_ptr_i(ex_ptr), .ex_tag_i(ex_tag), .ex_addr_i(ex_addr),
    .cm_valid_i(cm_v), .cm_tag_i(cm_tag), .cm_pop_o(cm_pop), .early_en_i(er_en),
    .head_nondspec_i(nds), .head_valid_o(h_v), .head_sq_ptr_o(h_sqp), .er_valid_o(er_v),
    .er_tag_o(er_tag), .srch_valid_i(s_v), .srch_kind_i(s_kind), .srch_addr_i(s_addr),
    .srch_sq_ptr_i(s_sqp), .sq_head_ptr_i(sq_head), .srch_hit_o(s_hit),
    .viol_valid_o(viol_v), .viol_ptr_o(viol_ptr), .viol_tag_o(viol_tag),
    .squash_valid_i(sqv), .squash_ptr_i(sq_ptr), .nsync_inc_o(ninc), .nsync_dec_o(ndec));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    al_v = '0; al_m = MODE_SYNC; al_tag = '0; al_sqp = '0; ex_v = '0; ex_ptr = '0;
    ex_tag = '0; ex_addr = '0; cm_v = 0; cm_tag = '0; er_en = 1; nds = 0; s_v = '0;
    s_addr = '0; s_sqp = '0; sq_head = '0; sqv = 0; sq_ptr = '0;
    foreach (s_kind[p]) s_kind[p] = SRCH_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 8000; c++) begin
      int squash_at, n_alloc, exp_inc, exp_dec, oldest;
      bit exp_cm, exp_er, head_sq, stale_sq;
      int s_int [NP];
      bit hit_any [$];
      @(negedge clk);
      // ---- registered violation report from the previous cycle
      chk(viol_v == exp_viol_v, "violation valid");
      if (exp_viol_v) begin
        chk(int'(viol_ptr) == exp_viol_ptr, "violation pointer");
        chk(int'(viol_tag) == exp_viol_tag, "violation tag");
        n_viol++;
      end
      // ---- state
      chk(int'(cnt) == q.size() && int'(free) == D - q.size(), "occupancy");
      chk(int'(tail) == tail_ptr, "tail pointer");
      chk(h_v == (q.size() > 0), "head valid");
      if (q.size() > 0) chk(int'(h_sqp) == q[0].sqp % (2 * SQD), "head SQ pointer");
      // ---- stimulus
      al_v = '0; ex_v = '0; s_v = '0; cm_v = 0; sqv = 0;
      // SQ head may advance, never past the oldest live load's SQ position
      if ($urandom_range(0, 3) == 0) begin
        int lim;
        lim = (q.size() > 0) ? q[0].sqp : last_sqp;
        if (sq_head_int < lim) sq_head_int++;
      end
      sq_head = SPW'(sq_head_int % (2 * SQD));
      squash_at = -1;
      stale_sq = 0;
      if ($urandom_range(0, 11) == 0 && q.size() > 0) begin
        squash_at = $urandom_range(0, q.size() - 1);
        sqv = 1;
        sq_ptr = PW'(q[squash_at].ptr);
      end else if ($urandom_range(0, 23) == 0) begin
        // squash from a load that already left: pointer up to D-1 behind
        // the head; the whole partition goes, from the head
        squash_at = 0;
        sqv = 1;
        stale_sq = 1;
        sq_ptr = PW'(ptr_add(head_ptr, 2 * D - $urandom_range(1, D - 1), D));
      end
      n_alloc = 0;
      if (!sqv) begin
        n_alloc = $urandom_range(0, AW);
        if (n_alloc > D - q.size()) n_alloc = D - q.size();
        al_m = mode_e'($urandom_range(0, 1));
        for (int s = 0; s < n_alloc; s++) begin
          int base, sp;
          base = (last_sqp > sq_head_int) ? last_sqp : sq_head_int;
          sp = base + $urandom_range(0, 1);
          if (sp > sq_head_int + SQD) sp = sq_head_int + SQD;
          al_v[s] = 1;
          al_tag[s] = TAG_W'(next_tag + s);
          al_sqp[s] = SPW'(sp % (2 * SQD));
          last_sqp = sp;
          al_tag[s] = TAG_W'(next_tag + s);
          // remember the position in a side array through the tag
          sqp_of[(next_tag + s) % 256] = sp;
        end
      end
      // executions of distinct unperformed loads that survive
      for (int e = 0; e < EW; e++) begin
        if (q.size() > 0 && $urandom_range(0, 1) == 1) begin
          int j;
          bit dup;
          j = $urandom_range(0, q.size() - 1);
          dup = 0;
          for (int f = 0; f < e; f++) if (ex_v[f] && int'(ex_ptr[f]) == q[j].ptr) dup = 1;
          if (!q[j].perf && !dup && (squash_at < 0 || j < squash_at)) begin
            ex_v[e] = 1; ex_ptr[e] = PW'(q[j].ptr); ex_tag[e] = TAG_W'(q[j].tag);
            ex_addr[e] = ADDR_W'($urandom_range(0, 255));
          end
        end
      end
      // searches
      for (int p = 0; p < NP; p++) begin
        s_int[p] = sq_head_int + $urandom_range(0, SQD - 1);
        s_sqp[p] = SPW'(s_int[p] % (2 * SQD));
        s_addr[p] = ADDR_W'($urandom_range(0, 255));
        s_kind[p] = srch_kind_e'($urandom_range(1, 3));
        s_v[p] = ($urandom_range(0, 1) == 1);
      end
      // commit: the head's tag, or a stale tag of a load that left early
      if ($urandom_range(0, 2) == 0) begin
        cm_v = 1;
        if (q.size() > 0 && $urandom_range(0, 3) != 0) cm_tag = TAG_W'(q[0].tag);
        else cm_tag = TAG_W'(next_tag + 100);
      end
      er_en = ($urandom_range(0, 7) != 0);
      nds = 1'($urandom_range(0, 1));
      #1;
      // ---- expected combinational outputs
      head_sq = sqv && squash_at == 0;
      exp_cm = q.size() > 0 && cm_v && int'(cm_tag) == q[0].tag && !head_sq;
      exp_er = q.size() > 0 && er_en && q[0].mode == MODE_DRF && nds && !exp_cm && !head_sq;
      chk(cm_pop == exp_cm, "commit pop");
      chk(er_v == exp_er, "early removal");
      if (exp_er) chk(int'(er_tag) == q[0].tag, "early removal tag");
      if (cm_v && !exp_cm) n_stale++;
      exp_inc = (!sqv && al_m == MODE_SYNC) ? n_alloc : 0;
      exp_dec = 0;
      if (sqv) for (int k = squash_at; k < q.size(); k++) if (q[k].mode == MODE_SYNC) exp_dec++;
      if (exp_cm && q[0].mode == MODE_SYNC) exp_dec++;
      chk(int'(ninc) == exp_inc, "num-sync increment");
      chk(int'(ndec) == exp_dec, "num-sync decrement");
      oldest = -1;
      for (int p = 0; p < NP; p++) begin
        bit h;
        h = 0;
        for (int k = 0; k < q.size(); k++) begin
          bit m;
          m = 0;
          if (s_v[p] && q[k].perf) begin
            if (s_kind[p] == SRCH_D)
              m = (q[k].addr / 8 == int'(s_addr[p]) / 8) && (q[k].sqp > s_int[p]);
            else
              m = (q[k].addr / 64 == int'(s_addr[p]) / 64);
          end
          if (m) begin
            h = 1;
            if (oldest < 0 || k < oldest) oldest = k;
          end
        end
        if (s_hit[p] != h && failures < 3) begin
          $display("port %0d kind %0d addr %0d sint %0d sqhead %0d hit %0d exp %0d", p, s_kind[p], s_addr[p], s_int[p], sq_head_int, s_hit[p], h);
          foreach (q[k]) $display("  ld ptr %0d tag %0d perf %0d addr %0d sqp %0d", q[k].ptr, q[k].tag, q[k].perf, q[k].addr, q[k].sqp);
        end
        chk(s_hit[p] == h, "search hit");
      end
      exp_viol_v = (oldest >= 0);
      if (oldest >= 0) begin
        exp_viol_ptr = q[oldest].ptr;
        exp_viol_tag = q[oldest].tag;
      end
      // ---- model update at the edge
      @(posedge clk);
      for (int e = 0; e < EW; e++) if (ex_v[e])
        foreach (q[k]) if (q[k].ptr == int'(ex_ptr[e])) begin q[k].perf = 1; q[k].addr = int'(ex_addr[e]); end
      if (exp_cm || exp_er) begin
        void'(q.pop_front());
        head_ptr = ptr_add(head_ptr, 1, D);
        if (exp_cm) n_cm++; else n_er++;
        if (squash_at > 0) squash_at--;
      end
      if (sqv) begin
        n_sq++;
        n_stale_sq += int'(stale_sq);
        tail_ptr = stale_sq ? head_ptr : int'(sq_ptr);
        while (q.size() > squash_at) void'(q.pop_back());
        last_sqp = (q.size() > 0) ? q[q.size() - 1].sqp : sq_head_int;
      end
      for (int s = 0; s < n_alloc; s++) begin
        ld_t l;
        l.ptr = tail_ptr; l.tag = (next_tag + s) % 256; l.mode = al_m;
        l.sqp = sqp_of[(next_tag + s) % 256]; l.perf = 0; l.addr = 0;
        q.push_back(l);
        tail_ptr = ptr_add(tail_ptr, 1, D);
      end
      next_tag = (next_tag + n_alloc) % 256;
    end
    chk(n_viol > 0 && n_er > 0 && n_cm > 0 && n_sq > 0 && n_stale > 0 && n_stale_sq > 0, "coverage");
    $display("violations %0d early %0d commits %0d squashes %0d stale commits %0d squashes behind head %0d",
             n_viol, n_er, n_cm, n_sq, n_stale, n_stale_sq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sqp_of [256];
endmodule
