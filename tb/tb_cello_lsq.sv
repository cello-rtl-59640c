// tb_cello_lsq: end-to-end test of the CELLO load/store queue at its default
// size (2 threads, 192-entry LQ, 128-entry SQ).
//
// A small core model runs one synthetic program per thread. Each program
// alternates long DRF regions (setDRF 1, then loads and stores to a pool of
// shared cache lines; one region in four is mostly stores) with short sync
// regions (setDRF 0, then lock-like accesses). The model allocates
// instruction groups in order, executes loads and resolves stores out of
// order, commits in order (with phases of stalled commit, as behind a
// long-latency load, and a fill phase with no execution, to fill the
// queues), lets committed stores write to L1, injects invalidations and
// evictions, and squashes a thread from the load that a search reports.
//
// Checked against the model: the Mode given to every group, the region flag,
// LQ and SQ occupancy and the num-sync counters every cycle; on every store
// write its address and whether it searched or which filter dropped the
// search; on every invalidation or eviction whether it searched; on every
// early removal that the load is the head, is DRF and has no unresolved older
// store; the violating load of every report; and an empty, idle design after
// the programs drain. Each mechanism (both filters, the three search kinds,
// a store write waiting for a search port, LQ-full and SQ-full stalls, early
// removal, violation squash with region-flag restore, both setDRF
// directions, the disabled mode, context restore) is counted and must occur
// at least once. Stalls of the store-resolve and invalidation requests are
// counted but not required: with two search ports and the fixed priority
// they cannot happen (only three requesters, the store write is lowest).
//
// Timing: all inputs change at the falling edge; combinational outputs are
// checked and captured 1 ns later, and the model is updated from the
// captured values after the rising edge. No input changes at the rising
// edge. Runs at the default parameters (no overrides), about 25k cycles.
module tb_cello_lsq;
  import cello_pkg::*;

  localparam int T = 2, LQA = 3, SQA = 2, EXW = 2;
  localparam int LQD = 96, SQD = 64, LPW = $clog2(2 * LQD), SPW = $clog2(2 * SQD);
  localparam int TAG_W = 9, ADDR_W = 48;
  localparam int NPROG = 1500;
  localparam int NLINES = 6;

  typedef enum int { I_SET, I_LD, I_ST } ik_e;
  typedef struct {
    ik_e   kind;
    int    val;
    int    addr;
  } prog_t;
  typedef struct {
    ik_e   kind;
    int    pc;
    int    val;
    int    addr;
    int    tag;
    int    lq_ptr;
    int    sq_ptr;
    int    sqp;      // loads: SQ tail at allocation
    bit    region;   // region flag the instruction was allocated under
    mode_e mode;
    bit    exec;
    bit    in_lq;
  } rob_t;
  typedef struct {
    int    addr;
    mode_e mode;
  } sb_t;

  // ---------------------------------------------------------------- DUT
  logic clk = 0, rst_n = 0, drf_en;
  logic al_v, al_sd_v, al_sd_val, al_ready;
  logic [0:0] al_t;
  logic [LQA-1:0] al_ld_v;
  logic [LQA-1:0][TAG_W-1:0] al_ld_tag;
  logic [LQA-1:0][1:0] al_ld_sb;
  logic [SQA-1:0] al_st_v;
  mode_e al_mode;
  logic [LQA-1:0][LPW-1:0] al_ld_ptr;
  logic [SQA-1:0][SPW-1:0] al_st_ptr;
  logic [EXW-1:0] lx_v;
  logic [EXW-1:0][0:0] lx_t;
  logic [EXW-1:0][LPW-1:0] lx_ptr;
  logic [EXW-1:0][TAG_W-1:0] lx_tag;
  logic [EXW-1:0][ADDR_W-1:0] lx_addr;
  logic sx_v, sx_ready;
  logic [0:0] sx_t;
  logic [SPW-1:0] sx_ptr;
  logic [ADDR_W-1:0] sx_addr;
  logic [T-1:0] lc_v, lc_pop, sc_v;
  logic [T-1:0][TAG_W-1:0] lc_tag;
  logic wr_ready, wr_fire;
  logic [0:0] wr_t;
  logic [ADDR_W-1:0] wr_addr;
  mode_e wr_mode;
  logic ev_v, ev_ready;
  mem_evt_e ev_kind;
  logic [ADDR_W-1:0] ev_addr;
  logic sq_v;
  logic [0:0] sq_t;
  logic [LPW-1:0] sq_lq;
  logic [SPW-1:0] sq_sq;
  mode_e sq_m;
  logic ctx_v, ctx_f;
  logic [0:0] ctx_t;
  logic [T-1:0] rflag, viol_v, er_v;
  logic [T-1:0][LPW-1:0] viol_ptr;
  logic [T-1:0][TAG_W-1:0] viol_tag, er_tag;
  logic [T-1:0][LPW:0] lq_cnt;
  logic [T-1:0][SPW:0] sq_cnt;
  logic [T-1:0][7:0] nsync;
  logic e_d, e_mc, e_mm, e_fs, e_fl, e_fe, e_sx, e_wr, e_ev;

  cello_lsq dut (
    .clk, .rst_n, .drf_enable_i(drf_en),
    .al_valid_i(al_v), .al_thread_i(al_t), .al_setdrf_valid_i(al_sd_v), .al_setdrf_val_i(al_sd_val),
    .al_ld_valid_i(al_ld_v), .al_ld_tag_i(al_ld_tag), .al_ld_st_before_i(al_ld_sb),
    .al_st_valid_i(al_st_v), .al_ready_o(al_ready), .al_mode_o(al_mode),
    .al_ld_ptr_o(al_ld_ptr), .al_st_ptr_o(al_st_ptr),
    .ld_ex_valid_i(lx_v), .ld_ex_thread_i(lx_t), .ld_ex_ptr_i(lx_ptr), .ld_ex_tag_i(lx_tag),
    .ld_ex_addr_i(lx_addr),
    .st_ex_valid_i(sx_v), .st_ex_thread_i(sx_t), .st_ex_ptr_i(sx_ptr), .st_ex_addr_i(sx_addr),
    .st_ex_ready_o(sx_ready),
    .ld_cm_valid_i(lc_v), .ld_cm_tag_i(lc_tag), .ld_cm_pop_o(lc_pop), .st_cm_valid_i(sc_v),
    .wr_ready_i(wr_ready), .wr_fire_o(wr_fire), .wr_thread_o(wr_t), .wr_addr_o(wr_addr),
    .wr_mode_o(wr_mode),
    .ev_valid_i(ev_v), .ev_kind_i(ev_kind), .ev_addr_i(ev_addr), .ev_ready_o(ev_ready),
    .sq_valid_i(sq_v), .sq_thread_i(sq_t), .sq_lq_ptr_i(sq_lq), .sq_sq_ptr_i(sq_sq),
    .sq_mode_i(sq_m),
    .ctx_wr_valid_i(ctx_v), .ctx_wr_thread_i(ctx_t), .ctx_wr_flag_i(ctx_f), .region_flag_o(rflag),
    .viol_valid_o(viol_v), .viol_lq_ptr_o(viol_ptr), .viol_tag_o(viol_tag),
    .er_valid_o(er_v), .er_tag_o(er_tag),
    .lq_count_o(lq_cnt), .sq_count_o(sq_cnt), .nsync_o(nsync),
    .srch_d_evt_o(e_d), .srch_mcore_evt_o(e_mc), .srch_mmem_evt_o(e_mm),
    .filt_st_store_evt_o(e_fs), .filt_st_load_evt_o(e_fl), .filt_ev_evt_o(e_fe),
    .stall_stex_evt_o(e_sx), .stall_wr_evt_o(e_wr), .stall_ev_evt_o(e_ev));

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  prog_t prog [T][NPROG];
  rob_t  rob [T][$];
  sb_t   sbuf [T][$];
  int    pc [T];
  int    next_tag [T];
  bit    mflag [T];
  int    checks = 0, failures = 0;

  // mechanism counters
  int c_fs, c_fl, c_fe, c_d, c_mc, c_mm, c_sx, c_wr, c_ev, c_er, c_viol, c_lqfull, c_sqfull;
  int c_set1, c_set0, c_dis, c_ctx, c_flag_restore;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  function automatic int lq_model_cnt(int t);
    int n = 0;
    foreach (rob[t][i]) if (rob[t][i].kind == I_LD && rob[t][i].in_lq) n++;
    return n;
  endfunction
  function automatic int sync_cnt(int t);
    int n = 0;
    foreach (rob[t][i]) if (rob[t][i].kind == I_LD && rob[t][i].in_lq && rob[t][i].mode == MODE_SYNC) n++;
    return n;
  endfunction
  function automatic int sq_model_cnt(int t);
    int n = sbuf[t].size();
    foreach (rob[t][i]) if (rob[t][i].kind == I_ST) n++;
    return n;
  endfunction
  function automatic int rob_find(int t, int tag);
    foreach (rob[t][i]) if (rob[t][i].kind == I_LD && rob[t][i].tag == tag) return i;
    return -1;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- programs
  initial begin
    for (int t = 0; t < T; t++) begin
      int i;
      i = 0;
      while (i < NPROG) begin
        int n;
        bit st_heavy;
        // DRF region
        prog[t][i] = '{I_SET, 1, 0}; i++;
        n = $urandom_range(15, 60);
        st_heavy = ($urandom_range(0, 3) == 0);  // some regions mostly write
        for (int k = 0; k < n && i < NPROG; k++) begin
          prog[t][i].kind = (($urandom_range(0, 2) == 0) != st_heavy) ? I_ST : I_LD;
          prog[t][i].val  = 0;
          prog[t][i].addr = $urandom_range(0, NLINES - 1) * 64 + $urandom_range(0, 3) * 8;
          i++;
        end
        // sync region: lock-like accesses to line 0
        if (i < NPROG) begin prog[t][i] = '{I_SET, 0, 0}; i++; end
        n = $urandom_range(2, 6);
        for (int k = 0; k < n && i < NPROG; k++) begin
          prog[t][i].kind = (k % 2 == 0) ? I_LD : I_ST;
          prog[t][i].val  = 0;
          prog[t][i].addr = $urandom_range(0, 1) * 64;
          i++;
        end
      end
    end
  end

  // ------------------------------------------------------------ driver
  logic k_al_ready, k_wr_fire, k_sx_ready, k_ev_ready;
  mode_e k_al_mode;
  logic [LQA-1:0][LPW-1:0] k_ld_ptr;
  logic [SQA-1:0][SPW-1:0] k_st_ptr;
  logic [T-1:0] k_lc_pop, k_er_v;
  logic [0:0] k_wr_t;
  bit ev_taken = 0;
  int pend_viol_tag [T];
  bit pend_viol [T];

  initial begin
    int cyc, stall_commit_until, group_pc_end;
    bit fill_phase;
    bit done;
    {al_v, al_sd_v, al_sd_val, al_t, sx_v, sx_t, wr_ready, ev_v, sq_v, sq_t, ctx_v, ctx_f, ctx_t} = '0;
    al_ld_v = '0; al_ld_tag = '0; al_ld_sb = '0; al_st_v = '0; lx_v = '0; lx_t = '0;
    lx_ptr = '0; lx_tag = '0; lx_addr = '0; sx_ptr = '0; sx_addr = '0; lc_v = '0; lc_tag = '0;
    sc_v = '0; ev_kind = EVT_INVALIDATION; ev_addr = '0; sq_lq = '0; sq_sq = '0; sq_m = MODE_SYNC;
    drf_en = 1;
    {c_fs, c_fl, c_fe, c_d, c_mc, c_mm, c_sx, c_wr, c_ev, c_er, c_viol, c_lqfull, c_sqfull} = '0;
    {c_set1, c_set0, c_dis, c_ctx, c_flag_restore} = '0;
    for (int t = 0; t < T; t++) begin
      pc[t] = 0; next_tag[t] = 0; mflag[t] = 0; pend_viol[t] = 0; pend_viol_tag[t] = 0;
    end
    stall_commit_until = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    done = 0;
    while (!done) begin
      int sq_thr, at, n_ld, n_st, gpc, ctx_phase;
      int ld_idx [LQA];
      int st_idx [SQA];
      int lx_idx [EXW];
      int sx_t_i, sx_i, ev_line;
      bit do_sd, sd_val_b, empty;
      @(negedge clk);
      cyc++;
      // ---------------- compare per-cycle state
      for (int t = 0; t < T; t++) begin
        chk(int'(nsync[t]) == sync_cnt(t), $sformatf("num-sync thread %0d: %0d vs %0d", t, nsync[t], sync_cnt(t)));
        chk(int'(lq_cnt[t]) == lq_model_cnt(t), $sformatf("LQ count thread %0d: %0d vs %0d", t, lq_cnt[t], lq_model_cnt(t)));
        chk(int'(sq_cnt[t]) == sq_model_cnt(t), $sformatf("SQ count thread %0d: %0d vs %0d (sb %0d)", t, sq_cnt[t], sq_model_cnt(t), sbuf[t].size()));
        chk(rflag[t] == mflag[t], $sformatf("region flag thread %0d", t));
      end
      // ---------------- violation reports (registered, from last cycle)
      for (int t = 0; t < T; t++) if (viol_v[t]) begin
        int j;
        j = rob_find(t, int'(viol_tag[t]));
        if (j >= 0) begin
          chk(rob[t][j].exec && rob[t][j].lq_ptr == int'(viol_ptr[t]),
              "violating load is a performed load");
          pend_viol[t] = 1;
          pend_viol_tag[t] = int'(viol_tag[t]);
        end
      end
      // ---------------- choose stimulus
      al_v = 0; al_sd_v = 0; al_ld_v = '0; al_st_v = '0; lx_v = '0; sx_v = 0; lc_v = '0;
      sc_v = '0; sq_v = 0; ctx_v = 0;
      drf_en = !(cyc > 3000 && cyc < 3600);
      if (!drf_en) c_dis++;
      // squash one thread with a pending violation
      sq_thr = -1;
      for (int t = 0; t < T; t++) if (pend_viol[t] && sq_thr < 0) begin
        int j;
        j = rob_find(t, pend_viol_tag[t]);
        pend_viol[t] = 0;
        if (j >= 0) begin
          sq_thr = t;
          sq_v = 1; sq_t = 1'(t);
          sq_lq = LPW'(rob[t][j].lq_ptr);
          sq_sq = SPW'(rob[t][j].sqp);
          sq_m  = rob[t][j].region ? MODE_DRF : MODE_SYNC;
        end
      end
      // context switch of thread 1: the OS overwrites the flag, then restores it
      ctx_phase = cyc % 1000;
      if (cyc > 500 && (ctx_phase == 10 || ctx_phase == 11) && sq_thr != 1) begin
        ctx_v = 1; ctx_t = 1;
        ctx_f = (ctx_phase == 10) ? !mflag[1] : mflag[1];
      end
      // allocation group
      at = cyc % 2;
      if (at == sq_thr || (ctx_v && at == 1)) at = -1;
      n_ld = 0; n_st = 0; do_sd = 0; sd_val_b = 0;
      gpc = (at >= 0) ? pc[at] : NPROG;
      while (at >= 0 && gpc < NPROG && (n_ld + n_st + int'(do_sd)) < 4) begin
        if (prog[at][gpc].kind == I_SET) begin
          if (n_ld + n_st + int'(do_sd) > 0) break;
          do_sd = 1; sd_val_b = prog[at][gpc].val[0];
        end else if (prog[at][gpc].kind == I_LD) begin
          if (n_ld == LQA) break;
          ld_idx[n_ld] = gpc;
          al_ld_sb[n_ld] = 2'(n_st);
          al_ld_tag[n_ld] = TAG_W'(next_tag[at] + n_ld + n_st);
          n_ld++;
        end else begin
          if (n_st == SQA) break;
          st_idx[n_st] = gpc;
          n_st++;
        end
        gpc++;
      end
      // tags follow program order inside the group
      if (at >= 0) begin
        int k, l;
        k = 0; l = 0;
        for (int p = pc[at]; p < gpc; p++) begin
          if (prog[at][p].kind == I_LD) begin al_ld_tag[l] = TAG_W'(next_tag[at] + k); l++; end
          if (prog[at][p].kind != I_SET) k++;
        end
      end
      if (at >= 0 && gpc > pc[at]) begin
        al_v = 1; al_t = 1'(at); al_sd_v = do_sd; al_sd_val = sd_val_b;
        al_ld_v = LQA'((1 << n_ld) - 1);
        al_st_v = SQA'((1 << n_st) - 1);
      end
      // fill phase: nothing executes, so the queues run full behind the stalled commit
      fill_phase = (cyc % 2100) >= 100 && (cyc % 2100) < 400;
      // load execution: random unexecuted loads of threads not being squashed
      for (int e = 0; e < EXW; e++) begin
        int t, j;
        lx_idx[e] = -1;
        t = $urandom_range(0, T - 1);
        if (t != sq_thr && rob[t].size() > 0 && !fill_phase && $urandom_range(0, 3) != 0) begin
          j = $urandom_range(0, rob[t].size() - 1);
          if (rob[t][j].kind == I_LD && !rob[t][j].exec &&
              !(e == 1 && lx_v[0] && int'(lx_t[0]) == t && lx_idx[0] == j)) begin
            lx_v[e] = 1; lx_t[e] = 1'(t); lx_ptr[e] = LPW'(rob[t][j].lq_ptr);
            lx_tag[e] = TAG_W'(rob[t][j].tag); lx_addr[e] = ADDR_W'(rob[t][j].addr);
            lx_idx[e] = j;
          end
        end
      end
      // store address resolution
      sx_i = -1;
      sx_t_i = $urandom_range(0, T - 1);
      if (sx_t_i != sq_thr && rob[sx_t_i].size() > 0 && !fill_phase && $urandom_range(0, 2) != 0) begin
        int j;
        j = $urandom_range(0, rob[sx_t_i].size() - 1);
        if (rob[sx_t_i][j].kind == I_ST && !rob[sx_t_i][j].exec) begin
          sx_v = 1; sx_t = 1'(sx_t_i); sx_ptr = SPW'(rob[sx_t_i][j].sq_ptr);
          sx_addr = ADDR_W'(rob[sx_t_i][j].addr); sx_i = j;
        end
      end
      // in-order commit of the oldest instruction of each thread
      if (cyc % 700 == 100) stall_commit_until = cyc + 300;
      for (int t = 0; t < T; t++) begin
        if (t != sq_thr && cyc > stall_commit_until && rob[t].size() > 0 &&
            $urandom_range(0, 3) != 0) begin
          if (rob[t][0].kind == I_LD && rob[t][0].exec) begin
            lc_v[t] = 1; lc_tag[t] = TAG_W'(rob[t][0].tag);
          end else if (rob[t][0].kind == I_ST && rob[t][0].exec && !(sx_v && sx_t_i == t && sx_i == 0)) begin
            sc_v[t] = 1;
          end
        end
      end
      wr_ready = ($urandom_range(0, 4) != 0);
      if (ev_taken) begin ev_v = 0; ev_taken = 0; end
      if (!ev_v && $urandom_range(0, 1) == 0) begin
        ev_v = 1;
        ev_kind = mem_evt_e'($urandom_range(0, 1));
        ev_line = $urandom_range(0, NLINES - 1);
        ev_addr = ADDR_W'(ev_line * 64 + $urandom_range(0, 63));
      end
      #1;
      // ---------------- check combinational responses
      if (al_v) begin
        bit f;
        f = do_sd ? sd_val_b : mflag[at];
        chk(al_mode == ((drf_en && f) ? MODE_DRF : MODE_SYNC), "allocation mode");
        if (!al_ready) begin
          if (n_ld > LQD - lq_model_cnt(at)) c_lqfull++;
          if (n_st > SQD - sq_model_cnt(at)) c_sqfull++;
          chk(n_ld > LQD - lq_model_cnt(at) || n_st > SQD - sq_model_cnt(at), "allocation refused with room");
        end else begin
          chk(n_ld <= LQD - lq_model_cnt(at) && n_st <= SQD - sq_model_cnt(at), "allocation accepted without room");
        end
      end
      if (wr_fire) begin
        int t;
        bit other_sync;
        t = int'(wr_t);
        other_sync = (sync_cnt(1 - t) != 0);
        chk(sbuf[t].size() > 0, "write from an empty store buffer");
        if (sbuf[t].size() > 0) begin
          chk(int'(wr_addr) == sbuf[t][0].addr && wr_mode == sbuf[t][0].mode, "store write address and mode");
          chk(e_fs == (sbuf[t][0].mode == MODE_DRF), "store-DRF filter");
          chk(e_fl == (sbuf[t][0].mode == MODE_SYNC && !other_sync), "load-DRF filter on store write");
          chk(e_mc == (sbuf[t][0].mode == MODE_SYNC && other_sync), "store write search");
        end
      end else begin
        chk(!e_mc && !e_fs && !e_fl, "store write events without a write");
      end
      if (ev_v && ev_ready) begin
        bit any_sync;
        any_sync = (sync_cnt(0) != 0) || (sync_cnt(1) != 0);
        chk(e_mm == any_sync && e_fe == !any_sync, "load-DRF filter on invalidation/eviction");
      end
      for (int t = 0; t < T; t++) if (er_v[t]) begin
        int h;
        bit older_ok;
        h = -1;
        foreach (rob[t][i]) if (h < 0 && rob[t][i].kind == I_LD && rob[t][i].in_lq) h = i;
        chk(h >= 0, "early removal from an empty LQ");
        if (h >= 0) begin
          older_ok = 1;
          for (int i = 0; i < h; i++) if (rob[t][i].kind == I_ST && !rob[t][i].exec) older_ok = 0;
          chk(rob[t][h].mode == MODE_DRF, "early removal of a sync load");
          chk(older_ok, "early removal with an unresolved older store");
          chk(int'(er_tag[t]) == rob[t][h].tag, "early removal tag");
        end
      end
      // ---------------- counters
      c_fs += int'(e_fs); c_fl += int'(e_fl); c_fe += int'(e_fe && ev_v && ev_ready);
      c_d += int'(e_d); c_mc += int'(e_mc); c_mm += int'(e_mm);
      c_sx += int'(e_sx); c_wr += int'(e_wr); c_ev += int'(e_ev);
      // ---------------- sample the outputs the update needs, then take the edge
      k_al_ready = al_ready; k_al_mode = al_mode; k_ld_ptr = al_ld_ptr; k_st_ptr = al_st_ptr;
      k_lc_pop = lc_pop; k_er_v = er_v; k_wr_fire = wr_fire; k_wr_t = wr_t;
      k_sx_ready = sx_ready; k_ev_ready = ev_ready;
      @(posedge clk);
      // early removals and commits
      for (int t = 0; t < T; t++) begin
        if (k_er_v[t]) begin
          c_er++;
          foreach (rob[t][i]) if (rob[t][i].kind == I_LD && rob[t][i].in_lq) begin
            rob[t][i].in_lq = 0;
            break;
          end
        end
        if (lc_v[t]) begin
          chk(k_lc_pop[t] == rob[t][0].in_lq, "commit pops only loads still in the LQ");
          void'(rob[t].pop_front());
        end else if (sc_v[t]) begin
          sbuf[t].push_back('{rob[t][0].addr, rob[t][0].mode});
          void'(rob[t].pop_front());
        end
      end
      // executions (indices are still valid: commits only removed index 0)
      for (int e = 0; e < EXW; e++) if (lx_v[e]) begin
        int t;
        t = int'(lx_t[e]);
        foreach (rob[t][i]) if (rob[t][i].kind == I_LD && rob[t][i].tag == int'(lx_tag[e])) rob[t][i].exec = 1;
      end
      if (sx_v && k_sx_ready)
        foreach (rob[sx_t_i][i])
          if (rob[sx_t_i][i].kind == I_ST && rob[sx_t_i][i].sq_ptr == int'(sx_ptr)) rob[sx_t_i][i].exec = 1;
      if (k_wr_fire) void'(sbuf[int'(k_wr_t)].pop_front());
      if (ev_v && k_ev_ready) ev_taken = 1;  // dropped at the next negedge
      // squash
      if (sq_v) begin
        int j;
        j = rob_find(sq_thr, pend_viol_tag[sq_thr]);
        c_viol++;
        pc[sq_thr] = rob[sq_thr][j].pc;
        next_tag[sq_thr] = rob[sq_thr][j].tag;  // tags are reused like ROB entries
        if (mflag[sq_thr] != rob[sq_thr][j].region) c_flag_restore++;
        mflag[sq_thr] = rob[sq_thr][j].region;
        while (rob[sq_thr].size() > j) void'(rob[sq_thr].pop_back());
      end
      if (ctx_v) begin
        mflag[1] = ctx_f;
        if (ctx_phase == 11) c_ctx++;
      end
      // allocation
      if (al_v && k_al_ready) begin
        int l, s;
        l = 0; s = 0;
        for (int p = pc[at]; p < gpc; p++) begin
          rob_t r;
          r.kind = prog[at][p].kind; r.pc = p; r.val = prog[at][p].val; r.addr = prog[at][p].addr;
          r.tag = 0; r.lq_ptr = 0; r.sq_ptr = 0; r.sqp = 0; r.exec = 0; r.in_lq = 0;
          r.region = do_sd ? sd_val_b : mflag[at];
          r.mode = k_al_mode;
          if (r.kind == I_SET) begin
            r.exec = 1;
            if (sd_val_b) c_set1++; else c_set0++;
          end else if (r.kind == I_LD) begin
            r.tag = int'(al_ld_tag[l]); r.lq_ptr = int'(k_ld_ptr[l]);
            r.sqp = ptr_add(int'(k_st_ptr[0]), s, SQD);
            r.in_lq = 1;
            l++;
          end else begin
            r.sq_ptr = int'(k_st_ptr[s]);
            s++;
          end
          if (r.kind != I_SET || rob[at].size() > 0) rob[at].push_back(r);
        end
        if (do_sd) mflag[at] = sd_val_b;
        next_tag[at] = (next_tag[at] + n_ld + n_st) % 512;
        pc[at] = gpc;
      end
      // setDRF instructions retire at once; drop them from the head
      for (int t = 0; t < T; t++) while (rob[t].size() > 0 && rob[t][0].kind == I_SET) void'(rob[t].pop_front());
      empty = 1;
      for (int t = 0; t < T; t++) if (pc[t] < NPROG || rob[t].size() > 0 || sbuf[t].size() > 0) empty = 0;
      done = empty && (!ev_v || ev_taken) && cyc > 4000;
      if (cyc > 350000) done = 1;
    end
    // ---------------- drained: everything empty
    @(negedge clk);
    for (int t = 0; t < T; t++) begin
      chk(lq_cnt[t] == 0 && sq_cnt[t] == 0 && nsync[t] == 0, "queues drained and num-sync zero");
    end
    $display("cycles %0d", cyc);
    $display("filtered: store-DRF %0d, load-DRF (store write) %0d, load-DRF (inv/evict) %0d", c_fs, c_fl, c_fe);
    $display("searches: D %0d, M-core %0d, M-memory %0d", c_d, c_mc, c_mm);
    $display("port stalls: store resolve %0d, store write %0d, inv/evict %0d", c_sx, c_wr, c_ev);
    $display("LQ full %0d, SQ full %0d, early removals %0d, violation squashes %0d (flag restored %0d)",
             c_lqfull, c_sqfull, c_er, c_viol, c_flag_restore);
    $display("setDRF 1: %0d, setDRF 0: %0d, disabled cycles %0d, context restores %0d",
             c_set1, c_set0, c_dis, c_ctx);
    chk(c_fs > 0, "store-DRF filter never used");
    chk(c_fl > 0, "load-DRF filter never dropped a store-write search");
    chk(c_fe > 0, "load-DRF filter never dropped an invalidation search");
    chk(c_d > 0 && c_mc > 0 && c_mm > 0, "a search kind never occurred");
    chk(c_wr > 0, "a store write never waited for a search port");
    chk(c_lqfull > 0, "LQ never full");
    chk(c_sqfull > 0, "SQ never full");
    chk(c_er > 0, "no early removal");
    chk(c_viol > 0 && c_flag_restore > 0, "no violation squash with flag restore");
    chk(c_set1 > 0 && c_set0 > 0 && c_dis > 0 && c_ctx > 0, "mode switches missing");
    chk(pc[0] == NPROG && pc[1] == NPROG, "programs did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
