// cello_lsq: the load/store queue subsystem of a 2-way SMT out-of-order core
// with CELLO, compiler-assisted load->load ordering in data-race-free regions.
//
// Under TSO, loads execute speculatively out of order, and the load queue is
// searched associatively to catch a reordering another thread could observe:
// on every invalidation and eviction, and in an SMT core also on every store
// write to L1 (the co-running thread gets no invalidation). The compiler marks
// data-race-free (DRF) and synchronization (sync) regions with a setDRF
// instruction. This block uses that mark to skip searches that cannot find a
// violation and to let DRF loads leave the LQ before they commit:
//
//   region_flags      per-thread flag set by setDRF at allocation; every load
//                     and store copies it into the Mode bit of its queue entry
//   num_sync_counter  per thread, the number of sync loads in the LQ
//   drf_filter        store-DRF filter (a DRF store write needs no search) and
//                     load-DRF filter (no search while the concerned threads
//                     hold no sync loads)
//   lq_search_arbiter the LQ search ports shared by memory-system M-searches,
//                     store D-searches and store-write M-searches
//   load_queue,       one partition per thread (the queues are statically
//   store_queue       partitioned between the threads)
//   nondspec_check    per thread, Execute-bit check that lets a DRF load at
//                     the LQ head leave early
//
// Interface (all per cycle):
//   al_*     one allocation group from one thread: an optional leading setDRF,
//            up to LQ_ALLOC_W loads and SQ_ALLOC_W stores (slots filled from 0).
//            al_ld_st_before_i[s] is how many of the group's stores precede
//            load s. The group is taken when al_ready_o is high; the entry
//            pointers it gets are on al_ld_ptr_o / al_st_ptr_o.
//   ld_ex_*  loads that performed (address known, data obtained).
//   st_ex_*  one store resolving its address; taken when st_ex_ready_o (its
//            dependence search got a search port).
//   ld_cm_*, st_cm_*  in-order commit, one load and one store per thread.
//   wr_*     the SQ head of a thread writes to L1 when wr_ready_i is high and
//            either no search is needed or a search port is granted;
//            wr_fire_o marks the write.
//   ev_*     one invalidation or eviction; taken when ev_ready_o.
//   sq_*     squash of one thread from the given LQ and SQ pointers on,
//            restoring the region flag to the mode of the oldest squashed
//            instruction.
//   viol_*   one cycle after a search, the oldest load of each thread that
//            it hit; the core squashes from there.
//   er_*     a load left the LQ early.
//   *_evt_o  event pulses for counting searches, filtered searches and stalls.
//
// Follows the source design: structure of the additions, Mode bits, counters,
// filter rules, early-removal conditions and the default sizes (192-entry LQ,
// 128-entry SQ, 2 threads, 3 LQ and 2 SQ allocation ports, 2 LQ search
// ports, 8-bit counters). Own choices: the handshakes above, widths of address
// and tags, one store resolution, one store write and one memory event per
// cycle, round-robin choice of the writing thread, fixed search priority.
module cello_lsq #(
  parameter int unsigned THREADS    = cello_pkg::THREADS_DEF,
  parameter int unsigned LQ_ENTRIES = cello_pkg::LQ_ENTRIES_DEF,
  parameter int unsigned SQ_ENTRIES = cello_pkg::SQ_ENTRIES_DEF,
  parameter int unsigned LQ_ALLOC_W = cello_pkg::LQ_ALLOC_W_DEF,
  parameter int unsigned SQ_ALLOC_W = cello_pkg::SQ_ALLOC_W_DEF,
  parameter int unsigned LQ_SPORTS  = cello_pkg::LQ_SPORTS_DEF,
  parameter int unsigned LD_EX_W    = 2,
  parameter int unsigned NSYNC_W    = cello_pkg::NSYNC_W_DEF,
  parameter int unsigned ADDR_W     = cello_pkg::ADDR_W_DEF,
  parameter int unsigned TAG_W      = cello_pkg::TAG_W_DEF,
  localparam int unsigned TW        = (THREADS > 1) ? $clog2(THREADS) : 1,
  localparam int unsigned LQD       = LQ_ENTRIES / THREADS,
  localparam int unsigned SQD       = SQ_ENTRIES / THREADS,
  localparam int unsigned LPW       = $clog2(2 * LQD),
  localparam int unsigned SPW       = $clog2(2 * SQD),
  localparam int unsigned SBW       = $clog2(SQ_ALLOC_W + 1)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 drf_enable_i,
  // allocation
  input  logic                                 al_valid_i,
  input  logic [TW-1:0]                        al_thread_i,
  input  logic                                 al_setdrf_valid_i,
  input  logic                                 al_setdrf_val_i,
  input  logic [LQ_ALLOC_W-1:0]                al_ld_valid_i,
  input  logic [LQ_ALLOC_W-1:0][TAG_W-1:0]     al_ld_tag_i,
  input  logic [LQ_ALLOC_W-1:0][SBW-1:0]       al_ld_st_before_i,
  input  logic [SQ_ALLOC_W-1:0]                al_st_valid_i,
  output logic                                 al_ready_o,
  output cello_pkg::mode_e                     al_mode_o,
  output logic [LQ_ALLOC_W-1:0][LPW-1:0]       al_ld_ptr_o,
  output logic [SQ_ALLOC_W-1:0][SPW-1:0]       al_st_ptr_o,
  // load execution
  input  logic [LD_EX_W-1:0]                   ld_ex_valid_i,
  input  logic [LD_EX_W-1:0][TW-1:0]           ld_ex_thread_i,
  input  logic [LD_EX_W-1:0][LPW-1:0]          ld_ex_ptr_i,
  input  logic [LD_EX_W-1:0][TAG_W-1:0]        ld_ex_tag_i,
  input  logic [LD_EX_W-1:0][ADDR_W-1:0]       ld_ex_addr_i,
  // store address resolution
  input  logic                                 st_ex_valid_i,
  input  logic [TW-1:0]                        st_ex_thread_i,
  input  logic [SPW-1:0]                       st_ex_ptr_i,
  input  logic [ADDR_W-1:0]                    st_ex_addr_i,
  output logic                                 st_ex_ready_o,
  // commit
  input  logic [THREADS-1:0]                   ld_cm_valid_i,
  input  logic [THREADS-1:0][TAG_W-1:0]        ld_cm_tag_i,
  output logic [THREADS-1:0]                   ld_cm_pop_o,
  input  logic [THREADS-1:0]                   st_cm_valid_i,
  // store write to L1
  input  logic                                 wr_ready_i,
  output logic                                 wr_fire_o,
  output logic [TW-1:0]                        wr_thread_o,
  output logic [ADDR_W-1:0]                    wr_addr_o,
  output cello_pkg::mode_e                     wr_mode_o,
  // invalidations and evictions
  input  logic                                 ev_valid_i,
  input  cello_pkg::mem_evt_e                  ev_kind_i,
  input  logic [ADDR_W-1:0]                    ev_addr_i,
  output logic                                 ev_ready_o,
  // squash
  input  logic                                 sq_valid_i,
  input  logic [TW-1:0]                        sq_thread_i,
  input  logic [LPW-1:0]                       sq_lq_ptr_i,
  input  logic [SPW-1:0]                       sq_sq_ptr_i,
  input  cello_pkg::mode_e                     sq_mode_i,
  // context switch
  input  logic                                 ctx_wr_valid_i,
  input  logic [TW-1:0]                        ctx_wr_thread_i,
  input  logic                                 ctx_wr_flag_i,
  output logic [THREADS-1:0]                   region_flag_o,
  // violations found by searches
  output logic [THREADS-1:0]                   viol_valid_o,
  output logic [THREADS-1:0][LPW-1:0]          viol_lq_ptr_o,
  output logic [THREADS-1:0][TAG_W-1:0]        viol_tag_o,
  // early removal
  output logic [THREADS-1:0]                   er_valid_o,
  output logic [THREADS-1:0][TAG_W-1:0]        er_tag_o,
  // occupancy
  output logic [THREADS-1:0][LPW:0]            lq_count_o,
  output logic [THREADS-1:0][SPW:0]            sq_count_o,
  output logic [THREADS-1:0][NSYNC_W-1:0]      nsync_o,
  // events
  output logic                                 srch_d_evt_o,
  output logic                                 srch_mcore_evt_o,
  output logic                                 srch_mmem_evt_o,
  output logic                                 filt_st_store_evt_o,
  output logic                                 filt_st_load_evt_o,
  output logic                                 filt_ev_evt_o,
  output logic                                 stall_stex_evt_o,
  output logic                                 stall_wr_evt_o,
  output logic                                 stall_ev_evt_o
);
  import cello_pkg::*;

  localparam int unsigned REQ_MMEM = 0, REQ_D = 1, REQ_MCORE = 2;

  // --------------------------------------------------------- region flags
  logic al_fire;

  region_flags #(.THREADS(THREADS)) u_flags (
    .clk, .rst_n,
    .drf_enable_i,
    .alloc_valid_i   (al_fire),
    .alloc_thread_i  (al_thread_i),
    .setdrf_valid_i  (al_setdrf_valid_i),
    .setdrf_val_i    (al_setdrf_val_i),
    .alloc_mode_o    (al_mode_o),
    .squash_valid_i  (sq_valid_i),
    .squash_thread_i (sq_thread_i),
    .squash_mode_i   (sq_mode_i),
    .ctx_wr_valid_i,
    .ctx_wr_thread_i,
    .ctx_wr_flag_i,
    .flag_o          (region_flag_o)
  );

  // ---------------------------------------------------------- per-thread
  logic [THREADS-1:0][LPW-1:0]      lq_tail;
  logic [THREADS-1:0][LPW:0]        lq_free;
  logic [THREADS-1:0][SPW-1:0]      sq_tail, sq_head;
  logic [THREADS-1:0][SPW:0]        sq_free;
  logic [THREADS-1:0]               sq_head_comm;
  logic [THREADS-1:0][ADDR_W-1:0]   sq_head_addr;
  mode_e                            sq_head_mode [THREADS];
  logic [THREADS-1:0][SQD-1:0]      sq_exec;
  logic [THREADS-1:0]               lq_head_valid, nondspec;
  logic [THREADS-1:0][SPW-1:0]      lq_head_sqp;
  logic [THREADS-1:0]               nsync_zero;
  logic [THREADS-1:0]               wr_pop;

  // allocation accounting
  int unsigned n_ld, n_st;
  always_comb begin
    n_ld = 0;
    n_st = 0;
    for (int s = 0; s < LQ_ALLOC_W; s++) if (al_ld_valid_i[s]) n_ld++;
    for (int s = 0; s < SQ_ALLOC_W; s++) if (al_st_valid_i[s]) n_st++;
  end

  assign al_ready_o = !(sq_valid_i && sq_thread_i == al_thread_i) &&
                      (n_ld <= int'(lq_free[al_thread_i])) &&
                      (n_st <= int'(sq_free[al_thread_i]));
  assign al_fire    = al_valid_i && al_ready_o;

  always_comb begin
    for (int s = 0; s < LQ_ALLOC_W; s++)
      al_ld_ptr_o[s] = LPW'(ptr_add(int'(lq_tail[al_thread_i]), s, LQD));
    for (int s = 0; s < SQ_ALLOC_W; s++)
      al_st_ptr_o[s] = SPW'(ptr_add(int'(sq_tail[al_thread_i]), s, SQD));
  end

  // --------------------------------------------------------- search ports
  logic                            ev_search, ev_filt;
  logic [THREADS-1:0]              ev_tmask;
  logic                            wr_cand;
  logic [TW-1:0]                   wr_sel;
  logic                            st_search, st_filt_store, st_filt_load;
  logic [THREADS-1:0]              st_tmask;
  logic [2:0]                      req, gnt;
  logic [LQ_SPORTS-1:0]            port_valid;
  logic [LQ_SPORTS-1:0][1:0]       port_src;
  srch_kind_e                      port_kind [LQ_SPORTS];
  logic [LQ_SPORTS-1:0][ADDR_W-1:0] port_addr;
  logic [LQ_SPORTS-1:0][THREADS-1:0] port_tmask;

  // round-robin choice of the thread whose committed SQ head writes to L1
  logic [TW-1:0] rr_q;
  always_comb begin
    wr_cand = 1'b0;
    wr_sel  = rr_q;
    for (int k = THREADS - 1; k >= 0; k--) begin
      int unsigned t;
      t = (int'(rr_q) + k) % THREADS;
      if (sq_head_comm[t]) begin
        wr_cand = 1'b1;
        wr_sel  = TW'(t);
      end
    end
  end

  drf_filter #(.THREADS(THREADS)) u_filter (
    .st_valid_i      (wr_cand),
    .st_thread_i     (wr_sel),
    .st_mode_i       (sq_head_mode[wr_sel]),
    .ev_valid_i      (ev_valid_i),
    .nsync_zero_i    (nsync_zero),
    .st_search_o     (st_search),
    .st_tmask_o      (st_tmask),
    .st_filt_store_o (st_filt_store),
    .st_filt_load_o  (st_filt_load),
    .ev_search_o     (ev_search),
    .ev_tmask_o      (ev_tmask),
    .ev_filt_load_o  (ev_filt)
  );

  assign req[REQ_MMEM]  = ev_search;
  assign req[REQ_D]     = st_ex_valid_i;
  assign req[REQ_MCORE] = st_search && wr_ready_i;

  lq_search_arbiter #(.NREQ(3), .NPORTS(LQ_SPORTS)) u_arb (
    .req_i        (req),
    .gnt_o        (gnt),
    .port_valid_o (port_valid),
    .port_src_o   (port_src)
  );

  always_comb begin
    for (int p = 0; p < LQ_SPORTS; p++) begin
      port_kind[p]  = SRCH_NONE;
      port_addr[p]  = '0;
      port_tmask[p] = '0;
      if (port_valid[p]) begin
        unique case (int'(port_src[p]))
          REQ_MMEM: begin
            port_kind[p]  = SRCH_MMEM;
            port_addr[p]  = ev_addr_i;
            port_tmask[p] = ev_tmask;
          end
          REQ_D: begin
            port_kind[p]  = SRCH_D;
            port_addr[p]  = st_ex_addr_i;
            port_tmask[p] = THREADS'(1) << st_ex_thread_i;
          end
          default: begin
            port_kind[p]  = SRCH_MCORE;
            port_addr[p]  = sq_head_addr[wr_sel];
            port_tmask[p] = st_tmask;
          end
        endcase
      end
    end
  end

  assign st_ex_ready_o = gnt[REQ_D];
  assign ev_ready_o    = ev_valid_i && (!ev_search || gnt[REQ_MMEM]);
  assign wr_fire_o     = wr_cand && wr_ready_i && (!st_search || gnt[REQ_MCORE]);
  assign wr_thread_o   = wr_sel;
  assign wr_addr_o     = sq_head_addr[wr_sel];
  assign wr_mode_o     = sq_head_mode[wr_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rr_q <= '0;
    else if (wr_fire_o) rr_q <= TW'((int'(wr_sel) + 1) % THREADS);
  end

  // events
  assign srch_d_evt_o        = gnt[REQ_D];
  assign srch_mcore_evt_o    = gnt[REQ_MCORE] && wr_fire_o;
  assign srch_mmem_evt_o     = gnt[REQ_MMEM];
  assign filt_st_store_evt_o = wr_fire_o && st_filt_store;
  assign filt_st_load_evt_o  = wr_fire_o && st_filt_load;
  assign filt_ev_evt_o       = ev_filt;
  assign stall_stex_evt_o    = st_ex_valid_i && !gnt[REQ_D];
  assign stall_wr_evt_o      = wr_cand && wr_ready_i && st_search && !gnt[REQ_MCORE];
  assign stall_ev_evt_o      = ev_search && !gnt[REQ_MMEM];

  // ------------------------------------------------------- thread slices
  for (genvar t = 0; t < THREADS; t++) begin : g_thr
    logic                   al_here, sq_here;
    logic [LQ_ALLOC_W-1:0]  lq_alloc;
    logic [SQ_ALLOC_W-1:0]  sq_alloc;
    logic [LQ_ALLOC_W-1:0][SPW-1:0] ld_sqp;
    logic [LD_EX_W-1:0]     ex_v;
    logic [LQ_SPORTS-1:0]   sv;
    logic [$clog2(LQ_ALLOC_W+1)-1:0] ninc;
    logic [LPW:0]           ndec;

    assign al_here  = al_fire && (al_thread_i == TW'(t));
    assign sq_here  = sq_valid_i && (sq_thread_i == TW'(t));
    assign lq_alloc = al_here ? al_ld_valid_i : '0;
    assign sq_alloc = al_here ? al_st_valid_i : '0;

    always_comb begin
      for (int s = 0; s < LQ_ALLOC_W; s++)
        ld_sqp[s] = SPW'(ptr_add(int'(sq_tail[t]), int'(al_ld_st_before_i[s]), SQD));
      for (int e = 0; e < LD_EX_W; e++)
        ex_v[e] = ld_ex_valid_i[e] && (ld_ex_thread_i[e] == TW'(t));
      for (int p = 0; p < LQ_SPORTS; p++)
        sv[p] = port_valid[p] && port_tmask[p][t];
    end

    store_queue #(.DEPTH(SQD), .ALLOC_W(SQ_ALLOC_W), .ADDR_W(ADDR_W)) u_sq (
      .clk, .rst_n,
      .alloc_valid_i    (sq_alloc),
      .alloc_mode_i     (al_mode_o),
      .tail_ptr_o       (sq_tail[t]),
      .free_o           (sq_free[t]),
      .exec_valid_i     (gnt[REQ_D] && st_ex_thread_i == TW'(t)),
      .exec_ptr_i       (st_ex_ptr_i),
      .exec_addr_i      (st_ex_addr_i),
      .commit_i         (st_cm_valid_i[t]),
      .head_valid_o     (),
      .head_committed_o (sq_head_comm[t]),
      .head_exec_o      (),
      .head_mode_o      (sq_head_mode[t]),
      .head_addr_o      (sq_head_addr[t]),
      .head_ptr_o       (sq_head[t]),
      .pop_i            (wr_pop[t]),
      .squash_valid_i   (sq_here),
      .squash_ptr_i     (sq_sq_ptr_i),
      .exec_bits_o      (sq_exec[t]),
      .count_o          (sq_count_o[t])
    );
    assign wr_pop[t] = wr_fire_o && (wr_sel == TW'(t));

    nondspec_check #(.DEPTH(SQD)) u_nds (
      .exec_i        (sq_exec[t]),
      .sq_head_ptr_i (sq_head[t]),
      .ld_sq_ptr_i   (lq_head_sqp[t]),
      .nondspec_o    (nondspec[t])
    );

    load_queue #(
      .DEPTH(LQD), .ALLOC_W(LQ_ALLOC_W), .EX_W(LD_EX_W), .NPORTS(LQ_SPORTS),
      .ADDR_W(ADDR_W), .TAG_W(TAG_W), .SQ_DEPTH(SQD)
    ) u_lq (
      .clk, .rst_n,
      .alloc_valid_i   (lq_alloc),
      .alloc_mode_i    (al_mode_o),
      .alloc_tag_i     (al_ld_tag_i),
      .alloc_sq_ptr_i  (ld_sqp),
      .tail_ptr_o      (lq_tail[t]),
      .free_o          (lq_free[t]),
      .count_o         (lq_count_o[t]),
      .ex_valid_i      (ex_v),
      .ex_ptr_i        (ld_ex_ptr_i),
      .ex_tag_i        (ld_ex_tag_i),
      .ex_addr_i       (ld_ex_addr_i),
      .cm_valid_i      (ld_cm_valid_i[t]),
      .cm_tag_i        (ld_cm_tag_i[t]),
      .cm_pop_o        (ld_cm_pop_o[t]),
      .early_en_i      (drf_enable_i),
      .head_nondspec_i (nondspec[t]),
      .head_valid_o    (lq_head_valid[t]),
      .head_sq_ptr_o   (lq_head_sqp[t]),
      .er_valid_o      (er_valid_o[t]),
      .er_tag_o        (er_tag_o[t]),
      .srch_valid_i    (sv),
      .srch_kind_i     (port_kind),
      .srch_addr_i     (port_addr),
      .srch_sq_ptr_i   ({LQ_SPORTS{st_ex_ptr_i}}),
      .sq_head_ptr_i   (sq_head[t]),
      .srch_hit_o      (),
      .viol_valid_o    (viol_valid_o[t]),
      .viol_ptr_o      (viol_lq_ptr_o[t]),
      .viol_tag_o      (viol_tag_o[t]),
      .squash_valid_i  (sq_here),
      .squash_ptr_i    (sq_lq_ptr_i),
      .nsync_inc_o     (ninc),
      .nsync_dec_o     (ndec)
    );

    num_sync_counter #(.W(NSYNC_W), .INC_W($clog2(LQ_ALLOC_W+1)), .DEC_W(LPW+1)) u_nsync (
      .clk, .rst_n,
      .inc_i   (ninc),
      .dec_i   (ndec),
      .count_o (nsync_o[t]),
      .zero_o  (nsync_zero[t])
    );
  end

  // the kind of a memory event does not change how it is handled: both an
  // invalidation and an eviction search the whole line
  logic unused_ok;
  assign unused_ok = ^{ev_kind_i, lq_head_valid};

endmodule
