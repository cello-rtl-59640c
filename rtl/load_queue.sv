// load_queue: one hardware thread's share of the load queue (LQ), extended
// with the CELLO Mode bit and early removal of DRF loads.
//
// The LQ is statically partitioned between the SMT threads; this module is
// one partition, a circular buffer of DEPTH entries kept in program order.
// Each entry holds the load's ROB tag, its Mode bit (copied from the region
// flag at allocation), the SQ tail pointer seen at allocation (the stores
// older than the load are those from the SQ head up to that pointer), a
// Performed bit and the address once the load has executed.
//
// Searches. Each of the NPORTS search ports is a content-addressed search of
// all entries for performed loads that match:
//   SRCH_D      same 8-byte word as a store that just resolved its address,
//               and younger than that store (dependence violation);
//   SRCH_MCORE  same cache line as a store of another thread writing to L1;
//   SRCH_MMEM   same cache line as an invalidation or eviction.
// The caller routes a search only to the partitions it concerns. The oldest
// matching load of all ports is reported one cycle later on viol_*; the core
// then squashes from that load on.
//
// Leaving the LQ. A load leaves at the head, at most one per cycle, either
// when it commits (cm_valid_i with the head's tag; a commit whose tag is not
// at the head belongs to a load that has already left early and is ignored)
// or, with CELLO, early: the head load is DRF and head_nondspec_i says every
// older store has resolved its address, so no search can concern it any
// more. A squash cuts the tail back to squash_ptr_i; if the squashed load
// has already left the LQ early (a search can hit a load in the cycle it
// leaves), the head has passed squash_ptr_i and the whole partition is
// squashed from the head instead. nsync_inc_o/dec_o count
// the sync loads entering and leaving, for the thread's num-sync counter.
//
// Follows the source design: Mode bit per entry, the three search kinds and
// their targets, cache-line matching of invalidations and evictions, the
// three conditions for early removal. Own choices: entry fields, one removal
// per cycle, word granularity of the D-search, line granularity of the store
// write search, registered violation report, tag check on execution so that
// a late execution of a load that already left is dropped.
module load_queue #(
  parameter int unsigned DEPTH    = cello_pkg::LQ_ENTRIES_DEF / cello_pkg::THREADS_DEF,
  parameter int unsigned ALLOC_W  = cello_pkg::LQ_ALLOC_W_DEF,
  parameter int unsigned EX_W     = 2,
  parameter int unsigned NPORTS   = cello_pkg::LQ_SPORTS_DEF,
  parameter int unsigned ADDR_W   = cello_pkg::ADDR_W_DEF,
  parameter int unsigned TAG_W    = cello_pkg::TAG_W_DEF,
  parameter int unsigned SQ_DEPTH = cello_pkg::SQ_ENTRIES_DEF / cello_pkg::THREADS_DEF,
  parameter int unsigned LINE_OFF = cello_pkg::LINE_OFF_DEF,
  parameter int unsigned WORD_OFF = cello_pkg::WORD_OFF_DEF,
  localparam int unsigned PW      = $clog2(2 * DEPTH),
  localparam int unsigned SPW     = $clog2(2 * SQ_DEPTH)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // allocation
  input  logic [ALLOC_W-1:0]               alloc_valid_i,
  input  cello_pkg::mode_e                 alloc_mode_i,
  input  logic [ALLOC_W-1:0][TAG_W-1:0]    alloc_tag_i,
  input  logic [ALLOC_W-1:0][SPW-1:0]      alloc_sq_ptr_i,
  output logic [PW-1:0]                    tail_ptr_o,
  output logic [PW:0]                      free_o,
  output logic [PW:0]                      count_o,
  // execution (load performed)
  input  logic [EX_W-1:0]                  ex_valid_i,
  input  logic [EX_W-1:0][PW-1:0]          ex_ptr_i,
  input  logic [EX_W-1:0][TAG_W-1:0]       ex_tag_i,
  input  logic [EX_W-1:0][ADDR_W-1:0]      ex_addr_i,
  // commit
  input  logic                             cm_valid_i,
  input  logic [TAG_W-1:0]                 cm_tag_i,
  output logic                             cm_pop_o,
  // early removal
  input  logic                             early_en_i,
  input  logic                             head_nondspec_i,
  output logic                             head_valid_o,
  output logic [SPW-1:0]                   head_sq_ptr_o,
  output logic                             er_valid_o,
  output logic [TAG_W-1:0]                 er_tag_o,
  // searches
  input  logic [NPORTS-1:0]                srch_valid_i,
  input  cello_pkg::srch_kind_e            srch_kind_i [NPORTS],
  input  logic [NPORTS-1:0][ADDR_W-1:0]    srch_addr_i,
  input  logic [NPORTS-1:0][SPW-1:0]       srch_sq_ptr_i,
  input  logic [SPW-1:0]                   sq_head_ptr_i,
  output logic [NPORTS-1:0]                srch_hit_o,
  output logic                             viol_valid_o,
  output logic [PW-1:0]                    viol_ptr_o,
  output logic [TAG_W-1:0]                 viol_tag_o,
  // squash
  input  logic                             squash_valid_i,
  input  logic [PW-1:0]                    squash_ptr_i,
  // num-sync bookkeeping
  output logic [$clog2(ALLOC_W+1)-1:0]     nsync_inc_o,
  output logic [PW:0]                      nsync_dec_o
);
  import cello_pkg::*;

  logic [DEPTH-1:0]              valid_q, perf_q;
  mode_e                         mode_q [DEPTH];
  logic [DEPTH-1:0][TAG_W-1:0]   tag_q;
  logic [DEPTH-1:0][SPW-1:0]     sqp_q;
  logic [DEPTH-1:0][ADDR_W-1:0]  addr_q;
  logic [PW-1:0]                 head_q, tail_q;
  int unsigned                   head_idx, n_alloc;
  logic                          pop, head_squashed;
  logic [PW-1:0]                 sq_from;
  logic [DEPTH-1:0]              match;
  logic                          viol_valid_d;
  logic [PW-1:0]                 viol_ptr_d;
  logic [TAG_W-1:0]              viol_tag_d;

  assign head_idx      = ptr_idx(int'(head_q), DEPTH);
  assign count_o       = (PW+1)'(ptr_diff(int'(tail_q), int'(head_q), DEPTH));
  assign free_o        = (PW+1)'(DEPTH) - count_o;
  assign tail_ptr_o    = tail_q;
  assign head_valid_o  = valid_q[head_idx];
  assign head_sq_ptr_o = sqp_q[head_idx];

  always_comb begin
    n_alloc = 0;
    for (int s = 0; s < ALLOC_W; s++) if (alloc_valid_i[s]) n_alloc++;
  end

  // ---------------------------------------------------------------- removal
  // a squash pointer behind the head belongs to a load that already left
  assign sq_from = (ptr_diff(int'(squash_ptr_i), int'(head_q), DEPTH) > int'(count_o))
                   ? head_q : squash_ptr_i;
  assign head_squashed = squash_valid_i && (sq_from == head_q);
  assign cm_pop_o   = valid_q[head_idx] && cm_valid_i && (tag_q[head_idx] == cm_tag_i)
                      && !head_squashed;
  assign er_valid_o = valid_q[head_idx] && early_en_i && (mode_q[head_idx] == MODE_DRF)
                      && head_nondspec_i && !cm_pop_o && !head_squashed;
  assign er_tag_o   = tag_q[head_idx];
  assign pop        = cm_pop_o || er_valid_o;

  // ------------------------------------------------------- num-sync counts
  always_comb begin
    int unsigned n_sq;
    n_sq = 0;
    if (squash_valid_i) begin
      for (int k = 0; k < DEPTH; k++) begin
        if (k < int'(ptr_diff(int'(tail_q), int'(sq_from), DEPTH)) &&
            mode_q[ptr_idx(ptr_add(int'(sq_from), k, DEPTH), DEPTH)] == MODE_SYNC)
          n_sq++;
      end
    end
    if (cm_pop_o && mode_q[head_idx] == MODE_SYNC) n_sq++;
    nsync_dec_o = (PW+1)'(n_sq);
    nsync_inc_o = (!squash_valid_i && alloc_mode_i == MODE_SYNC)
                  ? ($clog2(ALLOC_W+1))'(n_alloc) : '0;
  end

  // -------------------------------------------------------------- searches
  always_comb begin
    match      = '0;
    srch_hit_o = '0;
    for (int p = 0; p < NPORTS; p++) begin
      for (int i = 0; i < DEPTH; i++) begin
        logic hit;
        hit = 1'b0;
        if (srch_valid_i[p] && valid_q[i] && perf_q[i]) begin
          unique case (srch_kind_i[p])
            SRCH_D: begin
              hit = (addr_q[i][ADDR_W-1:WORD_OFF] == srch_addr_i[p][ADDR_W-1:WORD_OFF]) &&
                    (ptr_diff(int'(sqp_q[i]), int'(sq_head_ptr_i), SQ_DEPTH) >
                     ptr_diff(int'(srch_sq_ptr_i[p]), int'(sq_head_ptr_i), SQ_DEPTH));
            end
            SRCH_MCORE, SRCH_MMEM: begin
              hit = (addr_q[i][ADDR_W-1:LINE_OFF] == srch_addr_i[p][ADDR_W-1:LINE_OFF]);
            end
            default: hit = 1'b0;
          endcase
        end
        if (hit) begin
          match[i]      = 1'b1;
          srch_hit_o[p] = 1'b1;
        end
      end
    end
  end

  // oldest matching load, scanning from the head
  always_comb begin
    viol_valid_d = 1'b0;
    viol_ptr_d   = '0;
    viol_tag_d   = '0;
    for (int k = DEPTH - 1; k >= 0; k--) begin
      int unsigned idx;
      idx = ptr_idx(ptr_add(int'(head_q), k, DEPTH), DEPTH);
      if (match[idx]) begin
        viol_valid_d = 1'b1;
        viol_ptr_d   = PW'(ptr_add(int'(head_q), k, DEPTH));
        viol_tag_d   = tag_q[idx];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      viol_valid_o <= 1'b0;
      viol_ptr_o   <= '0;
      viol_tag_o   <= '0;
    end else begin
      viol_valid_o <= viol_valid_d;
      viol_ptr_o   <= viol_ptr_d;
      viol_tag_o   <= viol_tag_d;
    end
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      perf_q  <= '0;
      tag_q   <= '0;
      sqp_q   <= '0;
      addr_q  <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      for (int i = 0; i < DEPTH; i++) mode_q[i] <= MODE_SYNC;
    end else begin
      // execution: only if the entry still holds that load
      for (int e = 0; e < EX_W; e++) begin
        if (ex_valid_i[e] && valid_q[ptr_idx(int'(ex_ptr_i[e]), DEPTH)] &&
            tag_q[ptr_idx(int'(ex_ptr_i[e]), DEPTH)] == ex_tag_i[e]) begin
          perf_q[ptr_idx(int'(ex_ptr_i[e]), DEPTH)] <= 1'b1;
          addr_q[ptr_idx(int'(ex_ptr_i[e]), DEPTH)] <= ex_addr_i[e];
        end
      end
      // removal at the head
      if (pop) begin
        valid_q[head_idx] <= 1'b0;
        perf_q[head_idx]  <= 1'b0;
        head_q <= PW'(ptr_add(int'(head_q), 1, DEPTH));
      end
      // squash or allocation at the tail
      if (squash_valid_i) begin
        for (int k = 0; k < DEPTH; k++) begin
          if (k < int'(ptr_diff(int'(tail_q), int'(sq_from), DEPTH))) begin
            valid_q[ptr_idx(ptr_add(int'(sq_from), k, DEPTH), DEPTH)] <= 1'b0;
            perf_q[ptr_idx(ptr_add(int'(sq_from), k, DEPTH), DEPTH)]  <= 1'b0;
          end
        end
        tail_q <= sq_from;
      end else begin
        for (int s = 0; s < ALLOC_W; s++) begin
          if (s < int'(n_alloc)) begin
            valid_q[ptr_idx(ptr_add(int'(tail_q), s, DEPTH), DEPTH)] <= 1'b1;
            perf_q[ptr_idx(ptr_add(int'(tail_q), s, DEPTH), DEPTH)]  <= 1'b0;
            mode_q[ptr_idx(ptr_add(int'(tail_q), s, DEPTH), DEPTH)]  <= alloc_mode_i;
            tag_q[ptr_idx(ptr_add(int'(tail_q), s, DEPTH), DEPTH)]   <= alloc_tag_i[s];
            sqp_q[ptr_idx(ptr_add(int'(tail_q), s, DEPTH), DEPTH)]   <= alloc_sq_ptr_i[s];
          end
        end
        tail_q <= PW'(ptr_add(int'(tail_q), n_alloc, DEPTH));
      end
    end
  end

  a_alloc_fits: assert property (@(posedge clk) disable iff (!rst_n)
    !squash_valid_i |-> (PW+1)'(n_alloc) <= free_o)
    else $error("LQ allocation beyond free space");
  a_squash_behind_head_only_by_less_than_depth: assert property (@(posedge clk) disable iff (!rst_n)
    squash_valid_i |-> ptr_diff(int'(head_q), int'(squash_ptr_i), DEPTH) <= DEPTH ||
                       ptr_diff(int'(squash_ptr_i), int'(head_q), DEPTH) <= int'(count_o))
    else $error("LQ squash pointer neither in the queue nor recently passed");

endmodule
