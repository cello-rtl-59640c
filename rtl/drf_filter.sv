// drf_filter: the store-DRF and load-DRF filters of CELLO.
//
// Decides, for each event that would search the LQ for an ordering
// (M-speculation) violation, whether the search is needed.
//
//  * Store write from the SQ to L1 (thread st_thread_i). In an SMT core this
//    would search the loads of the co-running threads. The store-DRF filter
//    drops the search when the store's Mode bit is DRF: a DRF store cannot
//    race with a load of another thread. The load-DRF filter drops it when
//    the num-sync counters of all the other threads are zero: their LQ
//    entries are then all DRF loads, which are never M-speculative. The
//    writing thread's own counter is not consulted.
//  * Invalidation or eviction from the memory system. Only the load-DRF
//    filter applies: the search is dropped when every num-sync counter is 0.
//    (A DRF store of another core still invalidates and is not filtered here,
//    since the line would otherwise go unwatched for later sync stores.)
//
// Outputs name which filter removed a search, for energy accounting; when
// both apply the store-DRF filter is credited. *_tmask_o is the set of
// threads whose loads must be searched. Purely combinational.
//
// Follows the source design: both filter conditions and the threads they
// consult. Own choice: the accounting outputs and the search thread masks.
module drf_filter #(
  parameter int unsigned THREADS = cello_pkg::THREADS_DEF
) (
  // store write
  input  logic                       st_valid_i,
  input  logic [$clog2(THREADS)-1:0] st_thread_i,
  input  cello_pkg::mode_e           st_mode_i,
  // invalidation / eviction
  input  logic                       ev_valid_i,
  // num-sync counters
  input  logic [THREADS-1:0]         nsync_zero_i,
  // decisions
  output logic                       st_search_o,
  output logic [THREADS-1:0]         st_tmask_o,
  output logic                       st_filt_store_o,
  output logic                       st_filt_load_o,
  output logic                       ev_search_o,
  output logic [THREADS-1:0]         ev_tmask_o,
  output logic                       ev_filt_load_o
);
  import cello_pkg::*;

  logic others_all_drf;
  logic all_drf;

  always_comb begin
    others_all_drf = 1'b1;
    st_tmask_o     = '0;
    for (int t = 0; t < THREADS; t++) begin
      if (st_thread_i != t[$clog2(THREADS)-1:0]) begin
        st_tmask_o[t] = 1'b1;
        if (!nsync_zero_i[t]) others_all_drf = 1'b0;
      end
    end
  end

  assign all_drf    = &nsync_zero_i;
  assign ev_tmask_o = '1;

  assign st_filt_store_o = st_valid_i && (st_mode_i == MODE_DRF);
  assign st_filt_load_o  = st_valid_i && (st_mode_i == MODE_SYNC) && others_all_drf;
  assign st_search_o     = st_valid_i && (st_mode_i == MODE_SYNC) && !others_all_drf;

  assign ev_filt_load_o  = ev_valid_i && all_drf;
  assign ev_search_o     = ev_valid_i && !all_drf;

endmodule
