// lq_search_arbiter: shares the LQ search ports among the three sources of
// LQ searches.
//
// Requesters, in fixed priority order: 0 = invalidation/eviction M-search
// from the memory system, 1 = D-search of a store that resolved its address,
// 2 = M-search of a store writing to L1. Up to NPORTS requests are granted per
// cycle, highest priority first; a requester that is not granted keeps its
// request and is stalled (store address resolution and store writes wait; the
// memory system holds its event). port_valid_o/port_src_o say which requester
// each port serves. Purely combinational.
//
// Follows the source design: two LQ search ports and the three search sources;
// a search that finds no free port stalls. Own choice: fixed priority, with
// the memory system first because an invalidation cannot be refused for long
// by a coherence protocol, and D-searches before store writes because they
// unblock younger loads and early removal.
module lq_search_arbiter #(
  parameter int unsigned NREQ   = 3,
  parameter int unsigned NPORTS = cello_pkg::LQ_SPORTS_DEF
) (
  input  logic [NREQ-1:0]                     req_i,
  output logic [NREQ-1:0]                     gnt_o,
  output logic [NPORTS-1:0]                   port_valid_o,
  output logic [NPORTS-1:0][$clog2(NREQ)-1:0] port_src_o
);

  always_comb begin
    int unsigned used;
    used         = 0;
    gnt_o        = '0;
    port_valid_o = '0;
    port_src_o   = '0;
    for (int r = 0; r < NREQ; r++) begin
      if (req_i[r] && used < NPORTS) begin
        gnt_o[r]               = 1'b1;
        port_valid_o[used]     = 1'b1;
        port_src_o[used]       = r[$clog2(NREQ)-1:0];
        used                   = used + 1;
      end
    end
  end

endmodule
