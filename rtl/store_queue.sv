// store_queue: one hardware thread's share of the unified store queue and
// store buffer (SQ/SB), extended with the CELLO Mode bit.
//
// The SQ is statically partitioned between the SMT threads; this module is
// one partition, a circular buffer of DEPTH entries kept in program order.
// Each entry holds the store address, a Mode bit (DRF or sync, copied from
// the thread's region flag at allocation), an Execute bit (0 until the store
// has resolved its address and made its dependence search of the LQ) and a
// Committed bit. Stores are allocated at the tail in groups of up to ALLOC_W
// (slots must be filled from slot 0 upwards), resolve their address in any
// order (exec_*), commit in order (commit_i marks the oldest uncommitted
// store), and leave from the head once their write to L1 has been performed
// (pop_i). A squash cuts the tail back to squash_ptr_i; committed stores can
// never be squashed. The Execute bits and the head pointer go to
// nondspec_check for the early removal of DRF loads from the LQ.
//
// Timing: every update lands on the clock edge; the head outputs and
// free_o are registered state. The caller asserts exec_valid_i only when the
// store's dependence search has been granted a search port in that cycle.
//
// Follows the source design: Mode bit per entry, Execute bit per entry, static
// partitioning, in-order write from the head. Own choices: field set, the
// allocation and commit handshakes, one commit and one write per cycle.
module store_queue #(
  parameter int unsigned DEPTH   = cello_pkg::SQ_ENTRIES_DEF / cello_pkg::THREADS_DEF,
  parameter int unsigned ALLOC_W = cello_pkg::SQ_ALLOC_W_DEF,
  parameter int unsigned ADDR_W  = cello_pkg::ADDR_W_DEF,
  localparam int unsigned PW     = $clog2(2 * DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // allocation
  input  logic [ALLOC_W-1:0]     alloc_valid_i,
  input  cello_pkg::mode_e       alloc_mode_i,
  output logic [PW-1:0]          tail_ptr_o,
  output logic [PW:0]            free_o,
  // address resolution
  input  logic                   exec_valid_i,
  input  logic [PW-1:0]          exec_ptr_i,
  input  logic [ADDR_W-1:0]      exec_addr_i,
  // commit
  input  logic                   commit_i,
  // head / write to L1
  output logic                   head_valid_o,
  output logic                   head_committed_o,
  output logic                   head_exec_o,
  output cello_pkg::mode_e       head_mode_o,
  output logic [ADDR_W-1:0]      head_addr_o,
  output logic [PW-1:0]          head_ptr_o,
  input  logic                   pop_i,
  // squash
  input  logic                   squash_valid_i,
  input  logic [PW-1:0]          squash_ptr_i,
  // state for the non-D-speculation check
  output logic [DEPTH-1:0]       exec_bits_o,
  output logic [PW:0]            count_o
);
  import cello_pkg::*;

  logic [DEPTH-1:0]             valid_q, exec_q, comm_q;
  mode_e                        mode_q [DEPTH];
  logic [DEPTH-1:0][ADDR_W-1:0] addr_q;
  logic [PW-1:0]                head_q, tail_q, cptr_q;
  logic [PW:0]                  count;
  int unsigned                  n_alloc;
  int unsigned                  head_idx;

  assign count    = (PW+1)'(ptr_diff(int'(tail_q), int'(head_q), DEPTH));
  assign count_o  = count;
  assign free_o   = (PW+1)'(DEPTH) - count;
  assign head_idx = ptr_idx(int'(head_q), DEPTH);

  always_comb begin
    n_alloc = 0;
    for (int s = 0; s < ALLOC_W; s++) if (alloc_valid_i[s]) n_alloc++;
  end

  assign tail_ptr_o       = tail_q;
  assign head_ptr_o       = head_q;
  assign head_valid_o     = valid_q[head_idx];
  assign head_committed_o = valid_q[head_idx] && comm_q[head_idx];
  assign head_exec_o      = exec_q[head_idx];
  assign head_mode_o      = mode_q[head_idx];
  assign head_addr_o      = addr_q[head_idx];
  assign exec_bits_o      = exec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      exec_q  <= '0;
      comm_q  <= '0;
      addr_q  <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      cptr_q  <= '0;
      for (int i = 0; i < DEPTH; i++) mode_q[i] <= MODE_SYNC;
    end else begin
      // address resolution
      if (exec_valid_i) begin
        exec_q[ptr_idx(int'(exec_ptr_i), DEPTH)] <= 1'b1;
        addr_q[ptr_idx(int'(exec_ptr_i), DEPTH)] <= exec_addr_i;
      end
      // commit (in order)
      if (commit_i) begin
        comm_q[ptr_idx(int'(cptr_q), DEPTH)] <= 1'b1;
        cptr_q <= PW'(ptr_add(int'(cptr_q), 1, DEPTH));
      end
      // write performed: free the head
      if (pop_i) begin
        valid_q[head_idx] <= 1'b0;
        exec_q[head_idx]  <= 1'b0;
        comm_q[head_idx]  <= 1'b0;
        head_q <= PW'(ptr_add(int'(head_q), 1, DEPTH));
      end
      // squash or allocation at the tail
      if (squash_valid_i) begin
        for (int k = 0; k < DEPTH; k++) begin
          if (k < int'(ptr_diff(int'(tail_q), int'(squash_ptr_i), DEPTH))) begin
            valid_q[ptr_idx(ptr_add(int'(squash_ptr_i), k, DEPTH), DEPTH)] <= 1'b0;
            exec_q[ptr_idx(ptr_add(int'(squash_ptr_i), k, DEPTH), DEPTH)]  <= 1'b0;
          end
        end
        tail_q <= squash_ptr_i;
      end else begin
        for (int s = 0; s < ALLOC_W; s++) begin
          if (s < int'(n_alloc)) begin
            valid_q[ptr_idx(ptr_add(int'(tail_q), s, DEPTH), DEPTH)] <= 1'b1;
            exec_q[ptr_idx(ptr_add(int'(tail_q), s, DEPTH), DEPTH)]  <= 1'b0;
            comm_q[ptr_idx(ptr_add(int'(tail_q), s, DEPTH), DEPTH)]  <= 1'b0;
            mode_q[ptr_idx(ptr_add(int'(tail_q), s, DEPTH), DEPTH)]  <= alloc_mode_i;
          end
        end
        tail_q <= PW'(ptr_add(int'(tail_q), n_alloc, DEPTH));
      end
    end
  end

  // rules of the interface
  a_alloc_fits: assert property (@(posedge clk) disable iff (!rst_n)
    !squash_valid_i |-> (PW+1)'(n_alloc) <= free_o)
    else $error("SQ allocation beyond free space");
  a_pop_committed: assert property (@(posedge clk) disable iff (!rst_n)
    pop_i |-> head_committed_o)
    else $error("SQ pop of an uncommitted store");
  a_squash_uncommitted: assert property (@(posedge clk) disable iff (!rst_n)
    squash_valid_i |-> ptr_diff(int'(squash_ptr_i), int'(head_q), DEPTH)
                       >= ptr_diff(int'(cptr_q), int'(head_q), DEPTH))
    else $error("SQ squash reaches committed stores");

endmodule
