// nondspec_check: tells whether the load at the head of a thread's LQ is no
// longer D-speculative, i.e. every store older than it has resolved its
// address (and so has already made its dependence search of the LQ).
//
// Each SQ entry has an Execute bit, 0 while the store address is unresolved
// and 1 once the store has executed. A range decoder builds a mask with 0 for
// every SQ entry older than the load (the entries from the SQ head up to the
// SQ tail the load saw when it was allocated, ld_sq_ptr_i) and 1 for all
// others. The mask is ORed bitwise with the Execute bits and the result is
// ANDed together: 1 means no older store is unresolved. This uses one bit per
// SQ entry and no address comparison. Purely combinational.
//
// Pointers are circular-queue pointers of cello_pkg (0 .. 2*DEPTH-1).
// Follows the source design: range decoder, bitwise OR, AND reduction.
module nondspec_check #(
  parameter int unsigned DEPTH = cello_pkg::SQ_ENTRIES_DEF / cello_pkg::THREADS_DEF,
  localparam int unsigned PW   = $clog2(2 * DEPTH)
) (
  input  logic [DEPTH-1:0] exec_i,
  input  logic [PW-1:0]    sq_head_ptr_i,
  input  logic [PW-1:0]    ld_sq_ptr_i,
  output logic             nondspec_o
);
  import cello_pkg::*;

  logic [DEPTH-1:0] younger_mask;

  // range decoder: entry i is older than the load when its distance from the
  // SQ head is below the number of stores between the head and the load
  always_comb begin
    int unsigned n_older;
    int unsigned head_idx;
    n_older  = ptr_diff(int'(ld_sq_ptr_i), int'(sq_head_ptr_i), DEPTH);
    head_idx = ptr_idx(int'(sq_head_ptr_i), DEPTH);
    for (int i = 0; i < DEPTH; i++) begin
      int unsigned d_head;
      d_head = (i >= head_idx) ? i - head_idx : i + DEPTH - head_idx;
      younger_mask[i] = !(d_head < n_older);
    end
  end

  assign nondspec_o = &(exec_i | younger_mask);

endmodule
