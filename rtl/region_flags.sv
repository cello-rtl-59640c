// region_flags: the per-thread region flag of CELLO.
//
// Each hardware thread owns one flag bit (1 = DRF region, 0 = sync region).
// A setDRF instruction copies its one-bit operand into the flag of its thread
// when it is allocated; because allocation is in program order, the flag
// always reflects the region of the next instruction to be allocated. Every
// load and store allocated in the same cycle receives the resulting mode,
// which the queues keep in the Mode bit of the entry. After reset all flags are
// 0 (sync), so code without setDRF runs with every optimization off. On a
// squash the flag of the squashed thread takes the mode of the oldest squashed
// instruction. On a context switch the operating system saves the flag with the
// other processor flags (flag_o) and restores it (ctx_wr_*). When drf_enable is
// low every memory operation is given sync mode, which is the debug mode that
// turns the DRF markings off.
//
// Interface: one allocation group per cycle from thread alloc_thread_i; if the
// group holds a setDRF it is taken to be the group's first instruction (the
// allocator ends a group before a setDRF that follows memory operations).
// alloc_mode_o is combinational; the flag register updates on the next edge.
// Priority for the same thread in one cycle: squash, then context restore,
// then setDRF.
//
// Follows the source design: one flag per thread, set at allocation, default
// sync, restore from the oldest squashed instruction, save on context switch,
// global disable. Own choices: the port-level handshake and the priorities.
module region_flags #(
  parameter int unsigned THREADS = cello_pkg::THREADS_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       drf_enable_i,
  // allocation
  input  logic                       alloc_valid_i,
  input  logic [$clog2(THREADS)-1:0] alloc_thread_i,
  input  logic                       setdrf_valid_i,
  input  logic                       setdrf_val_i,
  output cello_pkg::mode_e           alloc_mode_o,
  // squash recovery
  input  logic                       squash_valid_i,
  input  logic [$clog2(THREADS)-1:0] squash_thread_i,
  input  cello_pkg::mode_e           squash_mode_i,
  // context switch restore
  input  logic                       ctx_wr_valid_i,
  input  logic [$clog2(THREADS)-1:0] ctx_wr_thread_i,
  input  logic                       ctx_wr_flag_i,
  output logic [THREADS-1:0]         flag_o
);
  import cello_pkg::*;

  logic [THREADS-1:0] flag_q;
  logic               group_flag;

  assign group_flag   = setdrf_valid_i ? setdrf_val_i : flag_q[alloc_thread_i];
  assign alloc_mode_o = (drf_enable_i && group_flag) ? MODE_DRF : MODE_SYNC;
  assign flag_o       = flag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_q <= '0;
    end else begin
      for (int t = 0; t < THREADS; t++) begin
        if (squash_valid_i && squash_thread_i == t[$clog2(THREADS)-1:0])
          flag_q[t] <= (squash_mode_i == MODE_DRF);
        else if (ctx_wr_valid_i && ctx_wr_thread_i == t[$clog2(THREADS)-1:0])
          flag_q[t] <= ctx_wr_flag_i;
        else if (alloc_valid_i && setdrf_valid_i && alloc_thread_i == t[$clog2(THREADS)-1:0])
          flag_q[t] <= setdrf_val_i;
      end
    end
  end

endmodule
