// num_sync_counter: the num-sync counter of one hardware thread.
//
// Holds how many sync-mode loads of the thread are in the LQ. It is 0 after
// reset, grows by inc_i when sync loads are allocated into the LQ and shrinks
// by dec_i when sync loads leave it (at commit or when squashed). zero_o feeds
// the load-DRF filter: when the counters that matter are all zero the LQ holds
// only DRF loads and an ordering search can be skipped.
//
// Timing: count_o and zero_o are registered; an increment and a decrement in
// the same cycle are applied together. Assertions flag underflow and overflow.
//
// Follows the source design: one counter per thread, 8 bits, increment on a
// sync load entering the LQ, decrement on a sync load leaving it. Own choice:
// several loads may enter or leave per cycle, so the steps are counts.
module num_sync_counter #(
  parameter int unsigned W     = cello_pkg::NSYNC_W_DEF,
  parameter int unsigned INC_W = 2,
  parameter int unsigned DEC_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [INC_W-1:0] inc_i,
  input  logic [DEC_W-1:0] dec_i,
  output logic [W-1:0]     count_o,
  output logic             zero_o
);

  logic [W-1:0] cnt_q;
  logic [W:0]   sum;

  assign sum     = {1'b0, cnt_q} + (W+1)'(inc_i);
  assign count_o = cnt_q;
  assign zero_o  = (cnt_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= W'(sum - (W+1)'(dec_i));
  end

  property p_no_underflow;
    @(posedge clk) disable iff (!rst_n) (W+1)'(dec_i) <= sum;
  endproperty
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) sum - (W+1)'(dec_i) < (W+1)'(2 ** W);
  endproperty
  a_no_underflow: assert property (p_no_underflow) else $error("num-sync underflow");
  a_no_overflow:  assert property (p_no_overflow)  else $error("num-sync overflow");

endmodule
