// tb_store_queue: random self-checking test of one SQ partition, run with a
// 6-entry partition so that wrap-around, full and empty occur often. The
// testbench keeps its own list of in-flight stores (mode, Execute bit,
// committed bit, address) and applies random allocations of 1-2 stores,
// address resolutions in any order, in-order commits, head writes and
// squashes of uncommitted stores; every cycle it compares head fields,
// occupancy, tail pointer and the Execute bits of the live entries.
module tb_store_queue;
  import cello_pkg::*;
  localparam int D = 6, AW = 2, PW = $clog2(2 * D), ADDR_W = 16;

  typedef struct {
    int    ptr;
    mode_e mode;
    bit    exec;
    bit    comm;
    logic [ADDR_W-1:0] addr;
  } st_t;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] al_v;
  mode_e al_m, h_mode;
  logic [PW-1:0] tail, hptr, ex_ptr, sq_ptr;
  logic [PW:0] free, cnt;
  logic ex_v, cm, pop, sqv, h_v, h_c, h_e;
  logic [ADDR_W-1:0] ex_addr, h_addr;
  logic [D-1:0] exec_bits;
  int checks = 0, failures = 0, fulls = 0, squashes = 0, pops = 0;

  st_t q[$];
  int  head_ptr = 0, tail_ptr = 0;

  store_queue #(.DEPTH(D), .ALLOC_W(AW), .ADDR_W(ADDR_W)) dut (
    .clk, .rst_n, .alloc_valid_i(al_v), .alloc_mode_i(al_m), .tail_ptr_o(tail), .free_o(free),
    .exec_valid_i(ex_v), .exec_ptr_i(ex_ptr), .exec_addr_i(ex_addr), .commit_i(cm),
    .head_valid_o(h_v), .head_committed_o(h_c), .head_exec_o(h_e), .head_mode_o(h_mode),
    .head_addr_o(h_addr), .head_ptr_o(hptr), .pop_i(pop), .squash_valid_i(sqv),
    .squash_ptr_i(sq_ptr), .exec_bits_o(exec_bits), .count_o(cnt));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    al_v = '0; al_m = MODE_SYNC; ex_v = 0; ex_ptr = '0; ex_addr = '0;
    cm = 0; pop = 0; sqv = 0; sq_ptr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      int n_unc, first_unc, n_alloc, squash_at, ex_i;
      @(negedge clk);
      // ---- compare state
      chk(int'(cnt) == q.size(), "count");
      chk(int'(free) == D - q.size(), "free");
      chk(int'(tail) == tail_ptr, "tail pointer");
      chk(int'(hptr) == head_ptr, "head pointer");
      chk(h_v == (q.size() > 0), "head valid");
      if (q.size() > 0) begin
        chk(h_c == q[0].comm, "head committed");
        chk(h_mode == q[0].mode, "head mode");
        chk(h_e == q[0].exec, "head exec");
        if (q[0].exec) chk(h_addr == q[0].addr, "head address");
      end
      foreach (q[i]) chk(exec_bits[ptr_idx(q[i].ptr, D)] == q[i].exec, "exec bit");
      if (q.size() == D) fulls++;
      // ---- choose stimulus
      n_unc = 0; first_unc = q.size();
      foreach (q[i]) if (!q[i].comm) begin n_unc++; if (first_unc == q.size()) first_unc = i; end
      al_v = '0; ex_v = 0; cm = 0; pop = 0; sqv = 0;
      squash_at = -1;
      if ($urandom_range(0, 15) == 0 && n_unc > 0) begin
        squash_at = $urandom_range(first_unc, q.size() - 1);
        sqv = 1;
        sq_ptr = PW'(q[squash_at].ptr);
      end
      n_alloc = 0;
      if (!sqv) begin
        n_alloc = $urandom_range(0, AW);
        if (n_alloc > D - q.size()) n_alloc = D - q.size();
        al_v = AW'((1 << n_alloc) - 1);
        al_m = mode_e'($urandom_range(0, 1));
      end
      // resolve one unresolved store that is not being squashed
      ex_i = -1;
      for (int k = 0; k < 4; k++) begin
        int j;
        if (q.size() == 0) break;
        j = $urandom_range(0, q.size() - 1);
        if (!q[j].exec && (squash_at < 0 || j < squash_at)) begin ex_i = j; break; end
      end
      if (ex_i >= 0) begin
        ex_v = 1; ex_ptr = PW'(q[ex_i].ptr); ex_addr = ADDR_W'($urandom);
      end
      // commit the oldest uncommitted store if it has resolved and survives
      if (first_unc < q.size() && q[first_unc].exec && first_unc != squash_at &&
          $urandom_range(0, 2) != 0) cm = 1;
      if (q.size() > 0 && q[0].comm && $urandom_range(0, 2) != 0) pop = 1;
      // ---- update the model
      @(posedge clk);
      if (ex_v) begin q[ex_i].exec = 1; q[ex_i].addr = ex_addr; end
      if (cm) q[first_unc].comm = 1;
      if (sqv) begin
        squashes++;
        tail_ptr = q[squash_at].ptr;
        while (q.size() > squash_at) void'(q.pop_back());
      end
      if (pop) begin
        pops++;
        void'(q.pop_front());
        head_ptr = ptr_add(head_ptr, 1, D);
      end
      for (int s = 0; s < n_alloc; s++) begin
        st_t e;
        e.ptr = tail_ptr; e.mode = al_m; e.exec = 0; e.comm = 0; e.addr = '0;
        q.push_back(e);
        tail_ptr = ptr_add(tail_ptr, 1, D);
      end
    end
    chk(fulls > 0 && squashes > 0 && pops > 0, "coverage: full, squash, write");
    $display("full %0d squash %0d writes %0d", fulls, squashes, pops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
