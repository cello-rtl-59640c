// tb_drf_filter: exhaustive test of the store-DRF and load-DRF filters for
// 2 and 4 threads. Every combination of store write valid, writing thread,
// store mode, memory event valid and num-sync zero flags is applied and the
// decisions are compared with the filter rules written out independently.
module tb_drf_filter;
  import cello_pkg::*;
  int checks = 0, failures = 0;

  task automatic report(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("mismatch: %s", what);
    end
  endtask

  // 2 threads
  logic st_v2, ev_v2, s2, fs2, fl2, e2, ef2;
  logic [0:0] st_t2;
  mode_e m2;
  logic [1:0] z2, tm2, etm2;
  drf_filter #(.THREADS(2)) dut2 (
    .st_valid_i(st_v2), .st_thread_i(st_t2), .st_mode_i(m2), .ev_valid_i(ev_v2),
    .nsync_zero_i(z2), .st_search_o(s2), .st_tmask_o(tm2), .st_filt_store_o(fs2),
    .st_filt_load_o(fl2), .ev_search_o(e2), .ev_tmask_o(etm2), .ev_filt_load_o(ef2));

  // 4 threads
  logic st_v4, ev_v4, s4, fs4, fl4, e4, ef4;
  logic [1:0] st_t4;
  mode_e m4;
  logic [3:0] z4, tm4, etm4;
  drf_filter #(.THREADS(4)) dut4 (
    .st_valid_i(st_v4), .st_thread_i(st_t4), .st_mode_i(m4), .ev_valid_i(ev_v4),
    .nsync_zero_i(z4), .st_search_o(s4), .st_tmask_o(tm4), .st_filt_store_o(fs4),
    .st_filt_load_o(fl4), .ev_search_o(e4), .ev_tmask_o(etm4), .ev_filt_load_o(ef4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      bit other_sync, any_sync;
      {st_v2, st_t2, m2, ev_v2, z2} = 6'(v);
      #1;
      other_sync = !z2[1 - st_t2];
      any_sync   = (z2 != 2'b11);
      report(s2  == (st_v2 && m2 == MODE_SYNC && other_sync), "2T store search");
      report(fs2 == (st_v2 && m2 == MODE_DRF), "2T store-DRF filtered");
      report(fl2 == (st_v2 && m2 == MODE_SYNC && !other_sync), "2T load-DRF filtered store");
      report(tm2 == (2'b01 << (1 - st_t2)), "2T store thread mask");
      report(e2  == (ev_v2 && any_sync), "2T event search");
      report(ef2 == (ev_v2 && !any_sync), "2T event filtered");
      report(etm2 == 2'b11, "2T event mask");
    end
    for (int v = 0; v < 512; v++) begin
      bit other_sync;
      {st_v4, st_t4, m4, ev_v4, z4} = 9'(v);
      #1;
      other_sync = 0;
      for (int t = 0; t < 4; t++) if (t != st_t4 && !z4[t]) other_sync = 1;
      report(s4  == (st_v4 && m4 == MODE_SYNC && other_sync), "4T store search");
      report(fl4 == (st_v4 && m4 == MODE_SYNC && !other_sync), "4T load-DRF filtered store");
      report(tm4 == (4'b1111 & ~(4'b0001 << st_t4)), "4T store thread mask");
      report(e4  == (ev_v4 && z4 != 4'b1111), "4T event search");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
