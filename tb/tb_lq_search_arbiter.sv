// tb_lq_search_arbiter: exhaustive test of the search-port arbiter with 3
// requesters and 1, 2 and 3 ports: grants go to the highest-priority
// requesters up to the number of ports, ports are filled in order and name
// the requester they serve.
module tb_lq_search_arbiter;
  int checks = 0, failures = 0;
  logic [2:0] req;
  logic [2:0] g1, g2, g3;
  logic [0:0] pv1; logic [1:0] pv2; logic [2:0] pv3;
  logic [0:0][1:0] ps1; logic [1:0][1:0] ps2; logic [2:0][1:0] ps3;

  lq_search_arbiter #(.NREQ(3), .NPORTS(1)) a1 (.req_i(req), .gnt_o(g1), .port_valid_o(pv1), .port_src_o(ps1));
  lq_search_arbiter #(.NREQ(3), .NPORTS(2)) a2 (.req_i(req), .gnt_o(g2), .port_valid_o(pv2), .port_src_o(ps2));
  lq_search_arbiter #(.NREQ(3), .NPORTS(3)) a3 (.req_i(req), .gnt_o(g3), .port_valid_o(pv3), .port_src_o(ps3));

  function automatic logic [2:0] exp_gnt(logic [2:0] r, int np);
    logic [2:0] g = '0;
    int n = 0;
    for (int i = 0; i < 3; i++) if (r[i] && n < np) begin g[i] = 1; n++; end
    return g;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int p;
      req = 3'(v);
      #1;
      checks += 3;
      if (g1 !== exp_gnt(req, 1)) failures++;
      if (g2 !== exp_gnt(req, 2)) failures++;
      if (g3 !== exp_gnt(req, 3)) failures++;
      // port assignment of the 2-port arbiter
      p = 0;
      for (int i = 0; i < 3; i++) begin
        if (exp_gnt(req, 2)[i]) begin
          checks++;
          if (!pv2[p] || ps2[p] != 2'(i)) begin
            failures++;
            $display("req %b port %0d: valid %0d src %0d", req, p, pv2[p], ps2[p]);
          end
          p++;
        end
      end
      for (int q = p; q < 2; q++) begin
        checks++;
        if (pv2[q]) failures++;
      end
      checks++;
      if (pv1[0] != (req != 0) || (req != 0 && ps1[0] != 2'(req[0] ? 0 : req[1] ? 1 : 2))) failures++;
      checks++;
      if (pv3 != (3'b111 >> (3 - $countones(req)))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
