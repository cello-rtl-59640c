// tb_nondspec_check: random test of the non-D-speculation check for a
// 64-entry and a 6-entry SQ partition. For random SQ head pointers, random
// positions of the load between the head and the tail, and random Execute
// bits, the expected answer is computed by walking the older stores one by
// one from the head.
module tb_nondspec_check;
  import cello_pkg::*;
  int checks = 0, failures = 0, ones = 0, zeros = 0;

  localparam int D1 = 64, D2 = 6;
  logic [D1-1:0] ex1; logic [$clog2(2*D1)-1:0] h1, l1; logic o1;
  logic [D2-1:0] ex2; logic [$clog2(2*D2)-1:0] h2, l2; logic o2;

  nondspec_check #(.DEPTH(D1)) d1 (.exec_i(ex1), .sq_head_ptr_i(h1), .ld_sq_ptr_i(l1), .nondspec_o(o1));
  nondspec_check #(.DEPTH(D2)) d2 (.exec_i(ex2), .sq_head_ptr_i(h2), .ld_sq_ptr_i(l2), .nondspec_o(o2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 3000; c++) begin
      int n, hp, exp1, exp2;
      // 64 entries
      hp = $urandom_range(0, 2*D1-1);
      n  = $urandom_range(0, D1);
      h1 = 7'(hp);
      l1 = 7'((hp + n) % (2*D1));
      ex1 = {$urandom, $urandom};
      // make the older stores mostly executed so both answers occur
      for (int k = 0; k < n; k++) if ($urandom_range(0, 15) != 0) ex1[(hp + k) % D1] = 1'b1;
      exp1 = 1;
      for (int k = 0; k < n; k++) if (!ex1[(hp + k) % D1]) exp1 = 0;
      // 6 entries (not a power of two)
      hp = $urandom_range(0, 2*D2-1);
      n  = $urandom_range(0, D2);
      h2 = 4'(hp);
      l2 = 4'((hp + n) % (2*D2));
      ex2 = 6'($urandom);
      exp2 = 1;
      for (int k = 0; k < n; k++) if (!ex2[(hp + k) % D2]) exp2 = 0;
      #1;
      checks += 2;
      if (o1 !== 1'(exp1)) begin failures++; $display("64: head %0d load %0d got %0d", h1, l1, o1); end
      if (o2 !== 1'(exp2)) begin failures++; $display("6: head %0d load %0d got %0d", h2, l2, o2); end
      if (exp1 == 1) ones++; else zeros++;
    end
    checks++;
    if (ones == 0 || zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
