// tb_num_sync_counter: drives random increments and decrements (never more
// than the count) into an 8-bit num-sync counter and compares count and zero
// flag with an integer model every cycle.
module tb_num_sync_counter;
  logic clk = 0, rst_n = 0;
  logic [1:0] inc;
  logic [7:0] dec, cnt;
  logic zero;
  int model = 0, checks = 0, failures = 0, zeros = 0;

  num_sync_counter #(.W(8), .INC_W(2), .DEC_W(8)) dut (
    .clk, .rst_n, .inc_i(inc), .dec_i(dec), .count_o(cnt), .zero_o(zero));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 0; dec = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      checks++;
      if (cnt !== 8'(model) || zero !== (model == 0)) begin
        failures++;
        $display("cycle %0d: count %0d zero %0d, model %0d", c, cnt, zero, model);
      end
      if (model == 0) zeros++;
      inc = (model > 240) ? 2'd0 : 2'($urandom_range(0, 3));
      // phases: fill up, then drain in bursts like a squash
      if (c % 400 < 300) dec = (model > 0 && $urandom_range(0, 3) == 0) ? 8'd1 : 8'd0;
      else dec = 8'($urandom_range(0, model + int'(inc)));
      model = model + int'(inc) - int'(dec);
    end
    checks++;
    if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
