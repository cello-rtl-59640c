// tb_region_flags: random self-checking test of the per-thread region flags.
// A reference model in the testbench tracks each flag through setDRF at
// allocation, squash restore and context-switch restore (with their
// priorities) and checks the flags and the mode given to each allocation
// group every cycle, with CELLO enabled and disabled.
module tb_region_flags;
  import cello_pkg::*;
  localparam int T = 2;

  logic clk = 0, rst_n = 0;
  logic drf_en, al_v, sd_v, sd_val, sq_v, ctx_v, ctx_f;
  logic [0:0] al_t, sq_t, ctx_t;
  mode_e sq_m, mode;
  logic [T-1:0] flags, ref_flags;
  int checks = 0, failures = 0;

  region_flags #(.THREADS(T)) dut (
    .clk, .rst_n, .drf_enable_i(drf_en),
    .alloc_valid_i(al_v), .alloc_thread_i(al_t), .setdrf_valid_i(sd_v), .setdrf_val_i(sd_val),
    .alloc_mode_o(mode), .squash_valid_i(sq_v), .squash_thread_i(sq_t), .squash_mode_i(sq_m),
    .ctx_wr_valid_i(ctx_v), .ctx_wr_thread_i(ctx_t), .ctx_wr_flag_i(ctx_f), .flag_o(flags));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_flag;
    {drf_en, al_v, sd_v, sd_val, sq_v, ctx_v, ctx_f, al_t, sq_t, ctx_t} = '0;
    sq_m = MODE_SYNC;
    ref_flags = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    if (flags !== 2'b00) failures++;
    checks++;
    for (int c = 0; c < 3000; c++) begin
      drf_en = (c < 2500) ? 1'b1 : 1'($urandom_range(0, 1));
      al_v   = 1'($urandom_range(0, 1));
      al_t   = 1'($urandom_range(0, 1));
      sd_v   = ($urandom_range(0, 3) == 0);
      sd_val = 1'($urandom_range(0, 1));
      sq_v   = ($urandom_range(0, 9) == 0);
      sq_t   = 1'($urandom_range(0, 1));
      sq_m   = mode_e'($urandom_range(0, 1));
      ctx_v  = ($urandom_range(0, 19) == 0);
      ctx_t  = 1'($urandom_range(0, 1));
      ctx_f  = 1'($urandom_range(0, 1));
      #1;
      exp_flag = sd_v ? sd_val : ref_flags[al_t];
      checks++;
      if (mode !== ((drf_en && exp_flag) ? MODE_DRF : MODE_SYNC)) begin
        failures++;
        $display("cycle %0d: mode %0d expected flag %0d en %0d", c, mode, exp_flag, drf_en);
      end
      @(posedge clk);
      for (int t = 0; t < T; t++) begin
        if (sq_v && sq_t == t) ref_flags[t] = (sq_m == MODE_DRF);
        else if (ctx_v && ctx_t == t) ref_flags[t] = ctx_f;
        else if (al_v && sd_v && al_t == t) ref_flags[t] = sd_val;
      end
      @(negedge clk);
      checks++;
      if (flags !== ref_flags) begin
        failures++;
        $display("cycle %0d: flags %b expected %b", c, flags, ref_flags);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
