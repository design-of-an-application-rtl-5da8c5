// Self-checking testbench of the RLE zero counter: feeds random sparse
// blocks one coefficient per cycle and compares the (run, level, last)
// stream with a reference; checks that at most one pair leaves per cycle and
// the decoding run counter.
module tb_rle_zero_cnt;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        clr = 0, coef_valid = 0, coef_blk_end = 0;
  logic [15:0] coef = '0, pair_level;
  logic        pair_valid, pair_last, flushing;
  logic [14:0] pair_run;
  logic        run_ld = 0, run_dn = 0, run_zero;
  logic [14:0] run_val = '0;

  rle_zero_cnt dut (.clk, .rst_n, .clr, .coef_valid, .coef, .coef_blk_end,
                    .pair_valid, .pair_run, .pair_level, .pair_last, .flushing,
                    .run_ld, .run_val, .run_dn, .run_zero);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] expq [$], gotq [$];
  always @(posedge clk) if (rst_n && pair_valid) gotq.push_back({pair_last, pair_run, pair_level});

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      automatic int len = (b % 3 == 0) ? 64 : 16;
      automatic int run = 0, np = 0;
      automatic int dens = (b % 5 == 0) ? 0 : 25;
      for (int k = 0; k < len; k++) begin
        automatic logic [15:0] c = (($urandom % 100) < dens) ? 16'($urandom_range(1, 999)) : 16'd0;
        if (c != 0) begin expq.push_back({1'b0, 15'(run), c}); run = 0; np++; end
        else run++;
        @(negedge clk); coef_valid = 1; coef = c; coef_blk_end = (k == len - 1);
      end
      if (np == 0) expq.push_back({1'b1, 15'd0, 16'd0});
      else expq[$][31] = 1'b1;
    end
    @(negedge clk); coef_valid = 0; coef_blk_end = 0;
    repeat (3) @(negedge clk);
    check(gotq.size() == expq.size(), $sformatf("pair count %0d vs %0d", gotq.size(), expq.size()));
    begin
      automatic int errs = 0;
      foreach (expq[i]) if (i < gotq.size() && gotq[i] != expq[i]) errs++;
      check(errs == 0, "pair stream");
    end
    // decoding run counter
    @(negedge clk); run_ld = 1; run_val = 3;
    @(negedge clk); run_ld = 0;
    for (int i = 0; i < 3; i++) begin
      check(!run_zero, "run counting down");
      run_dn = 1; @(negedge clk);
    end
    run_dn = 0;
    check(run_zero, "run reaches zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
