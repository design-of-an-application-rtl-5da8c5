// Self-checking testbench of the RLE address counter: walks a turn of
// NBLK blocks for several block lengths and compares position, block base,
// block end and turn end with a counter model.
module tb_rle_addr_cnt;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        clr = 0, inc = 0;
  logic [5:0]  len_m1 = '0, pos;
  logic [15:0] nblk = '0, blk;
  logic [14:0] base;
  logic        blk_end, turn_end;

  rle_addr_cnt dut (.clk, .rst_n, .clr, .inc, .len_m1, .nblk, .pos, .base, .blk, .blk_end, .turn_end);

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

  int lens [3] = '{16, 64, 5};
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (lens[l]) begin
      automatic int n = 0;
      len_m1 = 6'(lens[l] - 1); nblk = 16'(3 + l);
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      for (int b = 0; b < 3 + l; b++) for (int p = 0; p < lens[l]; p++) begin
        // hold inc low on some cycles: the counter must not move
        if (($urandom % 4) == 0) begin inc = 0; @(negedge clk); end
        check(pos == 6'(p) && base == 15'(b * lens[l]) && blk == 16'(b), "position/base");
        check(blk_end == (p == lens[l] - 1), "block end");
        check(turn_end == (p == lens[l] - 1 && b == 2 + l), "turn end");
        inc = 1; @(negedge clk); inc = 0;
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
