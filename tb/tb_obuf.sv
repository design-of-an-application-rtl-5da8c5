// Self-checking testbench of oBuf: the two-SRAM arrangement in wide and
// narrow mode on the STP port (16-bit writes to either SRAM, zero-extended
// 16-bit reads, 32-bit reads), RLE-side 32-bit entries, and the NZR registers
// and half pointers of both sides.
module tb_obuf;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        r_we = 0, r_re = 0, r_done = 0, r_release = 0;
  logic [4:0]  r_addr = '0;
  logic [31:0] r_wdata = '0, r_rdata, s_wdata = '0, s_rdata;
  logic [15:0] r_count = '0, s_count = '0;
  logic        s_wide = 1, s_we = 0, s_re = 0, s_switch = 0, s_set = 0, s_clr = 0;
  logic [5:0]  s_addr = '0;
  logic [1:0]  nzr_flag;
  logic [15:0] nzr_cnt [2];
  logic        r_sel, s_sel;

  obuf #(.WORDS(32)) dut (.clk, .rst_n, .r_we, .r_re, .r_addr, .r_wdata, .r_rdata, .r_done, .r_count,
    .r_release, .s_wide, .s_we, .s_re, .s_addr, .s_wdata, .s_rdata, .s_switch, .s_set, .s_clr,
    .s_count, .nzr_flag, .nzr_cnt, .r_sel, .s_sel);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic sread(bit wide, int a, output logic [31:0] d);
    @(negedge clk); s_re = 1; s_wide = wide; s_addr = 6'(a);
    @(negedge clk); s_re = 0; d = s_rdata;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // RLE writes entries into half 0, completes the turn
    for (int i = 0; i < 10; i++) begin @(negedge clk); r_we = 1; r_addr = 5'(i); r_wdata = {16'(i), 16'(100 + i)}; end
    @(negedge clk); r_we = 0; r_done = 1; r_count = 10;
    @(negedge clk); r_done = 0;
    check(nzr_flag == 2'b01 && nzr_cnt[0] == 10 && r_sel, "NZR set by the RLE");
    for (int i = 0; i < 10; i++) begin
      sread(1, i, d);     check(d == {16'(i), 16'(100 + i)}, "wide read");
      sread(0, 2 * i, d); check(d == {16'h0, 16'(i)}, "narrow read upper SRAM");
      sread(0, 2 * i + 1, d); check(d == {16'h0, 16'(100 + i)}, "narrow read lower SRAM");
    end
    // narrow writes go to one SRAM only
    @(negedge clk); s_we = 1; s_wide = 0; s_addr = 6'd6; s_wdata = 32'hDEAD_BEEF;
    @(negedge clk); s_we = 0;
    sread(1, 3, d); check(d == {16'hBEEF, 16'd103}, "narrow write to the upper SRAM");
    @(negedge clk); s_we = 1; s_wide = 0; s_addr = 6'd7; s_wdata = 32'h0000_1234;
    @(negedge clk); s_we = 0;
    sread(1, 3, d); check(d == 32'hBEEF_1234, "narrow write to the lower SRAM");
    // STP clears NZR and switches; writes half 1 wide, sets NZR
    @(negedge clk); s_clr = 1; @(negedge clk); s_clr = 0; s_switch = 1; @(negedge clk); s_switch = 0;
    check(nzr_flag == 2'b00 && s_sel, "STP cleared NZR and switched");
    @(negedge clk); s_we = 1; s_wide = 1; s_addr = 6'd0; s_wdata = 32'h1111_2222;
    @(negedge clk); s_we = 0; s_set = 1; s_count = 1;
    @(negedge clk); s_set = 0;
    check(nzr_flag == 2'b10 && nzr_cnt[1] == 1, "NZR set by the STP");
    @(negedge clk); r_re = 1; r_addr = 0;
    @(negedge clk); r_re = 0;
    check(r_rdata == 32'h1111_2222, "RLE reads the STP's entry");
    @(negedge clk); r_release = 1; @(negedge clk); r_release = 0;
    check(nzr_flag == 2'b00 && !r_sel, "RLE reset nxt_NZR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
