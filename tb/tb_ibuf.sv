// Self-checking testbench of iBuf: both halves written and read from both
// ports, host and RLE pointers moving independently, and the full flags of
// the encoding (iBuf_Full / release) and decoding (release / MB_done) flows.
module tb_ibuf;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        h_we = 0, h_re = 0, h_full = 0, h_done = 0, r_we = 0, r_re = 0, r_release = 0;
  logic [5:0]  h_addr = '0, r_addr = '0;
  logic [15:0] h_wdata = '0, r_wdata = '0, h_rdata, r_rdata;
  logic [1:0]  full;
  logic        h_sel, r_sel;

  ibuf #(.WORDS(64)) dut (.clk, .rst_n, .h_we, .h_re, .h_addr, .h_wdata, .h_rdata, .h_full, .h_done,
                          .r_we, .r_re, .r_addr, .r_wdata, .r_rdata, .r_release, .full, .h_sel, .r_sel);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(full == 0 && !h_sel && !r_sel, "reset state");
    // host fills half 0
    for (int i = 0; i < 64; i++) begin @(negedge clk); h_we = 1; h_addr = 6'(i); h_wdata = 16'(i * 7 + 1); end
    @(negedge clk); h_we = 0; h_full = 1;
    @(negedge clk); h_full = 0;
    check(full == 2'b01 && h_sel && !r_sel, "iBuf_Full sets half 0, host moves on");
    // host writes half 1 while the RLE reads half 0
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); h_we = 1; h_addr = 6'(i); h_wdata = 16'(1000 + i); r_re = 1; r_addr = 6'(63 - i);
      @(negedge clk); h_we = 0; r_re = 0;
      check(r_rdata == 16'((63 - i) * 7 + 1), "RLE reads half 0");
    end
    @(negedge clk); r_release = 1;
    @(negedge clk); r_release = 0;
    check(full == 2'b00 && r_sel, "release clears half 0, RLE moves on");
    // decoding: RLE writes half 1 and marks it full, host reads and MB_done
    for (int i = 0; i < 64; i++) begin @(negedge clk); r_we = 1; r_addr = 6'(i); r_wdata = 16'(5000 - i); end
    @(negedge clk); r_we = 0; r_release = 1;
    @(negedge clk); r_release = 0;
    check(full == 2'b10 && !r_sel, "RLE release marks half 1 full");
    for (int i = 0; i < 64; i += 5) begin
      @(negedge clk); h_re = 1; h_addr = 6'(i);
      @(negedge clk); h_re = 0;
      check(h_rdata == 16'(5000 - i), "host reads half 1");
    end
    @(negedge clk); h_done = 1;
    @(negedge clk); h_done = 0;
    check(full == 2'b00 && !h_sel, "MB_done empties half 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
