// Self-checking testbench of the command decoder: every host address region
// and register command, and the read-data multiplexer with its one-cycle
// latency.
module tb_cmd_dec;
  import bsp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [19:0] h_addr = '0;
  logic        h_we = 0, h_re = 0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic        im_we, ib_we, ib_re, ib_full, ib_done, pb_we, pb_re, cmd_set, jump, int_ack;
  logic [9:0]  im_addr, pb_addr;
  logic        dm_we;
  logic [11:0] dm_addr;
  logic [14:0] ib_addr;
  logic [15:0] ib_rdata = 16'hABCD;
  logic [31:0] pb_rdata = 32'h1234_5678, status = 32'h5555;
  logic [7:0]  int_pending = 8'h21;
  logic [5:0]  buf_status = 6'h2A;

  cmd_dec dut (.clk, .rst_n, .h_addr, .h_we, .h_re, .h_wdata, .h_rdata, .im_we, .im_addr, .dm_we, .dm_addr,
    .ib_we, .ib_re, .ib_addr, .ib_rdata, .ib_full, .ib_done, .pb_we, .pb_re, .pb_addr, .pb_rdata,
    .cmd_set, .jump, .int_ack, .status, .int_pending, .buf_status);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic rd(logic [19:0] a, logic [31:0] e, string what);
    @(negedge clk); h_re = 1; h_addr = a;
    @(negedge clk); h_re = 0; h_addr = '0;
    check(h_rdata == e, what);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); h_we = 1; h_addr = 20'h0_0123; h_wdata = 32'h1;
    #1 check(im_we && im_addr == 10'h123 && !ib_we && !pb_we, "instruction memory write");
    h_addr = 20'h4_0abc;
    #1 check(dm_we && dm_addr == 12'habc && !im_we, "data memory write");
    h_addr = 20'h1_4567;
    #1 check(ib_we && ib_addr == 15'h4567 && !im_we, "iBuf write");
    h_addr = 20'h2_0011;
    #1 check(pb_we && pb_addr == 10'h11, "pBuf write");
    h_addr = {HR_REG, 12'h0, HG_SYSCMD};
    #1 check(cmd_set && !jump, "system command");
    h_addr = {HR_REG, 12'h0, HG_IBUF}; h_wdata = 32'h1;
    #1 check(ib_full && !ib_done, "iBuf_Full");
    h_wdata = 32'h2;
    #1 check(!ib_full && ib_done, "MB_done");
    h_addr = {HR_REG, 12'h0, HG_JUMP};
    #1 check(jump && !cmd_set, "JUMP");
    h_addr = {HR_REG, 12'h0, HG_INT_ACK};
    #1 check(int_ack, "interrupt acknowledge");
    @(negedge clk); h_we = 0;
    rd(20'h1_0005, 32'hABCD, "iBuf read");
    rd(20'h2_0005, 32'h1234_5678, "pBuf read");
    rd({HR_REG, 12'h0, HG_STATUS}, 32'h5555, "status read");
    rd({HR_REG, 12'h0, HG_INT}, 32'h21, "pending read");
    rd({HR_REG, 12'h0, HG_IBUF_ST}, 32'h2A, "buffer status read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
